// tb_three_ones_fsm: drives directed and random bit streams into the
// three-ones detector and compares detect every cycle with a reference that
// counts the length of the current run of 1s (restarting after each
// detection), so a detection is expected on every third 1 of a run.
module tb_three_ones_fsm;
  logic clk = 0, rst, din, detect;
  int checks = 0, failures = 0, detections = 0;
  int run;

  three_ones_fsm dut (.clk, .rst, .din, .detect);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic bitv);
    logic want;
    din = bitv;
    #1;
    want = bitv && (run == 2);
    checks++;
    if (detect !== want) begin
      failures++;
      $display("FAIL din=%b run=%0d detect=%b want %b", bitv, run, detect, want);
    end
    if (detect) detections++;
    @(posedge clk); #1;
    if (!bitv) run = 0;
    else if (run == 2) run = 0;
    else run++;
  endtask

  initial begin
    logic [15:0] pattern;
    rst = 1; din = 0;
    @(posedge clk); #1;
    rst = 0; run = 0;
    pattern = 16'b1101_1100_1111_1101;   // runs of 2, 3, 6 and 1 ones
    for (int i = 15; i >= 0; i--) step(pattern[i]);
    for (int i = 0; i < 2000; i++) step(($urandom_range(0, 3) != 0));
    if (detections < 3) begin failures++; $display("FAIL too few detections"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
