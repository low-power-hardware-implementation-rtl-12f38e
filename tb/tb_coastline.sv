// tb_coastline: feeds random epochs of varying length and checks the
// coastline (sum of absolute first differences) and its one-cycle latency.
`timescale 1ns/1ps
module tb_coastline;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [7:0] sample = 0;
  logic sample_valid = 0, epoch_end = 0, cl_valid;
  logic [19:0] cl;
  int checks = 0, failures = 0;

  coastline dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic epoch(input int len, input int amp);
    int ref_cl = 0, prev = 0;
    for (int n = 0; n < len; n++) begin
      int v;
      v = int'($urandom_range(0, 2 * amp)) - amp;
      if (n > 0) ref_cl += (v > prev) ? v - prev : prev - v;
      prev = v;
      if ($urandom_range(0, 3) == 0) begin   // idle cycle inside the epoch
        @(negedge clk);
        sample = 8'($urandom); sample_valid = 0; epoch_end = 1;
      end
      @(negedge clk);
      sample = 8'(v); sample_valid = 1; epoch_end = (n == len - 1);
    end
    @(negedge clk);
    sample_valid = 0; epoch_end = 0;
    checks++;
    if (!cl_valid || cl != 20'(ref_cl)) begin
      failures++; $display("FAIL: cl=%0d valid=%0d expected %0d", cl, cl_valid, ref_cl);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    epoch(256, 3); epoch(256, 127); epoch(256, 127); epoch(10, 50); epoch(2, 100);
    for (int i = 0; i < 20; i++) epoch(int'($urandom_range(2, 300)), int'($urandom_range(0, 127)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
