// tb_classifier_rom: writes random words to every address, then random reads
// must return the stored word exactly one cycle after the address; a write
// to one address must not disturb others.
`timescale 1ns/1ps
module tb_classifier_rom;
  localparam int DW = 16, DEPTH = 15, AW = 4;
  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] raddr = 0, waddr = 0;
  logic [DW-1:0] rdata, wdata = 0;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  classifier_rom #(.DW(DW), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      we = 1; waddr = AW'(k); wdata = DW'($urandom); model[k] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      int ra;
      ra = $urandom_range(0, DEPTH - 1);
      we = ($urandom_range(0, 3) == 0);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      if (waddr == AW'(ra)) we = 0;
      wdata = DW'($urandom);
      raddr = AW'(ra);
      @(negedge clk);
      if (we) model[waddr] = wdata;
      we = 0;
      checks++;
      if (rdata != model[ra]) begin failures++; $display("FAIL: addr %0d got %h exp %h", ra, rdata, model[ra]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
