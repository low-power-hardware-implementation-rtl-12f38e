// tb_smo_register_file: random writes with random per-field enables; a model
// of the nine cached values is updated here and compared after every clock;
// clear must zero every field.
`timescale 1ns/1ps
module tb_smo_register_file;
  import svm_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  rf_we_t we = '0;
  rf_t wdata = '0, q, model;
  int checks = 0, failures = 0;

  smo_register_file dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = rf_we_t'($urandom);
      wdata = rf_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      clear = ($urandom_range(0, 50) == 0);
      if (clear) model = '0;
      else begin
        if (we.alpha_i) model.alpha_i = wdata.alpha_i;
        if (we.alpha_j) model.alpha_j = wdata.alpha_j;
        if (we.y_i) model.y_i = wdata.y_i;
        if (we.y_j) model.y_j = wdata.y_j;
        if (we.b) model.b = wdata.b;
        if (we.alpha_i_new) model.alpha_i_new = wdata.alpha_i_new;
        if (we.alpha_j_new) model.alpha_j_new = wdata.alpha_j_new;
        if (we.e_i) model.e_i = wdata.e_i;
        if (we.e_j) model.e_j = wdata.e_j;
      end
      @(posedge clk); #1;
      checks++;
      if (q != model) begin failures++; $display("FAIL: register file mismatch at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
