// tb_truncated_multiplier: compares the truncated multiplier with the
// independent model in tb_ref_pkg (exact product minus the dropped low
// columns) on corner and random operands, and checks that the truncation
// error against the exact product stays within 2 LSB.
`timescale 1ns/1ps
module tb_truncated_multiplier;
  import tb_ref_pkg::*;
  logic signed [15:0] a, b, p;
  int checks = 0, failures = 0;

  truncated_multiplier dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int x, input int y);
    int e;
    longint exact;
    a = 16'(x); b = 16'(y);
    #1;
    e = tm_ref(x, y);
    checks++;
    if (int'(p) != e) begin failures++; $display("FAIL: %0d * %0d = %0d, expected %0d", x, y, p, e); end
    exact = (longint'(x) * longint'(y)) / 256;
    if (exact > -32768 && exact < 32767) begin
      checks++;
      if (int'(p) - exact > 2 || exact - int'(p) > 2) begin
        failures++; $display("FAIL: error too large %0d vs %0d", p, exact);
      end
    end
  endtask

  initial begin
    one(0, 0); one(256, 256); one(-256, 256); one(-256, -256); one(32767, 32767);
    one(-32768, 256); one(384, -640); one(1, 1); one(255, 255); one(-1, 300);
    for (int i = 0; i < 3000; i++) one(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    for (int i = 0; i < 3000; i++) one(int'($urandom_range(0, 2048)) - 1024, int'($urandom_range(0, 2048)) - 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
