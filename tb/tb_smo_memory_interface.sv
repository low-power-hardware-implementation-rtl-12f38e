// tb_smo_memory_interface: four clients issue random reads and writes to the
// three banks of a real smo_main_memory through the interface. Each client
// holds its request until granted; at most one client per bank may be granted
// per cycle, the lowest index first; read data returns to the right client
// one cycle after the grant and matches a model of the memory. Cycles in which
// two banks serve different clients at once are counted and must occur.
`timescale 1ns/1ps
module tb_smo_memory_interface;
  import svm_pkg::*;
  localparam int NC = 4, M = 64, N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mem_req_t req [NC];
  mem_rsp_t rsp [NC];
  logic x_we, a_we, y_we, y_wdata, y_rdata;
  logic [MAXIDX-1:0] x_waddr, x_raddr1, x_raddr2, a_addr, y_addr;
  word_t x_wdata, x_rdata1, x_rdata2, a_wdata, a_rdata;
  int checks = 0, failures = 0, parallel = 0;
  int xm[M*N], am[M], ym[M];

  smo_memory_interface #(.NC(NC)) dut (.*);
  smo_main_memory #(.M(M), .N(N)) mem (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected read data per client, captured at the grant
  int exp1 [NC], exp2 [NC];
  bit pend [NC];
  bit gnt_q [NC];

  function automatic mem_req_t rnd_req(input bit allow_write);
    mem_req_t r;
    r = MEM_REQ_IDLE;
    r.req = 1'b1;
    r.bank = bank_e'($urandom_range(0, 2));
    r.we = allow_write && ($urandom_range(0, 2) == 0);
    r.addr = MAXIDX'(r.bank == BANK_X ? $urandom_range(0, M * N - 1) : $urandom_range(0, M - 1));
    r.addr2 = MAXIDX'($urandom_range(0, M * N - 1));
    r.wdata = word_t'($urandom);
    return r;
  endfunction

  initial begin
    for (int c = 0; c < NC; c++) begin req[c] = MEM_REQ_IDLE; pend[c] = 0; gnt_q[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise memory through client 0
    for (int k = 0; k < M * N; k++) begin
      @(negedge clk);
      req[0] = MEM_REQ_IDLE; req[0].req = 1; req[0].we = 1; req[0].bank = BANK_X;
      req[0].addr = MAXIDX'(k); xm[k] = k * 7 - 300; req[0].wdata = word_t'(xm[k]);
      req[1] = MEM_REQ_IDLE;
      if (k < M) begin
        req[1].req = 1; req[1].we = 1; req[1].bank = BANK_A; req[1].addr = MAXIDX'(k);
        am[k] = 1000 - k; req[1].wdata = word_t'(am[k]);
        req[2] = MEM_REQ_IDLE; req[2].req = 1; req[2].we = 1; req[2].bank = BANK_Y;
        req[2].addr = MAXIDX'(k); ym[k] = k % 2; req[2].wdata = word_t'(ym[k]);
      end else req[2] = MEM_REQ_IDLE;
      #1;
      checks++;
      if (!rsp[0].gnt || (k < M && (!rsp[1].gnt || !rsp[2].gnt))) begin failures++; $display("FAIL: init grant"); end
    end
    @(negedge clk);
    for (int c = 0; c < NC; c++) req[c] = MEM_REQ_IDLE;
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int granted_banks[3];
      @(negedge clk);
      // read data granted in the previous cycle must be returned now
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (pend[c]) begin
          if (!rsp[c].rvalid || int'(rsp[c].rdata) != exp1[c] || int'(rsp[c].rdata2) != exp2[c]) begin
            failures++; $display("FAIL: read data client %0d got %0d exp %0d", c, rsp[c].rdata, exp1[c]);
          end
          pend[c] = 0;
        end else if (rsp[c].rvalid) begin
          failures++; $display("FAIL: spurious rvalid %0d", c);
        end
      end
      // granted requests are withdrawn, free clients may issue new ones
      for (int c = 0; c < NC; c++) begin
        if (gnt_q[c]) req[c] = MEM_REQ_IDLE;
        if (!req[c].req && $urandom_range(0, 1)) req[c] = rnd_req(1);
      end
      #1;
      foreach (granted_banks[b]) granted_banks[b] = 0;
      for (int c = 0; c < NC; c++) begin
        bit lower_same_bank;
        lower_same_bank = 0;
        for (int l = 0; l < c; l++) if (req[l].req && req[l].bank == req[c].bank) lower_same_bank = 1;
        checks++;
        if (req[c].req && (rsp[c].gnt == lower_same_bank)) begin
          failures++; $display("FAIL: grant of client %0d req=%p gnt=%b lower=%0d t=%0t", c, req[c], rsp[c].gnt, lower_same_bank, $time);
        end
        if (rsp[c].gnt) granted_banks[req[c].bank]++;
        gnt_q[c] = rsp[c].gnt;
      end
      if ((granted_banks[0] > 0) + (granted_banks[1] > 0) + (granted_banks[2] > 0) >= 2) parallel++;
      for (int c = 0; c < NC; c++) if (rsp[c].gnt) begin
        if (req[c].we) begin
          unique case (req[c].bank)
            BANK_X: xm[req[c].addr] = int'(req[c].wdata);
            BANK_A: am[req[c].addr] = int'(req[c].wdata);
            default: ym[req[c].addr] = int'(req[c].wdata[0]);
          endcase
        end else begin
          pend[c] = 1;
          exp2[c] = 0;
          unique case (req[c].bank)
            BANK_X: begin exp1[c] = xm[req[c].addr]; exp2[c] = xm[req[c].addr2]; end
            BANK_A: exp1[c] = am[req[c].addr];
            default: exp1[c] = ym[req[c].addr];
          endcase
        end
      end
    end
    checks++;
    if (parallel == 0) begin failures++; $display("FAIL: banks never served in parallel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
