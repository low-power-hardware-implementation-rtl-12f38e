// smo_memory_interface: shares the three training-memory banks among clients.
//
// Each client (host loader, processing-unit controller, kernel unit, learned
// function unit) presents a mem_req_t and holds it until gnt. Arbitration is
// done per bank with fixed priority (lowest client index wins), so clients
// that use different banks are served in the same cycle - this is where the
// source design's "memory access parallelism" comes from; the policy itself
// is this design's choice. Read data (rdata, and rdata2 for the second X read
// port) return to the granted client with rvalid one cycle after the grant.
// Writes complete at the grant. Accesses to the alpha and label banks use
// addr as the point index.
module smo_memory_interface
  import svm_pkg::*;
#(
  parameter int unsigned NC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_req_t          req [NC],
  output mem_rsp_t          rsp [NC],
  // to smo_main_memory
  output logic              x_we,
  output logic [MAXIDX-1:0] x_waddr,
  output word_t             x_wdata,
  output logic [MAXIDX-1:0] x_raddr1,
  output logic [MAXIDX-1:0] x_raddr2,
  input  word_t             x_rdata1,
  input  word_t             x_rdata2,
  output logic              a_we,
  output logic [MAXIDX-1:0] a_addr,
  output word_t             a_wdata,
  input  word_t             a_rdata,
  output logic              y_we,
  output logic [MAXIDX-1:0] y_addr,
  output logic              y_wdata,
  input  logic              y_rdata
);
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1;

  logic [NC-1:0] gnt;
  logic [2:0]    bank_busy;
  logic [CW-1:0] sel [3];
  logic [2:0]    rd_pend_q;          // a read is returning from bank b
  logic [CW-1:0] rd_cli_q [3];

  always_comb begin
    gnt       = '0;
    bank_busy = '0;
    for (int b = 0; b < 3; b++) sel[b] = '0;
    for (int c = 0; c < NC; c++) begin
      if (req[c].req && !bank_busy[req[c].bank]) begin
        gnt[c]               = 1'b1;
        bank_busy[req[c].bank] = 1'b1;
        sel[req[c].bank]     = CW'(c);
      end
    end
  end

  always_comb begin
    mem_req_t rx, ra, ry;
    rx = req[sel[BANK_X]];
    ra = req[sel[BANK_A]];
    ry = req[sel[BANK_Y]];
    x_we     = bank_busy[BANK_X] && rx.we;
    x_waddr  = rx.addr;
    x_wdata  = rx.wdata;
    x_raddr1 = rx.addr;
    x_raddr2 = rx.addr2;
    a_we     = bank_busy[BANK_A] && ra.we;
    a_addr   = ra.addr;
    a_wdata  = ra.wdata;
    y_we     = bank_busy[BANK_Y] && ry.we;
    y_addr   = ry.addr;
    y_wdata  = ry.wdata[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend_q <= '0;
      for (int b = 0; b < 3; b++) rd_cli_q[b] <= '0;
    end else begin
      for (int b = 0; b < 3; b++) begin
        rd_pend_q[b] <= bank_busy[b] && !req[sel[b]].we;
        rd_cli_q[b]  <= sel[b];
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      rsp[c]        = '0;
      rsp[c].gnt    = gnt[c];
    end
    if (rd_pend_q[BANK_X]) begin
      rsp[rd_cli_q[BANK_X]].rvalid = 1'b1;
      rsp[rd_cli_q[BANK_X]].rdata  = x_rdata1;
      rsp[rd_cli_q[BANK_X]].rdata2 = x_rdata2;
    end
    if (rd_pend_q[BANK_A]) begin
      rsp[rd_cli_q[BANK_A]].rvalid = 1'b1;
      rsp[rd_cli_q[BANK_A]].rdata  = a_rdata;
    end
    if (rd_pend_q[BANK_Y]) begin
      rsp[rd_cli_q[BANK_Y]].rvalid = 1'b1;
      rsp[rd_cli_q[BANK_Y]].rdata  = {{(W-1){1'b0}}, y_rdata};
    end
  end

  // a client must keep its request until it is granted
  for (genvar c = 0; c < NC; c++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      req[c].req && !gnt[c] |=> req[c].req);
  end
endmodule
