// tb_mem_model: behavioural training memory for unit testbenches.
//
// Answers one memory-interface client: a request is granted after a random
// delay of 0-2 cycles (so clients must hold it), read data comes back one
// cycle after the grant with rvalid. Arrays x, a, y are preloaded by the
// testbench through hierarchical references. Writes are counted.
module tb_mem_model
  import svm_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  word_t x [DEPTH];
  word_t a [DEPTH];
  logic  y [DEPTH];
  int    writes = 0;
  int    wait_q = 0;
  logic  pend_q = 1'b0;
  mem_req_t last_q;

  always_comb begin
    rsp = '0;
    rsp.gnt = req.req && (wait_q == 0);
    if (pend_q) begin
      rsp.rvalid = 1'b1;
      unique case (last_q.bank)
        BANK_X: begin rsp.rdata = x[last_q.addr]; rsp.rdata2 = x[last_q.addr2]; end
        BANK_A: rsp.rdata = a[last_q.addr];
        default: rsp.rdata = {15'd0, y[last_q.addr]};
      endcase
    end
  end

  always_ff @(posedge clk) begin
    pend_q <= 1'b0;
    if (req.req) begin
      if (wait_q == 0) begin
        wait_q <= int'($urandom_range(0, 2));
        last_q <= req;
        if (req.we) begin
          writes <= writes + 1;
          unique case (req.bank)
            BANK_X: x[req.addr] <= req.wdata;
            BANK_A: a[req.addr] <= req.wdata;
            default: y[req.addr] <= req.wdata[0];
          endcase
        end else pend_q <= 1'b1;
      end else wait_q <= wait_q - 1;
    end
  end
endmodule
