// tb_mem_model: word memory answering the cpr_pkg memory port, for the
// block testbenches. A request held in one cycle is acknowledged in the
// next, so every access takes two cycles, as through the SRAM selector.
// Writes take effect at the end of the acknowledge cycle. The array is
// public so that a testbench can load and inspect it directly; accesses
// and writes are counted.
module tb_mem_model
  import cpr_pkg::*;
(
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);

  word_t mem [0:(1 << ADDR_W) - 1];
  logic  ack_q = 1'b0;
  int    accesses = 0;

  always_ff @(posedge clk) begin
    ack_q <= (req.re | req.we) && !ack_q;
    if (ack_q) begin
      accesses <= accesses + 1;
      if (req.we) mem[req.addr] <= req.wdata;
    end
  end

  always_comb begin
    rsp.ack   = ack_q;
    rsp.rdata = ack_q ? mem[req.addr] : '0;
  end

endmodule
