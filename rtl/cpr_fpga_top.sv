// cpr_fpga_top: the FPGA of the circular pattern recognition system.
//
// A PC loads a binary edge image (up to 256x256 pixels, 16 pixels per
// 16-bit word, see cpr_pkg) into the two external SRAMs through the PCI9052
// local bus, accesses word 13843 to reset and 13844 to start the recognition
// circuit, and polls words 13845 .. 13850 for N, n, r, q, p and out_ena. The
// recognition circuit finds the centre (p, q) and radius r of the best
// matching circle with a coarse-to-fine search (see recognition_circuit).
//
// Contents (as in the document's system figure): the local clock generator
// halves the 33 MHz PCI clock to the 16.5 MHz circuit clock, the interface
// block owns the local bus and the SRAM pins, and the recognition circuit
// reaches the SRAMs through the interface block. The local bus signals are
// sampled on the divided clock, which is brought out as local_clk (this
// design's choice; the document does not give the bus timing). Bidirectional
// pins are split into data in, data out and drive enable. sys_rst is a board
// reset, synchronous to pci_clk and long enough to cover two pci_clk cycles.
module cpr_fpga_top
  import cpr_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic       pci_clk,
  input  logic       sys_rst,
  output logic       local_clk,
  // PCI9052 local bus
  input  addr_t      local_addr,
  input  logic       local_rd,
  input  logic       local_wr,
  input  word_t      local_wdata,
  output word_t      local_rdata,
  output logic       local_rdata_oe,
  output logic       local_ready,
  // SRAM1 (low byte)
  output addr_t      sram1_addr,
  output logic       sram1_re,
  output logic       sram1_we,
  output logic [7:0] sram1_dout,
  output logic       sram1_doe,
  input  logic [7:0] sram1_din,
  // SRAM2 (high byte)
  output addr_t      sram2_addr,
  output logic       sram2_re,
  output logic       sram2_we,
  output logic [7:0] sram2_dout,
  output logic       sram2_doe,
  input  logic [7:0] sram2_din
);

  logic               clk;
  logic               rc_rst, rc_ena, rc_out_ena;
  logic [LEVELS+4:0]  rc_p, rc_q, rc_r;
  word_t              rc_n, rc_nn;
  mem_req_t           rc_mem_req;
  mem_rsp_t           rc_mem_rsp;

  local_clock_gen u_clkgen (.pci_clk, .rst(sys_rst), .clk_out(clk));
  assign local_clk = clk;

  interface_block #(.LEVELS(LEVELS)) u_if (
    .clk, .sys_rst,
    .local_addr, .local_rd, .local_wr, .local_wdata, .local_rdata, .local_rdata_oe, .local_ready,
    .rc_rst, .rc_ena, .rc_out_ena, .rc_p, .rc_q, .rc_r, .rc_n, .rc_nn,
    .rc_mem_req, .rc_mem_rsp,
    .sram1_addr, .sram1_re, .sram1_we, .sram1_dout, .sram1_doe, .sram1_din,
    .sram2_addr, .sram2_re, .sram2_we, .sram2_dout, .sram2_doe, .sram2_din
  );

  recognition_circuit #(.LEVELS(LEVELS)) u_rc (
    .clk, .rst(rc_rst), .ena(rc_ena), .out_ena(rc_out_ena),
    .p(rc_p), .q(rc_q), .r(rc_r), .n(rc_n), .nn(rc_nn),
    .mem_req(rc_mem_req), .mem_rsp(rc_mem_rsp)
  );

endmodule
