// interface_block: connects the PCI9052 local bus, the two external SRAMs
// and the recognition circuit.
//
// Seen from the PCI9052 the FPGA is a 15-bit word-addressed memory:
//   0 .. 13842      external SRAM (image and work area), through selector 2
//   13843           reset of the recognition circuit, reads back 1111h
//   13844           enable (start) of the recognition circuit, reads 2222h
//   13845 .. 13850  outputs N, n, r, q, p, out_ena of the recognition circuit
// The address map and the two acknowledge words are the document's; the
// order of the six outputs follows the inputs of the output multiplexer in
// the interface-block figure, left to right, which is this design's reading.
//
// Parts: an address decoder splits SRAM from register accesses. Selector 1
// is a two-state machine for register accesses: in the cycle that accepts
// the access it issues the reset pulse (13843) or sets the enable (13844),
// and in the next cycle it answers ready with 1111h, 2222h or the
// multiplexed output value as local data 1. Selector 2 (sram_selector)
// serves SRAM accesses and returns local data 2. A final selector returns
// local data 2 when selector 2 answers, else local data 1; the read data
// drive enable is high while either answers a read.
//
// Local bus handshake (this design's own, the document does not give the
// PCI9052 signals): the bus holds local_rd or local_wr, with local_addr and
// local_wdata, until local_ready is high for one cycle, and drops the
// request after that cycle. Writes to register addresses act like reads and
// ignore the data. Addresses above 13850 answer 0. The enable stays set until
// the next reset access; sys_rst clears everything. All on one clock.
module interface_block
  import cpr_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic               clk,
  input  logic               sys_rst,
  // PCI9052 local bus
  input  addr_t              local_addr,
  input  logic               local_rd,
  input  logic               local_wr,
  input  word_t              local_wdata,
  output word_t              local_rdata,
  output logic               local_rdata_oe,
  output logic               local_ready,
  // recognition circuit
  output logic               rc_rst,
  output logic               rc_ena,
  input  logic               rc_out_ena,
  input  logic [LEVELS+4:0]  rc_p,
  input  logic [LEVELS+4:0]  rc_q,
  input  logic [LEVELS+4:0]  rc_r,
  input  word_t              rc_n,
  input  word_t              rc_nn,
  input  mem_req_t           rc_mem_req,
  output mem_rsp_t           rc_mem_rsp,
  // SRAM1 (low byte) and SRAM2 (high byte)
  output addr_t              sram1_addr,
  output logic               sram1_re,
  output logic               sram1_we,
  output logic [7:0]         sram1_dout,
  output logic               sram1_doe,
  input  logic [7:0]         sram1_din,
  output addr_t              sram2_addr,
  output logic               sram2_re,
  output logic               sram2_we,
  output logic [7:0]         sram2_dout,
  output logic               sram2_doe,
  input  logic [7:0]         sram2_din
);

  // Address decoder.
  logic is_sram, access;
  assign is_sram = (local_addr < ADDR_RST);
  assign access  = local_rd | local_wr;

  // Output multiplexer of the recognition results.
  word_t out_mux;
  always_comb begin
    unique case (local_addr)
      ADDR_OUT_N:   out_mux = rc_nn;
      ADDR_OUT_SN:  out_mux = rc_n;
      ADDR_OUT_R:   out_mux = word_t'(rc_r);
      ADDR_OUT_Q:   out_mux = word_t'(rc_q);
      ADDR_OUT_P:   out_mux = word_t'(rc_p);
      ADDR_OUT_ENA: out_mux = word_t'(rc_out_ena);
      default:      out_mux = '0;
    endcase
  end

  // Selector 1 (register accesses).
  typedef enum logic {S1_IDLE, S1_RESP} s1_state_t;
  s1_state_t s1_state;
  word_t     local_data1;
  logic      tri_ena1;
  logic      rst_pulse, ena_q;

  always_ff @(posedge clk) begin
    if (sys_rst) begin
      s1_state    <= S1_IDLE;
      local_data1 <= '0;
      rst_pulse   <= 1'b0;
      ena_q       <= 1'b0;
    end else begin
      rst_pulse <= 1'b0;
      unique case (s1_state)
        S1_IDLE: if (access && !is_sram) begin
          if (local_addr == ADDR_RST) begin
            rst_pulse   <= 1'b1;
            ena_q       <= 1'b0;
            local_data1 <= RST_ACK_WORD;
          end else if (local_addr == ADDR_ENA) begin
            ena_q       <= 1'b1;
            local_data1 <= ENA_ACK_WORD;
          end else begin
            local_data1 <= out_mux;
          end
          s1_state <= S1_RESP;
        end
        S1_RESP: s1_state <= S1_IDLE;
        default: s1_state <= S1_IDLE;
      endcase
    end
  end

  assign tri_ena1 = (s1_state == S1_RESP) && local_rd;
  assign rc_rst   = sys_rst | rst_pulse;
  assign rc_ena   = ena_q;

  // Selector 2 (SRAM accesses).
  mem_req_t pci_req;
  mem_rsp_t pci_rsp;
  logic     tri_ena2;

  always_comb begin
    pci_req       = '0;
    pci_req.re    = local_rd && is_sram;
    pci_req.we    = local_wr && is_sram;
    pci_req.addr  = local_addr;
    pci_req.wdata = local_wdata;
  end

  sram_selector u_selector2 (
    .clk, .rst(sys_rst),
    .rc_req(rc_mem_req), .rc_rsp(rc_mem_rsp),
    .pci_req, .pci_rsp,
    .sram1_addr, .sram1_re, .sram1_we, .sram1_dout, .sram1_doe, .sram1_din,
    .sram2_addr, .sram2_re, .sram2_we, .sram2_dout, .sram2_doe, .sram2_din
  );

  assign tri_ena2 = pci_rsp.ack && local_rd;

  // Final selector towards the local data bus.
  assign local_rdata    = tri_ena2 ? pci_rsp.rdata : local_data1;
  assign local_rdata_oe = tri_ena1 | tri_ena2;
  assign local_ready    = (s1_state == S1_RESP) | pci_rsp.ack;

endmodule
