// sram_selector: "selector 2" of the interface block, a small state machine
// that connects the two external asynchronous SRAMs either to the PCI9052
// local bus or to the recognition circuit.
//
// The two 8-bit SRAMs share address, read enable and write enable and act as
// one 16-bit word (SRAM1 = bits 7:0, SRAM2 = bits 15:8). Each side presents
// a cpr_pkg memory request and holds it until ack. In IDLE the selector
// grants a pending request, alternating the priority between the two sides
// when both wait (this arbitration rule is this design's choice; the
// document only says that the selector connects the SRAMs to whichever side
// needs them). The grant registers address, enables and write data onto the
// SRAM pins; in the following ACCESS cycle the SRAMs' read data is returned
// with ack, and at the end of that cycle the enables drop while the address
// and write data stay, so a write ends with stable address and data.
// Every access therefore takes two clock cycles (60 ns at 16.5 MHz, against
// the 7.5 ns SRAM access time).
//
// The bidirectional SRAM data pins are split into dout (to the SRAM), doe
// (drive enable) and din (from the SRAM); a pad would join them.
module sram_selector
  import cpr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   rc_req,
  output mem_rsp_t   rc_rsp,
  input  mem_req_t   pci_req,
  output mem_rsp_t   pci_rsp,
  // SRAM1 (low byte) and SRAM2 (high byte)
  output addr_t      sram1_addr,
  output logic       sram1_re,
  output logic       sram1_we,
  output logic [7:0] sram1_dout,
  output logic       sram1_doe,
  input  logic [7:0] sram1_din,
  output addr_t      sram2_addr,
  output logic       sram2_re,
  output logic       sram2_we,
  output logic [7:0] sram2_dout,
  output logic       sram2_doe,
  input  logic [7:0] sram2_din
);

  typedef enum logic {S_IDLE, S_ACCESS} state_t;

  state_t state;
  logic   grant_pci;      // side served by the current access
  logic   last_pci;       // side served last, for alternating priority
  logic   rc_pend, pci_pend, pick_pci;
  addr_t  addr_q;
  logic   re_q, we_q;
  word_t  wdata_q;
  word_t  rdata;

  assign rc_pend  = rc_req.re  | rc_req.we;
  assign pci_pend = pci_req.re | pci_req.we;
  assign pick_pci = pci_pend && (!rc_pend || !last_pci);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      grant_pci <= 1'b0;
      last_pci  <= 1'b0;
      addr_q    <= '0;
      re_q      <= 1'b0;
      we_q      <= 1'b0;
      wdata_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rc_pend || pci_pend) begin
          grant_pci <= pick_pci;
          last_pci  <= pick_pci;
          addr_q    <= pick_pci ? pci_req.addr  : rc_req.addr;
          re_q      <= pick_pci ? pci_req.re    : rc_req.re;
          we_q      <= pick_pci ? pci_req.we    : rc_req.we;
          wdata_q   <= pick_pci ? pci_req.wdata : rc_req.wdata;
          state     <= S_ACCESS;
        end
        S_ACCESS: begin
          re_q  <= 1'b0;
          we_q  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sram1_addr = addr_q;
  assign sram2_addr = addr_q;
  assign sram1_re   = re_q;
  assign sram2_re   = re_q;
  assign sram1_we   = we_q;
  assign sram2_we   = we_q;
  assign sram1_dout = wdata_q[7:0];
  assign sram2_dout = wdata_q[15:8];
  assign sram1_doe  = we_q;
  assign sram2_doe  = we_q;
  assign rdata      = {sram2_din, sram1_din};

  always_comb begin
    rc_rsp  = '0;
    pci_rsp = '0;
    if (state == S_ACCESS) begin
      if (grant_pci) begin
        pci_rsp.ack   = 1'b1;
        pci_rsp.rdata = rdata;
      end else begin
        rc_rsp.ack    = 1'b1;
        rc_rsp.rdata  = rdata;
      end
    end
  end

endmodule
