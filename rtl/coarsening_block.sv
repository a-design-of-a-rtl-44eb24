// coarsening_block: builds the half-resolution copy of a binary image.
//
// The source image (level src_level, side S = 32 << src_level) is covered by
// non-overlapping 2x2 pixel squares; each square gives one pixel of the
// destination image (side S/2), black when at least one of its four pixels
// is black. This rule is the document's; the word-serial schedule is this
// design's own.
//
// Schedule: one destination word holds 16 pixels, fed by two source rows of
// two words each. For every destination word the block reads row 2y word 2w,
// row 2y+1 word 2w, row 2y word 2w+1, row 2y+1 word 2w+1 (ORing the rows as
// it goes), then writes the word: five memory accesses per 16 output pixels.
// Images are placed as described in cpr_pkg.
//
// Interface: pulse start for one cycle with src_level valid (1 .. LEVELS);
// busy is high until done pulses for one cycle. All memory traffic uses the
// mem_req/mem_rsp port (cpr_pkg). Synchronous active-high reset.
module coarsening_block
  import cpr_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  logic [lvl_w(LEVELS)-1:0]     src_level,
  output logic                         busy,
  output logic                         done,
  output mem_req_t                     mem_req,
  input  mem_rsp_t                     mem_rsp
);

  localparam int unsigned LW = lvl_w(LEVELS);
  localparam int unsigned CW = LEVELS + 5;   // coordinate width at full size

  typedef enum logic [2:0] {
    S_IDLE, S_R0W0, S_R1W0, S_R0W1, S_R1W1, S_WR, S_DONE
  } state_t;

  state_t         state;
  logic [LW-1:0]  lvl;          // source level latched at start
  logic [CW-1:0]  yd;           // destination row
  logic [CW-1:0]  wd;           // destination word within the row
  word_t          or_lo, or_hi; // source words ORed over the two rows
  addr_t          src_base, dst_base;
  addr_t          row0_addr, rd_addr;
  logic [CW-1:0]  last_yd, last_wd;
  word_t          packed_word;

  always_comb begin
    src_base = img_base(LEVELS, LEVELS);
    dst_base = img_base(LEVELS, LEVELS);
    for (int unsigned k = 1; k <= LEVELS; k++) begin
      if (lvl == LW'(k)) begin
        src_base = img_base(k, LEVELS);
        dst_base = img_base(k - 1, LEVELS);
      end
    end
  end

  // Source row 2*yd has (2 << lvl) words; destination rows have (1 << lvl).
  assign row0_addr = src_base + addr_t'((ADDR_W'(yd) << 1) << (lvl + 1)) + addr_t'(ADDR_W'(wd) << 1);
  assign last_yd   = CW'((16 << lvl) - 1);
  assign last_wd   = CW'((1 << lvl) - 1);

  always_comb begin
    unique case (state)
      S_R1W0:  rd_addr = row0_addr + addr_t'(2 << lvl);
      S_R0W1:  rd_addr = row0_addr + addr_t'(1);
      S_R1W1:  rd_addr = row0_addr + addr_t'(2 << lvl) + addr_t'(1);
      default: rd_addr = row0_addr;
    endcase
  end

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      packed_word[j]     = or_lo[2*j] | or_lo[2*j+1];
      packed_word[j + 8] = or_hi[2*j] | or_hi[2*j+1];
    end
  end

  always_comb begin
    mem_req = '0;
    unique case (state)
      S_R0W0, S_R1W0, S_R0W1, S_R1W1: begin
        mem_req.re   = 1'b1;
        mem_req.addr = rd_addr;
      end
      S_WR: begin
        mem_req.we    = 1'b1;
        mem_req.addr  = dst_base + addr_t'(ADDR_W'(yd) << lvl) + addr_t'(wd);
        mem_req.wdata = packed_word;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      lvl   <= '0;
      yd    <= '0;
      wd    <= '0;
      or_lo <= '0;
      or_hi <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lvl   <= src_level;
          yd    <= '0;
          wd    <= '0;
          state <= S_R0W0;
        end
        S_R0W0: if (mem_rsp.ack) begin or_lo <= mem_rsp.rdata;         state <= S_R1W0; end
        S_R1W0: if (mem_rsp.ack) begin or_lo <= or_lo | mem_rsp.rdata; state <= S_R0W1; end
        S_R0W1: if (mem_rsp.ack) begin or_hi <= mem_rsp.rdata;         state <= S_R1W1; end
        S_R1W1: if (mem_rsp.ack) begin or_hi <= or_hi | mem_rsp.rdata; state <= S_WR;   end
        S_WR: if (mem_rsp.ack) begin
          if (wd == last_wd) begin
            wd <= '0;
            if (yd == last_yd) state <= S_DONE;
            else begin
              yd    <= yd + 1'b1;
              state <= S_R0W0;
            end
          end else begin
            wd    <= wd + 1'b1;
            state <= S_R0W0;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
