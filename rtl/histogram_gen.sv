// histogram_gen: builds the radius histograms of one candidate centre.
//
// For a candidate centre of a circle (CCOC) (p, q) in the image at level
// `level` (side S = 32 << level), every pixel (x, y) of the image is given the
// rounded distance r = floor(sqrt((p-x)^2 + (q-y)^2) + 0.5) (equation (1)).
// For r inside the searched range [5 << level, 15 << level] the block counts
// N_r, the number of image pixels at distance r, and n_r, the number of those
// that are black. Both tables live in the external SRAM (cpr_pkg gives their
// place), so that the MDC calculator can read them afterwards; the document
// gives the histogram definition and the table ports, the schedule below is
// this design's own.
//
// Schedule: clear n_r and N_r for every r of the range (two writes per r),
// then scan the image row by row. One read fetches 16 pixels; each pixel
// takes one cycle to evaluate, plus a read-modify-write of N_r when r is in
// range, plus a read-modify-write of n_r when the pixel is also black. With
// a memory answering every access in two cycles, a run takes
//   1 + 2*(2*R + W + 2*I + 2*B) + S*S + 1 cycles from start to done,
// R radii, W image words, I in-range pixels, B black in-range pixels.
//
// Interface: pulse start for one cycle with level, p and q valid; done
// pulses for one cycle at the end. Synchronous active-high reset.
module histogram_gen
  import cpr_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  logic [lvl_w(LEVELS)-1:0]     level,
  input  logic [LEVELS+4:0]            p,
  input  logic [LEVELS+4:0]            q,
  output logic                         busy,
  output logic                         done,
  output mem_req_t                     mem_req,
  input  mem_rsp_t                     mem_rsp
);

  localparam int unsigned LW = lvl_w(LEVELS);
  localparam int unsigned CW = LEVELS + 5;
  localparam int unsigned RW = CW;             // radius width (r <= 15 << LEVELS)
  localparam addr_t HN  = hist_n_base(LEVELS);
  localparam addr_t HNN = hist_nn_base(LEVELS);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR_N, S_CLR_NN, S_RD, S_PIX, S_RD_NN, S_WR_NN, S_RD_N, S_WR_N, S_DONE
  } state_t;

  state_t         state;
  logic [LW-1:0]  lvl;
  logic [CW-1:0]  cp, cq;          // candidate centre
  logic [CW-1:0]  x, y;            // current pixel
  logic [RW-1:0]  rc;              // radius being cleared / updated
  logic           blk;             // current pixel is black
  word_t          pix_word;        // current 16 pixels
  word_t          cnt;             // histogram entry read back
  addr_t          ibase;
  logic [RW-1:0]  rmin, rmax;
  logic [CW-1:0]  last_xy;

  // Distance of the current pixel.
  logic signed [CW:0] dx, dy;
  logic [19:0]        d2;
  logic [10:0]        rdist;
  logic               in_range;

  always_comb begin
    ibase = img_base(LEVELS, LEVELS);
    for (int unsigned k = 0; k <= LEVELS; k++)
      if (lvl == LW'(k)) ibase = img_base(k, LEVELS);
  end

  assign rmin    = RW'(RMIN_BASE << lvl);
  assign rmax    = RW'(RMAX_BASE << lvl);
  assign last_xy = CW'((BASE_SIZE << lvl) - 1);

  assign dx       = $signed({1'b0, x}) - $signed({1'b0, cp});
  assign dy       = $signed({1'b0, y}) - $signed({1'b0, cq});
  logic signed [20:0] dxe, dye;
  assign dxe      = 21'(dx);
  assign dye      = 21'(dy);
  assign d2       = 20'(dxe * dxe + dye * dye);
  assign rdist    = round_sqrt(d2);
  assign in_range = (rdist >= 11'(rmin)) && (rdist <= 11'(rmax));

  // Step to the next pixel: same word, next word, next row or finished.
  logic   x_last, y_last, word_last;
  state_t adv_state;
  assign x_last    = (x == last_xy);
  assign y_last    = (y == last_xy);
  assign word_last = (x[3:0] == 4'hF);
  assign adv_state = (x_last && y_last) ? S_DONE :
                     (x_last || word_last) ? S_RD : S_PIX;

  always_comb begin
    mem_req = '0;
    unique case (state)
      S_CLR_N:  begin mem_req.we = 1'b1; mem_req.addr = HN  + addr_t'(rc); end
      S_CLR_NN: begin mem_req.we = 1'b1; mem_req.addr = HNN + addr_t'(rc); end
      S_RD: begin
        mem_req.re   = 1'b1;
        mem_req.addr = ibase + addr_t'(ADDR_W'(y) << (lvl + 1)) + addr_t'(x[CW-1:4]);
      end
      S_RD_NN: begin mem_req.re = 1'b1; mem_req.addr = HNN + addr_t'(rc); end
      S_WR_NN: begin
        mem_req.we = 1'b1; mem_req.addr = HNN + addr_t'(rc); mem_req.wdata = cnt + 1'b1;
      end
      S_RD_N:  begin mem_req.re = 1'b1; mem_req.addr = HN + addr_t'(rc); end
      S_WR_N: begin
        mem_req.we = 1'b1; mem_req.addr = HN + addr_t'(rc); mem_req.wdata = cnt + 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      lvl      <= '0;
      cp       <= '0;
      cq       <= '0;
      x        <= '0;
      y        <= '0;
      rc       <= '0;
      blk      <= 1'b0;
      pix_word <= '0;
      cnt      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lvl   <= level;
          cp    <= p;
          cq    <= q;
          rc    <= RW'(RMIN_BASE << level);
          state <= S_CLR_N;
        end
        S_CLR_N: if (mem_rsp.ack) state <= S_CLR_NN;
        S_CLR_NN: if (mem_rsp.ack) begin
          if (rc == rmax) begin
            x     <= '0;
            y     <= '0;
            state <= S_RD;
          end else begin
            rc    <= rc + 1'b1;
            state <= S_CLR_N;
          end
        end
        S_RD: if (mem_rsp.ack) begin
          pix_word <= mem_rsp.rdata;
          state    <= S_PIX;
        end
        S_PIX: begin
          if (in_range) begin
            rc    <= rdist[RW-1:0];
            blk   <= pix_word[x[3:0]];
            state <= S_RD_NN;
          end else begin
            x     <= x_last ? '0 : x + 1'b1;
            y     <= x_last ? y + 1'b1 : y;
            state <= adv_state;
          end
        end
        S_RD_NN: if (mem_rsp.ack) begin cnt <= mem_rsp.rdata; state <= S_WR_NN; end
        S_WR_NN: if (mem_rsp.ack) begin
          if (blk) state <= S_RD_N;
          else begin
            x     <= x_last ? '0 : x + 1'b1;
            y     <= x_last ? y + 1'b1 : y;
            state <= adv_state;
          end
        end
        S_RD_N: if (mem_rsp.ack) begin cnt <= mem_rsp.rdata; state <= S_WR_N; end
        S_WR_N: if (mem_rsp.ack) begin
          x     <= x_last ? '0 : x + 1'b1;
          y     <= x_last ? y + 1'b1 : y;
          state <= adv_state;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
