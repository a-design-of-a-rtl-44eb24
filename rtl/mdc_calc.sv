// mdc_calc: matching degree to a circle and its running maximum.
//
// After histogram_gen has filled the n_r and N_r tables for a candidate
// centre (p, q), a start pulse makes this block read, for every radius r of
// the range [5 << level, 15 << level], n_r and N_r from the SRAM and compare
// MDC_r = n_r / N_r (equation (3)) with the best value kept so far. The best
// is kept across candidates until clear is pulsed, so that after all
// candidates of one resolution level it holds equation (4): the maximum over
// (p, q) and r, with its centre, radius, n and N.
//
// No divider is used: n/N > bn/bN is tested as n*bN > bn*N. The first
// candidate with n > 0 replaces an empty best (bN = 0). Ties keep the earlier
// candidate (smaller r, then earlier in the controller's scan order).
// mdc_ok reports the document's recognition condition MDC >= 0.5, tested as
// 2*bn >= bN with bN non-zero. The cross-multiplication is this design's
// choice; the document gives only the definitions.
//
// Timing: two memory reads and one compare cycle per radius. clear and start
// are single-cycle pulses; done pulses for one cycle at the end.
module mdc_calc
  import cpr_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         clear,
  input  logic                         start,
  input  logic [lvl_w(LEVELS)-1:0]     level,
  input  logic [LEVELS+4:0]            p,
  input  logic [LEVELS+4:0]            q,
  output logic                         busy,
  output logic                         done,
  output logic [LEVELS+4:0]            best_p,
  output logic [LEVELS+4:0]            best_q,
  output logic [LEVELS+4:0]            best_r,
  output word_t                        best_n,
  output word_t                        best_nn,
  output logic                         mdc_ok,
  output mem_req_t                     mem_req,
  input  mem_rsp_t                     mem_rsp
);

  localparam int unsigned LW = lvl_w(LEVELS);
  localparam int unsigned CW = LEVELS + 5;
  localparam addr_t HN  = hist_n_base(LEVELS);
  localparam addr_t HNN = hist_nn_base(LEVELS);

  typedef enum logic [2:0] {S_IDLE, S_RD_N, S_RD_NN, S_CMP, S_DONE} state_t;

  state_t        state;
  logic [LW-1:0] lvl;
  logic [CW-1:0] cp, cq, rc, rmax;
  word_t         nv, nnv;
  logic [31:0]   lhs, rhs;
  logic          better;

  assign rmax   = CW'(RMAX_BASE << lvl);
  assign lhs    = 32'(nv) * 32'(best_nn);
  assign rhs    = 32'(best_n) * 32'(nnv);
  assign better = (nnv != '0) && (nv != '0) && ((best_nn == '0) || (lhs > rhs));
  assign mdc_ok = (best_nn != '0) && ({best_n, 1'b0} >= {1'b0, best_nn});

  always_comb begin
    mem_req = '0;
    unique case (state)
      S_RD_N:  begin mem_req.re = 1'b1; mem_req.addr = HN  + addr_t'(rc); end
      S_RD_NN: begin mem_req.re = 1'b1; mem_req.addr = HNN + addr_t'(rc); end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      lvl     <= '0;
      cp      <= '0;
      cq      <= '0;
      rc      <= '0;
      nv      <= '0;
      nnv     <= '0;
      best_p  <= '0;
      best_q  <= '0;
      best_r  <= '0;
      best_n  <= '0;
      best_nn <= '0;
    end else begin
      if (clear) begin
        best_p  <= '0;
        best_q  <= '0;
        best_r  <= '0;
        best_n  <= '0;
        best_nn <= '0;
      end
      unique case (state)
        S_IDLE: if (start) begin
          lvl   <= level;
          cp    <= p;
          cq    <= q;
          rc    <= CW'(RMIN_BASE << level);
          state <= S_RD_N;
        end
        S_RD_N:  if (mem_rsp.ack) begin nv  <= mem_rsp.rdata; state <= S_RD_NN; end
        S_RD_NN: if (mem_rsp.ack) begin nnv <= mem_rsp.rdata; state <= S_CMP;   end
        S_CMP: begin
          if (better) begin
            best_p  <= cp;
            best_q  <= cq;
            best_r  <= rc;
            best_n  <= nv;
            best_nn <= nnv;
          end
          if (rc == rmax) state <= S_DONE;
          else begin
            rc    <= rc + 1'b1;
            state <= S_RD_N;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
