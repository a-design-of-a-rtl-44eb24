// recognition_circuit: controller of the circular pattern recognition and
// its three sub-blocks (coarsening block, histogram generator, MDC
// calculator), which share one memory port.
//
// Algorithm (the document's): starting from the full image (level LEVELS,
// 256x256 for LEVELS = 3) the coarsening block builds the 1/4-resolution
// images down to 32x32 (LEVELS coarsening steps). At 32x32 every pixel is a
// candidate centre (global search, scan order q = 0..31 outer, p = 0..31
// inner). At each finer level the candidates are (2p, 2q) and its 8
// neighbours, (p, q) being the best centre of the level below (local
// search, scan order dq = -1..1 outer, dp = -1..1 inner; candidates outside
// the image are skipped). For each candidate the histogram generator fills
// n_r/N_r and the MDC calculator folds them into the level's maximum.
// When a level ends with MDC >= 0.5 the next finer level follows; at full
// resolution the result is output.
//
// This design's choices: when a level ends with MDC < 0.5 the search stops
// there and outputs that level's best values, so the host can tell a failed
// recognition from 2*n < N; the scan orders and tie rule are fixed as above.
//
// Interface: ena (level) starts a run from the idle state; out_ena rises
// when p, q, r (full-resolution pixels for a successful run), n and N
// (n_r and N_r at the recognised radius) are valid, and stays high until rst.
// rst is synchronous and active high. mem_req/mem_rsp is the cpr_pkg port.
module recognition_circuit
  import cpr_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ena,
  output logic               out_ena,
  output logic [LEVELS+4:0]  p,
  output logic [LEVELS+4:0]  q,
  output logic [LEVELS+4:0]  r,
  output word_t              n,
  output word_t              nn,      // N of the document (N_r)
  output mem_req_t           mem_req,
  input  mem_rsp_t           mem_rsp
);

  localparam int unsigned LW = lvl_w(LEVELS);
  localparam int unsigned CW = LEVELS + 5;

  typedef enum logic [3:0] {
    S_IDLE, S_CO_START, S_CO_WAIT, S_GLOBAL_INIT, S_H_START, S_H_WAIT,
    S_M_START, S_M_WAIT, S_NEXT, S_LOCAL_SEL, S_LEVEL_END, S_DONE
  } state_t;

  state_t        state;
  logic [LW-1:0] lvl;        // level being coarsened (source) or searched
  logic          global_mode;
  logic [CW-1:0] cand_p, cand_q;
  logic [CW-1:0] ctr_p, ctr_q; // centre of the local search, (2p, 2q)
  logic [1:0]    nb_p, nb_q; // neighbour offset + 1, each 0..2
  logic          nb_end;     // all 9 neighbours visited

  // Sub-block wiring.
  logic     co_start, co_busy, co_done;
  logic     h_start, h_busy, h_done;
  logic     m_clear, m_start, m_busy, m_done, m_ok;
  mem_req_t co_req, h_req, m_req;
  mem_rsp_t co_rsp, h_rsp, m_rsp;
  logic [CW-1:0] bp, bq, br;
  word_t         bn, bnn;

  coarsening_block #(.LEVELS(LEVELS)) u_coarsen (
    .clk, .rst, .start(co_start), .src_level(lvl), .busy(co_busy), .done(co_done),
    .mem_req(co_req), .mem_rsp(co_rsp)
  );

  histogram_gen #(.LEVELS(LEVELS)) u_hist (
    .clk, .rst, .start(h_start), .level(lvl), .p(cand_p), .q(cand_q),
    .busy(h_busy), .done(h_done), .mem_req(h_req), .mem_rsp(h_rsp)
  );

  mdc_calc #(.LEVELS(LEVELS)) u_mdc (
    .clk, .rst, .clear(m_clear), .start(m_start), .level(lvl), .p(cand_p), .q(cand_q),
    .busy(m_busy), .done(m_done), .best_p(bp), .best_q(bq), .best_r(br),
    .best_n(bn), .best_nn(bnn), .mdc_ok(m_ok), .mem_req(m_req), .mem_rsp(m_rsp)
  );

  // Only one sub-block is active at a time; the controller connects it.
  always_comb begin
    mem_req = '0;
    co_rsp  = '0;
    h_rsp   = '0;
    m_rsp   = '0;
    if (co_busy) begin
      mem_req = co_req;
      co_rsp  = mem_rsp;
    end else if (h_busy) begin
      mem_req = h_req;
      h_rsp   = mem_rsp;
    end else if (m_busy) begin
      mem_req = m_req;
      m_rsp   = mem_rsp;
    end
  end

  assign co_start = (state == S_CO_START);
  assign h_start  = (state == S_H_START);
  assign m_start  = (state == S_M_START);
  assign m_clear  = (state == S_GLOBAL_INIT) ||
                    ((state == S_LEVEL_END) && m_ok && (lvl != LW'(LEVELS)));

  // Next local-search candidate: (ctr_p + nb_p - 1, ctr_q + nb_q - 1).
  logic signed [CW+1:0] np_s, nq_s;
  logic                 nb_valid;
  logic [CW-1:0]        lvl_last;
  assign lvl_last = CW'((BASE_SIZE << lvl) - 1);
  assign np_s     = $signed({2'b00, ctr_p}) + $signed({{CW{1'b0}}, nb_p}) - 1;
  assign nq_s     = $signed({2'b00, ctr_q}) + $signed({{CW{1'b0}}, nb_q}) - 1;
  assign nb_valid = (np_s >= 0) && (nq_s >= 0) &&
                    (np_s <= $signed({2'b00, lvl_last})) && (nq_s <= $signed({2'b00, lvl_last}));

  assign out_ena = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      lvl         <= '0;
      global_mode <= 1'b0;
      cand_p      <= '0;
      cand_q      <= '0;
      ctr_p       <= '0;
      ctr_q       <= '0;
      nb_p        <= '0;
      nb_q        <= '0;
      nb_end      <= 1'b0;
      p           <= '0;
      q           <= '0;
      r           <= '0;
      n           <= '0;
      nn          <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ena) begin
          lvl   <= LW'(LEVELS);
          state <= (LEVELS == 0) ? S_GLOBAL_INIT : S_CO_START;
        end
        S_CO_START: state <= S_CO_WAIT;
        S_CO_WAIT: if (co_done) begin
          if (lvl == LW'(1)) state <= S_GLOBAL_INIT;
          else begin
            lvl   <= lvl - 1'b1;
            state <= S_CO_START;
          end
        end
        S_GLOBAL_INIT: begin
          lvl         <= '0;
          global_mode <= 1'b1;
          cand_p      <= '0;
          cand_q      <= '0;
          state       <= S_H_START;
        end
        S_H_START: state <= S_H_WAIT;
        S_H_WAIT:  if (h_done) state <= S_M_START;
        S_M_START: state <= S_M_WAIT;
        S_M_WAIT:  if (m_done) state <= S_NEXT;
        S_NEXT: begin
          if (global_mode) begin
            if (cand_p == CW'(BASE_SIZE - 1)) begin
              cand_p <= '0;
              if (cand_q == CW'(BASE_SIZE - 1)) state <= S_LEVEL_END;
              else begin
                cand_q <= cand_q + 1'b1;
                state  <= S_H_START;
              end
            end else begin
              cand_p <= cand_p + 1'b1;
              state  <= S_H_START;
            end
          end else begin
            state <= S_LOCAL_SEL;
          end
        end
        S_LOCAL_SEL: begin
          if (nb_end) state <= S_LEVEL_END;
          else begin
            // step through dq = -1..1 (outer), dp = -1..1 (inner)
            if (nb_p == 2'd2) begin
              nb_p <= '0;
              if (nb_q == 2'd2) nb_end <= 1'b1;
              else nb_q <= nb_q + 1'b1;
            end else begin
              nb_p <= nb_p + 1'b1;
            end
            if (nb_valid) begin
              cand_p <= CW'(np_s);
              cand_q <= CW'(nq_s);
              state  <= S_H_START;
            end
          end
        end
        S_LEVEL_END: begin
          if (!m_ok || lvl == LW'(LEVELS)) begin
            p     <= bp;
            q     <= bq;
            r     <= br;
            n     <= bn;
            nn    <= bnn;
            state <= S_DONE;
          end else begin
            // Step 6: next finer level around (2p, 2q).
            ctr_p       <= {bp[CW-2:0], 1'b0};
            ctr_q       <= {bq[CW-2:0], 1'b0};
            lvl         <= lvl + 1'b1;
            global_mode <= 1'b0;
            nb_p        <= '0;
            nb_q        <= '0;
            nb_end      <= 1'b0;
            state       <= S_LOCAL_SEL;
          end
        end
        S_DONE:  state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
