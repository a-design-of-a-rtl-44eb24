// cpr_pkg: types, constants and helper functions shared by the circular
// pattern recognition circuit.
//
// Memory organisation. The two 8-bit SRAMs are used side by side as one
// 16-bit word memory (SRAM1 holds bits 7:0, SRAM2 bits 15:8) with a 15-bit
// word address. A binary image of side S = 32 << L (L = resolution level,
// 0 = 32x32 coarsest, LEVELS = full resolution) is stored row by row, 16
// pixels per word, pixel x of a row in bit x % 16 of word x / 16, black = 1.
// The full-resolution image starts at word 0, each coarser image follows the
// previous one, and the two histogram tables (n_r then N_r, each hist_span()
// words indexed by r) follow the coarsest image. For LEVELS = 3 this is:
//   256x256 image  words    0 .. 4095
//   128x128 image  words 4096 .. 5119
//    64x64  image  words 5120 .. 5375
//    32x32  image  words 5376 .. 5439
//   n_r table      words 5440 .. 5567
//   N_r table      words 5568 .. 5695
// all of it inside the part of the address space left free for SRAM
// (0 .. 13842). Addresses 13843 .. 13850 are registers of the FPGA itself.
//
// Internal memory port. A requester drives mem_req_t (re or we, addr,
// wdata) and holds it until mem_rsp_t.ack is high for one cycle; on a read
// the data is valid in rdata in that same cycle. The requester may present
// its next request in the cycle after the ack.
package cpr_pkg;

  localparam int unsigned ADDR_W = 15;
  localparam int unsigned DATA_W = 16;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;

  typedef struct packed {
    logic  re;
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  typedef struct packed {
    logic  ack;
    word_t rdata;
  } mem_rsp_t;

  // Side of the coarsest image and the radius range searched there (Fig.1
  // plots r = 5 .. 15 for a 32x32 image); the range doubles with each level.
  localparam int unsigned BASE_SIZE = 32;
  localparam int unsigned RMIN_BASE = 5;
  localparam int unsigned RMAX_BASE = 15;

  // FPGA register addresses seen from the PCI9052 local bus (Fig.4).
  localparam addr_t ADDR_RST     = addr_t'(13843);
  localparam addr_t ADDR_ENA     = addr_t'(13844);
  localparam addr_t ADDR_OUT_N   = addr_t'(13845);
  localparam addr_t ADDR_OUT_SN  = addr_t'(13846);
  localparam addr_t ADDR_OUT_R   = addr_t'(13847);
  localparam addr_t ADDR_OUT_Q   = addr_t'(13848);
  localparam addr_t ADDR_OUT_P   = addr_t'(13849);
  localparam addr_t ADDR_OUT_ENA = addr_t'(13850);
  localparam word_t RST_ACK_WORD = 16'h1111;
  localparam word_t ENA_ACK_WORD = 16'h2222;

  // Width of a level number 0 .. levels (at least one bit).
  function automatic int unsigned lvl_w(int unsigned levels);
    return (levels > 0) ? $clog2(levels + 1) : 1;
  endfunction

  // Number of 16-bit words of the image at level lvl.
  function automatic int unsigned img_words(int unsigned lvl);
    return (BASE_SIZE * BASE_SIZE / 16) << (2 * lvl);
  endfunction

  // First word of the image at level lvl when the full image has level levels.
  function automatic addr_t img_base(int unsigned lvl, int unsigned levels);
    int unsigned base;
    base = 0;
    for (int unsigned k = levels; k > lvl; k--) base += img_words(k);
    return addr_t'(base);
  endfunction

  // Words per histogram table: one per radius, covering RMAX_BASE << levels.
  function automatic int unsigned hist_span(int unsigned levels);
    return 16 << levels;
  endfunction

  function automatic addr_t hist_n_base(int unsigned levels);
    return img_base(0, levels) + addr_t'(img_words(0));
  endfunction

  function automatic addr_t hist_nn_base(int unsigned levels);
    return hist_n_base(levels) + addr_t'(hist_span(levels));
  endfunction

  // Rounded square root, r = floor(sqrt(v) + 0.5), as in equation (1).
  // Digit-by-digit integer root, then one more if the remainder v - s*s
  // exceeds s, i.e. v > s*s + s, which is v >= (s + 0.5)^2 for integers.
  function automatic logic [10:0] round_sqrt(logic [19:0] v);
    logic [21:0] rem;
    logic [9:0]  root;
    logic [21:0] trial;
    rem  = '0;
    root = '0;
    for (int i = 9; i >= 0; i--) begin
      rem   = {rem[19:0], v[2*i+1 -: 2]};
      trial = {10'd0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[8:0], 1'b1};
      end else begin
        root = {root[8:0], 1'b0};
      end
    end
    return {1'b0, root} + ((rem > {12'd0, root}) ? 11'd1 : 11'd0);
  endfunction

endpackage
