// tb_histogram_gen: fills a word memory with a 64x64 image (LEVELS = 1)
// and its 32x32 coarse copy, runs the histogram generator for candidate
// centres at both levels (corners, edges, the ring centre, random points)
// and compares the n_r and N_r tables left in memory with the reference.
// The run time is checked against
//   2*(2*R + W + 2*I + 2*B) + S*S + 1 cycles from start to done,
// R radii, W image words, I in-range pixels, B black in-range pixels.
module tb_histogram_gen;
  import cpr_pkg::*;
  import cpr_ref_pkg::*;

  localparam int unsigned LEVELS = 1;

  logic     clk = 1'b0;
  logic     rst, start, busy, done;
  logic     level;
  logic [5:0] p, q;
  mem_req_t req;
  mem_rsp_t rsp;
  int       checks = 0, failures = 0;

  histogram_gen #(.LEVELS(LEVELS)) dut (
    .clk, .rst, .start, .level, .p, .q, .busy, .done, .mem_req(req), .mem_rsp(rsp)
  );
  tb_mem_model u_mem (.clk, .req, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int l, input int pp, input int qq);
    int cycles, side, rmin, rmax, expect_cycles, inr, blk;
    side = 32 << l; rmin = 5 << l; rmax = 15 << l;
    // stale values in the tables must be cleared by the block
    for (int r = 0; r < int'(hist_span(LEVELS)); r++) begin
      u_mem.mem[hist_n_base(LEVELS) + r]  = 16'hBEEF;
      u_mem.mem[hist_nn_base(LEVELS) + r] = 16'hBEEF;
    end
    @(posedge clk);
    start <= 1'b1; level <= 1'(l); p <= 6'(pp); q <= 6'(qq);
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    while (!done) begin @(posedge clk); cycles++; end
    histo(l, pp, qq);
    inr = 0; blk = 0;
    for (int r = rmin; r <= rmax; r++) begin
      inr += hnn[r]; blk += hn[r];
      check(u_mem.mem[hist_n_base(LEVELS) + r] == 16'(hn[r]),
            $sformatf("L%0d (%0d,%0d) n[%0d] got %0d exp %0d", l, pp, qq, r,
                      u_mem.mem[hist_n_base(LEVELS) + r], hn[r]));
      check(u_mem.mem[hist_nn_base(LEVELS) + r] == 16'(hnn[r]),
            $sformatf("L%0d (%0d,%0d) N[%0d] got %0d exp %0d", l, pp, qq, r,
                      u_mem.mem[hist_nn_base(LEVELS) + r], hnn[r]));
    end
    expect_cycles = 2 * (2 * (rmax - rmin + 1) + side * side / 16 + 2 * inr + 2 * blk) + side * side + 1;
    check(cycles == expect_cycles,
          $sformatf("L%0d (%0d,%0d) took %0d cycles, expected %0d", l, pp, qq, cycles, expect_cycles));
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; level = 1'b0; p = '0; q = '0;
    for (int i = 0; i < (1 << ADDR_W); i++) u_mem.mem[i] = '0;
    clear_img(1);
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++)
        img[1][y][x] = (($urandom % 23) == 0);
    draw_ring(1, 40, 30, 18);
    draw_line(1, 3, 0, 5, 63);
    coarsen(1);
    for (int l = 0; l <= 1; l++)
      for (int y = 0; y < (32 << l); y++)
        for (int w = 0; w < (2 << l); w++)
          u_mem.mem[img_base(l, LEVELS) + y * (2 << l) + w] = img_word(l, y, w);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(1, 40, 30);
    run(1, 0, 0);
    run(1, 63, 63);
    run(1, 63, 0);
    run(0, 20, 15);
    run(0, 0, 31);
    run(0, 31, 5);
    for (int k = 0; k < 4; k++) run(k % 2, $urandom % (32 << (k % 2)), $urandom % (32 << (k % 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
