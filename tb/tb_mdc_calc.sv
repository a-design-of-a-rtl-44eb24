// tb_mdc_calc: writes random n_r / N_r tables into a word memory, runs the
// MDC calculator for a sequence of candidates at both levels of LEVELS = 1,
// and compares the running best (centre, radius, n, N) and the MDC >= 0.5
// flag with a reference that divides in real arithmetic. Also checks clear
// and the run time of 5 cycles per radius + 1.
module tb_mdc_calc;
  import cpr_pkg::*;

  localparam int unsigned LEVELS = 1;

  logic     clk = 1'b0;
  logic     rst, clear, start, busy, done, ok;
  logic     level;
  logic [5:0] p, q, bp, bq, br;
  word_t    bn, bnn;
  mem_req_t req;
  mem_rsp_t rsp;
  int       checks = 0, failures = 0;

  mdc_calc #(.LEVELS(LEVELS)) dut (
    .clk, .rst, .clear, .start, .level, .p, .q, .busy, .done,
    .best_p(bp), .best_q(bq), .best_r(br), .best_n(bn), .best_nn(bnn), .mdc_ok(ok),
    .mem_req(req), .mem_rsp(rsp)
  );
  tb_mem_model u_mem (.clk, .req, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // reference best
  int   e_p, e_q, e_r, e_n, e_nn;
  real  e_mdc;

  task automatic do_clear();
    @(posedge clk); clear <= 1'b1;
    @(posedge clk); clear <= 1'b0;
    e_p = 0; e_q = 0; e_r = 0; e_n = 0; e_nn = 0; e_mdc = -1.0;
  endtask

  // Fill tables for level l; mode 0 random, 1 a given peak.
  task automatic candidate(input int l, input int pp, input int qq, input int peak_r, input int peak_n);
    int rmin, rmax, cycles;
    rmin = 5 << l; rmax = 15 << l;
    for (int r = rmin; r <= rmax; r++) begin
      int a, b;
      b = (r == rmin + 1) ? 0 : 1 + $urandom % 300;   // one empty radius
      a = (b == 0) ? 0 : $urandom % (b / 3 + 1);
      if (r == peak_r) a = peak_n * b / 100;
      u_mem.mem[hist_n_base(LEVELS) + r]  = 16'(a);
      u_mem.mem[hist_nn_base(LEVELS) + r] = 16'(b);
      if (b != 0 && a != 0 && real'(a) / real'(b) > e_mdc) begin
        e_mdc = real'(a) / real'(b);
        e_p = pp; e_q = qq; e_r = r; e_n = a; e_nn = b;
      end
    end
    @(posedge clk);
    start <= 1'b1; level <= 1'(l); p <= 6'(pp); q <= 6'(qq);
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    while (!done) begin @(posedge clk); cycles++; end
    @(posedge clk);
    check(cycles == 5 * (rmax - rmin + 1) + 1, $sformatf("run took %0d cycles", cycles));
    check(bp == 6'(e_p) && bq == 6'(e_q) && br == 6'(e_r) && bn == 16'(e_n) && bnn == 16'(e_nn),
          $sformatf("best (%0d,%0d) r=%0d n=%0d N=%0d, expected (%0d,%0d) r=%0d n=%0d N=%0d",
                    bp, bq, br, bn, bnn, e_p, e_q, e_r, e_n, e_nn));
    check(ok == (e_nn != 0 && 2 * e_n >= e_nn), $sformatf("mdc_ok %0d for %0d/%0d", ok, e_n, e_nn));
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; start = 1'b0; level = 1'b0; p = '0; q = '0;
    for (int i = 0; i < (1 << ADDR_W); i++) u_mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    do_clear();
    check(bnn == 0 && !ok, "clear leaves an empty best");
    for (int k = 0; k < 20; k++) candidate(0, $urandom % 32, $urandom % 32, -1, 0);
    candidate(0, 7, 9, 12, 80);       // a strong peak: MDC >= 0.5
    candidate(0, 8, 9, 13, 60);       // weaker, must not replace it
    do_clear();
    for (int k = 0; k < 10; k++) candidate(1, $urandom % 64, $urandom % 64, -1, 0);
    candidate(1, 33, 34, 20, 50);     // exactly one half
    for (int k = 0; k < 5; k++) candidate(1, $urandom % 64, $urandom % 64, -1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
