// tb_recognition_circuit: runs the whole coarse-to-fine search at
// LEVELS = 2 (128x128 input) against a word memory, for a ring with clutter
// lines (search reaches full resolution) and for clutter alone (search
// stops at the coarsest level with MDC < 0.5). Results are compared with
// the software reference; out_ena must stay low until the end and rst must
// return the circuit to idle. Two more instances check the smallest image
// sizes: LEVELS = 0 (32x32, global search only, no coarsening) and
// LEVELS = 1 (64x64, one coarsening pass and one local search). Cycle
// counts are printed.
module tb_recognition_circuit;
  import cpr_pkg::*;
  import cpr_ref_pkg::*;

  localparam int unsigned LEVELS = 2;

  logic     clk = 1'b0;
  logic     rst, ena, out_ena;
  logic [6:0] p, q, r;
  word_t    n, nn;
  mem_req_t req;
  mem_rsp_t rsp;
  int       checks = 0, failures = 0;
  int       stops_early = 0, full_runs = 0;

  recognition_circuit #(.LEVELS(LEVELS)) dut (
    .clk, .rst, .ena, .out_ena, .p, .q, .r, .n, .nn, .mem_req(req), .mem_rsp(rsp)
  );
  tb_mem_model u_mem (.clk, .req, .rsp);

  // Smallest sizes: LEVELS = 0 and LEVELS = 1.
  logic       ena0, out_ena0, ena1, out_ena1;
  logic [4:0] p0, q0, r0;
  logic [5:0] p1, q1, r1;
  word_t      n0, nn0, n1, nn1;
  mem_req_t   req0, req1;
  mem_rsp_t   rsp0, rsp1;

  recognition_circuit #(.LEVELS(0)) dut0 (
    .clk, .rst, .ena(ena0), .out_ena(out_ena0), .p(p0), .q(q0), .r(r0), .n(n0), .nn(nn0),
    .mem_req(req0), .mem_rsp(rsp0)
  );
  tb_mem_model u_mem0 (.clk, .req(req0), .rsp(rsp0));

  recognition_circuit #(.LEVELS(1)) dut1 (
    .clk, .rst, .ena(ena1), .out_ena(out_ena1), .p(p1), .q(q1), .r(r1), .n(n1), .nn(nn1),
    .mem_req(req1), .mem_rsp(rsp1)
  );
  tb_mem_model u_mem1 (.clk, .req(req1), .rsp(rsp1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  res_t e;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(input string name);
    int cycles;
    for (int i = 0; i < (1 << ADDR_W); i++) u_mem.mem[i] = $urandom;
    for (int y = 0; y < 128; y++)
      for (int w = 0; w < 8; w++)
        u_mem.mem[img_base(LEVELS, LEVELS) + y * 8 + w] = img_word(LEVELS, y, w);
    e = recognize(LEVELS);
    @(posedge clk); rst <= 1'b1;
    @(posedge clk); rst <= 1'b0;
    @(posedge clk);
    check(!out_ena, "out_ena low after reset");
    ena <= 1'b1;
    cycles = 0;
    while (!out_ena) begin
      @(posedge clk);
      cycles++;
    end
    $display("INFO %s: %0d cycles, (p,q)=(%0d,%0d) r=%0d n=%0d N=%0d", name, cycles, p, q, r, n, nn);
    check(p == 7'(e.p) && q == 7'(e.q) && r == 7'(e.r) && n == 16'(e.n) && nn == 16'(e.nn),
          $sformatf("%s: got (%0d,%0d) r=%0d n=%0d N=%0d, expected (%0d,%0d) r=%0d n=%0d N=%0d at level %0d",
                    name, p, q, r, n, nn, e.p, e.q, e.r, e.n, e.nn, e.level));
    if (e.ok && e.level == LEVELS) full_runs++;
    if (!e.ok) stops_early++;
    repeat (20) @(posedge clk);
    check(out_ena, "out_ena holds until reset");
    ena <= 1'b0;
  endtask

  task automatic run_small();
    int cycles0, cycles1;
    bit done0, done1;
    res_t e0, e1;
    word_t img0 [64];
    // LEVELS = 0: ring of radius 10 at (15, 17) with one stalk
    clear_img(0);
    draw_ring(0, 15, 17, 10);
    draw_line(0, 2, 0, 4, 31);
    for (int i = 0; i < (1 << ADDR_W); i++) u_mem0.mem[i] = $urandom;
    for (int y = 0; y < 32; y++)
      for (int w = 0; w < 2; w++)
        u_mem0.mem[img_base(0, 0) + y * 2 + w] = img_word(0, y, w);
    for (int i = 0; i < 64; i++) img0[i] = u_mem0.mem[img_base(0, 0) + i];
    e0 = recognize(0);
    check(e0.p == 15 && e0.q == 17 && e0.r == 10, "reference finds the 32x32 ring");
    // LEVELS = 1: ring of radius 20 at (40, 30) with two stalks
    clear_img(1);
    draw_ring(1, 40, 30, 20);
    draw_line(1, 3, 0, 8, 63);
    draw_line(1, 0, 60, 63, 50);
    for (int i = 0; i < (1 << ADDR_W); i++) u_mem1.mem[i] = $urandom;
    for (int y = 0; y < 64; y++)
      for (int w = 0; w < 4; w++)
        u_mem1.mem[img_base(1, 1) + y * 4 + w] = img_word(1, y, w);
    e1 = recognize(1);
    check(e1.p == 40 && e1.q == 30 && e1.r == 20 && e1.ok && e1.level == 1,
          "reference finds the 64x64 ring at full resolution");
    @(posedge clk); rst <= 1'b1;
    @(posedge clk); rst <= 1'b0;
    @(posedge clk);
    check(!out_ena0 && !out_ena1, "small sizes: out_ena low after reset");
    ena0 <= 1'b1;
    ena1 <= 1'b1;
    cycles0 = 0; cycles1 = 0; done0 = 0; done1 = 0;
    while (!(done0 && done1)) begin
      @(posedge clk);
      if (!done0) begin cycles0++; done0 = out_ena0; end
      if (!done1) begin cycles1++; done1 = out_ena1; end
    end
    $display("INFO 32x32: %0d cycles, (p,q)=(%0d,%0d) r=%0d n=%0d N=%0d", cycles0, p0, q0, r0, n0, nn0);
    $display("INFO 64x64: %0d cycles, (p,q)=(%0d,%0d) r=%0d n=%0d N=%0d", cycles1, p1, q1, r1, n1, nn1);
    check(p0 == 5'(e0.p) && q0 == 5'(e0.q) && r0 == 5'(e0.r) && n0 == 16'(e0.n) && nn0 == 16'(e0.nn),
          $sformatf("32x32: got (%0d,%0d) r=%0d n=%0d N=%0d, expected (%0d,%0d) r=%0d n=%0d N=%0d",
                    p0, q0, r0, n0, nn0, e0.p, e0.q, e0.r, e0.n, e0.nn));
    check(p1 == 6'(e1.p) && q1 == 6'(e1.q) && r1 == 6'(e1.r) && n1 == 16'(e1.n) && nn1 == 16'(e1.nn),
          $sformatf("64x64: got (%0d,%0d) r=%0d n=%0d N=%0d, expected (%0d,%0d) r=%0d n=%0d N=%0d",
                    p1, q1, r1, n1, nn1, e1.p, e1.q, e1.r, e1.n, e1.nn));
    // the input image must be left unchanged
    for (int y = 0; y < 32; y++)
      check(u_mem0.mem[img_base(0, 0) + y * 2] == img0[y * 2] &&
            u_mem0.mem[img_base(0, 0) + y * 2 + 1] == img0[y * 2 + 1],
            $sformatf("32x32: image row %0d unchanged", y));
    ena0 <= 1'b0;
    ena1 <= 1'b0;
  endtask

  initial begin
    rst = 1'b1; ena = 1'b0; ena0 = 1'b0; ena1 = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // ring with clutter, as a fruit outline among stalks
    clear_img(LEVELS);
    draw_ring(LEVELS, 97, 86, 28);
    draw_line(LEVELS, 5, 0, 12, 127);
    draw_line(LEVELS, 0, 40, 127, 35);
    draw_line(LEVELS, 60, 36, 120, 90);
    run_image("ring");
    check(e.p == 97 && e.q == 86 && e.r == 28, "reference finds the drawn ring");
    // clutter only
    clear_img(LEVELS);
    draw_line(LEVELS, 5, 0, 12, 127);
    draw_line(LEVELS, 0, 40, 127, 35);
    run_image("clutter");
    run_small();
    check(full_runs == 1, "one search reached full resolution");
    check(stops_early == 1, "one search stopped on MDC < 0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
