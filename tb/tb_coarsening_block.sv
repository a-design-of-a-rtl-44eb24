// tb_coarsening_block: loads a random 128x128 image (LEVELS = 2) into a
// word memory, coarsens it twice (128 -> 64 -> 32) and compares every
// written word with the 2x2-OR reference. Also checks that the source image
// is untouched and that each pass takes 10 cycles per output word + 1.
module tb_coarsening_block;
  import cpr_pkg::*;
  import cpr_ref_pkg::*;

  localparam int unsigned LEVELS = 2;

  logic     clk = 1'b0;
  logic     rst;
  logic     start;
  logic [1:0] src_level;
  logic     busy, done;
  mem_req_t req;
  mem_rsp_t rsp;
  int       checks = 0, failures = 0;

  coarsening_block #(.LEVELS(LEVELS)) dut (
    .clk, .rst, .start, .src_level, .busy, .done, .mem_req(req), .mem_rsp(rsp)
  );
  tb_mem_model u_mem (.clk, .req, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int cycles, side, wpr;
    rst = 1'b1; start = 1'b0; src_level = '0;
    for (int i = 0; i < (1 << ADDR_W); i++) u_mem.mem[i] = '0;
    clear_img(2);
    // sparse random pixels plus a ring, so both 0 and 1 outputs occur
    for (int y = 0; y < 128; y++)
      for (int x = 0; x < 128; x++)
        img[2][y][x] = (($urandom % 11) == 0);
    draw_ring(2, 60, 70, 30);
    for (int y = 0; y < 128; y++)
      for (int w = 0; w < 8; w++)
        u_mem.mem[img_base(2, LEVELS) + y * 8 + w] = img_word(2, y, w);
    coarsen(2);
    coarsen(1);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int l = 2; l >= 1; l--) begin
      @(posedge clk);
      start <= 1'b1; src_level <= 2'(l);
      @(posedge clk);
      start <= 1'b0;
      cycles = 0;  // edges after the one that samples start
      while (!done) begin @(posedge clk); cycles++; end
      side = 32 << (l - 1);
      wpr  = side / 16;
      check(cycles == 10 * side * wpr + 1,
            $sformatf("level %0d pass took %0d cycles, expected %0d", l, cycles, 10 * side * wpr + 1));
      for (int y = 0; y < side; y++)
        for (int w = 0; w < wpr; w++)
          check(u_mem.mem[img_base(l - 1, LEVELS) + y * wpr + w] == img_word(l - 1, y, w),
                $sformatf("level %0d row %0d word %0d: got %h expected %h", l - 1, y, w,
                          u_mem.mem[img_base(l - 1, LEVELS) + y * wpr + w], img_word(l - 1, y, w)));
    end
    for (int y = 0; y < 128; y += 17)
      check(u_mem.mem[img_base(2, LEVELS) + y * 8 + 3] == img_word(2, y, 3), "source image changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
