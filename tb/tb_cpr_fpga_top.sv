// tb_cpr_fpga_top: end-to-end test of the FPGA at its default size
// (256x256 image, LEVELS = 3) with two asynchronous SRAM models on its pins
// and a local-bus master standing in for the PCI9052.
//
// Operation 1: a ring of radius 56 around (195, 172) with clutter lines is
// written word by word into the SRAMs over the local bus and read back in
// part; the reset word (13843) and the enable word (13844) are accessed and
// must answer 1111h and 2222h; while the circuit runs, the host reads SRAM
// (the selector must interleave it with the circuit's accesses) and polls
// out_ena (13850); then N, n, r, q, p are read and compared with the
// software reference. Operation 2: clutter only, which must end with
// MDC < 0.5. Each mechanism is counted and one that never happened is a
// failure: coarsening passes, global and local candidate runs, register
// reads, SRAM reads during a run, an SRAM access that had to wait for the
// circuit, and a stop on MDC < 0.5.
module tb_cpr_fpga_top;
  import cpr_pkg::*;
  import cpr_ref_pkg::*;

  localparam int LV = 3;

  logic        pci_clk = 1'b0;
  logic        sys_rst;
  logic        local_clk;
  addr_t       local_addr;
  logic        local_rd, local_wr;
  word_t       local_wdata, local_rdata;
  logic        local_rdata_oe, local_ready;
  addr_t       sram1_addr, sram2_addr;
  logic        sram1_re, sram1_we, sram1_doe, sram2_re, sram2_we, sram2_doe;
  logic [7:0]  sram1_dout, sram1_din, sram2_dout, sram2_din;

  int checks = 0, failures = 0;
  int n_coarsen = 0, n_global = 0, n_local = 0, n_reg_reads = 0;
  int n_sram_during_run = 0, n_sram_waited = 0, n_stop_low = 0;

  cpr_fpga_top dut (.*);

  tb_async_sram u_sram1 (.addr(sram1_addr), .re(sram1_re), .we(sram1_we), .din(sram1_dout), .dout(sram1_din));
  tb_async_sram u_sram2 (.addr(sram2_addr), .re(sram2_re), .we(sram2_we), .din(sram2_dout), .dout(sram2_din));

  always #15 pci_clk = ~pci_clk;   // 33 MHz

  initial begin
    repeat (60000000) @(posedge pci_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Circuit clock cycles from enable to out_ena.
  int run_cycles = 0;
  always @(negedge local_clk) if (dut.rc_ena && !dut.rc_out_ena) run_cycles++;

  // Mechanism counters from the circuit's internal strobes.
  always @(posedge local_clk) begin
    if (dut.u_rc.co_start) n_coarsen++;
    if (dut.u_rc.h_start && dut.u_rc.global_mode) n_global++;
    if (dut.u_rc.h_start && !dut.u_rc.global_mode) n_local++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One local-bus access; returns read data and the cycles until ready.
  task automatic bus(input bit wr, input int addr, input word_t wdata, output word_t rdata, output int waited);
    @(posedge local_clk);
    local_addr <= addr_t'(addr); local_wdata <= wdata;
    local_rd <= !wr; local_wr <= wr;
    waited = 0;
    do begin
      @(posedge local_clk);
      waited++;
    end while (!local_ready);
    rdata = local_rdata;
    if (!wr) check(local_rdata_oe, "read data driven with ready");
    local_rd <= 1'b0; local_wr <= 1'b0;
  endtask

  task automatic load_image();
    word_t d; int w;
    for (int y = 0; y < 256; y++)
      for (int k = 0; k < 16; k++) bus(1'b1, y * 16 + k, img_word(LV, y, k), d, w);
    for (int y = 0; y < 256; y += 37) begin
      bus(1'b0, y * 16 + (y % 16), '0, d, w);
      check(d == img_word(LV, y, y % 16), $sformatf("SRAM read back row %0d", y));
    end
  endtask

  task automatic run_and_check(input string name);
    word_t d; int w, polls;
    res_t e;
    e = recognize(LV);
    run_cycles = 0;
    bus(1'b0, 13843, '0, d, w);
    check(d == 16'h1111, $sformatf("reset word %h", d));
    n_reg_reads++;
    bus(1'b0, 13850, '0, d, w);
    check(d == 16'h0000, "out_ena low after reset");
    bus(1'b0, 13844, '0, d, w);
    check(d == 16'h2222, $sformatf("enable word %h", d));
    n_reg_reads++;
    // host reads SRAM while the circuit runs
    for (int k = 0; k < 4; k++) begin
      repeat (997) @(posedge local_clk);
      bus(1'b0, 16 * 200 + k, '0, d, w);
      check(d == img_word(LV, 200, k), "SRAM read during a run");
      n_sram_during_run++;
      if (w > 2) n_sram_waited++;
    end
    polls = 0;
    do begin
      repeat (20000) @(posedge local_clk);
      bus(1'b0, 13850, '0, d, w);
      polls++;
    end while (d != 16'h0001);
    begin
      word_t on, sn, or_, oq, op;
      bus(1'b0, 13845, '0, on, w);
      bus(1'b0, 13846, '0, sn, w);
      bus(1'b0, 13847, '0, or_, w);
      bus(1'b0, 13848, '0, oq, w);
      bus(1'b0, 13849, '0, op, w);
      n_reg_reads += 5;
      $display("INFO %s: %0d circuit cycles (%0d ms at 16.5 MHz), (p,q)=(%0d,%0d) r=%0d n=%0d N=%0d",
               name, run_cycles, run_cycles / 16500, op, oq, or_, sn, on);
      check(op == 16'(e.p) && oq == 16'(e.q) && or_ == 16'(e.r) && sn == 16'(e.n) && on == 16'(e.nn),
            $sformatf("%s: expected (%0d,%0d) r=%0d n=%0d N=%0d level %0d", name, e.p, e.q, e.r, e.n, e.nn, e.level));
      if (!e.ok) begin
        n_stop_low++;
        check(2 * sn < on, "a stopped search reports MDC < 0.5");
      end
    end
  endtask

  initial begin
    sys_rst = 1'b1; local_addr = '0; local_rd = 1'b0; local_wr = 1'b0; local_wdata = '0;
    repeat (8) @(posedge pci_clk);
    sys_rst <= 1'b0;
    // operation 1: the fruit outline of the document's test image
    clear_img(LV);
    draw_ring(LV, 195, 172, 56);
    draw_line(LV, 10, 0, 25, 255);
    draw_line(LV, 0, 80, 255, 70);
    draw_line(LV, 140, 75, 230, 150);
    load_image();
    run_and_check("ring");
    check(n_coarsen == 3, $sformatf("%0d coarsening passes", n_coarsen));
    check(n_global == 1024, $sformatf("%0d global candidates", n_global));
    check(n_local > 0 && n_local <= 27, $sformatf("%0d local candidates", n_local));
    // operation 2: clutter without a circle
    clear_img(LV);
    draw_line(LV, 10, 0, 25, 255);
    draw_line(LV, 0, 80, 255, 70);
    load_image();
    run_and_check("clutter");
    $display("INFO mechanisms: coarsen=%0d global=%0d local=%0d reg_reads=%0d sram_in_run=%0d sram_waited=%0d stop_low=%0d",
             n_coarsen, n_global, n_local, n_reg_reads, n_sram_during_run, n_sram_waited, n_stop_low);
    check(n_reg_reads > 0, "register reads happened");
    check(n_sram_during_run > 0, "SRAM reads during a run happened");
    check(n_sram_waited > 0, "an SRAM access waited for the circuit");
    check(n_stop_low > 0, "a search stopped on MDC < 0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
