// tb_interface_block: drives the local bus like the PCI9052 and checks the
// address decoder, selector 1 and the output multiplexer: 13843 answers
// 1111h and pulses the circuit reset, 13844 answers 2222h and raises the
// enable, 13845 .. 13850 return N, n, r, q, p, out_ena. SRAM words written
// over the bus are read back over the bus and over the circuit's memory
// port, and words the circuit writes are read by the host.
module tb_interface_block;
  import cpr_pkg::*;

  logic        clk = 1'b0;
  logic        sys_rst;
  addr_t       local_addr;
  logic        local_rd, local_wr;
  word_t       local_wdata, local_rdata;
  logic        local_rdata_oe, local_ready;
  logic        rc_rst, rc_ena, rc_out_ena;
  logic [7:0]  rc_p, rc_q, rc_r;
  word_t       rc_n, rc_nn;
  mem_req_t    rc_mem_req;
  mem_rsp_t    rc_mem_rsp;
  addr_t       sram1_addr, sram2_addr;
  logic        sram1_re, sram1_we, sram1_doe, sram2_re, sram2_we, sram2_doe;
  logic [7:0]  sram1_dout, sram1_din, sram2_dout, sram2_din;
  int          checks = 0, failures = 0;
  int          rst_pulses = 0;

  interface_block dut (.*);
  tb_async_sram u_s1 (.addr(sram1_addr), .re(sram1_re), .we(sram1_we), .din(sram1_dout), .dout(sram1_din));
  tb_async_sram u_s2 (.addr(sram2_addr), .re(sram2_re), .we(sram2_we), .din(sram2_dout), .dout(sram2_din));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!sys_rst && rc_rst) rst_pulses++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Local-bus access: request at a falling edge, held until ready.
  task automatic bus(input bit wr, input int addr, input word_t wdata, output word_t rdata);
    @(negedge clk);
    local_addr = addr_t'(addr); local_wdata = wdata; local_rd = !wr; local_wr = wr;
    while (!local_ready) @(negedge clk);
    rdata = local_rdata;
    if (!wr) check(local_rdata_oe, "read data driven with ready");
    local_rd = 1'b0; local_wr = 1'b0;
  endtask

  task automatic rc_access(input bit wr, input int addr, input word_t wdata, output word_t rdata);
    @(negedge clk);
    rc_mem_req = '0; rc_mem_req.re = !wr; rc_mem_req.we = wr;
    rc_mem_req.addr = addr_t'(addr); rc_mem_req.wdata = wdata;
    while (!rc_mem_rsp.ack) @(negedge clk);
    rdata = rc_mem_rsp.rdata;
    rc_mem_req = '0;
  endtask

  initial begin
    word_t d;
    sys_rst = 1'b1; local_addr = '0; local_rd = 1'b0; local_wr = 1'b0; local_wdata = '0;
    rc_mem_req = '0; rc_out_ena = 1'b0;
    rc_p = 8'd195; rc_q = 8'd172; rc_r = 8'd56; rc_n = 16'd340; rc_nn = 16'd352;
    repeat (3) @(posedge clk);
    sys_rst = 1'b0;
    check(!rc_ena, "enable low after board reset");
    bus(1'b0, 13844, '0, d);
    check(d == 16'h2222, $sformatf("enable word %h", d));
    check(rc_ena, "enable set by 13844");
    bus(1'b0, 13843, '0, d);
    check(d == 16'h1111, $sformatf("reset word %h", d));
    @(posedge clk);
    check(rst_pulses == 1, $sformatf("%0d reset pulses", rst_pulses));
    check(!rc_ena, "enable cleared by 13843");
    bus(1'b1, 13844, 16'hFFFF, d);
    check(rc_ena, "a write to 13844 also enables");
    bus(1'b0, 13845, '0, d); check(d == 16'd352, "N at 13845");
    bus(1'b0, 13846, '0, d); check(d == 16'd340, "n at 13846");
    bus(1'b0, 13847, '0, d); check(d == 16'd56,  "r at 13847");
    bus(1'b0, 13848, '0, d); check(d == 16'd172, "q at 13848");
    bus(1'b0, 13849, '0, d); check(d == 16'd195, "p at 13849");
    bus(1'b0, 13850, '0, d); check(d == 16'd0,   "out_ena low at 13850");
    rc_out_ena = 1'b1;
    bus(1'b0, 13850, '0, d); check(d == 16'd1,   "out_ena high at 13850");
    bus(1'b0, 20000, '0, d); check(d == 16'd0,   "unmapped address reads 0");
    // SRAM through selector 2
    for (int k = 0; k < 20; k++) bus(1'b1, k * 691, word_t'(16'h1000 + k * 257), d);
    for (int k = 0; k < 20; k++) begin
      bus(1'b0, k * 691, '0, d);
      check(d == word_t'(16'h1000 + k * 257), $sformatf("host read of word %0d", k * 691));
      rc_access(1'b0, k * 691, '0, d);
      check(d == word_t'(16'h1000 + k * 257), $sformatf("circuit read of word %0d", k * 691));
    end
    check(u_s1.mem[691] == 8'((16'h1000 + 257) & 16'hFF) && u_s2.mem[691] == 8'((16'h1000 + 257) >> 8), "byte lanes");
    rc_access(1'b1, 13842, 16'hA5C3, d);
    bus(1'b0, 13842, '0, d);
    check(d == 16'hA5C3, "host reads a word the circuit wrote at the top of the SRAM area");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
