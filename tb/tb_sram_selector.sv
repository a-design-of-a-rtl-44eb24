// tb_sram_selector: two random requesters (the recognition side and the
// host side) share the selector, which drives two asynchronous SRAM models.
// Each side writes and reads back random words in its own address range;
// every read is compared with a shadow copy. Also checks that a lone access
// takes two cycles, that both sides waiting are served alternately, and
// that the byte halves land in the right SRAM.
module tb_sram_selector;
  import cpr_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  mem_req_t   rc_req, pci_req;
  mem_rsp_t   rc_rsp, pci_rsp;
  addr_t      a1, a2;
  logic       re1, we1, oe1, re2, we2, oe2;
  logic [7:0] do1, di1, do2, di2;
  int         checks = 0, failures = 0;

  sram_selector dut (
    .clk, .rst, .rc_req, .rc_rsp, .pci_req, .pci_rsp,
    .sram1_addr(a1), .sram1_re(re1), .sram1_we(we1), .sram1_dout(do1), .sram1_doe(oe1), .sram1_din(di1),
    .sram2_addr(a2), .sram2_re(re2), .sram2_we(we2), .sram2_dout(do2), .sram2_doe(oe2), .sram2_din(di2)
  );
  tb_async_sram u_s1 (.addr(a1), .re(re1), .we(we1), .din(do1), .dout(di1));
  tb_async_sram u_s2 (.addr(a2), .re(re2), .we(we2), .din(do2), .dout(di2));

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

  word_t shadow [0:255];
  int    served [2] = '{0, 0};
  int    rc_grants = 0, pci_grants = 0, alternations = 0;
  bit    last_pci;

  always @(negedge clk) begin
    if (rc_rsp.ack && pci_rsp.ack) check(1'b0, "both sides acknowledged at once");
    if (rc_rsp.ack)  begin if (last_pci) alternations++; last_pci = 1'b0; rc_grants++; end
    if (pci_rsp.ack) begin if (!last_pci) alternations++; last_pci = 1'b1; pci_grants++; end
  end

  // side 0 = recognition (addresses 0..127), side 1 = host (128..255)
  task automatic access(input int side, input bit wr, input int a, input word_t d, output word_t q, output int cyc);
    mem_req_t rq;
    rq = '0; rq.re = !wr; rq.we = wr; rq.addr = addr_t'(a); rq.wdata = d;
    // requests change and responses are sampled at the falling edge
    @(negedge clk);
    if (side == 0) rc_req = rq; else pci_req = rq;
    cyc = 1;
    while (!(side == 0 ? rc_rsp.ack : pci_rsp.ack)) begin
      @(negedge clk);
      cyc++;
    end
    q = (side == 0) ? rc_rsp.rdata : pci_rsp.rdata;
    if (side == 0) rc_req = '0; else pci_req = '0;
    served[side]++;
  endtask

  task automatic traffic(input int side, input int count);
    word_t q; int cyc, a;
    for (int k = 0; k < count; k++) begin
      a = side * 128 + $urandom % 128;
      if ($urandom % 2) begin
        word_t d;
        d = word_t'($urandom);
        access(side, 1'b1, a, d, q, cyc);
        shadow[a] = d;
      end else begin
        access(side, 1'b0, a, '0, q, cyc);
        check(q == shadow[a], $sformatf("side %0d read %0d: got %h expected %h", side, a, q, shadow[a]));
      end
      if ($urandom % 3 == 0) @(negedge clk);
    end
  endtask

  initial begin
    word_t q; int cyc;
    rst = 1'b1; rc_req = '0; pci_req = '0; last_pci = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // initialise both ranges through the host side
    for (int a = 0; a < 256; a++) begin
      shadow[a] = word_t'($urandom);
      access(1, 1'b1, a, shadow[a], q, cyc);
    end
    check(u_s1.mem[5] == shadow[5][7:0] && u_s2.mem[5] == shadow[5][15:8], "byte lanes");
    access(0, 1'b0, 7, '0, q, cyc);
    check(cyc == 2 && q == shadow[7], $sformatf("lone read took %0d cycles", cyc));
    alternations = 0;
    fork
      traffic(0, 300);
      traffic(1, 300);
    join
    check(served[0] == 301 && served[1] == 556, $sformatf("served rc=%0d host=%0d", served[0], served[1]));
    check(alternations > 100, $sformatf("only %0d alternations under contention", alternations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
