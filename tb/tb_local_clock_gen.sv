// tb_local_clock_gen: checks that the generated clock is low during reset,
// toggles on every rising edge of the 33 MHz input afterwards, and so has
// half the input frequency (16.5 MHz) with a 50 % duty cycle.
module tb_local_clock_gen;
  timeunit 1ns;
  timeprecision 1ps;

  logic pci_clk = 1'b0;
  logic rst;
  logic clk_out;
  int   checks = 0, failures = 0;
  int   rises = 0;
  realtime t_last, t_rise;

  local_clock_gen dut (.pci_clk, .rst, .clk_out);

  always #15.15 pci_clk = ~pci_clk;   // 33 MHz

  initial begin
    repeat (10000) @(posedge pci_clk);
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
    bit prev;
    rst = 1'b1;
    repeat (4) @(posedge pci_clk);
    @(negedge pci_clk);
    check(clk_out == 1'b0, "output low in reset");
    rst = 1'b0;
    prev = clk_out;
    for (int k = 0; k < 200; k++) begin
      @(negedge pci_clk);
      check(clk_out != prev, "toggles every input cycle");
      prev = clk_out;
    end
    // period of the generated clock
    @(posedge clk_out); t_last = $realtime;
    for (int k = 0; k < 10; k++) begin
      @(posedge clk_out); t_rise = $realtime;
      check(t_rise - t_last > 60.5 && t_rise - t_last < 60.7, $sformatf("period %0f ns", t_rise - t_last));
      t_last = t_rise;
      @(negedge clk_out);
      check($realtime - t_rise > 30.2 && $realtime - t_rise < 30.4, "50 % duty cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
