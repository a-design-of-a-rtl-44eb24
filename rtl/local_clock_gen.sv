// local_clock_gen: derives the circuit clock from the PCI bus clock.
//
// The document runs the circuit at 16.5 MHz, half of the 33 MHz PCI clock.
// A toggle flip-flop divides the input clock by two; its output is the clock
// of the interface block and the recognition circuit. rst (synchronous to
// pci_clk, active high) holds the output low. The divided clock rises on
// every second rising edge of pci_clk after rst is released, and has a 50 %
// duty cycle. The toggle-flop divider is this design's choice; the document
// only gives the two frequencies.
module local_clock_gen (
  input  logic pci_clk,
  input  logic rst,
  output logic clk_out
);

  always_ff @(posedge pci_clk) begin
    if (rst) clk_out <= 1'b0;
    else     clk_out <= ~clk_out;
  end

endmodule
