// tb_async_sram: behavioural model of one asynchronous 32768 x 8 SRAM.
// Reads are combinational while re is high (0 otherwise); a write takes
// place when we falls, with the address and data present at that moment,
// as in a write cycle ended by the write-enable edge.
module tb_async_sram (
  input  logic [14:0] addr,
  input  logic        re,
  input  logic        we,
  input  logic [7:0]  din,
  output logic [7:0]  dout
);

  logic [7:0] mem [0:32767];

  assign dout = re ? mem[addr] : 8'h00;

  always @(negedge we) mem[addr] <= din;

endmodule
