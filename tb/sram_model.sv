// sram_model: behavioural model of the 128K x 16 static RAM on the PMC card
// (testbench only). Asynchronous read while `oe` is high, write on the clock
// edge while `we` is high. Words are addressed modulo DEPTH and start at 0.
// The testbench may read and write `mem` directly to play the host's part.
module sram_model #(
  parameter int AW    = 18,
  parameter int DW    = 16,
  parameter int DEPTH = 131072
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          we,
  input  logic          oe,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) if (we) mem[int'(addr) % DEPTH] <= wdata;

  assign rdata = oe ? mem[int'(addr) % DEPTH] : '0;
endmodule
