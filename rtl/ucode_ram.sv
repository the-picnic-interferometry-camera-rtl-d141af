// ucode_ram: program memory of the interferogram (scan) circuit.
//
// The clocking sequence of scan mode is a program held in a RAM inside the
// CPLD, written by the host and executed by the microcode sequencer. Words
// are 12 bits (4-bit opcode, 8-bit operand). DEPTH defaults to 256 because
// the jump operand is one byte and can address 256 locations; the document
// does not give the RAM size. One synchronous write port (host) and one
// synchronous read port (sequencer, data valid the cycle after `raddr`).
// The contents are cleared at power-up (initial block) so that reads of
// unwritten words are defined.
module ucode_ram
  import picnic_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  ucode_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output ucode_t                   rdata
);

  ucode_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
