// cds_subtract: subtraction register and ALU of the quadrant readout circuit
// (correlated double sampling).
//
// In the reset frame the ALU passes the ADC word through so that it is
// stored in SRAM as the reset value of the pixel. In the image frame the
// SRAM_RD state machine first loads the stored reset value into the
// subtraction register (`load_sub`, one cycle), and the ALU then forms
// reset value minus image value, which the ADC state machine writes back to
// the same address. Photo-charge lowers the pixel voltage, so the difference
// grows with the collected light. The result wraps modulo 2^16 (16-bit SRAM
// word), a choice of this design. The ALU output is combinational.
module cds_subtract
  import picnic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_sub,
  input  logic [SRAM_DW-1:0] sram_rdata,
  input  logic [ADC_W-1:0]   adc_word,
  input  logic               reset_frame,
  output logic [SRAM_DW-1:0] sub_reg,
  output logic [SRAM_DW-1:0] alu_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sub_reg <= '0;
    else if (load_sub) sub_reg <= sram_rdata;
  end

  always_comb begin
    if (reset_frame) alu_out = SRAM_DW'(adc_word);
    else             alu_out = sub_reg - SRAM_DW'(adc_word);
  end

endmodule
