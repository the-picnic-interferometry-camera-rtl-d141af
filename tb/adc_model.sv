// adc_model: behavioural model of the camera's ADC (testbench only).
// On a start-of-conversion pulse it samples `level` (clamped to 16 bits),
// drops end-of-conversion, and CONV_CYC cycles later presents the word and
// raises end-of-conversion again. It counts conversions.
module adc_model #(
  parameter int CONV_CYC = 330
) (
  input  logic        clk,
  input  logic        soc,
  input  int          level,
  output logic        eoc,
  output logic [15:0] data,
  output int          n_conv
);
  int   cnt;
  int   held;

  initial begin eoc = 1'b1; data = '0; cnt = 0; n_conv = 0; held = 0; end

  always @(posedge clk) begin
    if (soc) begin
      held   <= (level > 65535) ? 65535 : level;
      eoc    <= 1'b0;
      cnt    <= CONV_CYC;
      n_conv <= n_conv + 1;
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin
        eoc  <= 1'b1;
        data <= 16'(held);
      end
    end
  end
endmodule
