// quad_sram_rd_fsm: SRAM_RD state machine of the quadrant readout circuit.
//
// In the image frame, while the ADC converts, it reads the reset-frame word
// stored at the current SRAM address and loads it into the subtraction
// register, so that the ALU can form reset minus image. A one-cycle
// `rd_start` enables the SRAM outputs for ACCESS_CYC cycles (the access
// time allowed to the asynchronous SRAM, this design's choice), and in the
// last of them `load_sub` loads the subtraction register and `rd_done`
// tells the ADC state machine that the value is ready.
module quad_sram_rd_fsm #(
  parameter int ACCESS_CYC = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rd_start,
  output logic sram_oe,
  output logic load_sub,
  output logic rd_done
);

  localparam int CW = $clog2(ACCESS_CYC + 1);
  logic          active;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
    end else if (!active) begin
      if (rd_start) begin
        active <= 1'b1;
        cnt    <= CW'(ACCESS_CYC - 1);
      end
    end else if (cnt == '0) begin
      active <= 1'b0;
    end else begin
      cnt <= cnt - CW'(1);
    end
  end

  assign sram_oe  = active;
  assign load_sub = active && (cnt == '0);
  assign rd_done  = load_sub;

endmodule
