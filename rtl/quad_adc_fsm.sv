// quad_adc_fsm: ADC state machine of the quadrant readout circuit.
//
// When the PIXEL state machine raises `sample_req` it sends a one-cycle
// start-of-conversion pulse to the ADC; in the image frame it also starts
// the SRAM_RD state machine, which fetches the stored reset value during the
// conversion. It waits for the rising edge of the ADC's end-of-conversion
// signal (active high here), latches the ADC word, and once the reset value
// is in the subtraction register (image frame only) writes one word to SRAM
// at the current address: the raw ADC word in the reset frame, reset minus
// image in the image frame (the ALU chooses). It then advances the address
// counter and answers the PIXEL state machine with a one-cycle
// `sample_done`. The write strobe is one clock cycle long, a choice of this
// design for a synchronous-write SRAM port.
module quad_adc_fsm
  import picnic_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_req,
  input  logic             reset_frame,
  input  logic             adc_eoc,
  input  logic [ADC_W-1:0] adc_data,
  input  logic             rd_done,
  output logic             adc_soc,
  output logic             rd_start,
  output logic [ADC_W-1:0] adc_word,
  output logic             sram_we,
  output logic             addr_inc,
  output logic             sample_done
);

  typedef enum logic [2:0] {A_IDLE, A_SOC, A_WAIT, A_WRITE, A_DONE} state_e;
  state_e state;

  logic eoc_q, got_eoc, got_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      eoc_q    <= 1'b0;
      got_eoc  <= 1'b0;
      got_rd   <= 1'b0;
      adc_word <= '0;
    end else begin
      eoc_q <= adc_eoc;
      unique case (state)
        A_IDLE:  if (sample_req) begin
                   got_eoc <= 1'b0;
                   got_rd  <= reset_frame;   // nothing to read in the reset frame
                   state   <= A_SOC;
                 end
        A_SOC:   state <= A_WAIT;
        A_WAIT: begin
                   if (adc_eoc && !eoc_q && !got_eoc) begin
                     adc_word <= adc_data;
                     got_eoc  <= 1'b1;
                   end
                   if (rd_done) got_rd <= 1'b1;
                   if (got_eoc && got_rd) state <= A_WRITE;
                 end
        A_WRITE: state <= A_DONE;
        A_DONE:  state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  assign adc_soc     = (state == A_SOC);
  assign rd_start    = (state == A_SOC) && !reset_frame;
  assign sram_we     = (state == A_WRITE);
  assign addr_inc    = (state == A_DONE);
  assign sample_done = (state == A_DONE);

endmodule
