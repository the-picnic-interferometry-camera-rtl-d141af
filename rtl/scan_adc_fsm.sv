// scan_adc_fsm: ADC state machine and pixel registers of the interferogram
// (scan) circuit.
//
// For each read request from the sequencer it reads the addressed pixel
// Nreads times. Every read waits the settling time Tdel = Ndel cycles, sends
// a one-cycle start-of-conversion pulse, waits for the rising edge of the
// ADC's end-of-conversion signal and adds the ADC word to the pixel register
// selected by `pix_idx`; after the last read it answers with a one-cycle
// `read_done`. The registers therefore sum Nreads reads over Nloops passes,
// which is one data point. `clear` (the end of a data point, when the SRAM
// writer has taken a copy) zeroes all registers. Sums are ACC_W = 32 bits
// wide, enough for 16 reads x 7 loops of a 16-bit ADC; a request whose index
// is outside the MAX_PIX registers is converted but not stored.
module scan_adc_fsm
  import picnic_pkg::*;
#(
  parameter int MAX_PIX = 6
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         read_req,
  input  logic [$clog2(MAX_PIX+1)-1:0] pix_idx,
  input  logic [4:0]                   nreads,
  input  logic [8:0]                   ndel,
  input  logic                         clear,
  input  logic                         adc_eoc,
  input  logic [ADC_W-1:0]             adc_data,
  output logic                         adc_soc,
  output logic                         read_done,
  output logic [ACC_W-1:0]             acc [MAX_PIX]
);

  typedef enum logic [2:0] {D_IDLE, D_DEL, D_SOC, D_WAIT, D_DONE} state_e;
  state_e state, state_d;

  logic       t_start, t_done, t_busy;
  logic       eoc_q, conv_end;
  logic [4:0] rcnt;

  prog_timer #(.W(9)) u_tdel (
    .clk, .rst_n, .start(t_start), .count(ndel), .busy(t_busy), .done(t_done)
  );

  assign conv_end = adc_eoc && !eoc_q;

  always_comb begin
    state_d = state;
    t_start = 1'b0;
    unique case (state)
      D_IDLE: if (read_req) begin t_start = 1'b1; state_d = D_DEL; end
      D_DEL:  if (t_done) state_d = D_SOC;
      D_SOC:  state_d = D_WAIT;
      D_WAIT: if (conv_end) begin
                if (rcnt + 5'd1 >= nreads) state_d = D_DONE;
                else begin t_start = 1'b1; state_d = D_DEL; end
              end
      D_DONE: state_d = D_IDLE;
      default: state_d = D_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      eoc_q <= 1'b0;
      rcnt  <= '0;
      for (int i = 0; i < MAX_PIX; i++) acc[i] <= '0;
    end else begin
      state <= state_d;
      eoc_q <= adc_eoc;
      if (state == D_IDLE) rcnt <= '0;
      if (state == D_WAIT && conv_end) begin
        rcnt <= rcnt + 5'd1;
        for (int i = 0; i < MAX_PIX; i++)
          if (pix_idx == ($clog2(MAX_PIX+1))'(i)) acc[i] <= acc[i] + ACC_W'(adc_data);
      end
      if (clear)
        for (int i = 0; i < MAX_PIX; i++) acc[i] <= '0;
    end
  end

  assign adc_soc   = (state == D_SOC);
  assign read_done = (state == D_DONE);

  a_clear_idle: assert property (@(posedge clk) disable iff (!rst_n)
    clear |-> (state == D_IDLE));

endmodule
