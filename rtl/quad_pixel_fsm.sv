// quad_pixel_fsm: PIXEL state machine of the quadrant readout circuit.
//
// Started by the LINE state machine for each line, it pulses LSYNC for one
// Tstep (returning the detector's pixel register to pixel 0), changes the
// level of the double-edged PIXEL clock Nx times, one Tstep apart, to reach
// the first pixel of the subquadrant, and then reads NW pixels. For each
// pixel it waits the settling delay Tdel after the last clock change, raises
// the sample semaphore `sample_req` and holds it until the ADC state machine
// answers with `sample_done`; before every following pixel it changes the
// PIXEL clock level once and waits one Tstep. Stepping costs Tstep per pixel
// and each read costs Tdel plus the conversion, as in the document's
// integration-time formula. `pix_cnt` counts pixels read on the line;
// `done` pulses for one cycle after the last one.
module quad_pixel_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] tstep,
  input  logic [15:0] tdel,
  input  logic [7:0]  nx,
  input  logic [8:0]  nw,
  input  logic        sample_done,
  output logic        sample_req,
  output logic        lsync,
  output logic        pixel_clk,
  output logic [8:0]  pix_cnt,
  output logic        done
);

  typedef enum logic [2:0] {P_IDLE, P_LSYNC, P_SKIP, P_SETTLE, P_SAMPLE, P_STEP} state_e;
  state_e state, state_d;

  logic        t_start, t_done, t_busy;
  logic [15:0] t_count;
  logic        tog, pix_end;
  logic [7:0]  skipped;

  prog_timer #(.W(16)) u_step (
    .clk, .rst_n, .start(t_start), .count(t_count), .busy(t_busy), .done(t_done)
  );

  always_comb begin
    state_d = state;
    t_start = 1'b0;
    t_count = tstep;
    tog     = 1'b0;
    pix_end = 1'b0;
    unique case (state)
      P_IDLE:   if (start) begin t_start = 1'b1; state_d = P_LSYNC; end
      P_LSYNC:  if (t_done) begin
                  t_start = 1'b1;
                  if (nx != 8'd0) begin tog = 1'b1; state_d = P_SKIP; end
                  else begin t_count = tdel; state_d = P_SETTLE; end
                end
      P_SKIP:   if (t_done) begin
                  t_start = 1'b1;
                  if (skipped == nx) begin t_count = tdel; state_d = P_SETTLE; end
                  else tog = 1'b1;
                end
      P_SETTLE: if (t_done) state_d = P_SAMPLE;
      P_SAMPLE: if (sample_done) begin
                  pix_end = 1'b1;
                  if (pix_cnt + 9'd1 >= nw) state_d = P_IDLE;
                  else begin tog = 1'b1; t_start = 1'b1; state_d = P_STEP; end
                end
      P_STEP:   if (t_done) begin t_start = 1'b1; t_count = tdel; state_d = P_SETTLE; end
      default:  state_d = P_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      lsync     <= 1'b0;
      pixel_clk <= 1'b0;
      skipped   <= '0;
      pix_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      state <= state_d;
      lsync <= (state_d == P_LSYNC);
      done  <= pix_end && (state_d == P_IDLE);
      if (tog) pixel_clk <= ~pixel_clk;
      if (state == P_IDLE && start) begin
        skipped <= '0;
        pix_cnt <= '0;
      end
      if (tog && state != P_SAMPLE) skipped <= skipped + 8'd1;
      if (pix_end) pix_cnt <= pix_cnt + 9'd1;
    end
  end

  assign sample_req = (state == P_SAMPLE);

endmodule
