// quad_line_fsm: LINE state machine of the quadrant readout circuit.
//
// Started by the SRAM state machine, it pulses FSYNC for one Tstep (which
// returns the detector's line register to line 0), then changes the level of
// the LINE clock Ny times, one Tstep apart, to reach the first line of the
// subquadrant. For each of the NH lines it starts the PIXEL state machine and
// waits for it to finish the line; between lines it changes the LINE clock
// level once more and waits one Tstep. The PICNIC line clock is double-edged,
// so every level change moves one line. In the reset frame RESET is driven
// together with the LSYNC pulse of the PIXEL state machine, which is the
// detector's line-by-line reset. `line_cnt` counts the lines read in the
// frame; `done` pulses for one cycle after the last line. FSYNC, LINE and
// the start pulse are registered outputs.
module quad_line_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        reset_frame,
  input  logic [15:0] tstep,
  input  logic [7:0]  ny,
  input  logic [8:0]  nh,
  input  logic        lsync,       // from the PIXEL state machine
  input  logic        pix_done,
  output logic        pix_start,
  output logic        fsync,
  output logic        line_clk,
  output logic        det_reset,
  output logic [8:0]  line_cnt,
  output logic        done
);

  typedef enum logic [2:0] {L_IDLE, L_FSYNC, L_SKIP, L_ROW, L_ADV} state_e;
  state_e state, state_d;

  logic       t_start, t_done, t_busy;
  logic       tog, go_row, row_end;
  logic [7:0] skipped;

  prog_timer #(.W(16)) u_step (
    .clk, .rst_n, .start(t_start), .count(tstep), .busy(t_busy), .done(t_done)
  );

  always_comb begin
    state_d = state;
    t_start = 1'b0;
    tog     = 1'b0;
    go_row  = 1'b0;
    row_end = 1'b0;
    unique case (state)
      L_IDLE:  if (start) begin t_start = 1'b1; state_d = L_FSYNC; end
      L_FSYNC: if (t_done) begin
                 if (ny != 8'd0) begin tog = 1'b1; t_start = 1'b1; state_d = L_SKIP; end
                 else begin go_row = 1'b1; state_d = L_ROW; end
               end
      L_SKIP:  if (t_done) begin
                 if (skipped == ny) begin go_row = 1'b1; state_d = L_ROW; end
                 else begin tog = 1'b1; t_start = 1'b1; end
               end
      L_ROW:   if (pix_done) begin
                 row_end = 1'b1;
                 if (line_cnt + 9'd1 >= nh) state_d = L_IDLE;
                 else begin tog = 1'b1; t_start = 1'b1; state_d = L_ADV; end
               end
      L_ADV:   if (t_done) begin go_row = 1'b1; state_d = L_ROW; end
      default: state_d = L_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= L_IDLE;
      fsync     <= 1'b0;
      line_clk  <= 1'b0;
      skipped   <= '0;
      line_cnt  <= '0;
      pix_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      state     <= state_d;
      fsync     <= (state_d == L_FSYNC);
      pix_start <= go_row;
      done      <= row_end && (state_d == L_IDLE);
      if (tog) line_clk <= ~line_clk;
      if (state == L_IDLE && start) begin
        skipped  <= '0;
        line_cnt <= '0;
      end
      if (tog && state != L_ROW) skipped <= skipped + 8'd1;
      if (row_end) line_cnt <= line_cnt + 9'd1;
    end
  end

  assign det_reset = reset_frame & lsync;

endmodule
