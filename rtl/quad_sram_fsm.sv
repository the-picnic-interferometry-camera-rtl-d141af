// quad_sram_fsm: SRAM state machine of the quadrant readout circuit.
//
// It owns the frame sequence of correlated double sampling. It polls the
// start bit of the control register; when it is set it acknowledges it,
// requests the SRAM bus from the PCI bridge and, once granted, sets the
// toggle flip-flop to "reset frame", loads the address counter and starts
// the LINE state machine (the semaphore of the document). After the reset
// frame it waits Tintdel cycles (integration), toggles to "image frame",
// reloads the address counter and starts the LINE state machine again. After
// the image frame (whose pixels are stored as reset minus image) it releases
// the bus and raises INTA, which stays high until the host clears it or
// starts a new readout. The bus request/grant handshake is this design's
// reading of "communications with the PCI bridge for bus arbitration": the
// request is held for the whole readout and the grant must stay high while
// it is held. Tintdel is measured from the end of the reset frame to the
// start of the image frame.
module quad_sram_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,        // control register start bit
  output logic        start_ack,    // one cycle: start bit taken
  input  logic        int_clr,
  input  logic [23:0] tintdel,
  output logic        bus_req,
  input  logic        bus_gnt,
  output logic        reset_frame,  // toggle flip-flop: 1 reset frame, 0 image frame
  output logic        addr_load,    // load the address counter with the base
  output logic        line_start,   // semaphore to the LINE state machine
  input  logic        line_done,
  output logic        busy,
  output logic        inta
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_FRAME, S_INTDEL, S_FIN} state_e;
  state_e state, state_d;

  logic t_start, t_done, t_busy;
  logic go_frame;   // start a frame this cycle
  logic toggle;     // flip the frame flip-flop this cycle

  prog_timer #(.W(24)) u_tintdel (
    .clk, .rst_n, .start(t_start), .count(tintdel), .busy(t_busy), .done(t_done)
  );

  always_comb begin
    state_d   = state;
    t_start   = 1'b0;
    go_frame  = 1'b0;
    toggle    = 1'b0;
    start_ack = 1'b0;
    unique case (state)
      S_IDLE:   if (start) begin start_ack = 1'b1; state_d = S_REQ; end
      S_REQ:    if (bus_gnt) begin go_frame = 1'b1; state_d = S_FRAME; end
      S_FRAME:  if (line_done) begin
                  if (reset_frame) begin t_start = 1'b1; state_d = S_INTDEL; end
                  else state_d = S_FIN;
                end
      S_INTDEL: if (t_done) begin toggle = 1'b1; go_frame = 1'b1; state_d = S_FRAME; end
      S_FIN:    state_d = S_IDLE;
      default:  state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      reset_frame <= 1'b1;
      bus_req     <= 1'b0;
      inta        <= 1'b0;
      addr_load   <= 1'b0;
      line_start  <= 1'b0;
    end else begin
      state      <= state_d;
      addr_load  <= go_frame;
      line_start <= go_frame;
      if (start_ack) begin
        bus_req     <= 1'b1;
        inta        <= 1'b0;
        reset_frame <= 1'b1;
      end
      if (toggle) reset_frame <= ~reset_frame;
      if (state == S_FIN) begin
        bus_req <= 1'b0;
        inta    <= 1'b1;
      end else if (int_clr) begin
        inta <= 1'b0;
      end
    end
  end

  assign busy = (state != S_IDLE);

  // The bridge may not take the bus back while the readout holds it.
  a_gnt_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_FRAME, S_INTDEL}) |-> bus_gnt);

endmodule
