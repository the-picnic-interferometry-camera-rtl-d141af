// scan_sequencer: microcode sequencer of the interferogram (scan) circuit.
//
// A scan starts with the array reset: FSYNC, then for each of RESET_LINES
// lines an LSYNC pulse with RESET (the PICNIC line-by-line reset) followed
// by one LINE clock change. The sequencer then runs the clocking program in
// the microcode RAM from address 0. Instructions (opcode:operand n):
//   0 line n         LINE clock changes level n times
//   1 pixel n        PIXEL clock changes level n times, then the pixel is read
//   2 fsync+line n   FSYNC pulse (line register to 0), then line n
//   3 lsync+pixel n  LSYNC pulse (pixel register to 0), then pixel n and read
//   4 jump n         end of one pass: go to address n
// Every sync pulse and every clock change lasts Tstep = Nbase cycles; both
// detector clocks are double-edged, so one change moves one line or pixel.
// A read is handed to the scan ADC state machine (`read_req` with the pixel
// register index, held until `read_done`), which reads the pixel Nreads
// times. Pixel register indices count reads from the start of each pass.
// The jump counts passes: after Nloops passes the data point is complete,
// `point_done` pulses (the pixel registers go to the SRAM writer) and the
// sample counter advances; after Nsmpl data points the scan ends. Fetching
// an instruction costs two cycles; an unknown opcode is skipped. That a
// pixel instruction ends with a read, and the reset sweep at scan start, are
// this design's reading of the document.
module scan_sequencer
  import picnic_pkg::*;
#(
  parameter int MAX_PIX     = 6,
  parameter int UDEPTH      = 256,
  parameter int RESET_LINES = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      start_ack,
  input  logic [7:0]                nbase,
  input  logic [2:0]                nloops,
  input  logic [15:0]               nsmpl,
  output logic [$clog2(UDEPTH)-1:0] uc_raddr,
  input  ucode_t                    uc_rdata,
  output logic                      read_req,
  output logic [$clog2(MAX_PIX+1)-1:0] pix_idx,
  input  logic                      read_done,
  output logic                      point_done,
  output logic                      scan_start,
  output logic                      busy,
  output logic [15:0]               smpl_cnt,
  output logic                      det_fsync,
  output logic                      det_lsync,
  output logic                      det_line,
  output logic                      det_pixel,
  output logic                      det_reset
);

  localparam int UW = $clog2(UDEPTH);
  localparam int PW = $clog2(MAX_PIX + 1);
  localparam int LW = $clog2(RESET_LINES + 1);

  typedef enum logic [3:0] {
    Q_IDLE, Q_RFSYNC, Q_RLSYNC, Q_RLINE, Q_FETCH, Q_DECODE,
    Q_SYNC, Q_CLK, Q_CLKW, Q_READ
  } state_e;
  state_e state, state_d;

  logic          t_start, t_done, t_busy;
  logic [UW-1:0] pc;
  logic [7:0]    cnt;          // clock changes still to make
  logic          clk_pixel;    // current instruction clocks PIXEL (else LINE)
  logic          sync_l;       // current sync pulse is LSYNC (else FSYNC)
  logic          do_read;      // current instruction ends with a read
  logic [2:0]    loop_cnt;
  logic [LW-1:0] rline;

  // combinational actions
  logic tog, next_pc, jump, decode, read_end, rl_inc;

  prog_timer #(.W(8)) u_step (
    .clk, .rst_n, .start(t_start), .count(nbase), .busy(t_busy), .done(t_done)
  );

  assign uc_raddr = pc;

  always_comb begin
    state_d   = state;
    t_start   = 1'b0;
    tog       = 1'b0;
    next_pc   = 1'b0;
    jump      = 1'b0;
    decode    = 1'b0;
    read_end  = 1'b0;
    rl_inc    = 1'b0;
    start_ack = 1'b0;
    unique case (state)
      Q_IDLE:   if (start) begin start_ack = 1'b1; t_start = 1'b1; state_d = Q_RFSYNC; end
      Q_RFSYNC: if (t_done) begin t_start = 1'b1; state_d = Q_RLSYNC; end
      Q_RLSYNC: if (t_done) begin
                  if (rline + LW'(1) >= LW'(RESET_LINES)) state_d = Q_FETCH;
                  else begin tog = 1'b1; t_start = 1'b1; state_d = Q_RLINE; end
                end
      Q_RLINE:  if (t_done) begin rl_inc = 1'b1; t_start = 1'b1; state_d = Q_RLSYNC; end
      Q_FETCH:  state_d = Q_DECODE;
      Q_DECODE: begin
                  decode = 1'b1;
                  unique case (uc_rdata.op)
                    OP_FSYNC_LINE, OP_LSYNC_PIXEL: begin t_start = 1'b1; state_d = Q_SYNC; end
                    OP_LINE, OP_PIXEL:             state_d = Q_CLK;
                    OP_JUMP: begin
                      jump = 1'b1;
                      if (loop_cnt + 3'd1 >= nloops && smpl_cnt + 16'd1 >= nsmpl)
                        state_d = Q_IDLE;
                      else
                        state_d = Q_FETCH;
                    end
                    default: begin next_pc = 1'b1; state_d = Q_FETCH; end
                  endcase
                end
      Q_SYNC:   if (t_done) state_d = Q_CLK;
      Q_CLK:    if (cnt != 8'd0) begin tog = 1'b1; t_start = 1'b1; state_d = Q_CLKW; end
                else if (do_read) state_d = Q_READ;
                else begin next_pc = 1'b1; state_d = Q_FETCH; end
      Q_CLKW:   if (t_done) state_d = Q_CLK;
      Q_READ:   if (read_done) begin read_end = 1'b1; next_pc = 1'b1; state_d = Q_FETCH; end
      default:  state_d = Q_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= Q_IDLE;
      pc         <= '0;
      cnt        <= '0;
      clk_pixel  <= 1'b0;
      sync_l     <= 1'b0;
      do_read    <= 1'b0;
      loop_cnt   <= '0;
      smpl_cnt   <= '0;
      pix_idx    <= '0;
      rline      <= '0;
      point_done <= 1'b0;
      scan_start <= 1'b0;
      det_fsync  <= 1'b0;
      det_lsync  <= 1'b0;
      det_reset  <= 1'b0;
      det_line   <= 1'b0;
      det_pixel  <= 1'b0;
    end else begin
      state      <= state_d;
      point_done <= 1'b0;
      scan_start <= start_ack;
      det_fsync  <= (state_d == Q_RFSYNC) || (state_d == Q_SYNC && !sync_l && !decode) ||
                    (decode && state_d == Q_SYNC && uc_rdata.op == OP_FSYNC_LINE);
      det_lsync  <= (state_d == Q_RLSYNC) || (state_d == Q_SYNC && sync_l && !decode) ||
                    (decode && state_d == Q_SYNC && uc_rdata.op == OP_LSYNC_PIXEL);
      det_reset  <= (state_d == Q_RLSYNC);
      if (start_ack) begin
        pc       <= '0;
        loop_cnt <= '0;
        smpl_cnt <= '0;
        pix_idx  <= '0;
        rline    <= '0;
      end
      if (rl_inc) rline <= rline + LW'(1);
      if (tog) begin
        if (state == Q_RLSYNC || !clk_pixel) det_line <= ~det_line;
        else                                 det_pixel <= ~det_pixel;
      end
      if (tog && state == Q_CLK) cnt <= cnt - 8'd1;
      if (decode) begin
        cnt       <= uc_rdata.n;
        clk_pixel <= (uc_rdata.op == OP_PIXEL) || (uc_rdata.op == OP_LSYNC_PIXEL);
        do_read   <= (uc_rdata.op == OP_PIXEL) || (uc_rdata.op == OP_LSYNC_PIXEL);
        sync_l    <= (uc_rdata.op == OP_LSYNC_PIXEL);
      end
      if (next_pc) pc <= pc + UW'(1);
      if (read_end && pix_idx != PW'(MAX_PIX)) pix_idx <= pix_idx + PW'(1);
      if (jump) begin
        pc      <= uc_rdata.n[UW-1:0];
        pix_idx <= '0;
        if (loop_cnt + 3'd1 >= nloops) begin
          loop_cnt   <= '0;
          point_done <= 1'b1;
          smpl_cnt   <= smpl_cnt + 16'd1;
        end else begin
          loop_cnt <= loop_cnt + 3'd1;
        end
      end
    end
  end

  assign read_req = (state == Q_READ);
  assign busy     = (state != Q_IDLE);

endmodule
