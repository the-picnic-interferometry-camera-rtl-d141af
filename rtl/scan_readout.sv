// scan_readout: interferogram-detection (scan mode) circuit of the PICNIC
// camera controller.
//
// A handful of pixels lit by the beam combiner are read over and over while
// the fringe scanner sweeps the optical delay. The host loads a clocking
// program into the microcode RAM and sets Nbase, Ndel, Nloops, Nreads, Nsmpl
// and Npix, then sets the start bit. The sequencer resets the array line by
// line and runs the program: each pass visits the pixels named by the
// program, each visit reads the pixel Nreads times into its pixel register,
// and Nloops passes make one data point (sample). The SRAM writer copies the
// pixel registers to SRAM while the next data point is being taken and
// pulses INTA, which the host uses to pace the piezo scanner. After Nsmpl
// data points the scan ends. SRAM holds raw sums; the host forms the
// difference of consecutive samples (Fowler sampling).
//
// Interface as for the quadrant circuit: a register port, a bus
// request/grant pair, a write-only SRAM port, the detector clock lines and
// the ADC handshake. INTA here is a pulse per data point.
module scan_readout
  import picnic_pkg::*;
#(
  parameter int MAX_PIX     = 6,
  parameter int UDEPTH      = 256,
  parameter int RESET_LINES = 128,
  parameter int INTA_CYC    = 33
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               reg_wr,
  input  logic [RA_W-1:0]    reg_addr,
  input  logic [RD_W-1:0]    reg_wdata,
  output logic [RD_W-1:0]    reg_rdata,
  output logic               bus_req,
  input  logic               bus_gnt,
  output logic               inta,
  output logic               overrun,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  output logic               sram_we,
  output logic               det_fsync,
  output logic               det_lsync,
  output logic               det_line,
  output logic               det_pixel,
  output logic               det_reset,
  output logic               adc_soc,
  input  logic               adc_eoc,
  input  logic [ADC_W-1:0]   adc_data
);

  localparam int PW = $clog2(MAX_PIX + 1);
  localparam int UW = $clog2(UDEPTH);

  logic          start, start_ack, busy, seq_busy, wr_busy;
  logic [7:0]    nbase;
  logic [8:0]    ndel;
  logic [2:0]    nloops;
  logic [4:0]    nreads;
  logic [15:0]   nsmpl, smpl_cnt;
  logic [PW-1:0] npix, pix_idx;
  logic          u_we;
  logic [UW-1:0] u_waddr, u_raddr;
  ucode_t        u_wdata, u_rdata;
  logic          read_req, read_done, point_done, scan_start;
  logic [ACC_W-1:0] acc [MAX_PIX];

  assign busy = seq_busy || point_done || wr_busy;   // no gap before the last transfer

  scan_regs #(.MAX_PIX(MAX_PIX), .UDEPTH(UDEPTH)) u_regs (
    .clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .start_ack, .busy, .inta, .start,
    .nbase, .ndel, .nloops, .nreads, .nsmpl, .npix, .u_we, .u_waddr, .u_wdata
  );

  ucode_ram #(.DEPTH(UDEPTH)) u_ram (
    .clk, .we(u_we), .waddr(u_waddr), .wdata(u_wdata), .raddr(u_raddr), .rdata(u_rdata)
  );

  scan_sequencer #(.MAX_PIX(MAX_PIX), .UDEPTH(UDEPTH), .RESET_LINES(RESET_LINES)) u_seq (
    .clk, .rst_n, .start, .start_ack, .nbase, .nloops, .nsmpl,
    .uc_raddr(u_raddr), .uc_rdata(u_rdata), .read_req, .pix_idx, .read_done,
    .point_done, .scan_start, .busy(seq_busy), .smpl_cnt,
    .det_fsync, .det_lsync, .det_line, .det_pixel, .det_reset
  );

  scan_adc_fsm #(.MAX_PIX(MAX_PIX)) u_adc (
    .clk, .rst_n, .read_req, .pix_idx, .nreads, .ndel, .clear(point_done),
    .adc_eoc, .adc_data, .adc_soc, .read_done, .acc
  );

  scan_sram_wr #(.MAX_PIX(MAX_PIX), .INTA_CYC(INTA_CYC)) u_wr (
    .clk, .rst_n, .scan_start, .capture(point_done), .acc_in(acc), .npix,
    .bus_req, .bus_gnt, .sram_addr, .sram_wdata, .sram_we, .inta,
    .busy(wr_busy), .overrun
  );

endmodule
