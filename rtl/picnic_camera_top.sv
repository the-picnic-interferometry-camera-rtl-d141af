// picnic_camera_top: CPLD controller of the PICNIC infrared camera.
//
// The controller sits between the detector electronics (clock drivers and
// ADC) and a single-board computer, and takes over all the timing of the
// readout so that the clocking is as steady as hard-wired logic. The CPU
// switches the readout method by loading another circuit into the CPLD; this
// top holds both circuits and the `mode_scan` input says which one is
// loaded:
//   mode_scan = 0  quadrant readout: correlated double sampling of a whole
//                  quadrant or a subquadrant into SRAM, for alignment;
//   mode_scan = 1  interferogram (scan) readout: a microcoded sequence reads
//                  a few pixels Nloops x Nreads times per data point, for
//                  fringe detection.
// The loaded circuit gets the register writes, the bus grant and the ADC,
// and drives the detector clocks, the SRAM, the bus request and INTA. The
// other circuit is held idle (no writes, no grant) so that its state is of
// no consequence. `mode_scan` should be changed only while both circuits
// are idle, as reloading the CPLD would. Modelling the reconfiguration as
// a select input is this design's choice.
//
// All ports are plain signals; the SRAM port has separate read and write
// data (the card's bidirectional data bus is outside this logic). The ADC
// end-of-conversion input is active high.
module picnic_camera_top
  import picnic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mode_scan,
  input  logic               reg_wr,
  input  logic [RA_W-1:0]    reg_addr,
  input  logic [RD_W-1:0]    reg_wdata,
  output logic [RD_W-1:0]    reg_rdata,
  output logic               bus_req,
  input  logic               bus_gnt,
  output logic               inta,
  output logic               scan_overrun,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output logic               sram_we,
  output logic               sram_oe,
  output logic               det_fsync,
  output logic               det_lsync,
  output logic               det_line,
  output logic               det_pixel,
  output logic               det_reset,
  output logic               adc_soc,
  input  logic               adc_eoc,
  input  logic [ADC_W-1:0]   adc_data
);

  // quadrant circuit
  logic [RD_W-1:0]    q_rdata;
  logic               q_req, q_inta, q_we, q_oe;
  logic [SRAM_AW-1:0] q_addr;
  logic [SRAM_DW-1:0] q_wdata;
  logic               q_fsync, q_lsync, q_line, q_pixel, q_reset, q_soc;
  // scan circuit
  logic [RD_W-1:0]    s_rdata;
  logic               s_req, s_inta, s_we;
  logic [SRAM_AW-1:0] s_addr;
  logic [SRAM_DW-1:0] s_wdata;
  logic               s_fsync, s_lsync, s_line, s_pixel, s_reset, s_soc;

  quad_readout u_quad (
    .clk, .rst_n,
    .reg_wr(reg_wr && !mode_scan), .reg_addr, .reg_wdata, .reg_rdata(q_rdata),
    .bus_req(q_req), .bus_gnt(bus_gnt && !mode_scan), .inta(q_inta),
    .sram_addr(q_addr), .sram_wdata(q_wdata), .sram_rdata, .sram_we(q_we), .sram_oe(q_oe),
    .det_fsync(q_fsync), .det_lsync(q_lsync), .det_line(q_line), .det_pixel(q_pixel),
    .det_reset(q_reset), .adc_soc(q_soc), .adc_eoc, .adc_data
  );

  scan_readout u_scan (
    .clk, .rst_n,
    .reg_wr(reg_wr && mode_scan), .reg_addr, .reg_wdata, .reg_rdata(s_rdata),
    .bus_req(s_req), .bus_gnt(bus_gnt && mode_scan), .inta(s_inta), .overrun(scan_overrun),
    .sram_addr(s_addr), .sram_wdata(s_wdata), .sram_we(s_we),
    .det_fsync(s_fsync), .det_lsync(s_lsync), .det_line(s_line), .det_pixel(s_pixel),
    .det_reset(s_reset), .adc_soc(s_soc), .adc_eoc, .adc_data
  );

  always_comb begin
    if (mode_scan) begin
      reg_rdata  = s_rdata;
      bus_req    = s_req;
      inta       = s_inta;
      sram_addr  = s_addr;
      sram_wdata = s_wdata;
      sram_we    = s_we;
      sram_oe    = 1'b0;
      det_fsync  = s_fsync;
      det_lsync  = s_lsync;
      det_line   = s_line;
      det_pixel  = s_pixel;
      det_reset  = s_reset;
      adc_soc    = s_soc;
    end else begin
      reg_rdata  = q_rdata;
      bus_req    = q_req;
      inta       = q_inta;
      sram_addr  = q_addr;
      sram_wdata = q_wdata;
      sram_we    = q_we;
      sram_oe    = q_oe;
      det_fsync  = q_fsync;
      det_lsync  = q_lsync;
      det_line   = q_line;
      det_pixel  = q_pixel;
      det_reset  = q_reset;
      adc_soc    = q_soc;
    end
  end

endmodule
