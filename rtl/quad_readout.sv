// quad_readout: quadrant readout circuit of the PICNIC camera controller
// (correlated double sampling of a whole quadrant or of a subquadrant).
//
// Five state machines share the work. The SRAM state machine takes the start
// bit, obtains the SRAM bus and runs two frames: a reset frame, in which
// every line is reset together with LSYNC and each pixel's reset level is
// written to SRAM, and, Tintdel later, an image frame, in which each pixel is
// read again and reset minus image overwrites the stored word. The LINE and
// PIXEL state machines clock the detector (FSYNC/LINE, LSYNC/PIXEL, both
// clocks double-edged) over the NW x NH window whose corner is (Nx, Ny). The
// ADC state machine converts each pixel and writes SRAM; the SRAM_RD state
// machine fetches the reset value into the subtraction register during the
// conversion. The address counter gives base + line*NW + pixel. When both
// frames are in SRAM the bus is released and INTA is raised; the host reads
// the frame from SRAM through the bridge and clears INTA with CTRL bit 1.
//
// Interface: a simple register port (write strobe, word address, 32-bit
// data, combinational read) standing for the local side of the PCI bridge;
// a bus request/grant pair; an asynchronous-read, synchronous-write SRAM
// port with separate read and write data; the detector clock lines; and the
// ADC start/end-of-conversion handshake with a 16-bit parallel word. The
// block structure follows the document's quadrant-mode diagram; the register
// map, the handshakes and the stepping order are this design's choices.
module quad_readout
  import picnic_pkg::*;
#(
  parameter int QUAD_PIX   = 128,  // pixels per quadrant side
  parameter int ACCESS_CYC = 2     // SRAM read access, clock cycles
) (
  input  logic               clk,
  input  logic               rst_n,
  // host register port (local side of the PCI bridge)
  input  logic               reg_wr,
  input  logic [RA_W-1:0]    reg_addr,
  input  logic [RD_W-1:0]    reg_wdata,
  output logic [RD_W-1:0]    reg_rdata,
  // SRAM bus arbitration and interrupt
  output logic               bus_req,
  input  logic               bus_gnt,
  output logic               inta,
  // SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output logic               sram_we,
  output logic               sram_oe,
  // PICNIC clocks
  output logic               det_fsync,
  output logic               det_lsync,
  output logic               det_line,
  output logic               det_pixel,
  output logic               det_reset,
  // ADC
  output logic               adc_soc,
  input  logic               adc_eoc,
  input  logic [ADC_W-1:0]   adc_data
);

  logic        start, start_ack, int_clr, busy;
  logic [15:0] tstep, tdel;
  logic [23:0] tintdel;
  logic [7:0]  nx, ny;
  logic [8:0]  nw, nh;
  logic [SRAM_AW-1:0] abase;
  logic        abase_wr;

  logic reset_frame, addr_load, line_start, line_done;
  logic pix_start, pix_done, sample_req, sample_done;
  logic rd_start, rd_done, load_sub, addr_inc;
  logic [8:0]  line_cnt, pix_cnt;
  logic [ADC_W-1:0]   adc_word;
  logic [SRAM_DW-1:0] sub_reg;

  quad_regs #(.QUAD_PIX(QUAD_PIX)) u_regs (
    .clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .start_ack, .busy, .inta, .start, .int_clr,
    .tstep, .tdel, .tintdel, .nx, .ny, .nw, .nh, .abase, .abase_wr
  );

  quad_sram_fsm u_sram_fsm (
    .clk, .rst_n, .start, .start_ack, .int_clr, .tintdel,
    .bus_req, .bus_gnt, .reset_frame, .addr_load, .line_start, .line_done,
    .busy, .inta
  );

  quad_line_fsm u_line (
    .clk, .rst_n, .start(line_start), .reset_frame, .tstep, .ny, .nh,
    .lsync(det_lsync), .pix_done, .pix_start,
    .fsync(det_fsync), .line_clk(det_line), .det_reset, .line_cnt, .done(line_done)
  );

  quad_pixel_fsm u_pixel (
    .clk, .rst_n, .start(pix_start), .tstep, .tdel, .nx, .nw,
    .sample_done, .sample_req, .lsync(det_lsync), .pixel_clk(det_pixel),
    .pix_cnt, .done(pix_done)
  );

  quad_adc_fsm u_adc (
    .clk, .rst_n, .sample_req, .reset_frame, .adc_eoc, .adc_data, .rd_done,
    .adc_soc, .rd_start, .adc_word, .sram_we, .addr_inc, .sample_done
  );

  quad_sram_rd_fsm #(.ACCESS_CYC(ACCESS_CYC)) u_sram_rd (
    .clk, .rst_n, .rd_start, .sram_oe, .load_sub, .rd_done
  );

  cds_subtract u_cds (
    .clk, .rst_n, .load_sub, .sram_rdata, .adc_word, .reset_frame,
    .sub_reg, .alu_out(sram_wdata)
  );

  quad_addr_counter u_addr (
    .clk, .rst_n, .load(addr_load || abase_wr), .load_val(abase),
    .inc(addr_inc), .addr(sram_addr)
  );

  // SRAM is touched only while the bus is held, and never read and written
  // in the same cycle.
  a_we_owned: assert property (@(posedge clk) disable iff (!rst_n)
    (sram_we || sram_oe) |-> (bus_req && bus_gnt));
  a_we_oe:    assert property (@(posedge clk) disable iff (!rst_n)
    !(sram_we && sram_oe));

endmodule
