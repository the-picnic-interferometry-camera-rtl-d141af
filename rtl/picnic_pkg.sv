// picnic_pkg: types and constants shared by the PICNIC camera controller.
//
// Widths of the card's buses follow the block diagram of the quadrant circuit:
// a 16-bit SRAM/ADC data path and an 18-bit SRAM address. The microcode word
// of the interferogram (scan) circuit is 12 bits: a 4-bit opcode followed by
// an 8-bit operand, which is how the example clocking program is written
// (e.g. 0x203 = fsync+line 3). The opcode values are the document's; the
// register maps of both circuits are this design's own choice.
package picnic_pkg;

  localparam int ADC_W   = 16;   // ADC word and SRAM data width
  localparam int SRAM_AW = 18;   // SRAM address width
  localparam int SRAM_DW = 16;
  localparam int ACC_W   = 32;   // scan-mode pixel register (two SRAM words)
  localparam int RA_W    = 5;    // host register address width
  localparam int RD_W    = 32;   // host data width (32-bit PCI bus)

  // Scan-mode microcode opcodes.
  typedef enum logic [3:0] {
    OP_LINE        = 4'h0,  // LINE clock changes level n times
    OP_PIXEL       = 4'h1,  // PIXEL clock changes level n times, then read
    OP_FSYNC_LINE  = 4'h2,  // FSYNC pulse (line register reset), then line n
    OP_LSYNC_PIXEL = 4'h3,  // LSYNC pulse (pixel register reset), then pixel n
    OP_JUMP        = 4'h4   // jump to program location n (loop end)
  } opcode_e;

  typedef struct packed {
    opcode_e    op;
    logic [7:0] n;
  } ucode_t;

  // Quadrant-mode register map (word addresses on the host bus).
  localparam logic [RA_W-1:0] QR_CTRL    = 5'd0;  // bit0 start, bit1 INTA clear
  localparam logic [RA_W-1:0] QR_TSTEP   = 5'd1;  // pixel/line step, clock cycles
  localparam logic [RA_W-1:0] QR_TDEL    = 5'd2;  // clock-to-sample delay, cycles
  localparam logic [RA_W-1:0] QR_TINTDEL = 5'd3;  // reset-to-image frame delay, cycles
  localparam logic [RA_W-1:0] QR_NX      = 5'd4;  // subquadrant corner, pixel
  localparam logic [RA_W-1:0] QR_NY      = 5'd5;  // subquadrant corner, line
  localparam logic [RA_W-1:0] QR_NW      = 5'd6;  // subquadrant width
  localparam logic [RA_W-1:0] QR_NH      = 5'd7;  // subquadrant height
  localparam logic [RA_W-1:0] QR_ABASE   = 5'd8;  // SRAM base address (address counter)

  // Scan-mode register map.
  localparam logic [RA_W-1:0] SR_CTRL    = 5'd0;  // bit0 start
  localparam logic [RA_W-1:0] SR_NBASE   = 5'd1;  // Tstep = Nbase / f
  localparam logic [RA_W-1:0] SR_NDEL    = 5'd2;  // Tdel  = Ndel / f
  localparam logic [RA_W-1:0] SR_NLOOPS  = 5'd3;
  localparam logic [RA_W-1:0] SR_NREADS  = 5'd4;
  localparam logic [RA_W-1:0] SR_NSMPL   = 5'd5;
  localparam logic [RA_W-1:0] SR_NPIX    = 5'd6;
  localparam logic [RA_W-1:0] SR_UADDR   = 5'd7;  // microcode write address
  localparam logic [RA_W-1:0] SR_UDATA   = 5'd8;  // microcode word, auto-increment

endpackage
