// quad_regs: control register and address decoder of the quadrant readout
// circuit.
//
// The CPU reaches the CPLD through the PCI bridge; this block decodes the
// bridge's register writes into the control register (start bit, interrupt
// clear) and the readout parameters the document lists: Tstep, Tdel and
// Tintdel as clock-cycle counts of the 33 MHz clock, and the subquadrant
// corner (Nx, Ny). The subquadrant size (NW, NH) and the SRAM base address
// loaded into the address counter are this design's additions so that a
// "small area of the detector" can be defined; the register addresses and
// reset values (a full 128x128 quadrant, Tstep 1 us, Tdel 4 us, Tintdel 3 ms)
// are also this design's choice. The start bit stays set until the SRAM state
// machine acknowledges it with `start_ack`. Writes take effect on the next
// clock edge; reads are combinational.
module quad_regs
  import picnic_pkg::*;
#(
  parameter int QUAD_PIX = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reg_wr,
  input  logic [RA_W-1:0]  reg_addr,
  input  logic [RD_W-1:0]  reg_wdata,
  output logic [RD_W-1:0]  reg_rdata,
  input  logic             start_ack,     // SRAM state machine took the start bit
  input  logic             busy,          // readout in progress (status)
  input  logic             inta,          // interrupt line (status)
  output logic             start,
  output logic             int_clr,       // one-cycle pulse
  output logic [15:0]      tstep,
  output logic [15:0]      tdel,
  output logic [23:0]      tintdel,
  output logic [7:0]       nx,
  output logic [7:0]       ny,
  output logic [8:0]       nw,
  output logic [8:0]       nh,
  output logic [SRAM_AW-1:0] abase,
  output logic             abase_wr       // pulse: host wrote the base address
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start    <= 1'b0;
      int_clr  <= 1'b0;
      tstep    <= 16'd33;
      tdel     <= 16'd132;
      tintdel  <= 24'd99000;
      nx       <= '0;
      ny       <= '0;
      nw       <= 9'(QUAD_PIX);
      nh       <= 9'(QUAD_PIX);
      abase    <= '0;
      abase_wr <= 1'b0;
    end else begin
      int_clr  <= 1'b0;
      abase_wr <= 1'b0;
      if (start_ack) start <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          QR_CTRL: begin
            if (reg_wdata[0]) start <= 1'b1;
            int_clr <= reg_wdata[1];
          end
          QR_TSTEP:   tstep   <= reg_wdata[15:0];
          QR_TDEL:    tdel    <= reg_wdata[15:0];
          QR_TINTDEL: tintdel <= reg_wdata[23:0];
          QR_NX:      nx      <= reg_wdata[7:0];
          QR_NY:      ny      <= reg_wdata[7:0];
          QR_NW:      nw      <= reg_wdata[8:0];
          QR_NH:      nh      <= reg_wdata[8:0];
          QR_ABASE: begin
            abase    <= reg_wdata[SRAM_AW-1:0];
            abase_wr <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      QR_CTRL:    reg_rdata = RD_W'({inta, busy, start});
      QR_TSTEP:   reg_rdata = RD_W'(tstep);
      QR_TDEL:    reg_rdata = RD_W'(tdel);
      QR_TINTDEL: reg_rdata = RD_W'(tintdel);
      QR_NX:      reg_rdata = RD_W'(nx);
      QR_NY:      reg_rdata = RD_W'(ny);
      QR_NW:      reg_rdata = RD_W'(nw);
      QR_NH:      reg_rdata = RD_W'(nh);
      QR_ABASE:   reg_rdata = RD_W'(abase);
      default:    reg_rdata = '0;
    endcase
  end

endmodule
