// scan_regs: control and parameter registers of the interferogram (scan)
// circuit, with the host write port of the microcode RAM.
//
// Holds the readout parameters of scan mode: Nbase (Tstep = Nbase/f),
// Ndel (Tdel = Ndel/f), Nloops, Nreads, Nsmpl (samples per scan) and Npix
// (pixel registers transferred per sample). Writes to UADDR set the microcode
// write pointer; each write to UDATA stores one 12-bit word there and
// advances the pointer. CTRL bit 0 requests a scan (held until the sequencer
// acknowledges it). Reset values are the document's typical settings (Nbase 85,
// Ndel 506, 4 loops, 4 reads, 256 samples, 6 pixels); values outside the
// document's ranges are clamped (Nloops 1-7, Nreads 1-16, Npix 1-MAX_PIX).
// The register addresses are this design's choice.
module scan_regs
  import picnic_pkg::*;
#(
  parameter int MAX_PIX = 6,
  parameter int UDEPTH  = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      reg_wr,
  input  logic [RA_W-1:0]           reg_addr,
  input  logic [RD_W-1:0]           reg_wdata,
  output logic [RD_W-1:0]           reg_rdata,
  input  logic                      start_ack,
  input  logic                      busy,
  input  logic                      inta,
  output logic                      start,
  output logic [7:0]                nbase,
  output logic [8:0]                ndel,
  output logic [2:0]                nloops,
  output logic [4:0]                nreads,
  output logic [15:0]               nsmpl,
  output logic [$clog2(MAX_PIX+1)-1:0] npix,
  output logic                      u_we,
  output logic [$clog2(UDEPTH)-1:0] u_waddr,
  output ucode_t                    u_wdata
);

  localparam int PW = $clog2(MAX_PIX + 1);
  localparam int UW = $clog2(UDEPTH);

  logic [UW-1:0] uptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start   <= 1'b0;
      nbase   <= 8'd85;
      ndel    <= 9'd506;
      nloops  <= 3'd4;
      nreads  <= 5'd4;
      nsmpl   <= 16'd256;
      npix    <= PW'(MAX_PIX);
      uptr    <= '0;
      u_we    <= 1'b0;
      u_waddr <= '0;
      u_wdata <= '0;
    end else begin
      u_we <= 1'b0;
      if (start_ack) start <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          SR_CTRL:   if (reg_wdata[0]) start <= 1'b1;
          SR_NBASE:  nbase  <= reg_wdata[7:0];
          SR_NDEL:   ndel   <= reg_wdata[8:0];
          SR_NLOOPS: nloops <= (reg_wdata[2:0] == 3'd0) ? 3'd1 : reg_wdata[2:0];
          SR_NREADS: nreads <= (reg_wdata[4:0] == 5'd0) ? 5'd1 :
                               (reg_wdata[4:0] > 5'd16) ? 5'd16 : reg_wdata[4:0];
          SR_NSMPL:  nsmpl  <= (reg_wdata[15:0] == 16'd0) ? 16'd1 : reg_wdata[15:0];
          SR_NPIX:   npix   <= (reg_wdata[PW-1:0] == '0) ? PW'(1) :
                               (reg_wdata[PW-1:0] > PW'(MAX_PIX)) ? PW'(MAX_PIX) :
                               reg_wdata[PW-1:0];
          SR_UADDR:  uptr   <= reg_wdata[UW-1:0];
          SR_UDATA: begin
            u_we    <= 1'b1;
            u_waddr <= uptr;
            u_wdata <= reg_wdata[11:0];
            uptr    <= uptr + UW'(1);
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      SR_CTRL:   reg_rdata = RD_W'({inta, busy, start});
      SR_NBASE:  reg_rdata = RD_W'(nbase);
      SR_NDEL:   reg_rdata = RD_W'(ndel);
      SR_NLOOPS: reg_rdata = RD_W'(nloops);
      SR_NREADS: reg_rdata = RD_W'(nreads);
      SR_NSMPL:  reg_rdata = RD_W'(nsmpl);
      SR_NPIX:   reg_rdata = RD_W'(npix);
      SR_UADDR:  reg_rdata = RD_W'(uptr);
      default:   reg_rdata = '0;
    endcase
  end

endmodule
