// scan_sram_wr: sram_wr_process of the interferogram (scan) circuit.
//
// When a data point is complete (`capture`, one cycle) it copies the pixel
// registers into holding registers, so that the next data point can be
// acquired in parallel, and then transfers them to SRAM: it requests the
// bus from the PCI bridge, waits for the grant and writes each of the first
// Npix registers as two 16-bit words (low half first) at consecutive
// addresses, releases the bus and raises INTA for INTA_CYC cycles. INTA marks
// the end of a data point for the host and steps the piezo scanner. The
// write pointer restarts at address 0 with every scan (`scan_start`), so
// sample s, pixel p, half h lands at (s*Npix + p)*2 + h. A capture that
// arrives while a transfer is still running is dropped and sets the sticky
// `overrun` flag until the next scan. The per-transfer bus request, the word
// order and the INTA pulse length are this design's choices.
module scan_sram_wr
  import picnic_pkg::*;
#(
  parameter int MAX_PIX  = 6,
  parameter int INTA_CYC = 33
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         scan_start,
  input  logic                         capture,
  input  logic [ACC_W-1:0]             acc_in [MAX_PIX],
  input  logic [$clog2(MAX_PIX+1)-1:0] npix,
  output logic                         bus_req,
  input  logic                         bus_gnt,
  output logic [SRAM_AW-1:0]           sram_addr,
  output logic [SRAM_DW-1:0]           sram_wdata,
  output logic                         sram_we,
  output logic                         inta,
  output logic                         busy,
  output logic                         overrun
);

  localparam int PW = $clog2(MAX_PIX + 1);
  localparam int IW = $clog2(INTA_CYC + 1);

  typedef enum logic [1:0] {W_IDLE, W_REQ, W_WRITE, W_REL} state_e;
  state_e state;

  logic [ACC_W-1:0] hold [MAX_PIX];
  logic [PW-1:0]    pidx;
  logic             half;
  logic [IW-1:0]    icnt;
  logic [ACC_W-1:0] word32;

  always_comb begin
    word32 = '0;
    for (int i = 0; i < MAX_PIX; i++)
      if (pidx == PW'(i)) word32 = hold[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= W_IDLE;
      bus_req   <= 1'b0;
      sram_addr <= '0;
      pidx      <= '0;
      half      <= 1'b0;
      icnt      <= '0;
      overrun   <= 1'b0;
      for (int i = 0; i < MAX_PIX; i++) hold[i] <= '0;
    end else begin
      if (icnt != '0) icnt <= icnt - IW'(1);
      if (scan_start) begin
        sram_addr <= '0;
        overrun   <= 1'b0;
      end
      if (capture && state != W_IDLE) overrun <= 1'b1;
      unique case (state)
        W_IDLE:  if (capture) begin
                   for (int i = 0; i < MAX_PIX; i++) hold[i] <= acc_in[i];
                   pidx    <= '0;
                   half    <= 1'b0;
                   bus_req <= 1'b1;
                   state   <= W_REQ;
                 end
        W_REQ:   if (bus_gnt) state <= W_WRITE;
        W_WRITE: begin
                   sram_addr <= sram_addr + SRAM_AW'(1);
                   half      <= ~half;
                   if (half) begin
                     pidx <= pidx + PW'(1);
                     if (pidx + PW'(1) >= npix) state <= W_REL;
                   end
                 end
        W_REL:   begin
                   bus_req <= 1'b0;
                   icnt    <= IW'(INTA_CYC);
                   state   <= W_IDLE;
                 end
        default: state <= W_IDLE;
      endcase
    end
  end

  assign sram_we    = (state == W_WRITE);
  assign sram_wdata = half ? word32[2*SRAM_DW-1:SRAM_DW] : word32[SRAM_DW-1:0];
  assign inta       = (icnt != '0);
  assign busy       = (state != W_IDLE);

  a_we_owned: assert property (@(posedge clk) disable iff (!rst_n)
    sram_we |-> (bus_req && bus_gnt));

endmodule
