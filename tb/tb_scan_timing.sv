// tb_scan_timing: the scan circuit at its default parameters, run at the
// operating points for which integration times and noise data are
// published, checking the time per data point, its steadiness and the data.
//
// All runs use six pixels on one line and a 10 us conversion at f = 33 MHz.
// The clocking program selects the line once per scan and loops over the
// pixels only: 0: fsync+line 20, 1: lsync+pixel 34, 2-6: pixel 7, 7: jump 1.
// Per pass this makes 1 + Nx + (Npix-1)*Nskip = 70 steps of Tstep and
// 6*Nreads reads of Tdel + conversion, which gives the integration time of
// one data point as
//   T_int = Nloops * (Tstep*(Nx + (Npix-1)*Nskip + 1) + T_read*Nreads*Npix)
// The time between successive INTA pulses is measured. It must be the same,
// to the cycle, for every data point of a scan, and exceed the formula by
// exactly 101 + 2*Npix*Nreads cycles per pass (instruction fetches and
// handshakes, this design's own overhead), which stays within 2.5 %.
//
// Runs:
//  1. the integration-time grid Nloops 1-4 x Nreads 1-4 at Nbase 85,
//     Ndel 506, 3 data points each; also compared with the published
//     table (within 8 %; the table is stated to agree with measurement
//     within 6 %);
//  2. the two gain-measurement settings, Nloops 1, Nreads 1, 128 data
//     points, (Tstep, Tdel) = (2.5 us, 15 us) and (1 us, 4 us); the slow
//     one is compared with its published 310 us within 8 %, the fast one
//     (published 130 us) is only printed, because with this pixel geometry
//     and a 10 us conversion the formula itself gives 154 us;
//  3. the multiple-read sweep, 128 data points with Nreads 1, 2, 4, 8, 16
//     at the fast setting and 16 at the slow one (1 is the slow gain run).
// In runs 2 and 3 every 32-bit sum written to SRAM is compared with the sum
// of the converter outputs it should hold, in the order pass, pixel, read.
module tb_scan_timing;
  import picnic_pkg::*;
  localparam int CONV = 330;
  localparam real F_MHZ = 33.0;
  localparam int NPIX = 6;
  // published integration times, us, [Nloops-1][Nreads-1]
  localparam real TAB [4][4] = '{'{340.0, 510.0, 670.0, 830.0},
                                 '{660.0, 990.0, 1320.0, 1640.0},
                                 '{980.0, 1470.0, 1960.0, 2450.0},
                                 '{1300.0, 1950.0, 2610.0, 3270.0}};

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0; logic [RA_W-1:0] reg_addr = '0; logic [RD_W-1:0] reg_wdata = '0, reg_rdata;
  logic bus_req, bus_gnt, inta, overrun;
  logic [SRAM_AW-1:0] sram_addr; logic [SRAM_DW-1:0] sram_wdata;
  logic sram_we;
  logic det_fsync, det_lsync, det_line, det_pixel, det_reset, adc_soc, adc_eoc;
  logic [15:0] adc_data;
  int cur_line, cur_pix, level, n_resets, n_fsync, n_conv;
  int checks = 0, failures = 0;
  longint cyc = 0;

  scan_readout dut (.*);
  picnic_model #(.SLOPE_DIV(4096)) u_det (.clk, .fsync(det_fsync), .lsync(det_lsync), .line_clk(det_line),
                      .pixel_clk(det_pixel), .reset(det_reset), .cur_line, .cur_pix, .level,
                      .n_resets, .n_fsync);
  adc_model #(.CONV_CYC(CONV)) u_adc (.clk, .soc(adc_soc), .level, .eoc(adc_eoc), .data(adc_data), .n_conv);

  assign bus_gnt = bus_req;
  always #15ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // INTA rising edges, converter outputs and SRAM writes of the current run
  longint inta_t [$];
  int conv_q [$];
  logic [15:0] mem [int];
  logic inta_q = 0, eoc_q = 0;
  always @(posedge clk) begin
    inta_q <= inta;
    eoc_q  <= adc_eoc;
    if (inta && !inta_q) inta_t.push_back(cyc);
    if (adc_eoc && !eoc_q) conv_q.push_back(int'(adc_data));
    if (sram_we) mem[int'(sram_addr)] = sram_wdata;
  end

  task automatic wr(input logic [RA_W-1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic chk(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One scan; returns the measured time per data point in us.
  task automatic run(input int nbase, ndel, nl, nr, nsmpl, input bit check_data, output real meas);
    real form;
    longint iv, iv_min, iv_max, ovh;
    wr(SR_NBASE, nbase); wr(SR_NDEL, ndel);
    wr(SR_NLOOPS, nl); wr(SR_NREADS, nr); wr(SR_NSMPL, nsmpl);
    inta_t.delete(); conv_q.delete(); mem.delete();
    wr(SR_CTRL, 1);
    @(negedge clk); reg_addr = SR_CTRL;
    do @(negedge clk); while (reg_rdata[1]);
    repeat (50) @(negedge clk);
    meas = 0.0;
    chk("INTA pulses", inta_t.size(), nsmpl);
    if (inta_t.size() != nsmpl || nsmpl < 2) return;
    iv_min = inta_t[1] - inta_t[0]; iv_max = iv_min;
    for (int i = 2; i < nsmpl; i++) begin
      iv = inta_t[i] - inta_t[i-1];
      if (iv < iv_min) iv_min = iv;
      if (iv > iv_max) iv_max = iv;
    end
    chk("spread of the time per data point, cycles", iv_max - iv_min, 0);
    meas = real'(iv_max) / F_MHZ;
    form = nl * (real'(nbase) / F_MHZ * (34 + 5 * 7 + 1) + real'(ndel + CONV) / F_MHZ * nr * NPIX);
    // cycles beyond the formula, per pass: instruction fetch and decode and the
    // sequencer-to-converter handshakes (a fixed 101 cycles per pass of this
    // program) plus 2 cycles per read
    ovh = iv_max - longint'(nl) * (nbase * 70 + (ndel + CONV) * nr * NPIX);
    chk("cycles per data point beyond the formula", ovh, nl * (101 + 2 * NPIX * nr));
    form = nl * (real'(nbase) / F_MHZ * (34 + 5 * 7 + 1) + real'(ndel + CONV) / F_MHZ * nr * NPIX);
    checks++;
    if (meas < form || meas > form * 1.025) begin
      failures++; $display("FAIL time per data point %0.1f us, formula %0.1f us", meas, form);
    end
    if (!check_data) return;
    chk("conversions", conv_q.size(), nsmpl * nl * NPIX * nr);
    if (conv_q.size() != nsmpl * nl * NPIX * nr) return;
    for (int s = 0; s < nsmpl; s++)
      for (int p = 0; p < NPIX; p++) begin
        longint sum = 0;
        int a = (s * NPIX + p) * 2;
        for (int l = 0; l < nl; l++)
          for (int r = 0; r < nr; r++) sum += conv_q[((s * nl + l) * NPIX + p) * nr + r];
        checks++;
        if (!mem.exists(a) || !mem.exists(a + 1) || {mem[a + 1], mem[a]} != 32'(sum)) begin
          failures++;
          if (failures < 10) $display("FAIL sum sample %0d pixel %0d", s, p);
        end
      end
  endtask

  initial begin
    logic [11:0] prog [] = '{12'h214, 12'h322, 12'h107, 12'h107, 12'h107, 12'h107, 12'h107, 12'h401};
    real meas;
    int nrs [5] = '{1, 2, 4, 8, 16};
    repeat (3) @(posedge clk); rst_n = 1;
    wr(SR_UADDR, 0);
    foreach (prog[i]) wr(SR_UDATA, prog[i]);
    wr(SR_NPIX, NPIX);

    $display("grid: Nloops Nreads  measured_us  published_us");
    for (int nl = 1; nl <= 4; nl++)
      for (int nr = 1; nr <= 4; nr++) begin
        run(85, 506, nl, nr, 3, 1'b0, meas);
        $display("        %0d      %0d     %8.1f    %8.1f", nl, nr, meas, TAB[nl-1][nr-1]);
        checks++;
        if (meas < TAB[nl-1][nr-1] * 0.92 || meas > TAB[nl-1][nr-1] * 1.08) begin
          failures++; $display("FAIL off the published value");
        end
      end

    // gain settings: Tstep 2.5 us = 83 cycles, Tdel 15 us = 495 cycles; 1 us = 33, 4 us = 132
    run(83, 495, 1, 1, 128, 1'b1, meas);
    $display("gain run slow: %0.1f us per data point (published 310)", meas);
    checks++;
    if (meas < 310.0 * 0.92 || meas > 310.0 * 1.08) begin failures++; $display("FAIL off 310 us"); end
    run(33, 132, 1, 1, 128, 1'b1, meas);
    $display("gain run fast: %0.1f us per data point (published 130)", meas);

    foreach (nrs[i]) begin
      run(33, 132, 1, nrs[i], 128, 1'b1, meas);
      $display("reads sweep fast: Nreads %0d  %0.1f us per data point", nrs[i], meas);
    end
    run(83, 495, 1, 16, 128, 1'b1, meas);
    $display("reads sweep slow: Nreads 16  %0.1f us per data point", meas);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
