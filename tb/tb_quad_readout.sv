// tb_quad_readout: end-to-end test of the quadrant readout circuit with
// models of the PICNIC detector, the ADC and the SRAM.
//
// Each run programs a subquadrant, sets the start bit and plays the PCI
// bridge (bus grant after a delay, SRAM read-back after INTA). It checks:
// the raster order of the pixels converted (line Ny+j, pixel Nx+i as seen by
// the detector model), that every line is reset together with LSYNC in the
// reset frame and never in the image frame, that each SRAM word is the
// reset-frame sample minus the image-frame sample of its pixel (and that
// the signal is positive), that words outside the window are untouched,
// the spacing of conversions along a line (Tstep + Tdel + the ADC model's
// CONV_CYC + 6 cycles of handshake), the Tintdel gap between frames, the bus request
// released before INTA, and INTA cleared by the host.
module tb_quad_readout;
  import picnic_pkg::*;
  localparam int CONV = 20;

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0; logic [RA_W-1:0] reg_addr = '0; logic [RD_W-1:0] reg_wdata = '0, reg_rdata;
  logic bus_req, bus_gnt = 0, inta;
  logic [SRAM_AW-1:0] sram_addr; logic [SRAM_DW-1:0] sram_wdata, sram_rdata;
  logic sram_we, sram_oe;
  logic det_fsync, det_lsync, det_line, det_pixel, det_reset, adc_soc, adc_eoc;
  logic [15:0] adc_data;
  int cur_line, cur_pix, level, n_resets, n_fsync, n_conv;
  int checks = 0, failures = 0;
  longint cyc = 0;

  quad_readout dut (.*);
  picnic_model u_det (.clk, .fsync(det_fsync), .lsync(det_lsync), .line_clk(det_line),
                      .pixel_clk(det_pixel), .reset(det_reset), .cur_line, .cur_pix, .level,
                      .n_resets, .n_fsync);
  adc_model #(.CONV_CYC(CONV)) u_adc (.clk, .soc(adc_soc), .level, .eoc(adc_eoc), .data(adc_data), .n_conv);
  sram_model u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we), .oe(sram_oe), .rdata(sram_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bridge: grant after gnt_delay cycles, take back when released
  int gnt_delay = 0, gnt_wait = 0, waits_seen = 0;
  always @(posedge clk) begin
    if (!bus_req) begin bus_gnt <= 0; gnt_wait <= 0; end
    else if (!bus_gnt) begin
      if (gnt_wait >= gnt_delay) bus_gnt <= 1;
      else begin gnt_wait <= gnt_wait + 1; waits_seen <= waits_seen + 1; end
    end
  end

  // conversion log
  int     soc_n = 0;
  int     s_line [$], s_pix [$], s_val [$];
  longint s_time [$];
  int     reset_bad = 0;
  always @(posedge clk) begin
    if (adc_soc) begin
      s_line.push_back(cur_line); s_pix.push_back(cur_pix);
      s_val.push_back(level > 65535 ? 65535 : level); s_time.push_back(cyc);
    end
    if (det_reset && !det_lsync) reset_bad++;
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic wr(input logic [RA_W-1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic run(input int nx, ny, nw, nh, tstep, tdel, tintdel, abase, gd);
    int rst0, fs0, n, k;
    longint t_req_low, t_inta;
    gnt_delay = gd;
    s_line.delete(); s_pix.delete(); s_val.delete(); s_time.delete();
    wr(QR_TSTEP, tstep); wr(QR_TDEL, tdel); wr(QR_TINTDEL, tintdel);
    wr(QR_NX, nx); wr(QR_NY, ny); wr(QR_NW, nw); wr(QR_NH, nh); wr(QR_ABASE, abase);
    rst0 = n_resets; fs0 = n_fsync;
    wr(QR_CTRL, 1);
    t_req_low = -1;
    while (!inta) begin
      @(posedge clk);
      if (!bus_req && t_req_low < 0 && s_time.size() > 0) t_req_low = cyc;
    end
    t_inta = cyc;
    n = nw * nh;
    chk("conversions", s_val.size(), 2 * n);
    chk("fsync pulses", n_fsync - fs0, 2);
    chk("line resets in reset frame", n_resets - rst0, nh);
    chk("reset only with lsync", reset_bad, 0);
    checks++; if (!(t_req_low >= 0 && t_req_low <= t_inta)) begin failures++; $display("bus not released before INTA"); end
    for (k = 0; k < n && k < s_val.size() / 2; k++) begin
      int l = k / nw, p = k % nw;
      logic [15:0] exp_w;
      chk("reset frame line", s_line[k], ny + l);
      chk("reset frame pixel", s_pix[k], nx + p);
      chk("image frame line", s_line[n + k], ny + l);
      chk("image frame pixel", s_pix[n + k], nx + p);
      exp_w = 16'(s_val[k] - s_val[n + k]);
      chk("cds word", u_sram.mem[abase + k], exp_w);
      checks++; if (!(s_val[k] > s_val[n + k])) begin failures++; $display("no signal at %0d", k); end
      if (p > 0) chk("pixel period", s_time[k] - s_time[k - 1], tstep + tdel + CONV + 6);
    end
    if (s_val.size() == 2 * n)
      checks++;
    if (s_val.size() == 2 * n && s_time[n] - s_time[n - 1] < tintdel) begin
      failures++; $display("frames closer than Tintdel");
    end
    chk("below window untouched", u_sram.mem[abase - 1], 0);
    chk("above window untouched", u_sram.mem[abase + n], 0);
    // status and INTA clear
    @(negedge clk); reg_addr = QR_CTRL; #1 chk("status inta", reg_rdata, 4);
    wr(QR_CTRL, 2);
    @(negedge clk); chk("inta cleared", inta, 0);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(2, 3, 5, 4, 3, 5, 300, 'h40, 7);
    run(0, 0, 3, 2, 1, 1, 1, 'h200, 0);
    run(5, 1, 4, 3, 2, 9, 50, 'h1000, 3);
    run(1, 1, 2, 2, 4, 2, 20, 'h1fff0, 1);
    checks++; if (waits_seen == 0) begin failures++; $display("bus wait never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
