// tb_picnic_camera_top: end-to-end test of the camera controller at its
// default parameters, with models of the PICNIC detector, the ADC (10 us
// conversion at 33 MHz) and the 128K x 16 SRAM, the testbench playing the
// CPU and the PCI bridge.
//
// Sequence: (1) quadrant mode with the reset values of the registers, a full
// 128 x 128 quadrant with Tstep 1 us, Tdel 4 us, Tintdel 3 ms; (2) scan mode
// with the typical parameters (Nbase 85, Ndel 506, 4 loops, 4 reads, 256
// samples, 6 pixels) and a six-pixel clocking program on two lines;
// (3) quadrant mode again on a 6 x 5 subquadrant at corner (9, 4) with a
// slow bus grant; (4) scan mode with the example clocking program of four
// pixels, 3 loops, 2 reads, 5 samples. Each quadrant readout is checked word
// by word (reset-frame sample minus image-frame sample, in raster order at
// the programmed corner) and each scan sample by the sums of its
// conversions. Counted mechanisms, each of which must occur: reset frame,
// image frame, subquadrant offset, bus wait, INTA clear, mode switch, array
// reset, loop repeat, multiple reads, jump, data-point transfer.
module tb_picnic_camera_top;
  import picnic_pkg::*;
  localparam int CONV = 330;

  logic clk = 0, rst_n = 0, mode_scan = 0;
  logic reg_wr = 0; logic [RA_W-1:0] reg_addr = '0; logic [RD_W-1:0] reg_wdata = '0, reg_rdata;
  logic bus_req, bus_gnt = 0, inta, scan_overrun;
  logic [SRAM_AW-1:0] sram_addr; logic [SRAM_DW-1:0] sram_wdata, sram_rdata;
  logic sram_we, sram_oe;
  logic det_fsync, det_lsync, det_line, det_pixel, det_reset, adc_soc, adc_eoc;
  logic [15:0] adc_data;
  int cur_line, cur_pix, level, n_resets, n_fsync, n_conv;
  int checks = 0, failures = 0;

  picnic_camera_top dut (.*);
  picnic_model #(.SLOPE_DIV(4096)) u_det (.clk, .fsync(det_fsync), .lsync(det_lsync), .line_clk(det_line),
                      .pixel_clk(det_pixel), .reset(det_reset), .cur_line, .cur_pix, .level,
                      .n_resets, .n_fsync);
  adc_model #(.CONV_CYC(CONV)) u_adc (.clk, .soc(adc_soc), .level, .eoc(adc_eoc), .data(adc_data), .n_conv);
  sram_model u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we), .oe(sram_oe), .rdata(sram_rdata));

  always #15ns clk = ~clk;   // 33 MHz

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PCI bridge: grant after gnt_delay cycles
  int gnt_delay = 0, gnt_wait = 0;
  int m_bus_wait = 0, m_reset_frame = 0, m_image_frame = 0, m_offset = 0, m_int_clr = 0,
      m_mode_switch = 0, m_array_reset = 0, m_loop = 0, m_multi_read = 0, m_jump = 0, m_transfer = 0;
  always @(posedge clk) begin
    if (!bus_req) begin bus_gnt <= 0; gnt_wait <= 0; end
    else if (!bus_gnt) begin
      if (gnt_wait >= gnt_delay) bus_gnt <= 1;
      else begin gnt_wait <= gnt_wait + 1; if (gnt_wait == 0) m_bus_wait++; end
    end
  end

  int s_line [$], s_pix [$], s_val [$];
  logic inta_q = 0; int n_inta = 0;
  always @(posedge clk) begin
    inta_q <= inta;
    if (inta && !inta_q) n_inta <= n_inta + 1;
    if (adc_soc) begin
      s_line.push_back(cur_line); s_pix.push_back(cur_pix);
      s_val.push_back(level > 65535 ? 65535 : level);
    end
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask
  task automatic wr(input logic [RA_W-1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic set_mode(input logic m);
    @(negedge clk);
    if (mode_scan != m) m_mode_switch++;
    mode_scan = m;
  endtask

  // quadrant readout; do_prog = 0 leaves the registers at their reset values
  task automatic quad(input bit do_prog, input int nx, ny, nw, nh, abase, gd);
    int n, rst0;
    gnt_delay = gd;
    set_mode(0);
    s_line.delete(); s_pix.delete(); s_val.delete();
    if (do_prog) begin
      wr(QR_TSTEP, 33); wr(QR_TDEL, 132); wr(QR_TINTDEL, 2000);
      wr(QR_NX, nx); wr(QR_NY, ny); wr(QR_NW, nw); wr(QR_NH, nh); wr(QR_ABASE, abase);
    end
    rst0 = n_resets;
    wr(QR_CTRL, 1);
    while (!inta) @(posedge clk);
    n = nw * nh;
    chk("quad conversions", s_val.size(), 2 * n);
    chk("quad line resets", n_resets - rst0, nh);
    m_reset_frame++; m_image_frame++;
    if (nx > 0 || ny > 0) m_offset++;
    if (s_val.size() == 2 * n)
      for (int k = 0; k < n; k++) begin
        chk("quad line", s_line[n + k], ny + k / nw);
        chk("quad pixel", s_pix[n + k], nx + k % nw);
        chk("quad cds word", u_sram.mem[abase + k], (s_val[k] - s_val[n + k]) & 'hffff);
        if (s_val[k] <= s_val[n + k]) begin failures++; $display("no signal at %0d", k); end
      end
    wr(QR_CTRL, 2);
    @(negedge clk); chk("inta cleared", inta, 0);
    if (!inta) m_int_clr++;
  endtask

  task automatic scan(input logic [11:0] prog [], input bit do_prog, input int nloops, nreads, nsmpl,
                      input int pl [], input int pp []);
    int rst0, inta0, c, np, npix;
    np = pl.size(); npix = np;
    set_mode(1);
    s_line.delete(); s_pix.delete(); s_val.delete();
    wr(SR_UADDR, 0);
    foreach (prog[i]) wr(SR_UDATA, prog[i]);
    if (do_prog) begin
      wr(SR_NBASE, 33); wr(SR_NDEL, 100); wr(SR_NLOOPS, nloops); wr(SR_NREADS, nreads);
      wr(SR_NSMPL, nsmpl); wr(SR_NPIX, npix);
    end
    rst0 = n_resets; inta0 = n_inta;
    wr(SR_CTRL, 1);
    @(negedge clk); reg_addr = SR_CTRL;
    do @(negedge clk); while (reg_rdata[1]);
    repeat (40) @(negedge clk);
    chk("scan conversions", s_val.size(), nsmpl * nloops * np * nreads);
    chk("scan inta pulses", n_inta - inta0, nsmpl);
    chk("no overrun", scan_overrun, 0);
    if (n_resets - rst0 == 128) m_array_reset++;
    chk("array reset", n_resets - rst0, 128);
    if (nloops > 1) m_loop++;
    if (nreads > 1) m_multi_read++;
    m_jump += nsmpl * nloops;
    m_transfer += n_inta - inta0;
    if (s_val.size() != nsmpl * nloops * np * nreads) return;
    c = 0;
    for (int s = 0; s < nsmpl; s++) begin
      longint sum [];
      sum = new[np];
      foreach (sum[i]) sum[i] = 0;
      for (int lp = 0; lp < nloops; lp++)
        for (int i = 0; i < np; i++)
          for (int r = 0; r < nreads; r++) begin
            chk("scan line", s_line[c], pl[i]);
            chk("scan pixel", s_pix[c], pp[i]);
            sum[i] += s_val[c];
            c++;
          end
      for (int i = 0; i < npix; i++) begin
        chk("scan sum low", u_sram.mem[(s * npix + i) * 2], sum[i] & 'hffff);
        chk("scan sum high", u_sram.mem[(s * npix + i) * 2 + 1], (sum[i] >> 16) & 'hffff);
      end
    end
  endtask

  initial begin
    // six pixels on two lines: (10,4) (10,7) (10,10) (12,4) (12,7) (12,10)
    logic [11:0] p6 [] = '{12'h20a, 12'h304, 12'h103, 12'h103, 12'h002, 12'h304, 12'h103, 12'h103, 12'h400};
    logic [11:0] p4 [] = '{12'h203, 12'h302, 12'h103, 12'h004, 12'h302, 12'h103, 12'h400};
    repeat (3) @(posedge clk); rst_n = 1;
    quad(0, 0, 0, 128, 128, 0, 0);
    $display("full quadrant done");
    scan(p6, 0, 4, 4, 256, '{10, 10, 10, 12, 12, 12}, '{4, 7, 10, 4, 7, 10});
    $display("full scan done");
    quad(1, 9, 4, 6, 5, 'h10000, 25);
    scan(p4, 1, 3, 2, 5, '{3, 3, 7, 7}, '{2, 5, 2, 5});
    chk("bus wait happened", m_bus_wait > 0, 1);
    chk("reset frame happened", m_reset_frame > 0, 1);
    chk("image frame happened", m_image_frame > 0, 1);
    chk("subquadrant offset happened", m_offset > 0, 1);
    chk("inta clear happened", m_int_clr > 0, 1);
    chk("mode switch happened", m_mode_switch > 0, 1);
    chk("array reset happened", m_array_reset > 0, 1);
    chk("loop repeat happened", m_loop > 0, 1);
    chk("multiple reads happened", m_multi_read > 0, 1);
    chk("jump happened", m_jump > 0, 1);
    chk("transfer happened", m_transfer > 0, 1);
    $display("mechanisms: bus_wait=%0d reset_frame=%0d image_frame=%0d offset=%0d int_clr=%0d mode_switch=%0d array_reset=%0d loop=%0d multi_read=%0d jump=%0d transfer=%0d",
             m_bus_wait, m_reset_frame, m_image_frame, m_offset, m_int_clr, m_mode_switch,
             m_array_reset, m_loop, m_multi_read, m_jump, m_transfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
