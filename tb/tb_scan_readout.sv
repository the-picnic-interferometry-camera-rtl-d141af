// tb_scan_readout: end-to-end test of the interferogram (scan) circuit with
// models of the PICNIC detector, the ADC and the SRAM.
//
// Run 1 loads the example clocking program (fsync+line 3, lsync+pixel 2,
// pixel 3, line 4, lsync+pixel 2, pixel 3, jump 0), with 2 loops, 3 reads
// and 3 samples. Run 2 loads a program that reads one pixel twice without
// moving (pixel 0) with 1 loop, 1 read and 4 samples. The testbench logs
// every conversion with the detector position and level and checks: the
// line-by-line array reset at scan start (RESET_LINES resets before the
// first conversion), the positions visited in each pass, Nreads reads per
// visit spaced Tdel + the ADC model's CONV_CYC + 2 cycles apart, one
// FSYNC per pass, one INTA pulse per sample, and that SRAM holds, for each
// sample and pixel, the sum of its Nloops x Nreads conversions as two
// 16-bit words. Run 3 holds back the bus grant so that a data point is
// completed while the previous one is still waiting: the overrun flag must
// rise.
module tb_scan_readout;
  import picnic_pkg::*;
  localparam int CONV = 12;
  localparam int RL   = 8;

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0; logic [RA_W-1:0] reg_addr = '0; logic [RD_W-1:0] reg_wdata = '0, reg_rdata;
  logic bus_req, bus_gnt = 0, inta, overrun;
  logic [SRAM_AW-1:0] sram_addr; logic [SRAM_DW-1:0] sram_wdata, sram_rdata;
  logic sram_we;
  logic det_fsync, det_lsync, det_line, det_pixel, det_reset, adc_soc, adc_eoc;
  logic [15:0] adc_data;
  int cur_line, cur_pix, level, n_resets, n_fsync, n_conv;
  int checks = 0, failures = 0;
  longint cyc = 0;

  scan_readout #(.RESET_LINES(RL), .INTA_CYC(4)) dut (.*);
  picnic_model u_det (.clk, .fsync(det_fsync), .lsync(det_lsync), .line_clk(det_line),
                      .pixel_clk(det_pixel), .reset(det_reset), .cur_line, .cur_pix, .level,
                      .n_resets, .n_fsync);
  adc_model #(.CONV_CYC(CONV)) u_adc (.clk, .soc(adc_soc), .level, .eoc(adc_eoc), .data(adc_data), .n_conv);
  sram_model u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we), .oe(1'b0), .rdata(sram_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gnt_delay = 0, gnt_wait = 0;
  always @(posedge clk) begin
    if (!bus_req) begin bus_gnt <= 0; gnt_wait <= 0; end
    else if (!bus_gnt) begin
      if (gnt_wait >= gnt_delay) bus_gnt <= 1; else gnt_wait <= gnt_wait + 1;
    end
  end

  int     s_line [$], s_pix [$], s_val [$], s_rst [$];
  longint s_time [$];
  int     n_inta = 0;
  logic   inta_q = 0;
  always @(posedge clk) begin
    inta_q <= inta;
    if (inta && !inta_q) n_inta <= n_inta + 1;
    if (adc_soc) begin
      s_line.push_back(cur_line); s_pix.push_back(cur_pix);
      s_val.push_back(level > 65535 ? 65535 : level); s_time.push_back(cyc);
      s_rst.push_back(n_resets);
    end
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic wr(input logic [RA_W-1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  // positions (line, pixel) read in one pass
  int pl [$], pp [$];

  task automatic run(input logic [11:0] prog [], input int nbase, ndel, nloops, nreads, nsmpl, npix,
                     input bit check_data);
    int rst0, fs0, inta0, c, np;
    s_line.delete(); s_pix.delete(); s_val.delete(); s_time.delete(); s_rst.delete();
    for (int i = 0; i < 4096; i++) u_sram.mem[i] = '0;
    wr(SR_UADDR, 0);
    foreach (prog[i]) wr(SR_UDATA, prog[i]);
    wr(SR_NBASE, nbase); wr(SR_NDEL, ndel); wr(SR_NLOOPS, nloops); wr(SR_NREADS, nreads);
    wr(SR_NSMPL, nsmpl); wr(SR_NPIX, npix);
    rst0 = n_resets; fs0 = n_fsync; inta0 = n_inta;
    wr(SR_CTRL, 1);
    @(negedge clk); reg_addr = SR_CTRL;
    do @(negedge clk); while (reg_rdata[1]);   // busy
    repeat (10) @(negedge clk);
    if (!check_data) return;
    np = pl.size();
    chk("conversions", s_val.size(), nsmpl * nloops * np * nreads);
    chk("array reset lines", n_resets - rst0, RL);
    if (s_rst.size() > 0) chk("reset before first read", s_rst[0] - rst0, RL);
    chk("fsync pulses", n_fsync - fs0, 1 + nsmpl * nloops);
    chk("inta pulses", n_inta - inta0, nsmpl);
    chk("no overrun", overrun, 0);
    if (s_val.size() != nsmpl * nloops * np * nreads) return;
    c = 0;
    for (int s = 0; s < nsmpl; s++) begin
      longint sum [];
      sum = new[np];
      foreach (sum[i]) sum[i] = 0;
      for (int lp = 0; lp < nloops; lp++)
        for (int i = 0; i < np; i++)
          for (int r = 0; r < nreads; r++) begin
            chk("read line", s_line[c], pl[i]);
            chk("read pixel", s_pix[c], pp[i]);
            if (r > 0) chk("read spacing", s_time[c] - s_time[c - 1], ndel + CONV + 2);
            sum[i] += s_val[c];
            c++;
          end
      for (int i = 0; i < npix; i++) begin
        int a = (s * npix + i) * 2;
        chk("sum low", u_sram.mem[a], sum[i] & 'hffff);
        chk("sum high", u_sram.mem[a + 1], (sum[i] >> 16) & 'hffff);
      end
    end
    chk("nothing past last sample", u_sram.mem[nsmpl * npix * 2], 0);
  endtask

  initial begin
    logic [11:0] p1 [] = '{12'h203, 12'h302, 12'h103, 12'h004, 12'h302, 12'h103, 12'h400};
    logic [11:0] p2 [] = '{12'h205, 12'h301, 12'h100, 12'h400};
    repeat (3) @(posedge clk); rst_n = 1;
    pl = '{3, 3, 7, 7}; pp = '{2, 5, 2, 5};
    gnt_delay = 2;
    run(p1, 3, 4, 2, 3, 3, 4, 1);
    pl = '{5, 5}; pp = '{1, 1};
    gnt_delay = 0;
    run(p2, 2, 6, 1, 1, 4, 2, 1);
    // overrun: the bridge is too slow to grant
    gnt_delay = 2000;
    run(p2, 1, 1, 1, 1, 3, 2, 0);
    chk("overrun flagged", overrun, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
