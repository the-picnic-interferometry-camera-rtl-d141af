// tb_scan_regs: checks the scan-mode register file: the typical reset
// values, write/read-back, clamping of Nloops, Nreads, Nsmpl and Npix to
// their ranges, the start bit held until acknowledged, and the microcode
// write port with its auto-incrementing pointer.
module tb_scan_regs;
  import picnic_pkg::*;
  logic clk = 0, rst_n = 0, reg_wr = 0, start_ack = 0, busy = 0, inta = 0;
  logic [RA_W-1:0] reg_addr = '0;
  logic [RD_W-1:0] reg_wdata = '0, reg_rdata;
  logic start; logic [7:0] nbase; logic [8:0] ndel; logic [2:0] nloops;
  logic [4:0] nreads; logic [15:0] nsmpl; logic [2:0] npix;
  logic u_we; logic [7:0] u_waddr; ucode_t u_wdata;
  int checks = 0, failures = 0, nwr = 0;
  logic [11:0] seen [256];

  scan_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (u_we) begin seen[u_waddr] <= u_wdata; nwr <= nwr + 1; end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(input logic [RA_W-1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [RA_W-1:0] a, input logic [31:0] exp, input string what);
    @(negedge clk); reg_addr = a; #1 chk(what, reg_rdata, exp);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    rd(SR_NBASE, 85, "nbase"); rd(SR_NDEL, 506, "ndel"); rd(SR_NLOOPS, 4, "nloops");
    rd(SR_NREADS, 4, "nreads"); rd(SR_NSMPL, 256, "nsmpl"); rd(SR_NPIX, 6, "npix");
    wr(SR_NBASE, 33);  chk("nbase", nbase, 33);
    wr(SR_NDEL, 511);  chk("ndel", ndel, 511);
    wr(SR_NLOOPS, 7);  chk("nloops 7", nloops, 7);
    wr(SR_NLOOPS, 0);  chk("nloops 0->1", nloops, 1);
    wr(SR_NREADS, 16); chk("nreads 16", nreads, 16);
    wr(SR_NREADS, 20); chk("nreads 20->16", nreads, 16);
    wr(SR_NREADS, 0);  chk("nreads 0->1", nreads, 1);
    wr(SR_NSMPL, 0);   chk("nsmpl 0->1", nsmpl, 1);
    wr(SR_NSMPL, 1000); chk("nsmpl", nsmpl, 1000);
    wr(SR_NPIX, 7);    chk("npix 7->6", npix, 6);
    wr(SR_NPIX, 0);    chk("npix 0->1", npix, 1);
    wr(SR_NPIX, 4);    chk("npix 4", npix, 4);
    // microcode: write 7 words from address 10
    wr(SR_UADDR, 10);
    for (int i = 0; i < 7; i++) wr(SR_UDATA, 32'h100 * i + i);
    @(negedge clk);
    chk("ucode writes", nwr, 7);
    for (int i = 0; i < 7; i++) chk("ucode word", seen[10 + i], 12'(32'h100 * i + i));
    rd(SR_UADDR, 17, "uptr");
    // start bit
    wr(SR_CTRL, 1); repeat (3) @(negedge clk); chk("start", start, 1);
    start_ack = 1; @(negedge clk); start_ack = 0; chk("start ack", start, 0);
    busy = 1; inta = 1; rd(SR_CTRL, 6, "status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
