// tb_quad_regs: checks the quadrant-mode register file: reset values,
// write/read-back of every parameter register, the start bit held until
// start_ack, the one-cycle INTA-clear and base-address-write pulses, and
// the status bits returned from CTRL.
module tb_quad_regs;
  import picnic_pkg::*;
  logic clk = 0, rst_n = 0, reg_wr = 0, start_ack = 0, busy = 0, inta = 0;
  logic [RA_W-1:0] reg_addr = '0;
  logic [RD_W-1:0] reg_wdata = '0, reg_rdata;
  logic start, int_clr, abase_wr;
  logic [15:0] tstep, tdel; logic [23:0] tintdel;
  logic [7:0] nx, ny; logic [8:0] nw, nh; logic [SRAM_AW-1:0] abase;
  int checks = 0, failures = 0;

  quad_regs dut (.*);

  always #5 clk = ~clk;

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
    rd(QR_TSTEP, 33, "tstep reset"); rd(QR_TDEL, 132, "tdel reset");
    rd(QR_TINTDEL, 99000, "tintdel reset"); rd(QR_NW, 128, "nw reset"); rd(QR_NH, 128, "nh reset");
    rd(QR_NX, 0, "nx reset"); rd(QR_CTRL, 0, "ctrl reset");
    for (int k = 0; k < 20; k++) begin
      logic [31:0] v = $urandom;
      wr(QR_TSTEP, v);   rd(QR_TSTEP, v & 32'hffff, "tstep");   chk("tstep out", tstep, v & 32'hffff);
      wr(QR_TDEL, v+1);  rd(QR_TDEL, (v+1) & 32'hffff, "tdel");  chk("tdel out", tdel, (v+1) & 32'hffff);
      wr(QR_TINTDEL, v); rd(QR_TINTDEL, v & 32'hffffff, "tintdel"); chk("tintdel out", tintdel, v & 32'hffffff);
      wr(QR_NX, v);      rd(QR_NX, v & 32'hff, "nx");           chk("nx out", nx, v & 32'hff);
      wr(QR_NY, v>>8);   rd(QR_NY, (v>>8) & 32'hff, "ny");      chk("ny out", ny, (v>>8) & 32'hff);
      wr(QR_NW, v>>3);   rd(QR_NW, (v>>3) & 32'h1ff, "nw");     chk("nw out", nw, (v>>3) & 32'h1ff);
      wr(QR_NH, v>>5);   rd(QR_NH, (v>>5) & 32'h1ff, "nh");     chk("nh out", nh, (v>>5) & 32'h1ff);
    end
    // base address write pulse
    @(negedge clk); reg_wr = 1; reg_addr = QR_ABASE; reg_wdata = 32'h2abcd;
    @(negedge clk); reg_wr = 0; chk("abase_wr", abase_wr, 1); chk("abase", abase, 18'h2abcd);
    @(negedge clk); chk("abase_wr low", abase_wr, 0);
    // start bit held until ack
    wr(QR_CTRL, 1);
    repeat (5) @(negedge clk);
    chk("start held", start, 1); rd(QR_CTRL, 1, "ctrl start");
    start_ack = 1; @(negedge clk); start_ack = 0; chk("start cleared", start, 0);
    // int clear pulse
    @(negedge clk); reg_wr = 1; reg_addr = QR_CTRL; reg_wdata = 2;
    @(negedge clk); reg_wr = 0; chk("int_clr", int_clr, 1); chk("no start", start, 0);
    @(negedge clk); chk("int_clr low", int_clr, 0);
    busy = 1; inta = 1; rd(QR_CTRL, 6, "status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
