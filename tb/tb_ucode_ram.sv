// tb_ucode_ram: writes the example clocking program and random words into
// the microcode RAM and checks every location read back one cycle after its
// address is presented.
module tb_ucode_ram;
  import picnic_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  ucode_t wdata = '0, rdata;
  logic [11:0] ref_mem [256];
  int checks = 0, failures = 0;
  logic [11:0] prog [7] = '{12'h203, 12'h302, 12'h103, 12'h004, 12'h302, 12'h103, 12'h400};

  ucode_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) ref_mem[i] = (i < 7) ? prog[i] : 12'($urandom);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = ref_mem[i];
    end
    @(negedge clk); we = 0;
    for (int i = 255; i >= 0; i--) begin
      @(negedge clk); raddr = 8'(i);
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[i]) begin failures++; $display("addr %0d got %h exp %h", i, rdata, ref_mem[i]); end
    end
    checks++;
    raddr = 0; @(negedge clk);
    if (rdata.op != OP_FSYNC_LINE || rdata.n != 8'd3) begin failures++; $display("decode of word 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
