// tb_quad_addr_counter: drives random load/increment sequences and compares
// the address with a reference counter (load wins over increment, wrap at
// 2^18), then checks that a raster of W x H increments from a base gives
// base + line*W + pixel.
module tb_quad_addr_counter;
  import picnic_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [SRAM_AW-1:0] load_val = '0, addr, ref_addr = '0;
  int checks = 0, failures = 0;

  quad_addr_counter dut (.clk, .rst_n, .load, .load_val, .inc, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (addr != '0) begin failures++; $display("reset value"); end
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      load = ($urandom_range(0, 20) == 0);
      inc  = $urandom_range(0, 1) == 1;
      load_val = (k == 5) ? '1 : SRAM_AW'($urandom);
      @(posedge clk);
      if (load) ref_addr = load_val; else if (inc) ref_addr = ref_addr + 1'b1;
      #1 checks++;
      if (addr != ref_addr) begin failures++; $display("addr %h exp %h", addr, ref_addr); end
    end
    // raster
    @(negedge clk); load = 1; inc = 0; load_val = 18'h100;
    @(negedge clk); load = 0;
    for (int l = 0; l < 5; l++)
      for (int p = 0; p < 7; p++) begin
        checks++;
        if (addr != 18'(18'h100 + l * 7 + p)) begin failures++; $display("raster l%0d p%0d", l, p); end
        inc = 1; @(negedge clk); inc = 0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
