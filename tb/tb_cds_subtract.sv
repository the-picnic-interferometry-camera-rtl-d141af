// tb_cds_subtract: checks the subtraction register (loads only on
// load_sub) and the ALU (pass-through in the reset frame, reset minus
// image modulo 2^16 in the image frame) against random values.
module tb_cds_subtract;
  import picnic_pkg::*;
  logic clk = 0, rst_n = 0, load_sub = 0, reset_frame = 0;
  logic [15:0] sram_rdata = 0, adc_word = 0, sub_reg, alu_out;
  logic [15:0] ref_sub = 0;
  int checks = 0, failures = 0;

  cds_subtract dut (.clk, .rst_n, .load_sub, .sram_rdata, .adc_word, .reset_frame, .sub_reg, .alu_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      load_sub    = ($urandom_range(0, 2) == 0);
      reset_frame = $urandom_range(0, 1) == 1;
      sram_rdata  = 16'($urandom);
      adc_word    = 16'($urandom);
      @(posedge clk);
      if (load_sub) ref_sub = sram_rdata;
      #1;
      checks++;
      if (sub_reg != ref_sub) begin failures++; $display("sub_reg %h exp %h", sub_reg, ref_sub); end
      checks++;
      if (reset_frame ? (alu_out != adc_word) : (alu_out != 16'(ref_sub - adc_word))) begin
        failures++; $display("alu %h rf=%0d sub=%h adc=%h", alu_out, reset_frame, ref_sub, adc_word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
