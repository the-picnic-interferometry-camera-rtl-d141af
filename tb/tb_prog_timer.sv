// tb_prog_timer: checks that the programmable counter's `done` is sampled
// exactly `count` cycles after `start` (count 0 counts as 1), that `busy`
// covers the interval, and that a new `start` restarts it.
module tb_prog_timer;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [11:0] count = '0;
  int checks = 0, failures = 0;

  prog_timer #(.W(12)) dut (.clk, .rst_n, .start, .count, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int waited;
    @(negedge clk); start = 1; count = 12'(n);
    @(posedge clk); #1 start = 0;
    waited = 1;
    while (!done) begin
      checks++; if (!busy && n > 1) begin failures++; $display("busy low early n=%0d", n); end
      @(posedge clk); #1 waited++;
    end
    // done is high now; it is sampled at the next edge
    checks++;
    if (waited != ((n == 0) ? 1 : n)) begin
      failures++; $display("n=%0d waited %0d", n, waited);
    end
    @(posedge clk); #1;
    checks++; if (done || busy) begin failures++; $display("done/busy stuck n=%0d", n); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(33); run(85); run(255); run(4095);
    for (int k = 0; k < 30; k++) run(1 + $urandom_range(0, 600));
    // restart while busy
    @(negedge clk); start = 1; count = 12'd50;
    @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    start = 1; count = 12'd10;
    @(negedge clk); start = 0;
    begin
      int w = 0;
      while (!done) begin @(negedge clk); w++; end
      checks++; if (w != 9) begin failures++; $display("restart waited %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
