// picnic_model: behavioural model of the PICNIC detector's addressing and
// pixel signal (testbench only).
//
// FSYNC high returns the line register to 0 and LSYNC high returns the pixel
// register to 0; every change of level of LINE or PIXEL (both double-edged)
// advances the line or the pixel by one. RESET high resets the selected
// line. The output level of the selected pixel is
//   level = BASE + line*7 + pixel*3 - (flux * cycles since the line's reset) / SLOPE_DIV
// with flux = 1 + (line + 2*pixel) % 5, floored at 0: a pixel discharges
// from its reset level as light falls on it. Counters of the events seen are
// exported for the testbenches.
module picnic_model #(
  parameter int BASE      = 40000,
  parameter int SLOPE_DIV = 64
) (
  input  logic clk,
  input  logic fsync,
  input  logic lsync,
  input  logic line_clk,
  input  logic pixel_clk,
  input  logic reset,
  output int   cur_line,
  output int   cur_pix,
  output int   level,
  output int   n_resets,
  output int   n_fsync
);
  longint cyc;
  longint rst_time [256];
  logic   line_q, pix_q, reset_q, fsync_q;

  initial begin
    cyc = 0; cur_line = 0; cur_pix = 0; n_resets = 0; n_fsync = 0;
    line_q = 0; pix_q = 0; reset_q = 0; fsync_q = 0;
    for (int i = 0; i < 256; i++) rst_time[i] = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    line_q  <= line_clk;
    pix_q   <= pixel_clk;
    reset_q <= reset;
    fsync_q <= fsync;
    if (fsync) cur_line <= 0;
    else if (line_clk != line_q) cur_line <= cur_line + 1;
    if (lsync) cur_pix <= 0;
    else if (pixel_clk != pix_q) cur_pix <= cur_pix + 1;
    if (reset) rst_time[cur_line % 256] <= cyc;
    if (reset && !reset_q) n_resets <= n_resets + 1;
    if (fsync && !fsync_q) n_fsync <= n_fsync + 1;
  end

  always_comb begin
    longint v;
    v = longint'(BASE + cur_line * 7 + cur_pix * 3)
        - (longint'(1 + (cur_line + 2 * cur_pix) % 5) * (cyc - rst_time[cur_line % 256])) / SLOPE_DIV;
    level = (v < 0) ? 0 : int'(v);
  end
endmodule
