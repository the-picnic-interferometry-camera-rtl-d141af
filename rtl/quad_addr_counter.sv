// quad_addr_counter: SRAM address counter of the quadrant readout circuit.
//
// The document forms the SRAM address by combining the line and pixel
// counters and draws a loadable address counter fed from the host data bus.
// Because pixels are visited in raster order, one counter that is loaded with
// a base address at the start of each frame and advanced once per pixel gives
// base + line*width + pixel, the same word for a pixel in the reset frame and
// in the image frame. `load` has priority over `inc`. The address wraps at
// the top of the SRAM address space.
module quad_addr_counter
  import picnic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [SRAM_AW-1:0] load_val,
  input  logic               inc,
  output logic [SRAM_AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (load) addr <= load_val;
    else if (inc)  addr <= addr + SRAM_AW'(1);
  end

endmodule
