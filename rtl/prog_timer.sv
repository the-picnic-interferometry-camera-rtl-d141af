// prog_timer: presettable down-counter used for every programmable interval
// of the controller (pixel/line step time Tstep, settling delay Tdel,
// reset-to-image delay Tintdel).
//
// The document generates these intervals by dividing the 33 MHz PCI clock
// with counters the CPU can program; this block is that counter. A one-cycle
// `start` loads `count`; `busy` is high while it runs and `done` pulses for
// one cycle; the edge that samples `done` comes exactly `count` edges after
// the edge that sampled `start` (a count of 0 behaves as 1), so a caller that
// moves on when it sees `done` spends exactly `count` cycles waiting. A `start` while busy restarts the interval.
module prog_timer #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] count,
  output logic         busy,
  output logic         done
);

  logic [W-1:0] remain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (count <= W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          remain <= count - W'(1);
          busy   <= 1'b1;
        end
      end else if (busy) begin
        if (remain == W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        remain <= remain - W'(1);
      end
    end
  end

endmodule
