// clk_div: divides the 50 MHz board clock down to the 1 MHz control rate.
//
// A counter runs from 0 to SCALE-1 and wraps; SCALE is the ratio of the input
// clock to the wanted rate (50 MHz / 1 MHz = 50). Rather than driving logic
// from a derived clock, the rest of the design runs on `clk` and uses `tick`,
// a one-cycle enable pulse issued when the counter wraps, i.e. once every
// SCALE cycles. `clk_out` is the same rate as a square wave (high for the
// first SCALE/2 counts) for use off chip or as a probe.
//
// Timing: after reset is released the first `tick` comes SCALE cycles later,
// then every SCALE cycles. Reset is asynchronous, active low (this design's
// choice).
module clk_div #(
  parameter int unsigned SCALE = 50
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick,
  output logic clk_out
);

  localparam int unsigned CW = (SCALE > 1) ? $clog2(SCALE) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(SCALE - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  assign clk_out = (cnt < CW'(SCALE / 2));

  initial assert (SCALE >= 2) else $error("clk_div: SCALE must be at least 2");

endmodule
