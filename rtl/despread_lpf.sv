// despread_lpf: despreading multiplier and low-pass filter.
//
// Multiplies each differential sample U_i by the local replica chip b_i of
// the m-sequence generator (a sign change for a -1 chip) and smooths the
// product with a first-order recursive low-pass filter,
// y <- y + (x - y) / 2^LPF_SHIFT. When the generator is in step with the
// received sequence the products are positive and y settles near the mean
// of |U_i|; out of step they average to about zero. The published scheme shows the
// multiplier and a low-pass filter but not their insides; the filter type and
// its constant are this design's choices.
//
// Interface: on a cycle with step high, u and chip are taken and y is
// updated (registered, visible the next cycle). clear sets y to zero.
module despread_lpf #(
  parameter int unsigned W_U       = 2 * drsse_pkg::DEF_W_Z + 1,
  parameter int unsigned LPF_SHIFT = 5,
  localparam int unsigned W_Y      = W_U + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  step,
  input  logic signed [W_U-1:0] u,
  input  logic                  chip,   // 0 = +1, 1 = -1
  output logic signed [W_Y-1:0] y
);

  logic signed [W_Y-1:0] x;
  logic signed [W_Y:0]   diff;

  always_comb begin
    x    = chip ? -W_Y'(u) : W_Y'(u);
    diff = (W_Y+1)'(x) - (W_Y+1)'(y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
    end else if (clear) begin
      y <= '0;
    end else if (step) begin
      y <= y + W_Y'(diff >>> LPF_SHIFT);
    end
  end

endmodule
