// diff_processor: chip-based differential pre-processor.
//
// Holds the previous received chip sample Z_{i-1} in a one-chip delay and
// forms U_i = Re(Z_i * conj(Z_{i-1})) = I_i*I_{i-1} + Q_i*Q_{i-1}. Because the
// carrier phase of two adjacent chips is nearly the same, the phase cancels
// and U_i carries the product b_i = c_i*c_{i-1} of two adjacent chips, which
// is itself a shifted copy of the same m-sequence. The operation follows the
// published scheme; the integer widths and the handshake are this design's choice.
//
// Interface: one sample (z_i, z_q) is taken per cycle in which in_valid is
// high. u and u_valid are registered: u_valid rises one cycle after the
// sample. The first sample after reset or clear only fills the delay and
// produces no output, since it has no predecessor.
module diff_processor #(
  parameter int unsigned W_Z = drsse_pkg::DEF_W_Z,
  localparam int unsigned W_U = 2 * W_Z + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,     // forget the stored sample
  input  logic                  in_valid,
  input  logic signed [W_Z-1:0] z_i,
  input  logic signed [W_Z-1:0] z_q,
  output logic                  u_valid,
  output logic signed [W_U-1:0] u
);

  logic signed [W_Z-1:0] prev_i, prev_q;
  logic                  have_prev;
  logic signed [W_U-1:0] prod_sum;

  // Each product of two W_Z-bit numbers fits in 2*W_Z bits; their sum in W_U.
  always_comb begin
    prod_sum = W_U'(z_i * prev_i) + W_U'(z_q * prev_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_i    <= '0;
      prev_q    <= '0;
      have_prev <= 1'b0;
      u_valid   <= 1'b0;
      u         <= '0;
    end else begin
      u_valid <= 1'b0;
      if (clear) begin
        have_prev <= 1'b0;
      end else if (in_valid) begin
        prev_i    <= z_i;
        prev_q    <= z_q;
        have_prev <= 1'b1;
        if (have_prev) begin
          u       <= prod_sum;
          u_valid <= 1'b1;
        end
      end
    end
  end

endmodule
