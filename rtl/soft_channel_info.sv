// soft_channel_info: intrinsic information of one differential chip.
//
// Computes L(b_i | U_i) = L_c * U_i + L(b_i): the differential sample scaled
// by the channel reliability value, plus the a-priori LLR of the chip (zero
// when nothing is known about it). L_c is an input taken with every sample,
// so the same block serves a fixed L_c = 2Ec/N0 (no channel knowledge,
// equal-gain weighting) and a per-chip L_c = 2 alpha_i^2 Ec/(Omega N0)
// (perfect channel knowledge, maximal-ratio weighting). The formula follows
// the published scheme; the fixed-point format is this design's choice: lc is an
// unsigned integer, the product is shifted right by LC_SHIFT bits (so lc
// carries LC_SHIFT fractional bits relative to U) and the sum saturates to
// +/-(2^(W_LLR-1)-1).
//
// Interface: lc and apriori are sampled together with u when u_valid is high.
// llr and the delayed copy u_d (for the despreader) are registered and appear
// with llr_valid one cycle later.
module soft_channel_info #(
  parameter int unsigned W_U      = 2 * drsse_pkg::DEF_W_Z + 1,
  parameter int unsigned W_LC     = drsse_pkg::DEF_W_LC,
  parameter int unsigned LC_SHIFT = drsse_pkg::DEF_LC_SHIFT,
  parameter int unsigned W_LLR    = drsse_pkg::DEF_W_LLR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    u_valid,
  input  logic signed [W_U-1:0]   u,
  input  logic        [W_LC-1:0]  lc,
  input  logic signed [W_LLR-1:0] apriori,
  output logic                    llr_valid,
  output logic signed [W_LLR-1:0] llr,
  output logic signed [W_U-1:0]   u_d
);

  localparam int unsigned W_P = W_U + W_LC + 2;  // product plus one bit for the sum
  localparam logic signed [W_P-1:0] LLR_MAX = W_P'((2 ** (W_LLR - 1)) - 1);
  localparam logic signed [W_P-1:0] LLR_MIN = -LLR_MAX;

  logic signed [W_P-1:0]   prod, scaled, total;
  logic signed [W_LLR-1:0] sat;

  always_comb begin
    prod   = W_P'(u) * $signed({2'b00, lc});
    scaled = prod >>> LC_SHIFT;
    total  = scaled + W_P'(apriori);
    if (total > LLR_MAX)      sat = LLR_MAX[W_LLR-1:0];
    else if (total < LLR_MIN) sat = LLR_MIN[W_LLR-1:0];
    else                      sat = total[W_LLR-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      llr_valid <= 1'b0;
      llr       <= '0;
      u_d       <= '0;
    end else begin
      llr_valid <= u_valid;
      if (u_valid) begin
        llr <= sat;
        u_d <= u;
      end
    end
  end

endmodule
