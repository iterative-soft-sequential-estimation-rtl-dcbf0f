// siso_decoder: recursive soft-in soft-out decoder of one chip.
//
// Forms the soft output L(y_i) = L(b_i|U_i) + L_e(b_i). The extrinsic part
// L_e(b_i) comes from the previous soft outputs at the generator taps: its
// sign is the product of their signs and its magnitude is the smallest of
// their magnitudes (the min-sum form of the parity check b_i = prod b_{i-s_m}).
// The equation is the published scheme's; the saturation of the sum to
// +/-(2^(W_LLR-1)-1) is this design's choice.
//
// Interface: purely combinational. scdu[k-1] must hold L(y_{i-k}); TAPS bit
// k-1 is the generator coefficient g_k. A value of zero counts as positive,
// and it makes the extrinsic magnitude zero anyway.
module siso_decoder #(
  parameter int unsigned         S     = drsse_pkg::DEF_S,
  parameter logic        [S-1:0] TAPS  = drsse_pkg::DEF_TAPS,
  parameter int unsigned         W_LLR = drsse_pkg::DEF_W_LLR
) (
  input  logic signed [W_LLR-1:0] intrinsic,
  input  logic signed [W_LLR-1:0] scdu [S],
  output logic signed [W_LLR-1:0] extrinsic,
  output logic signed [W_LLR-1:0] soft_out
);

  localparam logic [W_LLR-2:0] MAG_MAX = '1;
  localparam logic signed [W_LLR:0] LLR_MAX = (W_LLR+1)'(MAG_MAX);
  localparam logic signed [W_LLR:0] LLR_MIN = -LLR_MAX;

  logic             neg;
  logic [W_LLR-2:0] mag, m;
  logic signed [W_LLR-1:0] abs_v;
  logic signed [W_LLR:0] total;

  always_comb begin
    neg = 1'b0;
    mag = MAG_MAX;
    for (int k = 0; k < S; k++) begin
      if (TAPS[k]) begin
        neg = neg ^ scdu[k][W_LLR-1];
        // Inputs are saturated symmetrically, so |x| fits in W_LLR-1 bits.
        abs_v = scdu[k][W_LLR-1] ? -scdu[k] : scdu[k];
        m = abs_v[W_LLR-2:0];
        if (m < mag) mag = m;
      end
    end
    extrinsic = neg ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    total = (W_LLR+1)'(intrinsic) + (W_LLR+1)'(extrinsic);
    if (total > LLR_MAX)      soft_out = LLR_MAX[W_LLR-1:0];
    else if (total < LLR_MIN) soft_out = LLR_MIN[W_LLR-1:0];
    else                      soft_out = total[W_LLR-1:0];
  end

endmodule
