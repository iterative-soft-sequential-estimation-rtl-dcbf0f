// soft_chip_register: the S soft-chip-delay-units (SCDUs).
//
// A shift register of S log-likelihood ratios, as long as the m-sequence
// generator. Each new decoder soft output L(y_i) enters the left-most unit
// (scdu[0]) and the value in the right-most unit (scdu[S-1]) is dropped, so
// after chip i the register holds L(y_i), L(y_{i-1}), ..., L(y_{i-S+1}) and
// scdu[k-1] is the value that tap g_k of the generator polynomial reads.
// Reset and clear set all units to zero, which is the published scheme's starting
// condition of no extrinsic information for chips before the first one.
//
// Interface: on a cycle with shift_en high, soft_in is shifted in; the
// outputs are the registered contents.
module soft_chip_register #(
  parameter int unsigned S     = drsse_pkg::DEF_S,
  parameter int unsigned W_LLR = drsse_pkg::DEF_W_LLR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    shift_en,
  input  logic signed [W_LLR-1:0] soft_in,
  output logic signed [W_LLR-1:0] scdu [S]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < S; k++) scdu[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < S; k++) scdu[k] <= '0;
    end else if (shift_en) begin
      scdu[0] <= soft_in;
      for (int k = 1; k < S; k++) scdu[k] <= scdu[k-1];
    end
  end

endmodule
