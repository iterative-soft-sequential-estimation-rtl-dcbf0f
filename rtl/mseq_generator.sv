// mseq_generator: loadable S-stage m-sequence generator.
//
// A feedback shift register whose delay units hold the last S chips. The
// new chip is the product of the chips at the taps g_k = 1, c_i =
// prod c_{i-s_m}; with chips coded as bits (0 = +1, 1 = -1) the product is an
// exclusive-or. The new chip is the generator output and enters the first
// delay unit while the others shift one place to the right. This follows the
// published scheme's generator; the load port and the bit coding are this design's.
//
// Interface: state[k-1] is delay unit k, i.e. chip c_{i-k}. On a cycle with
// load high the delay units take load_state first; on a cycle with step high
// the register then advances by one chip. chip is combinational: it is the
// chip that this cycle's step produces from the (possibly just loaded)
// contents, so a load and a step in the same cycle give the chip that
// follows the loaded ones. Reset puts -1 in every unit, a valid non-zero
// state of the register.
module mseq_generator #(
  parameter int unsigned         S    = drsse_pkg::DEF_S,
  parameter logic        [S-1:0] TAPS = drsse_pkg::DEF_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [S-1:0] load_state,
  input  logic         step,
  output logic [S-1:0] state,
  output logic         chip
);

  logic [S-1:0] base;

  always_comb begin
    base = load ? load_state : state;
    chip = ^(base & TAPS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '1;
    end else if (step) begin
      state <= {base[S-2:0], chip};
    end else begin
      state <= base;
    end
  end

endmodule
