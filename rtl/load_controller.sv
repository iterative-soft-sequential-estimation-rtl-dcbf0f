// load_controller: hard decisions and loading command of the estimator.
//
// Watches the soft-chip-register. The hard decision of every soft-chip-delay-
// unit is the polarity of its LLR (>= 0 gives +1, < 0 gives -1); these S
// chips are what the m-sequence generator is loaded with. The loading command
// is given once the reliabilities are high enough: the smallest LLR magnitude
// of the S units must reach load_thresh, and at least min_chips decoder
// updates must have been made since the last restart. After a load the
// controller waits; a reloading command from the tracking loop sends it back
// to searching and restarts the chip count. Loading on reliability follows
// the published scheme; the minimum-magnitude test, the chip count and the restart
// are this design's choices.
//
// Interface: update is high for one cycle per decoder soft output. load_cmd
// is combinational from the registered unit contents and lasts one cycle;
// loaded rises the cycle after it. reload has priority over loading.
module load_controller #(
  parameter int unsigned S       = drsse_pkg::DEF_S,
  parameter int unsigned W_LLR   = drsse_pkg::DEF_W_LLR,
  parameter int unsigned W_COUNT = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,        // restart the acquisition
  input  logic                    update,       // one decoder update done
  input  logic                    reload,       // reloading command
  input  logic signed [W_LLR-1:0] scdu [S],
  input  logic        [W_LLR-2:0] load_thresh,
  input  logic      [W_COUNT-1:0] min_chips,
  output logic        [S-1:0]     hard,         // bit k-1: 0 = +1, 1 = -1
  output logic        [W_LLR-2:0] min_mag,
  output logic                    load_cmd,
  output logic                    loaded,
  output logic      [W_COUNT-1:0] chip_count
);

  logic signed [W_LLR-1:0] abs_v;

  always_comb begin
    min_mag = '1;
    for (int k = 0; k < S; k++) begin
      hard[k] = scdu[k][W_LLR-1];
      abs_v   = scdu[k][W_LLR-1] ? -scdu[k] : scdu[k];
      if (abs_v[W_LLR-2:0] < min_mag) min_mag = abs_v[W_LLR-2:0];
    end
    load_cmd = !loaded && !reload && !clear &&
               (chip_count >= min_chips) && (min_mag >= load_thresh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded     <= 1'b0;
      chip_count <= '0;
    end else if (clear || reload) begin
      loaded     <= 1'b0;
      chip_count <= '0;
    end else begin
      if (load_cmd) loaded <= 1'b1;
      if (update && chip_count != '1) chip_count <= chip_count + 1'b1;
    end
  end

  // A load is only given while searching, and reload takes it back.
  a_load_once: assert property (@(posedge clk) disable iff (!rst_n) load_cmd |-> !loaded);
  a_reload_clears: assert property (@(posedge clk) disable iff (!rst_n) reload |=> !loaded);

endmodule
