// drsse_acq: differential recursive soft sequential estimation (DRSSE)
// acquisition of an m-sequence.
//
// The receiver has to find the code phase of an m-sequence of period 2^S-1
// from noisy chip samples whose carrier phase is unknown. Instead of a serial
// search over all phases it estimates S consecutive chips and loads them into
// its own copy of the sequence generator. The chain is:
//
//   Z_i -> diff_processor -> U_i = Re(Z_i conj(Z_{i-1}))   (phase removed)
//       -> soft_channel_info -> L_c*U_i + L(b_i)           (intrinsic LLR)
//       -> siso_decoder (+ extrinsic LLR from the taps of the
//          soft_chip_register, min-sum of the parity b_i = prod b_{i-s_m})
//       -> soft_chip_register (S soft-chip-delay-units)
//       -> load_controller: when every unit is reliable enough, load the
//          signs of the S LLRs into the mseq_generator
//       -> mseq_generator runs freely and gives the replica chip b_i
//       -> despread_lpf: low-pass filtered U_i * b_i
//       -> tracking_loop: keeps the lock or gives the reloading command,
//          which clears the soft-chip-register and restarts the estimation.
//
// The differential products b_i = c_i c_{i-1} form a shifted copy of the same
// m-sequence, so the generator and the soft-chip-register use the generator
// polynomial TAPS of the transmitted sequence. The replica produced is that of
// the differential sequence b. The block structure and equations follow the
// published scheme; the fixed-point formats, the load test, the filter, the lock test
// and the restart on reload are this design's choices.
//
// Interface and timing: one complex chip sample per cycle with z_valid high
// (gaps are allowed). lc and apriori accompany the sample they belong to. A
// sample's decoder soft output appears two cycles later with soft_valid; the
// replica chip rep_chip for the same chip comes in that same cycle with
// rep_valid once the generator is loaded. clear restarts the acquisition.
module drsse_acq
  import drsse_pkg::*;
#(
  parameter int unsigned         S         = DEF_S,
  parameter logic        [S-1:0] TAPS      = DEF_TAPS,
  parameter int unsigned         W_Z       = DEF_W_Z,
  parameter int unsigned         W_LC      = DEF_W_LC,
  parameter int unsigned         LC_SHIFT  = DEF_LC_SHIFT,
  parameter int unsigned         W_LLR     = DEF_W_LLR,
  parameter int unsigned         LPF_SHIFT = 5,
  parameter int unsigned         SETTLE    = 128,
  parameter int unsigned         W_COUNT   = 16,
  localparam int unsigned        W_U       = 2 * W_Z + 1,
  localparam int unsigned        W_Y       = W_U + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  // received chip samples and their soft channel information
  input  logic                    z_valid,
  input  logic signed [W_Z-1:0]   z_i,
  input  logic signed [W_Z-1:0]   z_q,
  input  logic        [W_LC-1:0]  lc,
  input  logic signed [W_LLR-1:0] apriori,
  // run-time settings
  input  logic        [W_LLR-2:0] load_thresh,
  input  logic      [W_COUNT-1:0] min_chips,
  input  logic signed [W_Y-1:0]   lock_thresh,
  // decoder soft output
  output logic                    soft_valid,
  output logic signed [W_LLR-1:0] soft_out,
  output logic        [W_LLR-2:0] min_mag,
  // local replica
  output logic                    rep_valid,
  output logic                    rep_chip,     // 0 = +1, 1 = -1
  output logic        [S-1:0]     gen_state,
  // acquisition status
  output logic      [W_COUNT-1:0] chip_count,   // updates since restart
  output logic                    load_cmd,
  output logic                    reload_cmd,
  output logic                    loaded,
  output logic                    locked,
  output logic signed [W_Y-1:0]   corr_lpf
);

  // Differential pre-processing; lc and apriori follow their sample.
  logic                    u_valid;
  logic signed [W_U-1:0]   u;
  logic        [W_LC-1:0]  lc_d;
  logic signed [W_LLR-1:0] apriori_d;

  diff_processor #(.W_Z(W_Z)) u_diff (
    .clk, .rst_n, .clear,
    .in_valid(z_valid), .z_i, .z_q,
    .u_valid, .u
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lc_d      <= '0;
      apriori_d <= '0;
    end else if (z_valid) begin
      lc_d      <= lc;
      apriori_d <= apriori;
    end
  end

  // Intrinsic information.
  logic                    int_valid;
  logic signed [W_LLR-1:0] int_llr;
  logic signed [W_U-1:0]   u_d;

  soft_channel_info #(
    .W_U(W_U), .W_LC(W_LC), .LC_SHIFT(LC_SHIFT), .W_LLR(W_LLR)
  ) u_sci (
    .clk, .rst_n,
    .u_valid, .u, .lc(lc_d), .apriori(apriori_d),
    .llr_valid(int_valid), .llr(int_llr), .u_d
  );

  // Recursive SISO decoder around the soft-chip-register.
  logic signed [W_LLR-1:0] scdu [S];
  logic                    restart;

  siso_decoder #(.S(S), .TAPS(TAPS), .W_LLR(W_LLR)) u_siso (
    .intrinsic(int_llr), .scdu, .extrinsic(), .soft_out
  );

  assign restart = clear || reload_cmd;

  soft_chip_register #(.S(S), .W_LLR(W_LLR)) u_scr (
    .clk, .rst_n, .clear(restart),
    .shift_en(int_valid), .soft_in(soft_out), .scdu
  );

  assign soft_valid = int_valid;

  // Hard decisions and loading command.
  logic [S-1:0]         hard;

  load_controller #(.S(S), .W_LLR(W_LLR), .W_COUNT(W_COUNT)) u_load (
    .clk, .rst_n, .clear,
    .update(int_valid), .reload(reload_cmd),
    .scdu, .load_thresh, .min_chips,
    .hard, .min_mag, .load_cmd, .loaded, .chip_count
  );

  // Local m-sequence generator.
  mseq_generator #(.S(S), .TAPS(TAPS)) u_gen (
    .clk, .rst_n,
    .load(load_cmd), .load_state(hard),
    .step(int_valid),
    .state(gen_state), .chip(rep_chip)
  );

  assign rep_valid = int_valid && (loaded || load_cmd);

  // Despreading, filtering and lock supervision.

  despread_lpf #(.W_U(W_U), .LPF_SHIFT(LPF_SHIFT)) u_lpf (
    .clk, .rst_n,
    .clear(restart || (load_cmd && !int_valid)),
    .step(rep_valid), .u(u_d), .chip(rep_chip),
    .y(corr_lpf)
  );

  tracking_loop #(.W_Y(W_Y), .SETTLE(SETTLE)) u_track (
    .clk, .rst_n, .clear,
    .loaded, .step(int_valid), .y(corr_lpf), .lock_thresh,
    .locked, .reload(reload_cmd), .settle_count()
  );

endmodule
