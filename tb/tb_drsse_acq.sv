// tb_drsse_acq: end-to-end test of the DRSSE acquisition receiver at its
// default size (13-stage generator, polynomial 1 + D + D^3 + D^4 + D^13,
// period 8191 chips).
//
// A transmitter model produces the m-sequence c_i from its own recursion, and
// a channel model adds a carrier phase that drifts from chip to chip, complex
// Gaussian noise and, in one phase, Rayleigh fading; the samples are then
// quantised to 8 bits. The expected replica is b_i = c_i*c_{i-1}. The test
// runs these phases:
//   1. AWGN at Ec/N0 = 2 dB, fixed L_c: the receiver must load, lock, and its
//      replica must then match b_i chip for chip.
//   2. The transmitter jumps 1000 chips ahead: the tracking loop must lose
//      lock and issue a reload, after which the receiver must reacquire.
//   3. A careless load (threshold zero after one chip) at Ec/N0 = -6 dB: a
//      wrong load must be caught by the tracking loop and reloaded.
//   4. Rayleigh fading at Ec/N0 = 10 dB with per-chip L_c proportional to
//      |h_i|^2 (maximal-ratio weighting): the receiver must lock again.
// It counts loads, reloads, locks, saturated soft outputs and replica chip
// errors while locked, and fails if any of these mechanisms never occurs.
module tb_drsse_acq;
  import drsse_pkg::*;
  localparam int S = DEF_S;
  localparam int W_Z = DEF_W_Z, W_LC = DEF_W_LC, W_LLR = DEF_W_LLR, W_COUNT = 16;
  localparam int W_Y = 2 * W_Z + 2;
  localparam real PI = 3.141592653589793;
  localparam real AMP = 40.0;           // signal amplitude in quantiser steps

  logic clk = 0, rst_n = 0, clear = 0;
  logic z_valid = 0;
  logic signed [W_Z-1:0] z_i = 0, z_q = 0;
  logic [W_LC-1:0] lc = 0;
  logic signed [W_LLR-1:0] apriori = 0;
  logic [W_LLR-2:0] load_thresh = 800;
  logic [W_COUNT-1:0] min_chips = 0;
  logic signed [W_Y-1:0] lock_thresh = 800;
  logic soft_valid, rep_valid, rep_chip, load_cmd, reload_cmd, loaded, locked;
  logic signed [W_LLR-1:0] soft_out;
  logic [W_LLR-2:0] min_mag;
  logic [W_COUNT-1:0] chip_count;
  logic [S-1:0] gen_state;
  logic signed [W_Y-1:0] corr_lpf;

  drsse_acq dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- transmitter: c_i = prod of c at taps 1, 3, 4, 13 -------
  int c_hist [S];   // c_hist[k-1] = c_{i-k}, values +1 / -1
  int c_prev;
  function automatic int next_chip();
    int c;
    c = c_hist[0] * c_hist[2] * c_hist[3] * c_hist[12];
    for (int k = S - 1; k > 0; k--) c_hist[k] = c_hist[k-1];
    c_hist[0] = c;
    return c;
  endfunction

  // ---------------- channel ------------------------------------------------
  real phase = 0.0, h_re = 1.0, h_im = 0.0;
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction
  function automatic logic signed [W_Z-1:0] quant(real v);
    int r;
    r = $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
    if (r > 127) r = 127;
    if (r < -127) r = -127;
    return W_Z'(r);
  endfunction

  // expected b_i for every sample that will produce a soft output
  int exp_b [$];
  bit first_sample = 1;
  bit fading = 0;
  real esn0_db = 2.0;
  real lc_fixed;

  task automatic send_chip();
    int c;
    real sig, re, im, a2, lcv;
    c = next_chip();
    if (fading) begin
      // first-order complex Gauss-Markov fading, unit mean power
      h_re = 0.995 * h_re + $sqrt(1.0 - 0.995 * 0.995) * gauss() * $sqrt(0.5);
      h_im = 0.995 * h_im + $sqrt(1.0 - 0.995 * 0.995) * gauss() * $sqrt(0.5);
    end else begin
      h_re = 1.0; h_im = 0.0;
    end
    phase = phase + 0.05;   // carrier frequency offset: 0.05 rad per chip
    sig = AMP * $sqrt(0.5 / $pow(10.0, esn0_db / 10.0));
    re = AMP * c * (h_re * $cos(phase) - h_im * $sin(phase)) + sig * gauss();
    im = AMP * c * (h_re * $sin(phase) + h_im * $cos(phase)) + sig * gauss();
    a2 = fading ? (h_re * h_re + h_im * h_im) : 1.0;
    // L_c = 2 a^2 Ec/N0, scaled so that a noiseless U of AMP^2 gives 64 * L_c
    lcv = 2.0 * a2 * $pow(10.0, esn0_db / 10.0) * 64.0 * 256.0 / (AMP * AMP);
    if (!fading) lcv = lc_fixed;
    if (lcv > 255.0) lcv = 255.0;
    z_i = quant(re); z_q = quant(im);
    lc = W_LC'($rtoi(lcv + 0.5));
    z_valid = 1;
    if (!first_sample) exp_b.push_back(c * c_prev);
    first_sample = 0;
    c_prev = c;
  endtask

  // ---------------- monitor ------------------------------------------------
  int n_load = 0, n_reload = 0, n_lock = 0, n_sat = 0, n_cmp = 0, n_err = 0;
  int n_reload_unlocked = 0, n_reload_locked = 0;
  bit was_locked = 0;
  always @(posedge clk) if (rst_n) begin
    if (load_cmd) n_load++;
    if (reload_cmd) begin
      n_reload++;
      if (was_locked) n_reload_locked++; else n_reload_unlocked++;
    end
    if (locked && !was_locked) n_lock++;
    if (!reload_cmd) was_locked <= locked;
    else was_locked <= 0;
    if (soft_valid) begin
      int b;
      b = exp_b.pop_front();
      if (soft_out == 16'sd32767 || soft_out == -16'sd32767) n_sat++;
      if (rep_valid && locked) begin
        n_cmp++;
        if ((rep_chip ? -1 : 1) != b) begin
          n_err++;
        end
      end
    end
  end

  task automatic run_chips(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      send_chip();
    end
    @(negedge clk);
    z_valid = 0;
  endtask

  task automatic run_until_locked(int max_chips, output int used);
    used = 0;
    while (!locked && used < max_chips) begin
      @(negedge clk);
      send_chip();
      used++;
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
    else $display("ok: %s", what);
  endtask

  int used, err0, cmp0, rel0;
  initial begin
    for (int k = 0; k < S; k++) c_hist[k] = ($urandom_range(0, 1) != 0) ? 1 : -1;
    c_hist[0] = -1;            // never the all +1 state
    lc_fixed = 2.0 * $pow(10.0, 2.0 / 10.0) * 64.0 * 256.0 / (AMP * AMP);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- phase 1: AWGN 2 dB ----
    esn0_db = 2.0;
    run_until_locked(5000, used);
    $display("phase 1: locked after %0d chips (load events %0d)", used, n_load);
    check(locked, "phase 1 acquisition and lock at 2 dB AWGN");
    err0 = n_err; cmp0 = n_cmp;
    run_chips(3000);
    check(n_cmp - cmp0 >= 2900 && n_err == err0, "phase 1 replica matches b_i while locked");

    // ---- phase 2: code phase jump ----
    rel0 = n_reload;
    for (int k = 0; k < 1000; k++) void'(next_chip());
    // the sample across the jump gives c_j*c_{i-1}, which is what is expected
    run_until_locked(1, used);
    used = 0;
    while (n_reload == rel0 && used < 2000) begin @(negedge clk); send_chip(); used++; end
    check(n_reload > rel0, "phase 2 loss of lock gives a reloading command");
    run_until_locked(5000, used);
    check(locked, "phase 2 reacquisition after the jump");
    err0 = n_err; cmp0 = n_cmp;
    run_chips(2000);
    check(n_cmp - cmp0 >= 1900 && n_err == err0, "phase 2 replica matches after reacquisition");

    // ---- phase 3: careless loading at -6 dB must be caught ----
    @(negedge clk);
    z_valid = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    exp_b.delete();
    first_sample = 1;
    load_thresh = 0; min_chips = 1;
    esn0_db = -6.0;
    lc_fixed = 2.0 * $pow(10.0, -6.0 / 10.0) * 64.0 * 256.0 / (AMP * AMP);
    rel0 = n_reload_unlocked;
    run_chips(3000);
    check(n_reload_unlocked > rel0, "phase 3 wrong loads are caught and reloaded");

    // ---- phase 4: Rayleigh fading, maximal-ratio weighting ----
    @(negedge clk);
    z_valid = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    exp_b.delete();
    first_sample = 1;
    load_thresh = 1600; min_chips = 0; lock_thresh = 300;
    esn0_db = 10.0;
    fading = 1;
    run_until_locked(20000, used);
    $display("phase 4: locked after %0d chips", used);
    check(locked, "phase 4 lock under Rayleigh fading");
    err0 = n_err; cmp0 = n_cmp;
    run_chips(3000);
    check(n_cmp - cmp0 > 1000 && n_err == err0, "phase 4 replica matches while locked");

    $display("events: loads=%0d reloads=%0d (unlocked %0d, lost lock %0d) locks=%0d saturated=%0d compared=%0d errors=%0d",
             n_load, n_reload, n_reload_unlocked, n_reload_locked, n_lock, n_sat, n_cmp, n_err);
    check(n_sat > 0, "soft outputs reach saturation");
    check(n_load > 0 && n_lock > 0 && n_reload_locked > 0 && n_reload_unlocked > 0 && n_sat > 0,
          "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
