// tb_drsse_workloads: erroneous loading probability of the DRSSE receiver
// for the generator sizes, signal-to-noise ratios and chip counts at which
// its performance is usually quoted.
//
// Two receivers are instantiated: a 5-stage one with g(D) = 1 + D^2 + D^5
// and the default 13-stage one with g(D) = 1 + D + D^3 + D^4 + D^13. Every
// trial starts from a cleared receiver, a random code phase and a random
// carrier phase; L + 1 noisy samples are sent (giving L differential chips),
// the load threshold is zero and min_chips = L, so the generator is loaded
// after exactly L decoder updates. The trial is an erroneous load when any
// of the S loaded chips differs from the transmitted b_i.
//
// Published results for this method are about 1e-4 at L = 40*S..200*S chips
// and Ec/N0 of 0 to 1.7 dB. A floating-point model of the recursion exactly
// as implemented here (min-sum extrinsic, no clipping) reaches that level for
// S = 5 but shows an error floor for S = 13 at 1 to 2 dB, where the decoder
// sometimes settles on a wrong code phase and does not leave it. The bounds
// below follow that model (with margin for the trial count and the 8-bit
// samples), and W8 shows the 13-stage receiver loading reliably at 4 dB.
//   W1  S=5,  AWGN 0 dB,    L = 5      model about 0.5   expect > 0.3
//   W2  S=5,  AWGN 0 dB,    L = 200    model about 0.003 expect < 0.02
//   W3  S=13, AWGN 1.7 dB,  L = 520    model 0.04..0.08  expect < 0.15
//   W4  S=13, AWGN 1 dB,    L = 2600   model 0.22..0.33  expect < 0.45
//   W5  S=13, AWGN 2 dB,    L = 260    model about 0.06  expect < 0.15
//   W6  S=13, Rayleigh 2 dB, per-chip L_c (maximal ratio), L = 6500,
//                                                         expect < 0.05
//   W7  as W6 with fixed L_c (equal gain)                  expect < 0.20
//   W8  S=13, AWGN 4 dB,    L = 520                        expect < 0.01
// The fading is a first-order Gauss-Markov process with correlation 0.995
// from chip to chip, and the carrier drifts by 0.05 rad per chip.
module tb_drsse_workloads;
  import drsse_pkg::*;
  localparam int W_Z = DEF_W_Z, W_LC = DEF_W_LC, W_LLR = DEF_W_LLR, W_COUNT = 16;
  localparam real PI = 3.141592653589793;
  localparam real AMP = 40.0;

  logic clk = 0, rst_n = 0, clear = 0;
  logic zv5 = 0, zv13 = 0;
  logic signed [W_Z-1:0] z_i = 0, z_q = 0;
  logic [W_LC-1:0] lc = 0;
  logic [W_COUNT-1:0] min_chips = 16'hFFFF;

  logic        ld5, ld13;
  logic [4:0]  st5;
  logic [12:0] st13;

  drsse_acq #(.S(5), .TAPS(5'b10010)) dut5 (
    .clk, .rst_n, .clear, .z_valid(zv5), .z_i, .z_q, .lc, .apriori('0),
    .load_thresh('0), .min_chips, .lock_thresh(18'sd800),
    .soft_valid(), .soft_out(), .min_mag(), .rep_valid(), .rep_chip(), .gen_state(st5),
    .chip_count(), .load_cmd(ld5), .reload_cmd(), .loaded(), .locked(), .corr_lpf()
  );
  drsse_acq dut13 (
    .clk, .rst_n, .clear, .z_valid(zv13), .z_i, .z_q, .lc, .apriori('0),
    .load_thresh('0), .min_chips, .lock_thresh(18'sd800),
    .soft_valid(), .soft_out(), .min_mag(), .rep_valid(), .rep_chip(), .gen_state(st13),
    .chip_count(), .load_cmd(ld13), .reload_cmd(), .loaded(), .locked(), .corr_lpf()
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter: c_i = product of c_{i-k} over the taps
  int c_hist [13];
  int S_cur;
  logic [12:0] taps_cur;
  function automatic int next_chip();
    int c = 1;
    for (int k = 0; k < S_cur; k++) if (taps_cur[k]) c = c * c_hist[k];
    for (int k = 12; k > 0; k--) c_hist[k] = c_hist[k-1];
    c_hist[0] = c;
    return c;
  endfunction

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

  // one trial; wrong is 1 for an erroneous load
  task automatic trial(int S, int L, real esn0_db, bit fading, bit mrc, output bit wrong);
    real phase, h_re, h_im, sig, re, im, a2, es, lcv;
    int c, c_prev;
    int b [$];
    logic [12:0] loaded_state, expect_state;
    es = $pow(10.0, esn0_db / 10.0);
    sig = AMP * $sqrt(0.5 / es);
    phase = 2.0 * PI * real'($urandom) / 4294967296.0;
    h_re = gauss() * $sqrt(0.5); h_im = gauss() * $sqrt(0.5);
    for (int k = 0; k < 13; k++) c_hist[k] = ($urandom_range(0, 1) != 0) ? 1 : -1;
    c_hist[0] = -1;
    min_chips = W_COUNT'(L);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n <= L; n++) begin
      c = next_chip();
      if (fading) begin
        h_re = 0.995 * h_re + $sqrt(1.0 - 0.995 * 0.995) * gauss() * $sqrt(0.5);
        h_im = 0.995 * h_im + $sqrt(1.0 - 0.995 * 0.995) * gauss() * $sqrt(0.5);
      end else begin
        h_re = 1.0; h_im = 0.0;
      end
      phase = phase + 0.05;
      re = AMP * c * (h_re * $cos(phase) - h_im * $sin(phase)) + sig * gauss();
      im = AMP * c * (h_re * $sin(phase) + h_im * $cos(phase)) + sig * gauss();
      a2 = (fading && mrc) ? (h_re * h_re + h_im * h_im) : 1.0;
      // L_c = 2 a^2 Ec/N0, scaled so that a noiseless U of AMP^2 gives 64 * L_c
      lcv = 2.0 * a2 * es * 64.0 * 256.0 / (AMP * AMP);
      if (lcv > 255.0) lcv = 255.0;
      z_i = quant(re); z_q = quant(im); lc = W_LC'($rtoi(lcv + 0.5));
      if (S == 5) zv5 = 1; else zv13 = 1;
      if (n > 0) b.push_front(c * c_prev);   // b[0] is the newest
      c_prev = c;
      @(negedge clk);
    end
    zv5 = 0; zv13 = 0;
    // wait for the load
    for (int w = 0; w < 10; w++) begin
      if ((S == 5) ? ld5 : ld13) break;
      @(negedge clk);
    end
    @(negedge clk);
    loaded_state = (S == 5) ? 13'(st5) : st13;
    expect_state = '0;
    for (int k = 0; k < S; k++) expect_state[k] = (b[k] < 0);
    wrong = (loaded_state != expect_state);
  endtask

  task automatic workload(string name, int S, logic [12:0] taps, int L, real esn0_db,
                          bit fading, bit mrc, int trials, real lo, real hi);
    int errs = 0;
    bit w;
    real pe;
    S_cur = S; taps_cur = taps;
    for (int t = 0; t < trials; t++) begin
      trial(S, L, esn0_db, fading, mrc, w);
      if (w) errs++;
    end
    pe = real'(errs) / real'(trials);
    checks++;
    if (pe < lo || pe > hi) begin
      failures++;
      $display("FAIL %s: Pe = %0d/%0d = %f, expected in [%f, %f]", name, errs, trials, pe, lo, hi);
    end else
      $display("ok %s: Pe = %0d/%0d = %f", name, errs, trials, pe);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    workload("W1 S=5 AWGN 0dB L=5",          5, 13'b10010,   5,    0.0, 0, 0, 400, 0.3,  1.0);
    workload("W2 S=5 AWGN 0dB L=200",        5, 13'b10010,   200,  0.0, 0, 0, 400, 0.0,  0.02);
    workload("W3 S=13 AWGN 1.7dB L=520",    13, 13'h100D,    520,  1.7, 0, 0, 300, 0.0,  0.15);
    workload("W4 S=13 AWGN 1dB L=2600",     13, 13'h100D,    2600, 1.0, 0, 0, 150, 0.0,  0.45);
    workload("W5 S=13 AWGN 2dB L=260",      13, 13'h100D,    260,  2.0, 0, 0, 300, 0.0,  0.15);
    workload("W6 S=13 Rayleigh 2dB MRC L=6500", 13, 13'h100D, 6500, 2.0, 1, 1, 60, 0.0, 0.05);
    workload("W7 S=13 Rayleigh 2dB EGC L=6500", 13, 13'h100D, 6500, 2.0, 1, 0, 60, 0.0, 0.20);
    workload("W8 S=13 AWGN 4dB L=520",      13, 13'h100D,    520,  4.0, 0, 0, 300, 0.0,  0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
