// tb_load_controller: self-checking test of the hard decisions and the
// loading command. Random register contents and thresholds are applied; the
// hard decisions must be the LLR signs, min_mag the smallest magnitude, and
// load_cmd must fire exactly when the controller is searching, at least
// min_chips updates have been counted and min_mag reaches the threshold.
// A reload must return it to searching and restart the count.
module tb_load_controller;
  localparam int S = 13, W_LLR = 16, W_COUNT = 16;
  logic clk = 0, rst_n = 0, clear = 0, update = 0, reload = 0;
  logic signed [W_LLR-1:0] scdu [S];
  logic [W_LLR-2:0] load_thresh = 15'h7fff, min_mag;
  logic [W_COUNT-1:0] min_chips = 0, chip_count;
  logic [S-1:0] hard;
  logic load_cmd, loaded;
  int checks = 0, failures = 0;

  load_controller #(.S(S), .W_LLR(W_LLR), .W_COUNT(W_COUNT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_loaded = 0, m_count = 0, loads = 0, reloads = 0;
  int mn, a, exp_cmd;
  logic [S-1:0] exp_hard;
  initial begin
    for (int k = 0; k < S; k++) scdu[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      for (int k = 0; k < S; k++)
        scdu[k] = W_LLR'($urandom_range(0, 1) ? $urandom_range(0, 3000) : -int'($urandom_range(0, 3000)));
      load_thresh = W_LLR'($urandom_range(0, 600));
      min_chips   = W_COUNT'($urandom_range(0, 40));
      update      = $urandom_range(0, 1);
      reload      = m_loaded && ($urandom_range(0, 9) == 0);
      clear       = ($urandom_range(0, 499) == 0);
      mn = 32767;
      for (int k = 0; k < S; k++) begin
        a = (scdu[k] < 0) ? -int'(scdu[k]) : int'(scdu[k]);
        exp_hard[k] = (scdu[k] < 0);
        if (a < mn) mn = a;
      end
      exp_cmd = (!m_loaded && !reload && !clear && m_count >= min_chips && mn >= load_thresh) ? 1 : 0;
      #1;
      checks++;
      if (hard !== exp_hard || min_mag !== (W_LLR-1)'(mn) || load_cmd !== exp_cmd[0] ||
          loaded !== m_loaded[0] || chip_count !== W_COUNT'(m_count)) begin
        failures++;
        if (failures < 10)
          $display("n=%0d cmd %0d/%0d loaded %0d/%0d cnt %0d/%0d min %0d/%0d", n, load_cmd, exp_cmd,
                   loaded, m_loaded, chip_count, m_count, min_mag, mn);
      end
      if (exp_cmd != 0) loads++;
      if (reload) reloads++;
      // reference state update
      if (clear || reload) begin m_loaded = 0; m_count = 0; end
      else begin
        if (exp_cmd != 0) m_loaded = 1;
        if (update) m_count++;
      end
    end
    checks++;
    if (loads < 10 || reloads < 10) begin failures++; $display("loads %0d reloads %0d", loads, reloads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
