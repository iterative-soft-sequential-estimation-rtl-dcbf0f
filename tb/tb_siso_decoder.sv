// tb_siso_decoder: self-checking test of the min-sum SISO decoder.
// Uses the default 13-stage polynomial (taps 1, 3, 4, 13). Random register
// contents, some with small or zero magnitudes and some near full scale, are
// applied; extrinsic must be the product of the tap signs times the smallest
// tap magnitude, ignoring the non-tap units, and soft_out the clipped sum
// with the intrinsic value.
module tb_siso_decoder;
  localparam int S = 13, W_LLR = 16;
  localparam logic [S-1:0] TAPS = 13'h100D;
  logic signed [W_LLR-1:0] intrinsic;
  logic signed [W_LLR-1:0] scdu [S];
  logic signed [W_LLR-1:0] extrinsic, soft_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  siso_decoder #(.S(S), .TAPS(TAPS), .W_LLR(W_LLR)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_llr(int mode);
    int v;
    case (mode)
      0: v = $urandom_range(0, 65534) - 32767;
      1: v = $urandom_range(0, 40) - 20;
      default: v = ($urandom_range(0, 1) != 0) ? 32767 - $urandom_range(0, 3) : -32767 + $urandom_range(0, 3);
    endcase
    return v;
  endfunction

  int ext, mn, sg, tot, nsat = 0;
  initial begin
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      intrinsic = W_LLR'(rnd_llr(n % 3));
      for (int k = 0; k < S; k++) scdu[k] = W_LLR'(rnd_llr((n + k) % 3));
      mn = 32767; sg = 1;
      for (int k = 0; k < S; k++) begin
        if (TAPS[k]) begin
          int a;
          a = (scdu[k] < 0) ? -int'(scdu[k]) : int'(scdu[k]);
          if (scdu[k] < 0) sg = -sg;
          if (a < mn) mn = a;
        end
      end
      ext = sg * mn;
      tot = int'(intrinsic) + ext;
      if (tot > 32767) begin tot = 32767; nsat++; end
      if (tot < -32767) begin tot = -32767; nsat++; end
      #1;
      checks++;
      if (extrinsic !== W_LLR'(ext) || soft_out !== W_LLR'(tot)) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d: ext %0d/%0d out %0d/%0d", n, extrinsic, ext, soft_out, tot);
      end
    end
    if (nsat == 0) begin failures++; $display("clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
