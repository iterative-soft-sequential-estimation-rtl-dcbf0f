// tb_soft_channel_info: self-checking test of the intrinsic LLR unit.
// Random U, L_c and a-priori values, including the extremes, are compared
// with floor(U*L_c / 2^LC_SHIFT) + L(b) clipped to +/-(2^15-1), one cycle
// after they are presented.
module tb_soft_channel_info;
  localparam int W_U = 17, W_LC = 8, LC_SHIFT = 8, W_LLR = 16;
  logic clk = 0, rst_n = 0, u_valid = 0;
  logic signed [W_U-1:0] u = 0;
  logic [W_LC-1:0] lc = 0;
  logic signed [W_LLR-1:0] apriori = 0;
  logic llr_valid;
  logic signed [W_LLR-1:0] llr;
  logic signed [W_U-1:0] u_d;
  int checks = 0, failures = 0;

  soft_channel_info #(.W_U(W_U), .W_LC(W_LC), .LC_SHIFT(LC_SHIFT), .W_LLR(W_LLR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e, p, uu;
  int sat_hi = 0, sat_lo = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      u_valid = 1;
      case (n % 5)
        0: u = $signed(W_U'($urandom));
        1: u = $signed(W_U'($urandom_range(0, 4000))) - 2000;
        2: u = (n % 2) ? 17'sh0FFFF : -17'sh10000;
        default: u = $signed(W_U'($urandom)) >>> 4;
      endcase
      lc = W_LC'($urandom);
      apriori = (n % 3 == 0) ? $signed(W_LLR'($urandom)) : 16'sd0;
      uu = u;
      p = uu * longint'(lc);
      e = (p >>> LC_SHIFT) + longint'(apriori);
      if (e > 32767) begin e = 32767; sat_hi++; end
      if (e < -32767) begin e = -32767; sat_lo++; end
      @(negedge clk);
      u_valid = 0;
      checks++;
      if (!llr_valid || llr !== W_LLR'(e) || u_d !== u) begin
        failures++;
        $display("mismatch u=%0d lc=%0d la=%0d: llr=%0d expected %0d", u, lc, apriori, llr, e);
      end
      @(negedge clk);
      checks++;
      if (llr_valid) begin failures++; $display("valid held"); end
    end
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
