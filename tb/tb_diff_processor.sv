// tb_diff_processor: self-checking test of the differential pre-processor.
// Random complex samples, with gaps in in_valid and an occasional clear, are
// fed in; every output must equal I_i*I_{i-1} + Q_i*Q_{i-1} of the last two
// accepted samples, one cycle after the second one, and the first sample
// after reset or clear must give no output.
module tb_diff_processor;
  localparam int W_Z = 8;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [W_Z-1:0] z_i = 0, z_q = 0;
  logic u_valid;
  logic signed [2*W_Z:0] u;
  int checks = 0, failures = 0;

  diff_processor #(.W_Z(W_Z)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pi_, pq_, have, exp_u, exp_v;
  initial begin
    have = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check the output produced by the previous cycle's input
      if (u_valid !== exp_v[0]) begin
        failures++; $display("valid mismatch at %0d", n);
      end else if (exp_v != 0 && u !== exp_u) begin
        failures++; $display("u mismatch at %0d: %0d vs %0d", n, u, exp_u);
      end
      checks++;
      clear    = ($urandom_range(0, 99) == 0);
      in_valid = ($urandom_range(0, 3) != 0);
      z_i      = $signed(W_Z'($urandom));
      z_q      = $signed(W_Z'($urandom));
      exp_v = 0;
      if (clear) have = 0;
      else if (in_valid) begin
        if (have != 0) begin
          exp_u = int'(z_i) * pi_ + int'(z_q) * pq_;
          exp_v = 1;
        end
        pi_ = z_i; pq_ = z_q; have = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
