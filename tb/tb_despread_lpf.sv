// tb_despread_lpf: self-checking test of the despreader and its filter.
// Random samples and chips are applied with gaps in step and occasional
// clears; the output must follow y <- y + floor((x - y) / 2^5) with x = U for
// a +1 chip and -U for a -1 chip. A long run of matched chips on a constant
// |U| must bring y within 2^5 of |U|.
module tb_despread_lpf;
  localparam int W_U = 17, LPF_SHIFT = 5;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, chip = 0;
  logic signed [W_U-1:0] u = 0;
  logic signed [W_U:0] y;
  int checks = 0, failures = 0;

  despread_lpf #(.W_U(W_U), .LPF_SHIFT(LPF_SHIFT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m, x;
  initial begin
    m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      checks++;
      if (y !== (W_U+1)'(m)) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, m);
      end
      if (n < 4000) begin
        u = $signed(W_U'($urandom));
        chip = $urandom_range(0, 1);
        step = $urandom_range(0, 3) != 0;
        clear = $urandom_range(0, 299) == 0;
      end else begin
        // constant |U| = 1000 with the matching chip
        chip = $urandom_range(0, 1);
        u = chip ? -17'sd1000 : 17'sd1000;
        step = 1; clear = 0;
      end
      x = chip ? -longint'(u) : longint'(u);
      if (clear) m = 0;
      else if (step) m = m + ((x - m) >>> LPF_SHIFT);
    end
    checks++;
    if (y < 1000 - 32 || y > 1000) begin failures++; $display("filter did not settle: %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
