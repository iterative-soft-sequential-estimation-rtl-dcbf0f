// tb_soft_chip_register: self-checking test of the soft-chip-delay-units.
// Random values are shifted in with random gaps and occasional clears; the
// register must always equal a reference model of the last S values (newest
// in unit 0, zeros where nothing has been shifted in since the clear).
module tb_soft_chip_register;
  localparam int S = 13, W_LLR = 16;
  logic clk = 0, rst_n = 0, clear = 0, shift_en = 0;
  logic signed [W_LLR-1:0] soft_in = 0;
  logic signed [W_LLR-1:0] scdu [S];
  int checks = 0, failures = 0;
  int model [S];

  soft_chip_register #(.S(S), .W_LLR(W_LLR)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < S; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int k = 0; k < S; k++) begin
        checks++;
        if (scdu[k] !== W_LLR'(model[k])) begin
          failures++;
          if (failures < 10) $display("n=%0d unit %0d: %0d expected %0d", n, k, scdu[k], model[k]);
        end
      end
      clear    = ($urandom_range(0, 299) == 0);
      shift_en = ($urandom_range(0, 2) != 0);
      soft_in  = $signed(W_LLR'($urandom));
      if (clear) for (int k = 0; k < S; k++) model[k] = 0;
      else if (shift_en) begin
        for (int k = S - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = soft_in;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
