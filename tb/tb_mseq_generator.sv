// tb_mseq_generator: self-checking test of the loadable m-sequence generator.
// With the default polynomial 1 + D + D^3 + D^4 + D^13 it checks that:
// every output chip equals the product of the chips 1, 3, 4 and 13 steps
// earlier; the state returns to its start after exactly 8191 steps and not
// before; a load without a step holds the loaded state; and a load together
// with a step outputs the chip that follows the loaded ones.
module tb_mseq_generator;
  localparam int S = 13;
  localparam logic [S-1:0] TAPS = 13'h100D;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [S-1:0] load_state = 0, state;
  logic chip;
  int checks = 0, failures = 0;

  mseq_generator #(.S(S), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [$];
  logic [S-1:0] start, ls;
  int first_return;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = state;
    first_return = -1;
    step = 1;
    for (int n = 0; n < 8191 + 20; n++) begin
      // chip is combinational from the current state
      hist.push_back(chip);
      if (hist.size() > 13) begin
        int L;
        L = hist.size();
        checks++;
        if (hist[L-1] != (hist[L-2] ^ hist[L-4] ^ hist[L-5] ^ hist[L-14])) begin
          failures++; $display("recursion broken at %0d", n);
        end
      end
      @(negedge clk);
      if (state == start && first_return < 0) first_return = n + 1;
    end
    checks++;
    if (first_return != 8191) begin
      failures++; $display("period %0d, expected 8191", first_return);
    end
    // load without step
    step = 0;
    for (int r = 0; r < 50; r++) begin
      ls = S'($urandom) | 13'h1;
      load = 1; load_state = ls;
      @(negedge clk);
      load = 0;
      checks++;
      if (state !== ls) begin failures++; $display("load failed"); end
      // load together with step
      ls = S'($urandom) | 13'h2;
      load = 1; step = 1; load_state = ls;
      #1;
      checks++;
      if (chip !== (ls[0] ^ ls[2] ^ ls[3] ^ ls[12])) begin
        failures++; $display("chip after load wrong");
      end
      @(negedge clk);
      checks++;
      if (state !== {ls[S-2:0], ls[0] ^ ls[2] ^ ls[3] ^ ls[12]}) begin
        failures++; $display("state after load+step wrong");
      end
      load = 0; step = 0;
      @(negedge clk);
      checks++;
      if (state !== {ls[S-2:0], ls[0] ^ ls[2] ^ ls[3] ^ ls[12]}) begin
        failures++; $display("state moved without step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
