// tb_tracking_loop: self-checking test of the lock supervision.
// SETTLE is reduced to 8 chips. After the load, no decision may be made for
// 8 chips; then a filter value at or above the threshold must give locked,
// and a value below it, right after settling or later, must give a single
// reload pulse in the next cycle and drop the lock.
module tb_tracking_loop;
  localparam int W_Y = 18, SETTLE = 8;
  logic clk = 0, rst_n = 0, clear = 0, loaded = 0, step = 0;
  logic signed [W_Y-1:0] y = 0, lock_thresh = 18'sd500;
  logic locked, reload;
  logic [$clog2(SETTLE+1)-1:0] settle_count;
  int checks = 0, failures = 0;

  tracking_loop #(.W_Y(W_Y), .SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit exp_locked, input bit exp_reload, input string what);
    checks++;
    if (locked !== exp_locked || reload !== exp_reload) begin
      failures++;
      $display("%s: locked=%0d reload=%0d, expected %0d %0d", what, locked, reload, exp_locked, exp_reload);
    end
  endtask

  int nlock = 0, nrel = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      bit good;
      int lose_at;
      good = trial % 2;
      lose_at = good ? $urandom_range(1, 20) : 0;
      @(negedge clk);
      loaded = 1;
      // settling: low filter values must not cause a reload
      for (int c = 0; c < SETTLE; c++) begin
        y = -18'sd1000; step = 1;
        @(negedge clk);
        chk(0, 0, "settling");
      end
      if (good) begin
        for (int c = 0; c < lose_at; c++) begin
          y = 18'sd500 + W_Y'($urandom_range(0, 300));
          step = (c % 3) != 2;
          @(negedge clk);
          chk(1, 0, "locked phase");
        end
        nlock++;
      end
      // lose lock (or fail right after settling)
      y = 18'sd499; step = 1;
      @(negedge clk);
      chk(0, 1, "reload pulse");
      nrel++;
      // the controller drops loaded on the reload
      loaded = 0; step = 1; y = 18'sd499;
      @(negedge clk);
      chk(0, 0, "after reload");
      step = 0;
    end
    checks++;
    if (nlock == 0 || nrel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
