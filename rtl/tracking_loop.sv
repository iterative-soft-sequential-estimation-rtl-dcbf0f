// tracking_loop: lock supervision of the loaded m-sequence generator.
//
// After every load of the generator it lets the despreader's low-pass filter
// settle for SETTLE chips, then compares the filtered correlation with
// lock_thresh. At or above it the receiver is locked; below it, either right
// after settling or at any later chip, the loading was wrong or lock was
// lost, and a one-cycle reloading command is given. The published scheme names the
// tracking loop and its reloading command only; this lock test is the
// simplest function that gives them, and fine code-phase (sub-chip) tracking
// is not modelled, since the datapath runs at one sample per chip.
//
// Interface: loaded comes from the load controller, step marks one chip,
// y is the filter output. locked and reload are registered.
module tracking_loop #(
  parameter int unsigned W_Y     = 2 * drsse_pkg::DEF_W_Z + 2,
  parameter int unsigned SETTLE  = 128,
  parameter int unsigned W_COUNT = $clog2(SETTLE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  loaded,
  input  logic                  step,
  input  logic signed [W_Y-1:0] y,
  input  logic signed [W_Y-1:0] lock_thresh,
  output logic                  locked,
  output logic                  reload,
  output logic [W_COUNT-1:0]    settle_count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked       <= 1'b0;
      reload       <= 1'b0;
      settle_count <= '0;
    end else begin
      reload <= 1'b0;
      if (clear || !loaded || reload) begin
        locked       <= 1'b0;
        settle_count <= '0;
      end else if (step) begin
        if (settle_count != W_COUNT'(SETTLE)) begin
          settle_count <= settle_count + 1'b1;
        end else if (y >= lock_thresh) begin
          locked <= 1'b1;
        end else begin
          locked <= 1'b0;
          reload <= 1'b1;
        end
      end
    end
  end

  // The reloading command is a single-cycle pulse and never comes with lock.
  a_reload_pulse: assert property (@(posedge clk) disable iff (!rst_n) reload |=> !reload);
  a_reload_unlocked: assert property (@(posedge clk) disable iff (!rst_n) reload |-> !locked);

endmodule
