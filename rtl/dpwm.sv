// dpwm: counter-comparator digital pulse-width modulator.
//
// A period counter runs 0, 1, ..., N-1 and wraps, N = cycle, so the DPWM
// clock must be N times the switching frequency. The output is high while
// the counter is below the duty count and low for the rest of the period,
// giving duty_count/N on-time. A new duty_count (strobed by duty_valid) is
// held pending and takes effect at the next wrap of the counter, so a pulse
// is never cut short or doubled by an update in mid-period. cycle = 0 stops
// the counter at 0 with the output low; duty_count >= N gives an output that
// stays high.
//
// The counter and comparator follow the usual DPWM structure; the
// update-at-wrap rule and the registered output are this design's choices.
// Timing: pwm and period_start are registers, both consistent with cnt, so
// pwm = (cnt < active duty) and period_start = (cnt == 0) at every clock.
module dpwm #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] cycle,
  input  logic [CNT_W-1:0] duty_count,
  input  logic             duty_valid,
  output logic             pwm,
  output logic             period_start
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] cnt_next;
  logic [CNT_W-1:0] duty_pending;
  logic [CNT_W-1:0] duty_active;
  logic [CNT_W-1:0] duty_active_next;
  logic             wrap;

  assign wrap = (cycle == '0) || (cnt >= cycle - 1'b1);

  always_comb begin
    cnt_next         = wrap ? '0 : cnt + 1'b1;
    duty_active_next = wrap ? (duty_valid ? duty_count : duty_pending) : duty_active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      duty_pending <= '0;
      duty_active  <= '0;
      pwm          <= 1'b0;
      period_start <= 1'b1;
    end else begin
      cnt          <= cnt_next;
      duty_active  <= duty_active_next;
      if (duty_valid) duty_pending <= duty_count;
      pwm          <= (cycle != '0) && (cnt_next < duty_active_next);
      period_start <= (cnt_next == '0);
    end
  end

endmodule
