// dpwm_tb: self-checking test of the counter-comparator DPWM.
//
// For several periods N (including 1 and the largest), the testbench sends
// new duty counts at random moments and checks, clock by clock, the output
// against its own model: a counter 0..N-1, and a duty that changes only at
// the start of a period. It also counts the high clocks of every complete
// period and checks that they equal min(duty, N) and that period_start marks
// exactly every N-th clock. Updates arriving mid-period (deferred) and at the
// wrap clock itself are both exercised. Stimulus changes at the falling edge.
module dpwm_tb;

  localparam int unsigned CNT_W = 10;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [CNT_W-1:0] cycle = '0;
  logic [CNT_W-1:0] duty_count = '0;
  logic             duty_valid = 1'b0;
  logic             pwm;
  logic             period_start;

  int checks   = 0;
  int failures = 0;
  int n_deferred = 0;
  int n_periods  = 0;

  // Model state
  int m_cnt, m_pending, m_active, high_in_period, len_in_period;

  dpwm #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // One clock, entered and left at a falling edge: optionally strobe a new
  // duty, advance the model at the rising edge, compare.
  task automatic tick(input bit send, input int d);
    bit wrap;
    duty_valid = send;
    duty_count = CNT_W'(d);
    if (send && m_cnt != 0 && m_cnt != int'(cycle) - 1) n_deferred++;
    @(posedge clk);
    wrap = (m_cnt >= int'(cycle) - 1);
    if (wrap) begin
      if (len_in_period == int'(cycle)) begin
        n_periods++;
        chk(high_in_period == ((m_active < int'(cycle)) ? m_active : int'(cycle)),
            $sformatf("period high=%0d expected %0d", high_in_period, m_active));
      end
      m_cnt = 0;
      m_active = send ? d : m_pending;
      high_in_period = 0;
      len_in_period = 0;
    end else begin
      m_cnt++;
    end
    if (send) m_pending = d;
    #1;
    chk(pwm == (m_cnt < m_active), $sformatf("pwm=%0b cnt=%0d duty=%0d", pwm, m_cnt, m_active));
    chk(period_start == (m_cnt == 0), "period_start");
    high_in_period += int'(pwm);
    len_in_period++;
    @(negedge clk);
  endtask

  int cycles [5] = '{1, 7, 100, 250, 1023};

  initial begin
    foreach (cycles[c]) begin
      @(negedge clk);
      rst_n = 1'b0;
      cycle = CNT_W'(cycles[c]);
      duty_valid = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      m_cnt = 0; m_pending = 0; m_active = 0;
      high_in_period = 0; len_in_period = 0;
      for (int i = 0; i < 40 * cycles[c] + 200; i++) begin
        tick($urandom_range(0, 3 * cycles[c]) == 0, int'($urandom_range(0, cycles[c] + 1)));
      end
    end
    chk(n_deferred > 0, "mid-period update deferred");
    chk(n_periods > 100, "complete periods checked");
    $display("periods %0d, deferred updates %0d", n_periods, n_deferred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
