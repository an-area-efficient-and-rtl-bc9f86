// dpwm_controller_top_tb: end-to-end test of filter, PI controller and DPWM.
//
// Runs the whole digital chain with its default parameters. The ADC is
// modelled by a sine-wave test signal around the reference (one sample
// strobe every SPACING clocks), as in an open-loop check of the controller:
// as the input swings, the duty ratio must rise and fall and the width of
// the PWM pulses must follow it.
//
// The testbench holds its own model of the chain: a 4-sample moving average,
// the incremental PI law with its clamp at 0 and 100 %, and the conversion
// to counter clocks. It checks every duty count the controller produces
// against the model, and for every complete PWM period checks its length
// (Cycle clocks) and its number of high clocks (the latest duty count
// delivered before the period began). Two set-ups are run, separated by a
// reset: large gains with one sample per PWM period, and small gains with
// samples faster than the PWM period, so that some duty counts are replaced
// before they are used. It counts, and requires at least once each: the
// three-product and two-product update sequences, both clamps, a filter
// fill after reset, a change of pulse width, and a duty count superseded
// before its period began.
module dpwm_controller_top_tb;

  localparam int unsigned ADC_W  = 12;
  localparam int unsigned GAIN_W = 16;
  localparam int unsigned D_FRAC = 16;
  localparam int unsigned CNT_W  = 10;
  localparam longint      D_MAX  = longint'(1) << D_FRAC;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              cfg_valid = 1'b0;
  logic [ADC_W-1:0]  cfg_vref = '0;
  logic [GAIN_W-1:0] cfg_kp = '0;
  logic [GAIN_W-1:0] cfg_ki = '0;
  logic [CNT_W-1:0]  cfg_cycle = '0;
  logic              adc_valid = 1'b0;
  logic [ADC_W-1:0]  adc_data = '0;
  logic              pwm;
  logic              period_start;
  logic [D_FRAC:0]   duty_ratio;
  logic [CNT_W-1:0]  duty_count;
  logic              duty_valid;
  logic              busy;
  logic              cycle_state;

  int checks   = 0;
  int failures = 0;

  // mechanism counters
  int n_form_a = 0, n_form_b = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_fill = 0, n_width_change = 0, n_superseded = 0, n_periods = 0;

  // model state
  longint m_d, m_vprev, m_vref, m_kp, m_ki, m_cycle;
  int     hist [$];
  longint exp_duty [$];       // duty counts expected from the controller, in order
  longint exp_form [$];       // 0: three-product sequence, 1: two-product sequence
  int     n_avg;
  longint latest, active, prev_active;
  int     high_cnt, len_cnt;
  bit     in_period, pending_unused;
  bit     run = 1'b0;

  dpwm_controller_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Model of filter and controller for one ADC sample.
  task automatic model_sample(input int v);
    longint s, sum, avg;
    hist.push_front(v);
    if (hist.size() > 4) void'(hist.pop_back());
    if (hist.size() < 4) return;
    s = 0;
    foreach (hist[i]) s += longint'(hist[i]);
    avg = s >> 2;
    if (n_avg == 0) n_fill++;
    sum = m_d + m_kp * (m_vprev - avg) + m_ki * (m_vref - avg);
    if (sum < 0) begin m_d = 0; n_sat_lo++; end
    else if (sum > D_MAX) begin m_d = D_MAX; n_sat_hi++; end
    else m_d = sum;
    m_vprev = avg;
    exp_duty.push_back((m_d * m_cycle) >> D_FRAC);
    exp_form.push_back(longint'(n_avg[0]));
    n_avg++;
  endtask

  // Monitor, at every falling edge: controller results and PWM periods.
  always @(negedge clk) begin
    if (run) begin
      if (period_start) begin
        if (in_period) begin
          n_periods++;
          chk(len_cnt == int'(m_cycle), $sformatf("period length %0d", len_cnt));
          chk(longint'(high_cnt) == active, $sformatf("high clocks %0d expected %0d", high_cnt, active));
        end
        prev_active = active;
        active = latest;
        if (active != prev_active) n_width_change++;
        pending_unused = 1'b0;
        high_cnt = 0;
        len_cnt = 0;
        in_period = 1'b1;
      end
      high_cnt += int'(pwm);
      len_cnt++;
      if (duty_valid) begin
        chk(exp_duty.size() > 0, "unexpected duty update");
        if (exp_duty.size() > 0) begin
          longint e, f;
          e = exp_duty.pop_front();
          f = exp_form.pop_front();
          chk(longint'(duty_count) == e, $sformatf("duty_count=%0d expected %0d", duty_count, e));
          if (f == 0) n_form_a++; else n_form_b++;
          latest = e;
        end
        if (pending_unused) n_superseded++;
        pending_unused = 1'b1;
      end
    end
  end

  task automatic run_setup(input int vref, input int kp, input int ki, input int cyc,
                           input int spacing, input int n_samples, input int amp, input int per);
    @(negedge clk);
    run = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    m_vref = longint'(vref); m_kp = longint'(kp); m_ki = longint'(ki); m_cycle = longint'(cyc);
    m_d = 0; m_vprev = longint'(vref); n_avg = 0;
    hist.delete(); exp_duty.delete(); exp_form.delete();
    latest = 0; active = 0; in_period = 1'b0; pending_unused = 1'b0;
    cfg_vref = ADC_W'(vref); cfg_kp = GAIN_W'(kp); cfg_ki = GAIN_W'(ki); cfg_cycle = CNT_W'(cyc);
    cfg_valid = 1'b1;
    @(negedge clk);
    cfg_valid = 1'b0;
    run = 1'b1;
    for (int n = 0; n < n_samples; n++) begin
      int v;
      v = vref + int'($rtoi(real'(amp) * $sin(6.283185307179586 * real'(n) / real'(per))));
      repeat (spacing - 1) @(negedge clk);
      adc_valid = 1'b1;
      adc_data = ADC_W'(v);
      model_sample(v);
      @(negedge clk);
      adc_valid = 1'b0;
    end
    repeat (3 * cyc) @(negedge clk);
    chk(exp_duty.size() == 0, "every expected duty update delivered");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    // large gains, one sample per PWM period: duty swings between the clamps
    run_setup(1000, 64, 16, 250, 250, 192, 500, 64);
    // small gains, samples faster than the PWM period
    run_setup(1000, 40, 2, 250, 97, 256, 500, 64);
    run = 1'b0;
    $display("three-product %0d, two-product %0d, clamp high %0d, clamp low %0d",
             n_form_a, n_form_b, n_sat_hi, n_sat_lo);
    $display("filter fills %0d, periods %0d, width changes %0d, superseded %0d",
             n_fill, n_periods, n_width_change, n_superseded);
    chk(n_form_a > 0, "three-product sequence happened");
    chk(n_form_b > 0, "two-product sequence happened");
    chk(n_sat_hi > 0, "upper clamp happened");
    chk(n_sat_lo > 0, "lower clamp happened");
    chk(n_fill > 0, "filter filled");
    chk(n_width_change > 0, "pulse width changed");
    chk(n_superseded > 0, "duty superseded before use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
