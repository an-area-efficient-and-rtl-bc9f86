// digital_controller_tb: self-checking test of the complete PI controller.
//
// For each of several random set-ups the testbench resets the controller,
// presents Vref, Kp, KI and Cycle with cfg_valid, and sends a few hundred
// output-voltage samples that wander around Vref. For every sample it checks
// D and the DPWM count against its own model of
//   D = clamp(D + Kp*(Vout(k-1) - Vout(k)) + KI*(Vref - Vout(k)), 0, 2**D_FRAC),
//   duty_count = floor(D * Cycle / 2**D_FRAC),
// and checks the latency: duty_valid must rise 4 clocks after the sample
// strobe when the three-product sequence runs and 3 clocks after when the
// two-product sequence runs, and the two must alternate. Extra sample strobes
// with wrong data are sent while the controller is busy; they must be
// ignored. Counts of each sequence and of each clamp are checked to be
// non-zero. Stimulus changes at the falling clock edge.
module digital_controller_tb;

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
  logic              adc_ready = 1'b0;
  logic [ADC_W-1:0]  vout = '0;
  logic [D_FRAC:0]   duty_ratio;
  logic [CNT_W-1:0]  duty_count;
  logic              duty_valid;
  logic [CNT_W-1:0]  cycle;
  logic              busy;
  logic              cycle_state;

  int checks   = 0;
  int failures = 0;
  int n_form_a = 0;
  int n_form_b = 0;
  int n_sat_hi = 0;
  int n_sat_lo = 0;
  int n_ignored = 0;

  longint m_d, m_vprev, m_vref, m_kp, m_ki, m_cycle;

  digital_controller #(.ADC_W(ADC_W), .GAIN_W(GAIN_W), .D_FRAC(D_FRAC), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  task automatic sample(input int v, input bit form_b);
    longint sum;
    int lat;
    chk(!busy, "idle before sample");
    chk(cycle_state == form_b, "sequence alternates");
    adc_ready = 1'b1;
    vout = ADC_W'(v);
    sum = m_d + m_kp * (m_vprev - longint'(v)) + m_ki * (m_vref - longint'(v));
    if (sum < 0) begin m_d = 0; n_sat_lo++; end
    else if (sum > D_MAX) begin m_d = D_MAX; n_sat_hi++; end
    else m_d = sum;
    m_vprev = longint'(v);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
      // a strobe with wrong data while busy must be ignored
      adc_ready = ($urandom_range(0, 1) == 1);
      vout = ADC_W'($urandom);
      if (adc_ready && !duty_valid) n_ignored++;
      if (duty_valid) adc_ready = 1'b0;
    end while (!duty_valid && lat < 10);
    adc_ready = 1'b0;
    chk(lat == (form_b ? 3 : 4), $sformatf("latency %0d clocks (form %s)", lat, form_b ? "B" : "A"));
    chk(longint'(duty_ratio) == m_d, $sformatf("D=%0d expected %0d", duty_ratio, m_d));
    chk(longint'(duty_count) == ((m_d * m_cycle) >> D_FRAC),
        $sformatf("duty_count=%0d expected %0d", duty_count, (m_d * m_cycle) >> D_FRAC));
    if (form_b) n_form_b++; else n_form_a++;
  endtask

  initial begin
    int v;
    for (int cfg = 0; cfg < 10; cfg++) begin
      @(negedge clk);
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      m_vref  = longint'($urandom_range(500, 3500));
      m_kp    = (cfg % 3 == 0) ? longint'($urandom_range(0, 65535)) : longint'($urandom_range(0, 200));
      m_ki    = (cfg % 3 == 0) ? longint'($urandom_range(0, 65535)) : longint'($urandom_range(0, 40));
      m_cycle = longint'($urandom_range(1, (1 << CNT_W) - 1));
      repeat (2) @(negedge clk);
      chk(busy, "busy in Initialize Setup");
      cfg_vref = ADC_W'(m_vref); cfg_kp = GAIN_W'(m_kp);
      cfg_ki = GAIN_W'(m_ki); cfg_cycle = CNT_W'(m_cycle);
      cfg_valid = 1'b1;
      @(negedge clk);
      cfg_valid = 1'b0;
      cfg_vref = '0; cfg_kp = '0; cfg_ki = '0; cfg_cycle = '0;
      chk(longint'(cycle) == m_cycle, "Cycle loaded");
      m_d = 0;
      m_vprev = m_vref;
      v = int'(m_vref);
      for (int n = 0; n < 200; n++) begin
        v = v + int'($urandom_range(0, 60)) - 30 + ((n % 50) < 25 ? 4 : -4);
        if (v < 0) v = 0;
        if (v > (1 << ADC_W) - 1) v = (1 << ADC_W) - 1;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        sample(v, n % 2 == 1);
      end
    end
    chk(n_form_a > 0 && n_form_b > 0 && n_sat_hi > 0 && n_sat_lo > 0 && n_ignored > 0,
        "all mechanisms exercised");
    $display("form A %0d, form B %0d, clamp high %0d, clamp low %0d, ignored strobes %0d",
             n_form_a, n_form_b, n_sat_hi, n_sat_lo, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
