// pi_datapath_tb: self-checking test of the PI datapath with its shared multiplier.
//
// The testbench plays the control unit: it pulses init, then for each sample
// pulses sample_load and steps the state input through MULTI_KI, MULTI_KP,
// MULTI_DUTY (form A) or MULTI_KI_KP, MULTI_DUTY (form B), alternating A and
// B. After every update it compares D with its own integer model of the
// incremental PI law
//   D = clamp(D + Kp*(Vout(k-1) - Vout(k)) + KI*(Vref - Vout(k)), 0, 2**D_FRAC)
// and after MULTI_DUTY compares duty_count with floor(D*Cycle / 2**D_FRAC)
// and checks that duty_valid is high for exactly that one clock. Several
// random set-ups are used, with gains large enough to drive D into both
// clamps. Stimulus changes at the falling clock edge.
module pi_datapath_tb;
  import pi_pkg::*;

  localparam int unsigned ADC_W  = 12;
  localparam int unsigned GAIN_W = 16;
  localparam int unsigned D_FRAC = 16;
  localparam int unsigned CNT_W  = 10;
  localparam longint      D_MAX  = longint'(1) << D_FRAC;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  state_e            state = ST_INIT;
  logic              init = 1'b0;
  logic [ADC_W-1:0]  init_vref = '0;
  logic              sample_load = 1'b0;
  logic [ADC_W-1:0]  vout_in = '0;
  logic [ADC_W-1:0]  vref = '0;
  logic [GAIN_W-1:0] kp = '0;
  logic [GAIN_W-1:0] ki = '0;
  logic [GAIN_W:0]   kpki = '0;
  logic [CNT_W-1:0]  cycle = '0;
  logic [D_FRAC:0]   duty_ratio;
  logic [CNT_W-1:0]  duty_count;
  logic              duty_valid;

  int checks   = 0;
  int failures = 0;
  int n_sat_hi = 0;
  int n_sat_lo = 0;

  longint m_d;
  longint m_vprev;

  pi_datapath #(.ADC_W(ADC_W), .GAIN_W(GAIN_W), .D_FRAC(D_FRAC), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic step(input state_e s);
    @(negedge clk);
    state = s;
    sample_load = 1'b0;
  endtask

  task automatic do_sample(input int v, input bit form_b);
    longint sum;
    @(negedge clk);
    state = ST_WAIT_MULTI;
    sample_load = 1'b1;
    vout_in = ADC_W'(v);
    sum = m_d + longint'(kp) * (m_vprev - longint'(v)) + longint'(ki) * (longint'(vref) - longint'(v));
    if (sum < 0) begin m_d = 0; n_sat_lo++; end
    else if (sum > D_MAX) begin m_d = D_MAX; n_sat_hi++; end
    else m_d = sum;
    m_vprev = longint'(v);
    if (!form_b) begin
      step(ST_MULTI_KI);
      step(ST_MULTI_KP);
    end else begin
      step(ST_MULTI_KIKP);
    end
    step(ST_MULTI_DUTY);
    chk(longint'(duty_ratio) == m_d,
        $sformatf("D=%0d expected %0d (form %s)", duty_ratio, m_d, form_b ? "B" : "A"));
    chk(!duty_valid, "duty_valid low before MULTI_DUTY completes");
    step(ST_WAIT_MULTI);
    chk(duty_valid, "duty_valid after MULTI_DUTY");
    chk(longint'(duty_count) == ((m_d * longint'(cycle)) >> D_FRAC),
        $sformatf("duty_count=%0d expected %0d", duty_count, (m_d * longint'(cycle)) >> D_FRAC));
    @(negedge clk);
    chk(!duty_valid, "duty_valid lasts one clock");
  endtask

  initial begin
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cfg = 0; cfg < 12; cfg++) begin
      @(negedge clk);
      vref  = ADC_W'($urandom_range(500, 3500));
      kp    = GAIN_W'((cfg % 3 == 0) ? $urandom_range(0, 65535) : $urandom_range(0, 200));
      ki    = GAIN_W'((cfg % 3 == 0) ? $urandom_range(0, 65535) : $urandom_range(0, 40));
      kpki  = (GAIN_W+1)'({1'b0, kp} + {1'b0, ki});
      cycle = CNT_W'($urandom_range(1, (1 << CNT_W) - 1));
      init = 1'b1;
      init_vref = vref;
      state = ST_INIT;
      @(negedge clk);
      init = 1'b0;
      m_d = 0;
      m_vprev = longint'(vref);
      v = int'(vref);
      for (int n = 0; n < 200; n++) begin
        v = v + int'($urandom_range(0, 60)) - 30 + ((n % 50) < 25 ? 4 : -4);
        if (v < 0) v = 0;
        if (v > (1 << ADC_W) - 1) v = (1 << ADC_W) - 1;
        do_sample(v, n % 2 == 1);
      end
    end
    chk(n_sat_hi > 0 && n_sat_lo > 0, "both clamps exercised");
    $display("clamp high %0d, clamp low %0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
