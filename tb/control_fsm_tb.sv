// control_fsm_tb: self-checking test of the six-state control unit.
//
// Checks that the machine stays in Initialize Setup without cfg_valid, loads
// the set-up once, waits in WAIT_MULTI, and that each ADC ready produces the
// Mealy sample_load pulse in the same clock followed by
// MULTI_KI, MULTI_KP, MULTI_DUTY (Cycle_state 0) or MULTI_KI_KP, MULTI_DUTY
// (Cycle_state 1), with Cycle_state alternating from sample to sample. Ready
// pulses during a sequence must be ignored. Sample spacing is random.
module control_fsm_tb;
  import pi_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   cfg_valid = 1'b0;
  logic   adc_ready = 1'b0;
  state_e state;
  logic   cfg_load;
  logic   sample_load;
  logic   cycle_state;

  int checks   = 0;
  int failures = 0;
  int n_form_a = 0;
  int n_form_b = 0;

  control_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s (state=%0d)", $time, what, state);
    end
  endtask

  initial begin
    bit exp_cs;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      chk(state == ST_INIT && !cfg_load, "stays in Initialize Setup");
    end
    cfg_valid = 1'b1;
    #1;
    chk(cfg_load == 1'b1, "cfg_load with cfg_valid in Initialize Setup");
    @(negedge clk);
    cfg_valid = 1'b0;
    chk(state == ST_WAIT_MULTI && !cfg_load, "to WAIT_MULTI");
    exp_cs = 1'b0;
    for (int n = 0; n < 300; n++) begin
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        chk(state == ST_WAIT_MULTI && !sample_load, "waits for ADC ready");
      end
      chk(cycle_state == exp_cs, "Cycle_state alternates");
      adc_ready = 1'b1;
      #1;
      chk(sample_load == 1'b1, "Mealy sample_load with ADC ready");
      @(negedge clk);
      adc_ready = $urandom_range(0, 1) == 1;  // must be ignored while busy
      if (!exp_cs) begin
        n_form_a++;
        chk(state == ST_MULTI_KI, "Multi_KI");
        chk(!sample_load, "no sample_load while busy");
        @(negedge clk);
        chk(state == ST_MULTI_KP, "Multi_KP");
      end else begin
        n_form_b++;
        chk(state == ST_MULTI_KIKP, "Multi_KI_KP");
        chk(!sample_load, "no sample_load while busy");
      end
      @(negedge clk);
      chk(state == ST_MULTI_DUTY, "Multi_Duty_Cycle");
      adc_ready = 1'b0;
      @(negedge clk);
      chk(state == ST_WAIT_MULTI, "back to WAIT_MULTI");
      exp_cs = ~exp_cs;
    end
    chk(n_form_a > 0 && n_form_b > 0, "both sequences used");
    $display("form A sequences %0d, form B sequences %0d", n_form_a, n_form_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
