// instruction_register_tb: self-checking test of the controller's set-up register.
//
// Checks the reset values, then loads random set-ups (including the largest
// gains, whose sum needs the extra bit) and checks that each output shows the
// loaded value one clock after load, that Kp + KI is formed exactly, and that
// the outputs hold while load is low and the inputs change.
module instruction_register_tb;

  localparam int unsigned ADC_W  = 12;
  localparam int unsigned GAIN_W = 16;
  localparam int unsigned CNT_W  = 10;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              load = 1'b0;
  logic [ADC_W-1:0]  cfg_vref = '0;
  logic [GAIN_W-1:0] cfg_kp = '0;
  logic [GAIN_W-1:0] cfg_ki = '0;
  logic [CNT_W-1:0]  cfg_cycle = '0;
  logic [ADC_W-1:0]  vref;
  logic [GAIN_W-1:0] kp;
  logic [GAIN_W-1:0] ki;
  logic [GAIN_W:0]   kpki;
  logic [CNT_W-1:0]  cycle;

  int checks   = 0;
  int failures = 0;

  instruction_register #(.ADC_W(ADC_W), .GAIN_W(GAIN_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_all(input int ev, input int ekp, input int eki, input int ecy);
    checks++;
    if (vref != ADC_W'(ev) || kp != GAIN_W'(ekp) || ki != GAIN_W'(eki) ||
        kpki != (GAIN_W+1)'(ekp + eki) || cycle != CNT_W'(ecy)) begin
      failures++;
      $display("FAIL vref=%0d kp=%0d ki=%0d kpki=%0d cycle=%0d, expected %0d %0d %0d %0d %0d",
               vref, kp, ki, kpki, cycle, ev, ekp, eki, ekp + eki, ecy);
    end
  endtask

  initial begin
    int v, p, i, c;
    @(negedge clk);
    expect_all(0, 0, 0, 0);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      v = int'($urandom_range(0, (1 << ADC_W) - 1));
      p = (n == 0) ? (1 << GAIN_W) - 1 : int'($urandom_range(0, (1 << GAIN_W) - 1));
      i = (n == 0) ? (1 << GAIN_W) - 1 : int'($urandom_range(0, (1 << GAIN_W) - 1));
      c = int'($urandom_range(0, (1 << CNT_W) - 1));
      @(negedge clk);
      cfg_vref = ADC_W'(v); cfg_kp = GAIN_W'(p); cfg_ki = GAIN_W'(i); cfg_cycle = CNT_W'(c);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      expect_all(v, p, i, c);
      cfg_vref = ADC_W'($urandom); cfg_kp = GAIN_W'($urandom);
      cfg_ki = GAIN_W'($urandom); cfg_cycle = CNT_W'($urandom);
      repeat (2) @(negedge clk);
      expect_all(v, p, i, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
