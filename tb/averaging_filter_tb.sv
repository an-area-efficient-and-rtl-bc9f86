// averaging_filter_tb: self-checking test of the moving-average filter.
//
// Feeds random 12-bit samples with random gaps between strobes, keeps its own
// copy of the last four samples, and checks that (a) nothing is output before
// four samples have arrived, (b) every later sample produces exactly one
// output one clock after its strobe, and (c) the output equals the truncated
// mean of the last four samples. A constant full-scale run checks that the
// running sum does not overflow.
module averaging_filter_tb;

  localparam int unsigned DATA_W   = 12;
  localparam int unsigned AVG_LOG2 = 2;
  localparam int unsigned DEPTH    = 1 << AVG_LOG2;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic [DATA_W-1:0] in_data = '0;
  logic              out_valid;
  logic [DATA_W-1:0] out_data;

  int checks   = 0;
  int failures = 0;
  int n_in     = 0;
  int hist [$];
  bit expect_out = 1'b0;
  int expect_val = 0;

  averaging_filter #(.DATA_W(DATA_W), .AVG_LOG2(AVG_LOG2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: sample outputs after each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("FAIL t=%0t out_valid=%0b expected %0b", $time, out_valid, expect_out);
      end else if (expect_out && out_data != DATA_W'(expect_val)) begin
        failures++;
        $display("FAIL t=%0t out_data=%0d expected %0d", $time, out_data, expect_val);
      end
    end
  end

  // Stimulus is driven with blocking assignments at the falling edge; the
  // expected output is updated right after the rising edge that samples it.
  task automatic send(input int v);
    int s;
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = DATA_W'(v);
    @(posedge clk);
    hist.push_front(v);
    if (hist.size() > DEPTH) void'(hist.pop_back());
    n_in++;
    s = 0;
    foreach (hist[i]) s += hist[i];
    expect_out = (n_in >= DEPTH);
    expect_val = s >> AVG_LOG2;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      in_data  = DATA_W'($urandom);
      @(posedge clk);
      expect_out = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(2);
    for (int i = 0; i < 500; i++) begin
      send(int'($urandom_range(0, (1 << DATA_W) - 1)));
      idle(int'($urandom_range(0, 3)));
    end
    for (int i = 0; i < 8; i++) send((1 << DATA_W) - 1);
    idle(1);
    for (int i = 0; i < 8; i++) send(0);
    idle(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
