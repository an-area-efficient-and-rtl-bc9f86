// averaging_filter: moving-average filter between the ADC and the PI controller.
//
// Smooths short-term variation of the sampled output voltage so that the
// controller acts on the longer-term trend. It is a boxcar average over the
// last 2**AVG_LOG2 samples: a shift register holds the window, a running sum
// adds the new sample and subtracts the one that leaves, and the average is
// the sum shifted right by AVG_LOG2 (truncated). The filter's job comes from
// the converter architecture; the boxcar form, the window length and the
// rounding are this design's choices.
//
// Interface: in_valid/in_data carry one unsigned ADC sample per strobe.
// out_valid/out_data carry the average, one clock after the sample that
// completes it. After reset nothing is output until the window has been
// filled once; from then on every input sample yields one output.
module averaging_filter #(
  parameter int unsigned DATA_W   = 12,
  parameter int unsigned AVG_LOG2 = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned DEPTH = 1 << AVG_LOG2;
  localparam int unsigned SUM_W = DATA_W + AVG_LOG2;

  logic [DATA_W-1:0]   window [DEPTH];
  logic [SUM_W-1:0]    sum;
  logic [SUM_W-1:0]    sum_next;
  logic [AVG_LOG2:0]   fill;      // samples held, saturates at DEPTH

  always_comb begin
    sum_next = sum + SUM_W'(in_data) - SUM_W'(window[DEPTH-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) window[i] <= '0;
      sum       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        window[0] <= in_data;
        for (int i = 1; i < DEPTH; i++) window[i] <= window[i-1];
        sum <= sum_next;
        if (fill != (AVG_LOG2+1)'(DEPTH)) fill <= fill + 1'b1;
        if (fill >= (AVG_LOG2+1)'(DEPTH - 1)) begin
          out_valid <= 1'b1;
          out_data  <= DATA_W'(sum_next >> AVG_LOG2);
        end
      end
    end
  end

endmodule
