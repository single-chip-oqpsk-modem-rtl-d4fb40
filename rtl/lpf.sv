// lpf: low-pass filter after a correlator branch.
//
// A moving average over 2^LEN_LOG2 samples (sum of the last four samples,
// divided by four, with the defaults). Its main job is to remove the
// product term at twice the IF carrier, which for a quarter-rate carrier
// sits at half the sample rate, where the average has a zero. The
// document names a low-pass filter without giving its response; the
// moving average is this design's choice. Latency: 1 cycle.
module lpf #(
  parameter int unsigned W        = 16,
  parameter int unsigned LEN_LOG2 = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  localparam int unsigned LEN   = 1 << LEN_LOG2;
  localparam int unsigned ACC_W = W + LEN_LOG2;

  logic signed [W-1:0] hist [LEN-1];   // the previous LEN-1 samples
  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = ACC_W'(din);
    for (int i = 0; i < LEN - 1; i++) sum = sum + ACC_W'(hist[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN - 1; i++) hist[i] <= '0;
      dout <= '0;
    end else begin
      hist[0] <= din;
      for (int i = 1; i < LEN - 1; i++) hist[i] <= hist[i-1];
      dout <= W'(sum >>> LEN_LOG2);
    end
  end
endmodule
