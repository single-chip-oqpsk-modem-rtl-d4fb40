// digital_upconv: digital up-conversion for the loopback test mode.
//
// Turns the transmitter's baseband I/Q buses into the real IF sample
// stream the receiver expects: IF(n) = I(n)*cos(pi*n/2) - Q(n)*sin(pi*n/2),
// i.e. a carrier at a quarter of the sample rate. At that frequency the
// carrier takes only the values 0 and +-1, so the sequence is simply
// I, -Q, -I, Q, I, ... and no multiplier is needed. The result is scaled
// down by 2^SHIFT and saturated to the receiver's IF width. The document
// says only that an internal up-converter emulates the external IF chain;
// the fs/4 carrier and the scaling are this design's. Latency: 1 cycle.
module digital_upconv
  import odqpsk_pkg::*;
#(
  parameter int unsigned SHIFT = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IQ_W-1:0]  i_in,
  input  logic signed [IQ_W-1:0]  q_in,
  output logic signed [IF_W-1:0]  if_out
);
  logic [1:0] n;
  logic signed [IQ_W:0] mix, scaled;
  always_comb begin
    unique case (n)
      2'd0: mix =  (IQ_W+1)'(i_in);
      2'd1: mix = -(IQ_W+1)'(q_in);
      2'd2: mix = -(IQ_W+1)'(i_in);
      2'd3: mix =  (IQ_W+1)'(q_in);
    endcase
    scaled = mix >>> SHIFT;
  end

  localparam logic signed [IQ_W:0] MAXV = (IQ_W+1)'((1 <<< (IF_W - 1)) - 1);
  localparam logic signed [IQ_W:0] MINV = -(IQ_W+1)'(1 <<< (IF_W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n      <= '0;
      if_out <= '0;
    end else begin
      n <= n + 1'b1;
      if (scaled > MAXV)      if_out <= MAXV[IF_W-1:0];
      else if (scaled < MINV) if_out <= MINV[IF_W-1:0];
      else                    if_out <= scaled[IF_W-1:0];
    end
  end
endmodule
