// edge_sync: brings an asynchronous input into the sample-clock domain.
//
// Two flip-flops resynchronise the input; a third holds the previous value
// so that a one-cycle pulse marks each rising edge. Used for tx_clock,
// tx_data and tx_burst, which come from outside the chip. The synchroniser
// is this design's own choice: the block diagram shows the transmit inputs
// entering the encoder directly. Latency: 2 cycles to `q`, 3 to `rise`.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic rise
);
  logic s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {d, s1, s2};
  end
  assign q    = s2;
  assign rise = s2 & ~s3;
endmodule
