// prbs_gen: test pattern generator.
//
// A 9-bit linear feedback shift register (x^9 + x^5 + 1, period 511)
// that advances once per transmit bit when enabled and supplies the
// transmitter with a pseudo-random test pattern in place of tx_data. The
// document lists pattern generation among the test facilities; the
// polynomial and seed are this design's. `dout` is the register's oldest
// bit and changes in the cycle after `stb`.
module prbs_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic stb,
  output logic dout
);
  logic [8:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         lfsr <= '1;
    else if (en && stb) lfsr <= {lfsr[7:0], lfsr[8] ^ lfsr[4]};
  end
  assign dout = lfsr[8];
endmodule
