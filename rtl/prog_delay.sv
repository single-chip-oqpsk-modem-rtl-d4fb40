// prog_delay: programmable delay in front of the demodulator.
//
// Delays the IF samples by `delay` + 1 clock cycles so that the signal
// reaching the demodulator lines up with the burst detect produced from
// the RSSI envelope, whose smoothing and qualification take time. A
// circular buffer of DEPTH samples is written every cycle and read DELAY
// entries behind the write pointer; delay 0 bypasses the buffer. The
// purpose is the document's; the depth and the buffer are this design's.
module prog_delay #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp;

  always_ff @(posedge clk) mem[wp] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      dout <= '0;
    end else begin
      wp   <= wp + 1'b1;
      dout <= (delay == '0) ? din : mem[wp - delay];
    end
  end
endmodule
