// clock_recovery: burst-mode clock recovery from the demodulated waveform.
//
// Four stages, one per box of the clock recovery block diagram:
//  * Crossing detection: flags a sign change of X between two samples and
//    forms the derivative X(n) - X(n-1).
//  * Derivative based filter: keeps only crossings whose |derivative|
//    exceeds `slope_thr`, i.e. the points of steepest slope, where the
//    waveform swings between opposite data levels; shallow crossings
//    (noise, or patterns that pass through zero) are rejected, and after
//    an accepted one the next SPB/2 samples are ignored. Its output is the
//    extremum indicator.
//  * Pulse-to-location: a sample counter runs modulo SPB from the start of
//    the burst; an indicator pulse is turned into a location, the counter
//    value less half a sample (the crossing lies between two samples),
//    with FRAC fractional bits.
//  * Clock extraction: the eye centre lies half a bit from a steep
//    crossing, so the sampling phase target is location + SPB/2 (mod SPB).
//    The first indicator after the burst start sets the phase directly,
//    which is what makes acquisition take only a few symbols; later ones
//    move it by (target - phase) / 2^LOOP_SHIFT along the shorter way round
//    the circle. A strobe timer raises `clk_stb` exactly once every SPB
//    samples, and at each strobe moves the next one by at most one sample
//    towards the integer part of the phase, so a phase near the bit
//    boundary can never drop or double a strobe. The fractional part of
//    the phase (`frac`, the residual timing error) goes with each strobe to
//    the resampler.
// A rising edge of `burst` resets the counter and the lock, so the circuit
// restarts on every burst; in continuous mode `burst` is held high.
// The stages and the burst-by-burst reset are the document's; their
// insides (thresholds, offsets and loop law) are this design's.
// Timing: `clk_stb` and `frac` are combinational on the current count and
// refer to the X sample present on `x` in the same cycle.
module clock_recovery
  import odqpsk_pkg::*;
#(
  parameter int unsigned FRAC       = 4,
  parameter int unsigned LOOP_SHIFT = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    burst,
  input  logic signed [DEM_W-1:0] x,
  input  logic [DEM_W-2:0]        slope_thr,
  output logic                    clk_stb,
  output logic [FRAC-1:0]         frac,
  output logic                    locked,
  output logic                    extremum   // accepted crossing, for monitoring
);
  localparam int unsigned CW  = $clog2(SPB);
  localparam int unsigned PW  = CW + FRAC;           // phase: [CW integer | FRAC]
  localparam int unsigned HALF_SAMPLE = 1 << (FRAC - 1);
  localparam int unsigned HALF_BIT    = (SPB / 2) << FRAC;

  logic                    burst_d;
  logic signed [DEM_W-1:0] x_d;
  logic [CW-1:0]           cnt;
  logic [CW-1:0]           holdoff;
  logic [PW-1:0]           phase;
  logic [CW:0]             tmr;      // cycles to the next strobe, minus one

  // Crossing detection
  logic              crossing;
  logic signed [DEM_W:0] deriv;
  logic [DEM_W:0]    deriv_mag;
  always_comb begin
    crossing  = (x[DEM_W-1] != x_d[DEM_W-1]);
    deriv     = (DEM_W+1)'(x) - (DEM_W+1)'(x_d);
    deriv_mag = deriv[DEM_W] ? (DEM_W+1)'(-deriv) : (DEM_W+1)'(deriv);
  end

  // Derivative based filter
  logic burst_start;
  assign burst_start = burst && !burst_d;
  assign extremum = burst && !burst_start && crossing && (holdoff == '0) &&
                    (deriv_mag > (DEM_W+1)'(slope_thr));

  // Pulse-to-location and clock extraction
  logic [PW-1:0]        loc, target;
  logic signed [PW-1:0] diff;
  always_comb begin
    loc    = PW'({cnt, {FRAC{1'b0}}}) - PW'(HALF_SAMPLE);
    target = loc + PW'(HALF_BIT);          // wraps modulo one bit
    diff   = signed'(target - phase);      // shortest way round
  end

  // Strobe timer: distance from the strobe sample to the wanted one, the
  // shorter way round, limited to one sample per bit.
  logic [CW-1:0]      slip_mod;
  logic signed [CW:0] slip;
  logic signed [CW:0] step;
  always_comb begin
    slip_mod = phase[PW-1:FRAC] - cnt;                 // modulo one bit
    slip = signed'({1'b0, slip_mod});
    if (slip >= signed'((CW+1)'(SPB / 2))) slip = slip - signed'((CW+1)'(SPB));
    if (slip > 1)       step = 1;
    else if (slip < -1) step = -1;
    else                step = slip;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_d <= 1'b0;
      x_d     <= '0;
      cnt     <= '0;
      holdoff <= '0;
      phase   <= '0;
      locked  <= 1'b0;
      tmr     <= '0;
    end else begin
      burst_d <= burst;
      x_d     <= x;
      if (burst_start) begin
        cnt     <= CW'(1);
        holdoff <= '0;
        locked  <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
        if (extremum) begin
          holdoff <= CW'(SPB / 2);
          if (!locked) begin
            phase  <= target;
            locked <= 1'b1;
            // first strobe at the target sample: (target_int - cnt - 1) mod SPB more cycles
            tmr    <= (CW+1)'(CW'(target[PW-1:FRAC] - cnt - 1'b1));
          end else begin
            phase <= phase + PW'(diff >>> LOOP_SHIFT);
          end
        end else if (holdoff != '0) begin
          holdoff <= holdoff - 1'b1;
        end
        if (locked && !(extremum && !locked)) begin
          if (tmr == '0) tmr <= (CW+1)'(signed'((CW+1)'(SPB - 1)) + step);
          else           tmr <= tmr - 1'b1;
        end
      end
    end
  end

  assign clk_stb = locked && (tmr == '0);
  assign frac    = phase[FRAC-1:0];
endmodule
