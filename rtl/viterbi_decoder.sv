// viterbi_decoder: soft decision decoding and equalisation (Viterbi).
//
// The decimated X sample of bit k is, apart from noise, a function of three
// data symbols: with a steady neighbour it sits at +-A (A: the level the
// ALC holds), but when both neighbours differ from a_k (a ...+-+... run)
// the phase change over the bit cancels and X is close to 0. Such runs
// cannot be decided bit by bit; a 4-state trellis, state = (a_(k-1), a_k),
// resolves them from the transitions that enter and leave the run.
// For each new sample the branch (p,c) -> (c,n) gets the metric
// |x_k - mu(p,c,n)| with mu = 0 when p != c and n != c, else +A for c = 1
// and -A for c = 0. Add-compare-select keeps, for every state, the better
// of its two predecessors; path metrics are renormalised by subtracting
// the smallest one each step. Survivors are kept by register exchange,
// TB decisions deep, and the oldest decision of the best state is output.
// `start` (the beginning of a burst) clears metrics and the fill counter.
// The document says only that a Viterbi algorithm performs soft decoding
// and equalisation; trellis, metric and depth are this design's.
//
// Timing: each `din_valid` gives one `dout_valid` pulse in the next
// cycle, once TB samples have entered since `start`. The decided bit
// lags the input sample by TB - 1 bits: dout corresponds to a_(k-TB+1)
// when sample x_k is taken.
module viterbi_decoder
  import odqpsk_pkg::*;
#(
  parameter int unsigned TB = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [DEM_W-1:0] din,
  input  logic                    din_valid,
  input  logic [DEM_W-2:0]        level,
  output logic                    dout,
  output logic                    dout_valid
);
  localparam int unsigned PM_W = DEM_W + 6;
  typedef logic [PM_W-1:0] pm_t;
  typedef logic [TB-1:0]   surv_t;

  pm_t                   pm   [4];   // index {a_(k-1), a_k}
  surv_t                 surv [4];
  logic [$clog2(TB+1)-1:0] fill;

  function automatic pm_t bm(input logic p, input logic c, input logic n,
                             input logic signed [DEM_W-1:0] x, input logic [DEM_W-2:0] a);
    logic signed [DEM_W+1:0] mu, d;
    if (p != c && n != c) mu = '0;
    else if (c)           mu = (DEM_W+2)'({1'b0, a});
    else                  mu = -(DEM_W+2)'({1'b0, a});
    d = (DEM_W+2)'(x) - mu;
    return d[DEM_W+1] ? PM_W'(-d) : PM_W'(d);
  endfunction

  pm_t   pm_new   [4];
  surv_t surv_new [4];
  pm_t   pm_min;
  logic [1:0] best;
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      // new state s = {c, n}; predecessors {0, c} and {1, c}
      automatic logic c = s[1];
      automatic logic n = s[0];
      automatic pm_t m0 = pm[{1'b0, c}] + bm(1'b0, c, n, din, level);
      automatic pm_t m1 = pm[{1'b1, c}] + bm(1'b1, c, n, din, level);
      if (m1 < m0) begin
        pm_new[s]   = m1;
        surv_new[s] = {surv[{1'b1, c}][TB-2:0], c};
      end else begin
        pm_new[s]   = m0;
        surv_new[s] = {surv[{1'b0, c}][TB-2:0], c};
      end
    end
    pm_min = pm_new[0];
    best   = 2'd0;
    for (int s = 1; s < 4; s++)
      if (pm_new[s] < pm_min) begin
        pm_min = pm_new[s];
        best   = 2'(s);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) begin
        pm[s]   <= '0;
        surv[s] <= '0;
      end
      fill       <= '0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (start) begin
        for (int s = 0; s < 4; s++) pm[s] <= '0;
        fill <= '0;
      end else if (din_valid) begin
        for (int s = 0; s < 4; s++) begin
          pm[s]   <= pm_new[s] - pm_min;
          surv[s] <= surv_new[s];
        end
        if (fill != ($clog2(TB+1))'(TB)) fill <= fill + 1'b1;
        else begin
          dout       <= surv_new[best][TB-1];
          dout_valid <= 1'b1;
        end
      end
    end
  end
endmodule
