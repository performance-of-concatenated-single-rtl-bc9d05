// Two-state MAP (max-log BCJR) detector across the tracks of one column.
//
// Removes the inter-track interference left in the pair symbols. Reader r
// (r = 0..NT) delivers the costs of the symbol {x[r-1], x[r]} at one
// along-track position, where x[-1] and x[NT] are guard bands holding 0. The
// trellis runs across the tracks: its state is one track's bit, the branch
// from x[r-1] to x[r] takes reader r's symbol cost as branch metric. It starts
// from the single guard state, opens into two states with two branches each,
// and closes into the single guard state after the last track, as the
// document describes. Output: cost of each track bit being 0 / 1 (best is 0)
// and the hard decision.
//
// Timing: one column per cycle, registered (out_valid follows in_valid).
module across_track_map #(
  parameter int unsigned NT = 8       // recorded tracks in a sector
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  tdmr_pkg::sym_cost_t [NT:0]  in_cost,    // reader r: {x[r-1], x[r]}
  output logic                        out_valid,
  output tdmr_pkg::bit_cost_t [NT-1:0] out_cost,
  output logic [NT-1:0]               out_bit
);
  import tdmr_pkg::*;

  bit_cost_t [NT-1:0] cost_c;
  logic [NT-1:0]      bit_c;

  // path metrics: at most 9 costs of 8 bits
  typedef logic [CW+3:0] pm_t;
  pm_t alpha [NT][2];
  pm_t beta  [NT][2];

  always_comb begin
    pm_t a, b, t0, t1, m;
    // forward: from the leading guard (state 0)
    for (int v = 0; v < 2; v++) alpha[0][v] = pm_t'(in_cost[0][{1'b0, v[0]}]);
    for (int r = 1; r < NT; r++)
      for (int v = 0; v < 2; v++) begin
        a = alpha[r-1][0] + pm_t'(in_cost[r][{1'b0, v[0]}]);
        b = alpha[r-1][1] + pm_t'(in_cost[r][{1'b1, v[0]}]);
        alpha[r][v] = (a < b) ? a : b;
      end
    // backward: into the trailing guard (state 0)
    for (int v = 0; v < 2; v++) beta[NT-1][v] = pm_t'(in_cost[NT][{v[0], 1'b0}]);
    for (int r = NT - 1; r > 0; r--)
      for (int u = 0; u < 2; u++) begin
        a = beta[r][0] + pm_t'(in_cost[r][{u[0], 1'b0}]);
        b = beta[r][1] + pm_t'(in_cost[r][{u[0], 1'b1}]);
        beta[r-1][u] = (a < b) ? a : b;
      end
    for (int r = 0; r < NT; r++) begin
      t0 = alpha[r][0] + beta[r][0];
      t1 = alpha[r][1] + beta[r][1];
      m  = (t0 < t1) ? t0 : t1;
      bit_c[r]     = (t1 < t0);
      cost_c[r][0] = (t0 - m > pm_t'(COST_MAX)) ? cost_t'(COST_MAX) : cost_t'(t0 - m);
      cost_c[r][1] = (t1 - m > pm_t'(COST_MAX)) ? cost_t'(COST_MAX) : cost_t'(t1 - m);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cost  <= '0;
      out_bit   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_cost <= cost_c;
        out_bit  <= bit_c;
      end
    end
  end

endmodule
