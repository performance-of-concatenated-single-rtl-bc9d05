// Multi-level (two-track) MAP joint detector / single-parity decoder along a track.
//
// One reader sees its main track plus inter-track interference from one side
// track, equalized along the track to the target TAP0..TAP3 = [0.4 1 1 0.4]:
//   y[i] = sum_k TAP_k * (w_main * a_main[i-k] + w_side * a_side[i-k]),  a = 2x-1.
// The detector runs the max-log BCJR algorithm on the two-bit symbol
// {side bit, main bit}: memory 3 symbols gives 2^(3*2) = 64 states with
// 4 branches per state. Both tracks carry an odd parity bit at every fourth
// position (i mod 4 = 3); there only the branch whose bits complete the odd
// parity of the three previous bits of each track (held in the state) is
// kept, so one branch per state survives, as in the document's trellis
// (parity_en low turns this off for uncoded tracks: 4 branches everywhere). A
// guard track (all zeros, the -1 level) is handled by forcing its bits to 0
// and not checking its parity: with a guard side track only 8 states and 2
// branches per state remain reachable.
//
// Output: for every position the costs (max-log, smaller = more likely,
// normalised so the best is 0, saturated to tdmr_pkg::CW bits) of the four
// symbols 00, 01, 10, 11. These are the "APP[00..11]" saved for later stages.
//
// Timing: start (one cycle) latches the guard and parity flags and ITI weights. Then NB
// samples are accepted, one per cycle while in_ready is high (forward
// recursion, alphas stored per position). After the last sample in_ready drops
// and the backward recursion emits one output per cycle, positions NB-1 down to
// 0 (out_pos tells which), followed by a one-cycle done. Latency from the
// last sample to the first output is 1 cycle; a frame takes about 2*NB cycles.
// Bits before position 0 are assumed to be zero (the -1 level); the trellis end
// is left open. Branch metrics are (y - y_ideal)^2 >> GSHIFT; the noise
// variance of Eq. (12) is a common scale and is dropped in the max-log domain.
module multitrack_map #(
  parameter int unsigned NB     = 4096,  // positions per track (coded)
  parameter int unsigned SW     = 8,     // sample width, signed, SFRAC fraction bits
  parameter int unsigned SFRAC  = 4,
  parameter int          TAP0   = 26,    // target taps, Q6 (0.4 ~ 26/64)
  parameter int          TAP1   = 64,
  parameter int          TAP2   = 64,
  parameter int          TAP3   = 26,
  parameter int unsigned MW     = 12,    // state metric width
  parameter int unsigned GSHIFT = 7,     // branch metric scaling
  parameter int unsigned GMAX   = 1023,  // branch metric saturation
  parameter int unsigned OSHIFT = 1,     // output cost scaling
  localparam int unsigned PW    = $clog2(NB)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   guard_main,   // main track is a guard band (all 0)
  input  logic                   guard_side,   // side track is a guard band (all 0)
  input  logic                   parity_en,    // tracks carry the parity at i mod 4 = 3
  input  logic [6:0]             iti_main,     // ITI weight of the main track, Q6
  input  logic [6:0]             iti_side,     // ITI weight of the side track, Q6
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [SW-1:0]   in_sample,
  output logic                   out_valid,
  output logic [PW-1:0]          out_pos,
  output tdmr_pkg::sym_cost_t    out_cost,
  output logic                   done,
  output logic                   busy
);
  import tdmr_pkg::*;

  localparam int unsigned NS   = 64;
  localparam int unsigned MMAX = (1 << MW) - 1;

  typedef logic [MW-1:0] metric_t;
  typedef metric_t [NS-1:0] metric_vec_t;
  typedef enum logic [1:0] {IDLE, FWD, BWD} phase_e;

  phase_e          phase;
  logic [PW-1:0]   pos;
  logic            g_main, g_side, p_en;
  logic [6:0]      w_main, w_side;
  metric_vec_t     alpha, beta;
  metric_vec_t     alpha_mem [NB];
  logic signed [SW-1:0] y_mem [NB];

  // ---------------------------------------------------------------- helpers
  function automatic metric_t madd(input metric_t a, input metric_t b);
    logic [MW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s > (MW+1)'(MMAX)) ? metric_t'(MMAX) : s[MW-1:0];
  endfunction

  // Next state after symbol u from state s: s = {sym[i-3], sym[i-2], sym[i-1]}.
  function automatic logic [5:0] next_state(input logic [3:0] s_low, input logic [1:0] u);
    return {s_low, u};
  endfunction

  // ------------------------------------------------------- branch metrics
  logic signed [SW-1:0] y_cur;
  logic signed [9:0]    sum_main [16];   // sum_k TAP_k * a[i-k], Q6; pattern bit k = x[i-k]
  metric_t              gamma [NS][4];

  always_comb begin
    logic signed [9:0] taps [4];
    taps = '{10'(TAP0), 10'(TAP1), 10'(TAP2), 10'(TAP3)};
    for (int p = 0; p < 16; p++) begin
      sum_main[p] = '0;
      for (int k = 0; k < 4; k++) sum_main[p] += p[k] ? taps[k] : -taps[k];
    end
  end

  always_comb begin
    logic              is_par, ok;
    logic [3:0]        pm, ps;
    logic signed [15:0] ideal, e;
    logic [31:0]       e2;
    is_par = p_en && (pos[1:0] == 2'd3);
    for (int s = 0; s < NS; s++) begin
      for (int u = 0; u < 4; u++) begin
        // bit k of each pattern is the bit at position i-k
        pm = {s[4], s[2], s[0], u[0]};
        ps = {s[5], s[3], s[1], u[1]};
        ok = 1'b1;
        if (g_main && u[0]) ok = 1'b0;
        if (g_side && u[1]) ok = 1'b0;
        if (is_par && !g_main && (u[0] != odd_parity3(pm[3:1]))) ok = 1'b0;
        if (is_par && !g_side && (u[1] != odd_parity3(ps[3:1]))) ok = 1'b0;
        ideal = 16'((int'(w_main) * int'(sum_main[pm]) + int'(w_side) * int'(sum_main[ps])) >>> 6);
        e     = (16'(y_cur) <<< (6 - SFRAC)) - ideal;
        e2    = 32'(int'(e) * int'(e)) >> GSHIFT;
        if (!ok)                 gamma[s][u] = metric_t'(MMAX);
        else if (e2 > 32'(GMAX)) gamma[s][u] = metric_t'(GMAX);
        else                     gamma[s][u] = metric_t'(e2);
      end
    end
  end

  assign y_cur   = (phase == BWD) ? y_mem[pos] : in_sample;

  // ------------------------------------------------------ forward recursion
  metric_vec_t alpha_next;
  always_comb begin
    metric_t m, best;
    best = metric_t'(MMAX);
    for (int sn = 0; sn < NS; sn++) begin
      m = metric_t'(MMAX);
      for (int x = 0; x < 4; x++) begin
        logic [5:0] sp;
        metric_t    c;
        sp = {2'(x), 4'(sn >> 2)};
        c  = madd(alpha[sp], gamma[sp][sn & 3]);
        if (c < m) m = c;
      end
      alpha_next[sn] = m;
      if (m < best) best = m;
    end
    for (int sn = 0; sn < NS; sn++)
      alpha_next[sn] = (alpha_next[sn] == metric_t'(MMAX)) ? alpha_next[sn]
                                                           : alpha_next[sn] - best;
  end

  // ------------------------------------------ backward recursion and output
  metric_vec_t alpha_rd, beta_next;
  sym_cost_t   cost_next;
  assign alpha_rd = alpha_mem[pos];

  always_comb begin
    metric_t m, best, c;
    metric_t sym_best [4];
    for (int u = 0; u < 4; u++) sym_best[u] = metric_t'(MMAX);
    best = metric_t'(MMAX);
    for (int s = 0; s < NS; s++) begin
      m = metric_t'(MMAX);
      for (int u = 0; u < 4; u++) begin
        c = madd(beta[next_state(4'(s), 2'(u))], gamma[s][u]);
        if (c < m) m = c;
        c = madd(c, alpha_rd[s]);
        if (c < sym_best[u]) sym_best[u] = c;
      end
      beta_next[s] = m;
      if (m < best) best = m;
    end
    for (int s = 0; s < NS; s++)
      beta_next[s] = (beta_next[s] == metric_t'(MMAX)) ? beta_next[s] : beta_next[s] - best;
    best = metric_t'(MMAX);
    for (int u = 0; u < 4; u++) if (sym_best[u] < best) best = sym_best[u];
    for (int u = 0; u < 4; u++) begin
      metric_t d;
      d = (sym_best[u] - best) >> OSHIFT;
      cost_next[u] = (sym_best[u] == metric_t'(MMAX) || d > metric_t'(COST_MAX)) ? cost_t'(COST_MAX)
                                                                                 : cost_t'(d);
    end
  end

  // ------------------------------------------------------------- control
  assign in_ready = (phase == FWD);
  assign busy     = (phase != IDLE);

  always_ff @(posedge clk) begin
    if (phase == FWD && in_valid) begin
      alpha_mem[pos] <= alpha;
      y_mem[pos]     <= in_sample;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= IDLE;
      pos       <= '0;
      g_main    <= 1'b0;
      g_side    <= 1'b0;
      p_en      <= 1'b1;
      w_main    <= '0;
      w_side    <= '0;
      alpha     <= '0;
      beta      <= '0;
      out_valid <= 1'b0;
      out_pos   <= '0;
      out_cost  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (phase)
        IDLE: if (start) begin
          phase  <= FWD;
          pos    <= '0;
          g_main <= guard_main;
          g_side <= guard_side;
          p_en   <= parity_en;
          w_main <= iti_main;
          w_side <= iti_side;
          // the track starts from the all-zero state
          for (int s = 0; s < NS; s++) alpha[s] <= (s == 0) ? '0 : metric_t'(MMAX);
        end
        FWD: if (in_valid) begin
          alpha <= alpha_next;
          if (pos == PW'(NB - 1)) begin
            phase <= BWD;
            beta  <= '0;          // open trellis end
          end else begin
            pos <= pos + 1'b1;
          end
        end
        BWD: begin
          out_valid <= 1'b1;
          out_pos   <= pos;
          out_cost  <= cost_next;
          beta      <= beta_next;
          if (pos == '0) begin
            phase <= IDLE;
            done  <= 1'b1;
          end else begin
            pos <= pos - 1'b1;
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end

endmodule
