// Single-parity MAP decoder across the tracks (second coding approach).
//
// Takes the bit costs that the across-track detector produced for one column
// of NGROUPS*(K+1) recorded tracks. Each group of K data tracks plus one
// parity track must hold an odd number of ones. For every group the decoder
// scores all 2^K code words (the parity bit follows from the data bits) by the
// sum of their bit costs and decides every data bit from the best code word
// with that bit 0 against the best with it 1 (max-log MAP). The parity tracks
// are dropped: out_bit holds only the K*NGROUPS data tracks (6 of 8 for the
// document's sector), together with their costs.
//
// Timing: one column per cycle, registered (out_valid follows in_valid).
module across_spc_decoder #(
  parameter int unsigned K       = 3,
  parameter int unsigned NGROUPS = 2
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  tdmr_pkg::bit_cost_t [(K+1)*NGROUPS-1:0] in_cost,
  output logic                                  out_valid,
  output tdmr_pkg::bit_cost_t [K*NGROUPS-1:0]   out_cost,
  output logic [K*NGROUPS-1:0]                  out_bit
);
  import tdmr_pkg::*;

  bit_cost_t [K*NGROUPS-1:0] cost_c;
  logic [K*NGROUPS-1:0]      bit_c;

  always_comb begin
    for (int g = 0; g < NGROUPS; g++) begin
      int best [K][2];
      int c, m;
      logic par;
      for (int k = 0; k < K; k++) begin
        best[k][0] = 1 << 30;
        best[k][1] = 1 << 30;
      end
      for (int w = 0; w < (1 << K); w++) begin
        c   = 0;
        par = 1'b1;              // odd parity: parity bit = NOT xor(data)
        for (int k = 0; k < K; k++) begin
          c   += int'(in_cost[g*(K+1)+k][w[k]]);
          par ^= w[k];
        end
        c += int'(in_cost[g*(K+1)+K][par]);
        for (int k = 0; k < K; k++)
          if (c < best[k][w[k]]) best[k][w[k]] = c;
      end
      for (int k = 0; k < K; k++) begin
        m = (best[k][0] < best[k][1]) ? best[k][0] : best[k][1];
        bit_c[g*K+k]     = (best[k][1] < best[k][0]);
        cost_c[g*K+k][0] = (best[k][0] - m > int'(COST_MAX)) ? cost_t'(COST_MAX)
                                                             : cost_t'(best[k][0] - m);
        cost_c[g*K+k][1] = (best[k][1] - m > int'(COST_MAX)) ? cost_t'(COST_MAX)
                                                             : cost_t'(best[k][1] - m);
      end
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
