// Soft decoder of the first along-track single parity (first coding approach).
//
// Works on one code word of four consecutive positions of a two-track reader,
// after de-interleaving: each position carries the costs of the symbols
// {side bit, main bit} = 00, 01, 10, 11. Every track's four bits must have odd
// parity, so of the 256 symbol sequences only 64 are code words (the fourth
// symbol follows from the first three). Following the document, the decoder
// scores every valid sequence by combining the four symbol values it uses and,
// for each of the three data positions and each symbol value, keeps the best
// sequence with that value there; the parity position is dropped. The document
// multiplies probabilities and divides by their total; in the cost (max-log)
// domain used throughout this design the product becomes a sum, the sum over
// sequences becomes a minimum and the division becomes subtracting the best
// sequence's cost. A guard track (all zeros) has no parity: its bit is taken
// as 0 at the parity position.
//
// Timing: one code word per cycle, result registered (out_valid follows
// in_valid by one cycle).
module spc_app_decoder (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     guard_main,
  input  logic                     guard_side,
  input  logic                     in_valid,
  input  tdmr_pkg::sym_cost_t [3:0] in_cost,   // positions 0..2 data, 3 parity
  output logic                     out_valid,
  output tdmr_pkg::sym_cost_t [2:0] out_cost   // positions 0..2
);
  import tdmr_pkg::*;

  sym_cost_t [2:0] dec;

  always_comb begin
    int best_pos [3][4];
    int best, c;
    logic [1:0] s3;
    for (int k = 0; k < 3; k++)
      for (int v = 0; v < 4; v++) best_pos[k][v] = 1 << 30;
    best = 1 << 30;
    for (int q = 0; q < 64; q++) begin
      logic [1:0] s0, s1, s2;
      s0 = 2'(q);
      s1 = 2'(q >> 2);
      s2 = 2'(q >> 4);
      s3[0] = guard_main ? 1'b0 : odd_parity3({s0[0], s1[0], s2[0]});
      s3[1] = guard_side ? 1'b0 : odd_parity3({s0[1], s1[1], s2[1]});
      c = int'(in_cost[0][s0]) + int'(in_cost[1][s1]) + int'(in_cost[2][s2])
        + int'(in_cost[3][s3]);
      if (c < best) best = c;
      if (c < best_pos[0][s0]) best_pos[0][s0] = c;
      if (c < best_pos[1][s1]) best_pos[1][s1] = c;
      if (c < best_pos[2][s2]) best_pos[2][s2] = c;
    end
    for (int k = 0; k < 3; k++)
      for (int v = 0; v < 4; v++)
        dec[k][v] = (best_pos[k][v] - best > int'(COST_MAX)) ? cost_t'(COST_MAX)
                                                             : cost_t'(best_pos[k][v] - best);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cost  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_cost <= dec;
    end
  end

endmodule
