// Across-track odd single-parity encoder (second coding approach, Fig. 2).
//
// Takes one column of the sector, i.e. the bit at the same along-track position
// of every data track, and inserts after every K data tracks a parity track
// whose bit makes the K+1 bits of that group odd. With the document's sizes,
// 6 data tracks become 8 recorded tracks: tracks 3 and 7 carry the parities.
// Purely combinational; one column per use.
module across_parity_encoder #(
  parameter int unsigned K       = 3,   // data tracks per parity track
  parameter int unsigned NGROUPS = 2    // parity groups in a sector (6 -> 8 tracks)
) (
  input  logic [K*NGROUPS-1:0]     data_col,   // bit g*K+k: data track k of group g
  output logic [(K+1)*NGROUPS-1:0] coded_col   // bit g*(K+1)+K is the parity of group g
);
  always_comb begin
    for (int g = 0; g < NGROUPS; g++) begin
      logic par;
      par = 1'b0;
      for (int k = 0; k < K; k++) begin
        coded_col[g*(K+1)+k] = data_col[g*K+k];
        par ^= data_col[g*K+k];
      end
      coded_col[g*(K+1)+K] = ~par;
    end
  end
endmodule
