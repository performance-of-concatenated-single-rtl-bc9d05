// Concatenated single-parity codec for a two-dimensional magnetic recording
// sector: write-side encoder and read-side detector/decoder.
//
// The shingled medium and the read heads sit between the two halves and are
// not part of this logic: the encoder's coded-bit stream goes out to the
// write channel, and the equalized-to-be read-back samples of the NT+1
// readers come in from the read channel. Both halves run any of the three
// schemes, chosen per sector by their own scheme input:
//   SCHEME_ALONG : two along-track odd parities separated by a DRP
//                  interleaver (NT tracks x NB*9/16 user bits per sector);
//   SCHEME_ACROSS: one odd parity along the track and one across the tracks
//                  (NT*3/4 tracks x NB*3/4 user bits per sector);
//   SCHEME_UNCODED: no parity, the reference for the two coded approaches
//                  (NT tracks x NB user bits per sector).
// See tdmr_encoder and tdmr_decoder for the data order and timing.
module tdmr_spc_codec #(
  parameter int unsigned NT    = 8,
  parameter int unsigned NB    = 4096,
  parameter int unsigned SW    = 8,
  parameter int unsigned NTAPS = 12,
  parameter int unsigned CWID  = 10,
  localparam int unsigned TW   = $clog2(NT + 1),
  localparam int unsigned PW   = $clog2(NB + 1),
  localparam int unsigned CLW  = $clog2(NB + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // write side
  input  logic                          enc_start,
  input  tdmr_pkg::scheme_e             enc_scheme,
  input  logic                          enc_in_valid,
  output logic                          enc_in_ready,
  input  logic                          enc_in_bit,
  output logic                          enc_out_valid,
  input  logic                          enc_out_ready,
  output logic                          enc_out_bit,
  output logic [TW-1:0]                 enc_out_track,
  output logic [PW-1:0]                 enc_out_pos,
  output logic                          enc_done,
  output logic                          enc_busy,
  // read side
  input  logic                          dec_start,
  input  tdmr_pkg::scheme_e             dec_scheme,
  input  logic [6:0]                    dec_iti_main,
  input  logic [6:0]                    dec_iti_side,
  input  logic signed [NTAPS-1:0][CWID-1:0] dec_eq_coef,
  input  logic                          dec_in_valid,
  output logic                          dec_in_ready,
  input  logic signed [SW-1:0]          dec_in_sample,
  output logic                          dec_out_valid,
  output logic [CLW-1:0]                dec_out_col,
  output logic [NT-1:0]                 dec_out_bits,
  output logic                          dec_done,
  output logic                          dec_busy
);

  tdmr_encoder #(.NT(NT), .NB(NB)) u_enc (
    .clk, .rst_n,
    .start(enc_start), .scheme(enc_scheme),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_bit(enc_in_bit),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_bit(enc_out_bit),
    .out_track(enc_out_track), .out_pos(enc_out_pos),
    .done(enc_done), .busy(enc_busy)
  );

  tdmr_decoder #(.NT(NT), .NB(NB), .SW(SW), .NTAPS(NTAPS), .CWID(CWID)) u_dec (
    .clk, .rst_n,
    .start(dec_start), .scheme(dec_scheme),
    .iti_main(dec_iti_main), .iti_side(dec_iti_side), .eq_coef(dec_eq_coef),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_sample(dec_in_sample),
    .out_valid(dec_out_valid), .out_col(dec_out_col), .out_bits(dec_out_bits),
    .done(dec_done), .busy(dec_busy)
  );

endmodule
