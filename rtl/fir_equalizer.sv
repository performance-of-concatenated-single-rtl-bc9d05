// Linear (FIR) equalizer along the track.
//
// Shapes the read-back samples of one reader to the partial-response target
// [0.4 1 1 0.4] used by the detector. The document uses NTAPS = 12 taps whose
// coefficients are found offline as C = H^-1 T (Eq. 10) from the channel
// response H and the zero-padded target T; here they are a run-time input so
// that any channel can be equalized. Coefficients are signed fixed point with
// CFRAC fractional bits; the output y[n] = sum_k c[k] x[n-k] is rounded back
// to the input scale and saturated to OW bits.
//
// Timing: one sample per cycle when in_valid is high, result registered, so
// out_valid follows in_valid by one cycle. The delay line starts from zero at
// reset and on clear (start of a new track), so every track is equalized as if
// preceded by zero samples.
module fir_equalizer #(
  parameter int unsigned NTAPS = 12,
  parameter int unsigned IW    = 8,   // input sample width (signed)
  parameter int unsigned CWID  = 10,  // coefficient width (signed)
  parameter int unsigned CFRAC = 7,   // fractional bits of a coefficient
  parameter int unsigned OW    = 8    // output sample width (signed)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic signed [NTAPS-1:0][CWID-1:0] coef,
  input  logic                          in_valid,
  input  logic signed [IW-1:0]          in_sample,
  output logic                          out_valid,
  output logic signed [OW-1:0]          out_sample
);
  localparam int unsigned AW = IW + CWID + $clog2(NTAPS) + 1;

  logic signed [IW-1:0] hist [NTAPS-1];   // x[n-1] .. x[n-NTAPS+1]
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] rounded;

  always_comb begin
    acc = AW'(in_sample) * AW'($signed(coef[0]));
    for (int k = 1; k < NTAPS; k++) acc += AW'(hist[k-1]) * AW'($signed(coef[k]));
    rounded = (acc + (AW'(1) <<< (CFRAC - 1))) >>> CFRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS - 1; k++) hist[k] <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        for (int k = 0; k < NTAPS - 1; k++) hist[k] <= '0;
      end else if (in_valid) begin
        hist[0] <= in_sample;
        for (int k = 1; k < NTAPS - 1; k++) hist[k] <= hist[k-1];
        if (rounded > AW'((1 << (OW - 1)) - 1))
          out_sample <= OW'((1 << (OW - 1)) - 1);
        else if (rounded < -AW'(1 << (OW - 1)))
          out_sample <= OW'(-(1 << (OW - 1)));
        else
          out_sample <= OW'(rounded);
      end
    end
  end

endmodule
