// End-to-end testbench of tdmr_spc_codec at its default size (a sector of
// 8 tracks x 4096 bits, 9 readers). For each run a random sector of user bits
// is encoded by the write side; the coded sector is captured and passed
// through a model of the two-track read channel written here (target
// [0.4 1 1 0.4] along the track, ITI weights for main and side track, guard
// bands of zeros around the sector, +-1 LSB of noise, identity equalizer);
// the read side must return every user bit. Both coding approaches, the
// uncoded scheme and two ITI levels are run. Mechanisms that must each occur at least once: input
// stall of the decoder, output stall of the encoder, guard-band readers,
// de-interleaver passes, across-track parity decoding, scheme switch.
module tb_tdmr_spc_codec;
  import tdmr_pkg::*;
  localparam int NT = 8, NB = 4096, L = NB * 3 / 4, ND = 6, NR = NT + 1;
  logic clk = 0, rst_n = 0;
  logic enc_start, enc_in_valid, enc_in_ready, enc_in_bit, enc_out_valid, enc_out_ready;
  logic enc_out_bit, enc_done, enc_busy;
  scheme_e enc_scheme, dec_scheme;
  logic [3:0] enc_out_track;
  logic [12:0] enc_out_pos;
  logic dec_start, dec_in_valid, dec_in_ready, dec_out_valid, dec_done, dec_busy;
  logic [6:0] dec_iti_main, dec_iti_side;
  logic signed [11:0][9:0] dec_eq_coef;
  logic signed [7:0] dec_in_sample;
  logic [12:0] dec_out_col;
  logic [NT-1:0] dec_out_bits;
  int checks = 0, failures = 0;
  int n_dec_stall = 0, n_enc_stall = 0, n_guard_rd = 0, n_deint = 0, n_across = 0, n_switch = 0;
  bit user [$];
  bit sect [NT][NB];

  tdmr_spc_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dec_in_valid && !dec_in_ready && dec_busy) n_dec_stall++;
    if (enc_out_valid && !enc_out_ready) n_enc_stall++;
    if (dut.u_dec.u_dil.rd_done) n_deint++;
    if (dut.u_dec.u_asd.out_valid) n_across++;
  end

  // read channel: reader r sees track r (main) and track r-1 (side)
  function automatic real level(int t, int i);
    if (t < 0 || t >= NT || i < 0) return -1.0;
    return sect[t][i] ? 1.0 : -1.0;
  endfunction

  function automatic int sample(int r, int i, real wm, real ws);
    real taps [4] = '{0.4, 1.0, 1.0, 0.4};
    real y = 0.0;
    int q;
    for (int k = 0; k < 4; k++) y += taps[k] * (wm * level(r, i - k) + ws * level(r - 1, i - k));
    q = $rtoi(y * 16.0 + (y >= 0 ? 0.5 : -0.5)) + int'($urandom % 3) - 1;
    return q;
  endfunction

  task automatic run(input scheme_e s, input real ws);
    int nuser, sent = 0, got = 0, cyc = 0, r, i, nout = 0, ncols;
    nuser = (s == SCHEME_ALONG) ? NT * (L * 3 / 4) : (s == SCHEME_ACROSS) ? ND * L : NT * NB;
    user.delete();
    for (int k = 0; k < nuser; k++) user.push_back(1'($urandom));
    if (checks > 0 && s != prev_scheme) n_switch++;
    prev_scheme = s;
    // ---- write side
    @(negedge clk);
    enc_start = 1; enc_scheme = s;
    @(negedge clk);
    enc_start = 0;
    while (!enc_done && cyc < 1000000) begin
      enc_in_valid  = (sent < nuser);
      enc_in_bit    = (sent < nuser) ? user[sent] : 1'b0;
      enc_out_ready = ($urandom % 16 != 0);
      #1;
      if (enc_out_valid && enc_out_ready) begin
        sect[3'(enc_out_track)][12'(enc_out_pos)] = enc_out_bit;
        got++;
      end
      if (enc_in_valid && enc_in_ready) sent++;
      @(negedge clk);
      cyc++;
    end
    enc_in_valid = 0; enc_out_ready = 0;
    checks++;
    if (got != NT * NB) begin failures++; $display("encoder gave %0d bits", got); end
    // ---- read side
    dec_start = 1; dec_scheme = s;
    dec_iti_main = 7'd64; dec_iti_side = 7'($rtoi(ws * 64.0));
    @(negedge clk);
    dec_start = 0;
    r = 0; i = 0; cyc = 0;
    ncols = (s == SCHEME_ALONG) ? L * 3 / 4 : (s == SCHEME_ACROSS) ? L : NB;
    while (!dec_done && cyc < 2000000) begin
      dec_in_valid  = (r < NR);
      dec_in_sample = (r < NR) ? 8'(sample(r, i, 1.0, ws)) : '0;
      #1;
      if (dec_in_valid && dec_in_ready) begin
        if (i == 0 && (r == 0 || r == NT)) n_guard_rd++;
        i++;
        if (i == NB) begin i = 0; r++; end
      end
      if (dec_out_valid) begin
        for (int t = 0; t < ((s == SCHEME_ACROSS) ? ND : NT); t++) begin
          int idx;
          bit e;
          idx = t * ncols + int'(dec_out_col);
          e = user[idx];
          checks++;
          if (dec_out_bits[t] !== e) begin
            failures++;
            if (failures < 10) $display("scheme %0d col %0d track %0d: got %0d exp %0d", s,
                                        dec_out_col, t, dec_out_bits[t], e);
          end
        end
        nout++;
      end
      @(negedge clk);
      cyc++;
    end
    dec_in_valid = 0;
    checks++;
    if (nout != ncols) begin failures++; $display("decoder gave %0d columns", nout); end
    $display("scheme %0d, ITI [1.0 %0.2f]: %0d decode cycles", s, ws, cyc);
  endtask

  scheme_e prev_scheme = SCHEME_ALONG;

  initial begin
    enc_start = 0; enc_in_valid = 0; enc_in_bit = 0; enc_out_ready = 0; enc_scheme = SCHEME_ALONG;
    dec_start = 0; dec_in_valid = 0; dec_in_sample = 0; dec_scheme = SCHEME_ALONG;
    dec_iti_main = 7'd64; dec_iti_side = 7'd32;
    dec_eq_coef = '0;
    dec_eq_coef[0] = 10'sd128;     // identity equalizer: samples already at the target
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(SCHEME_ALONG, 0.5);
    run(SCHEME_ACROSS, 0.5);
    run(SCHEME_ALONG, 0.25);
    run(SCHEME_UNCODED, 0.5);
    checks += 6;
    if (n_dec_stall == 0) begin failures++; $display("no decoder input stall"); end
    if (n_enc_stall == 0) begin failures++; $display("no encoder output stall"); end
    if (n_guard_rd == 0) begin failures++; $display("no guard reader"); end
    if (n_deint == 0) begin failures++; $display("no de-interleaver pass"); end
    if (n_across == 0) begin failures++; $display("no across-track parity decoding"); end
    if (n_switch == 0) begin failures++; $display("no scheme switch"); end
    $display("stalls dec %0d enc %0d, guard readers %0d, deinterleave passes %0d, across columns %0d, switches %0d",
             n_dec_stall, n_enc_stall, n_guard_rd, n_deint, n_across, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
