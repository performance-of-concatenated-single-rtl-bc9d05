// Workload testbench: the three ITI levels [1.0 0.25], [1.0 0.5] and
// [1.0 1.0] with both coding approaches and with the uncoded scheme, one full
// sector (8 x 4096) each, through the top with a read channel model that adds
// noise of roughly Gaussian shape (sum of four uniform draws, standard
// deviation 4 LSB, i.e. 0.25 of the unit amplitude). It reports the bit error
// rate of every run. Checks: every sector completes with all its columns, the
// coded bit error rate stays below 1 percent (uncoded below 10 percent), and
// at every ITI level both coded approaches do no worse than uncoded (the
// noiseless case is covered by tb_tdmr_spc_codec).
module tb_tdmr_iti_workloads;
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

  function automatic int noise();
    int n = 0;
    for (int k = 0; k < 4; k++) n += int'($urandom % 7) - 3;
    return n;
  endfunction

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
    q = $rtoi(y * 16.0 + (y >= 0 ? 0.5 : -0.5)) + noise();
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  task automatic run(input scheme_e s, input real ws, output real ber);
    int nuser, sent = 0, got = 0, cyc = 0, r, i, nout = 0, ncols, nbits = 0, nerr = 0;
    nuser = (s == SCHEME_ALONG) ? NT * (L * 3 / 4) : (s == SCHEME_ACROSS) ? ND * L : NT * NB;
    user.delete();
    for (int k = 0; k < nuser; k++) user.push_back(1'($urandom));
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
    dec_iti_main = 7'd64; dec_iti_side = (ws >= 1.0) ? 7'd64 : 7'($rtoi(ws * 64.0));
    @(negedge clk);
    dec_start = 0;
    r = 0; i = 0; cyc = 0;
    ncols = (s == SCHEME_ALONG) ? L * 3 / 4 : (s == SCHEME_ACROSS) ? L : NB;
    while (!dec_done && cyc < 2000000) begin
      dec_in_valid  = (r < NR);
      dec_in_sample = (r < NR) ? 8'(sample(r, i, 1.0, ws)) : '0;
      #1;
      if (dec_in_valid && dec_in_ready) begin
        i++;
        if (i == NB) begin i = 0; r++; end
      end
      if (dec_out_valid) begin
        for (int t = 0; t < ((s == SCHEME_ACROSS) ? ND : NT); t++) begin
          int idx;
          bit e;
          idx = t * ncols + int'(dec_out_col);
          e = user[idx];
          nbits++;
          if (dec_out_bits[t] !== e) nerr++;
        end
        nout++;
      end
      @(negedge clk);
      cyc++;
    end
    dec_in_valid = 0;
    checks++;
    if (nout != ncols) begin failures++; $display("decoder gave %0d columns", nout); end
    checks++;
    if (nerr * ((s == SCHEME_UNCODED) ? 10 : 100) >= nbits) failures++;
    ber = real'(nerr) / real'(nbits);
    $display("scheme %0d, ITI [1.0 %0.2f]: %0d errors in %0d bits, BER %e", s, ws, nerr, nbits,
             real'(nerr) / real'(nbits));
  endtask

  real iti [3] = '{0.25, 0.5, 1.0};
  real ber [3][3];

  initial begin
    enc_start = 0; enc_in_valid = 0; enc_in_bit = 0; enc_out_ready = 0; enc_scheme = SCHEME_ALONG;
    dec_start = 0; dec_in_valid = 0; dec_in_sample = 0; dec_scheme = SCHEME_ALONG;
    dec_iti_main = 7'd64; dec_iti_side = 7'd32;
    dec_eq_coef = '0;
    dec_eq_coef[0] = 10'sd128;     // identity equalizer: samples already at the target
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (iti[k])
      for (int s = 0; s < 3; s++) run(scheme_e'(s), iti[k], ber[k][s]);
    foreach (iti[k]) begin
      checks++;
      if (ber[k][0] > ber[k][2] || ber[k][1] > ber[k][2]) begin
        failures++;
        $display("ITI [1.0 %0.2f]: a coded scheme is worse than uncoded", iti[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
