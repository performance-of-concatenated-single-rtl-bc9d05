// Testbench for tdmr_decoder at its default size (8 tracks x 4096 bits,
// 9 readers). A reference encoder written here (odd parity after every 3
// bits, DRP permutation of Eq. (1)-(3) with this design's constants, odd
// parity across tracks 3 and 7) produces a random sector; a channel model
// turns it into read-back samples (target [0.4 1 1 0.4] along the track, ITI
// weights for main and side track, guard bands of zeros around the sector,
// +-1 LSB of noise). Every user bit must be returned. Runs: both approaches and
// the uncoded scheme at ITI [1.0 0.5]; the along-track approach at full ITI [1.0 1.0]; and a run in
// which the channel adds a post-cursor (1 + 0.5 D) that the 12-tap equalizer
// must remove with coefficients (-0.5)^k.
module tb_tdmr_decoder;
  import tdmr_pkg::*;
  localparam int NT = 8, NB = 4096, L = NB * 3 / 4, ND = 6, NR = NT + 1;
  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  logic start, in_valid, in_ready, out_valid, done, busy;
  logic [6:0] iti_main, iti_side;
  logic signed [11:0][9:0] eq_coef;
  logic signed [7:0] in_sample;
  logic [12:0] out_col;
  logic [NT-1:0] out_bits;
  int checks = 0, failures = 0;
  bit user [$];
  bit sect [NT][NB];
  int perm [L];
  bit post;          // channel adds the (1 + 0.5 D) post-cursor

  tdmr_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void spc(input bit d [$], output bit c [$]);
    int ones;
    c.delete();
    for (int i = 0; i < d.size(); i += 3) begin
      ones = 0;
      for (int k = 0; k < 3; k++) begin c.push_back(d[i+k]); ones += d[i+k]; end
      c.push_back(ones % 2 == 0);
    end
  endfunction

  task automatic build_reference(input scheme_e s);
    bit d [$], c1 [$], il [$], c2 [$];
    int n = 0;
    user.delete();
    if (s == SCHEME_ALONG) begin
      for (int t = 0; t < NT; t++) begin
        d.delete();
        for (int i = 0; i < L * 3 / 4; i++) begin d.push_back(1'($urandom)); user.push_back(d[i]); end
        spc(d, c1);
        il = c1;
        for (int i = 0; i < L; i++) il[perm[i]] = c1[i];
        spc(il, c2);
        for (int i = 0; i < NB; i++) sect[t][i] = c2[i];
      end
    end else if (s == SCHEME_UNCODED) begin
      for (int t = 0; t < NT; t++)
        for (int i = 0; i < NB; i++) begin sect[t][i] = 1'($urandom); user.push_back(sect[t][i]); end
    end else begin
      for (int t = 0; t < ND; t++) begin
        d.delete();
        for (int i = 0; i < L; i++) begin d.push_back(1'($urandom)); user.push_back(d[i]); end
        spc(d, c1);
        for (int i = 0; i < NB; i++) sect[t + t / 3][i] = c1[i];
      end
      for (int i = 0; i < NB; i++) begin
        sect[3][i] = !(sect[0][i] ^ sect[1][i] ^ sect[2][i]);
        sect[7][i] = !(sect[4][i] ^ sect[5][i] ^ sect[6][i]);
      end
    end
  endtask

  function automatic real level(int t, int i);
    if (t < 0 || t >= NT || i < 0) return -1.0;
    return sect[t][i] ? 1.0 : -1.0;
  endfunction

  function automatic real target_out(int r, int i, real wm, real ws);
    real taps [4] = '{0.4, 1.0, 1.0, 0.4};
    real y = 0.0;
    for (int k = 0; k < 4; k++) y += taps[k] * (wm * level(r, i - k) + ws * level(r - 1, i - k));
    return y;
  endfunction

  function automatic int sample(int r, int i, real wm, real ws);
    real y;
    y = target_out(r, i, wm, ws);
    if (post) y += 0.5 * ((i > 0) ? target_out(r, i - 1, wm, ws) : target_out(r, -1, wm, ws));
    return $rtoi(y * 16.0 + (y >= 0 ? 0.5 : -0.5)) + int'($urandom % 3) - 1;
  endfunction

  task automatic run(input scheme_e s, input real ws, input bit with_post);
    int cyc = 0, r = 0, i = 0, nout = 0, ncols;
    post = with_post;
    eq_coef = '0;
    for (int k = 0; k < 12; k++) eq_coef[k] = with_post ? 10'($rtoi(128.0 * ((-0.5) ** k))) : (k == 0 ? 10'sd128 : 10'sd0);
    build_reference(s);
    @(negedge clk);
    start = 1; scheme = s;
    iti_main = 7'd64; iti_side = 7'($rtoi(ws * 64.0));
    @(negedge clk);
    start = 0;
    ncols = (s == SCHEME_ALONG) ? L * 3 / 4 : (s == SCHEME_ACROSS) ? L : NB;
    while (!done && cyc < 2000000) begin
      in_valid  = (r < NR);
      in_sample = (r < NR) ? 8'(sample(r, i, 1.0, ws)) : '0;
      #1;
      if (in_valid && in_ready) begin
        i++;
        if (i == NB) begin i = 0; r++; end
      end
      if (out_valid) begin
        for (int t = 0; t < ((s == SCHEME_ACROSS) ? ND : NT); t++) begin
          int idx;
          bit e;
          idx = t * ncols + int'(out_col);
          e = user[idx];
          checks++;
          if (out_bits[t] !== e) begin
            failures++;
            if (failures < 10) $display("scheme %0d col %0d track %0d: got %0d exp %0d", s,
                                        out_col, t, out_bits[t], e);
          end
        end
        nout++;
      end
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    checks++;
    if (nout != ncols) begin failures++; $display("decoder gave %0d columns", nout); end
    $display("scheme %0d, ITI [1.0 %0.2f], post-cursor %0d: %0d cycles", s, ws, with_post, cyc);
  endtask

  initial begin
    int rr, q;
    for (int k = 0; k < L; k++) begin
      rr = (k / 8) * 8 + (3 + 5 * k) % 8;
      q = (17 + 1897 * rr) % L;
      perm[k] = (q / 8) * 8 + (1 + 3 * q) % 8;
    end
    start = 0; in_valid = 0; in_sample = 0; scheme = SCHEME_ALONG;
    iti_main = 7'd64; iti_side = 7'd32; eq_coef = '0; post = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(SCHEME_ALONG, 0.5, 1'b0);
    run(SCHEME_ACROSS, 0.5, 1'b0);
    run(SCHEME_UNCODED, 0.5, 1'b0);
    run(SCHEME_ALONG, 1.0, 1'b0);
    run(SCHEME_ACROSS, 0.5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
