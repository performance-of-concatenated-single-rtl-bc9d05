// Testbench for tdmr_encoder at the document's sector size (8 tracks x 4096
// bits). For each coding approach a random sector of user bits is encoded
// with random input/output stalls and the coded stream is compared bit by bit
// with a reference encoder written here: odd parity after every 3 bits, the
// DRP permutation of Eq. (1)-(3) with this design's constants, and across-track
// odd parity on tracks 3 and 7; the uncoded scheme must pass the user bits
// through unchanged. Also checks track/position tags, the number of
// coded bits and the parity rules on the result.
module tb_tdmr_encoder;
  import tdmr_pkg::*;
  localparam int NT = 8, NB = 4096, L = NB * 3 / 4, ND = 6;
  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, done, busy;
  scheme_e scheme;
  logic [3:0] out_track;
  logic [12:0] out_pos;
  int checks = 0, failures = 0;
  bit user [$];
  bit sect [NT][NB];
  int perm [L];

  tdmr_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  task automatic run(input scheme_e s);
    int sent = 0, got = 0, cyc = 0;
    build_reference(s);
    @(negedge clk);
    start = 1; scheme = s;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 2000000) begin
      in_valid  = (sent < user.size()) && ($urandom % 8 != 0);
      in_bit    = (sent < user.size()) ? user[sent] : 1'b0;
      out_ready = ($urandom % 8 != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (int'(out_track) != got / NB || int'(out_pos) != got % NB ||
            out_bit !== sect[got / NB][got % NB]) begin
          failures++;
          if (failures < 10) $display("scheme %0d bit %0d (t%0d p%0d): got %0d exp %0d", s, got,
                                      out_track, out_pos, out_bit, sect[got / NB][got % NB]);
        end
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
      cyc++;
    end
    in_valid = 0; out_ready = 0;
    checks += 2;
    if (got != NT * NB) begin failures++; $display("scheme %0d: %0d coded bits", s, got); end
    if (sent != user.size()) begin failures++; $display("scheme %0d: %0d user bits taken", s, sent); end
    // every recorded track of the sector is made of odd code words of four
    if (s != SCHEME_UNCODED)
      for (int t = 0; t < NT; t++)
        for (int i = 0; i < NB; i += 4) begin
          checks++;
          if ((sect[t][i] + sect[t][i+1] + sect[t][i+2] + sect[t][i+3]) % 2 != 1) failures++;
        end
  endtask

  initial begin
    int r, q;
    for (int i = 0; i < L; i++) begin
      r = (i / 8) * 8 + (3 + 5 * i) % 8;
      q = (17 + 1897 * r) % L;
      perm[i] = (q / 8) * 8 + (1 + 3 * q) % 8;
    end
    start = 0; in_valid = 0; in_bit = 0; out_ready = 0; scheme = SCHEME_ALONG;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(SCHEME_ALONG);
    run(SCHEME_ACROSS);
    run(SCHEME_UNCODED);
    run(SCHEME_ALONG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
