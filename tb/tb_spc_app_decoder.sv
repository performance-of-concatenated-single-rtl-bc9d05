// Testbench for spc_app_decoder: random symbol costs for a four-position code
// word; the reference enumerates all 256 symbol sequences, keeps those in
// which every non-guard track has an odd number of ones and a guard track only
// zeros at the parity position, and takes minima per position and value.
// All four guard combinations are exercised; the output register must deliver
// the result one cycle after in_valid.
module tb_spc_app_decoder;
  import tdmr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic guard_main, guard_side, in_valid, out_valid;
  sym_cost_t [3:0] in_cost;
  sym_cost_t [2:0] out_cost;
  int checks = 0, failures = 0;

  spc_app_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, c, e;
    int bp [3][4];
    logic [1:0] s [4];
    guard_main = 0; guard_side = 0; in_valid = 0; in_cost = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      guard_main = (t % 4 == 1); guard_side = (t % 4 == 2);
      for (int p = 0; p < 4; p++)
        for (int v = 0; v < 4; v++) in_cost[p][v] = cost_t'($urandom % (t < 200 ? 40 : 256));
      in_valid = 1;
      best = 1 << 30;
      for (int k = 0; k < 3; k++) for (int v = 0; v < 4; v++) bp[k][v] = 1 << 30;
      for (int q = 0; q < 256; q++) begin
        bit ok;
        for (int p = 0; p < 4; p++) s[p] = 2'(q >> (2 * p));
        ok = 1;
        for (int b = 0; b < 2; b++) begin
          int ones;
          bit g;
          g = (b == 0) ? guard_main : guard_side;
          ones = s[0][b] + s[1][b] + s[2][b] + s[3][b];
          if (!g && ones % 2 == 0) ok = 0;
          if (g && s[3][b]) ok = 0;
        end
        if (!ok) continue;
        c = 0;
        for (int p = 0; p < 4; p++) c += in_cost[p][s[p]];
        if (c < best) best = c;
        for (int k = 0; k < 3; k++) if (c < bp[k][s[k]]) bp[k][s[k]] = c;
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 3; k++)
        for (int v = 0; v < 4; v++) begin
          e = bp[k][v] - best;
          if (e > 255) e = 255;
          checks++;
          if (int'(out_cost[k][v]) != e) begin
            failures++;
            if (failures < 10) $display("t=%0d pos %0d sym %0d: got %0d exp %0d", t, k, v, out_cost[k][v], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
