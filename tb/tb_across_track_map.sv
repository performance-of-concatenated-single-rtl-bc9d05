// Testbench for across_track_map with 8 tracks: random pair-symbol costs for
// the 9 readers; the reference enumerates all 256 track bit vectors (guard
// bits 0 at both ends), adds the nine readers' symbol costs and takes, per
// track and bit value, the best vector. Costs and hard bits must match
// exactly, one cycle after in_valid.
module tb_across_track_map;
  import tdmr_pkg::*;
  localparam int NT = 8;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  sym_cost_t [NT:0] in_cost;
  bit_cost_t [NT-1:0] out_cost;
  logic [NT-1:0] out_bit;
  int checks = 0, failures = 0;

  across_track_map #(.NT(NT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, c, e;
    int bb [NT][2];
    logic [NT+1:0] x;   // x[0] leading guard, x[1..NT] tracks, x[NT+1] trailing guard
    in_valid = 0; in_cost = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int r = 0; r <= NT; r++)
        for (int v = 0; v < 4; v++) in_cost[r][v] = cost_t'($urandom % (t < 150 ? 30 : 256));
      in_valid = 1;
      best = 1 << 30;
      for (int k = 0; k < NT; k++) begin bb[k][0] = 1 << 30; bb[k][1] = 1 << 30; end
      for (int v = 0; v < (1 << NT); v++) begin
        x = {1'b0, NT'(v), 1'b0};
        c = 0;
        for (int r = 0; r <= NT; r++) c += in_cost[r][{x[r], x[r+1]}];
        if (c < best) best = c;
        for (int k = 0; k < NT; k++) if (c < bb[k][v[k]]) bb[k][v[k]] = c;
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < NT; k++) begin
        for (int b = 0; b < 2; b++) begin
          e = bb[k][b] - best;
          if (e > 255) e = 255;
          checks++;
          if (int'(out_cost[k][b]) != e) begin
            failures++;
            if (failures < 10) $display("t=%0d track %0d bit %0d: got %0d exp %0d", t, k, b, out_cost[k][b], e);
          end
        end
        if (bb[k][0] != bb[k][1]) begin
          checks++;
          if (out_bit[k] != (bb[k][1] < bb[k][0])) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
