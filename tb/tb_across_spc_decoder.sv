// Testbench for across_spc_decoder (two groups of 3 data + 1 parity track):
// random bit costs; the reference enumerates all 256 column vectors, keeps
// those with odd parity in both groups of four tracks, and takes per data
// track and value the best vector. Costs and decisions must match exactly.
module tb_across_spc_decoder;
  import tdmr_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  bit_cost_t [7:0] in_cost;
  bit_cost_t [5:0] out_cost;
  logic [5:0] out_bit;
  int checks = 0, failures = 0;

  across_spc_decoder #(.K(3), .NGROUPS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, c, e, d;
    int bb [6][2];
    in_valid = 0; in_cost = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) for (int b = 0; b < 2; b++) in_cost[k][b] = cost_t'($urandom % 256);
      in_valid = 1;
      best = 1 << 30;
      for (int k = 0; k < 6; k++) begin bb[k][0] = 1 << 30; bb[k][1] = 1 << 30; end
      for (int v = 0; v < 256; v++) begin
        logic [7:0] x;
        x = 8'(v);
        if ($countones(x[3:0]) % 2 == 0 || $countones(x[7:4]) % 2 == 0) continue;
        c = 0;
        for (int k = 0; k < 8; k++) c += in_cost[k][x[k]];
        if (c < best) best = c;
        for (int k = 0; k < 6; k++) begin
          d = (k < 3) ? k : k + 1;
          if (c < bb[k][x[d]]) bb[k][x[d]] = c;
        end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 6; k++) begin
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
