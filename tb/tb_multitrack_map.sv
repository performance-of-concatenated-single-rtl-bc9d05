// Testbench for multitrack_map on short frames (NB = 64, same trellis as the
// full size). Two tracks of random odd-parity code words (or a guard track of
// zeros) are turned into equalized read-back samples by a model of the target
// [0.4 1 1 0.4] with ITI weights [1.0 0.5], plus +-1 LSB of noise. For every
// position the symbol with the lowest cost must be the written one and have
// cost 0; outputs must come in descending position order, one per cycle, and
// the whole frame must take 2*NB + 1 cycles from start to done. Uncoded frames
// (parity_en low, random bits at the parity positions) are run as well.
module tb_multitrack_map;
  import tdmr_pkg::*;
  localparam int NB = 64;
  logic clk = 0, rst_n = 0;
  logic start, guard_main, guard_side, parity_en, in_valid, in_ready, out_valid, done, busy;
  logic [6:0] iti_main, iti_side;
  logic signed [7:0] in_sample;
  logic [5:0] out_pos;
  sym_cost_t out_cost;
  int checks = 0, failures = 0;
  bit xm [NB], xs [NB];

  multitrack_map #(.NB(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_track(output bit x [NB], input bit guard, input bit pe);
    int ones;
    for (int i = 0; i < NB; i += 4) begin
      ones = 0;
      for (int k = 0; k < 3; k++) begin
        x[i+k] = guard ? 1'b0 : 1'($urandom);
        ones += x[i+k];
      end
      x[i+3] = guard ? 1'b0 : pe ? (ones % 2 == 0) : 1'($urandom);
    end
  endfunction

  function automatic int sample(int i, real wm, real ws);
    real taps [4] = '{0.4, 1.0, 1.0, 0.4};
    real y;
    real am, as_;
    y = 0.0;
    for (int k = 0; k < 4; k++) begin
      am  = (i - k >= 0 && xm[i-k]) ? 1.0 : -1.0;
      as_ = (i - k >= 0 && xs[i-k]) ? 1.0 : -1.0;
      y += taps[k] * (wm * am + ws * as_);
    end
    return int'($rtoi(y * 16.0 + (y >= 0 ? 0.5 : -0.5))) + int'($urandom % 3) - 1;
  endfunction

  task automatic run(input bit gm, input bit gs, input bit pe = 1'b1);
    int cyc, nout, expect_pos, best, bestv;
    make_track(xm, gm, pe);
    make_track(xs, gs, pe);
    @(negedge clk);
    start = 1; guard_main = gm; guard_side = gs; parity_en = pe;
    @(negedge clk);
    start = 0;
    cyc = 1; nout = 0; expect_pos = NB - 1;
    for (int i = 0; i < NB; i++) begin
      in_valid = 1; in_sample = 8'(sample(i, 1.0, 0.5));
      checks++;
      if (!in_ready) failures++;
      @(negedge clk); cyc++;
    end
    in_valid = 0;
    while (!done && cyc < 4 * NB) begin
      if (out_valid) begin
        logic [1:0] truth;
        truth = {xs[out_pos], xm[out_pos]};
        checks += 3;
        if (int'(out_pos) != expect_pos) failures++;
        best = 1 << 30; bestv = 0;
        for (int v = 0; v < 4; v++) if (out_cost[v] < best) begin best = out_cost[v]; bestv = v; end
        if (bestv != truth) begin
          failures++;
          if (failures < 10) $display("pos %0d: decided %0d written %0d costs %p", out_pos, bestv, truth, out_cost);
        end
        if (out_cost[truth] != 0) failures++;
        expect_pos--; nout++;
      end
      @(negedge clk); cyc++;
    end
    if (out_valid) nout++;   // last output arrives together with done
    checks += 2;
    if (nout != NB) begin failures++; $display("got %0d outputs", nout); end
    if (cyc != 2 * NB + 1) begin failures++; $display("frame took %0d cycles", cyc); end
  endtask

  initial begin
    start = 0; guard_main = 0; guard_side = 0; parity_en = 1; in_valid = 0; in_sample = 0;
    iti_main = 7'd64; iti_side = 7'd32;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (6) run(1'b0, 1'b0);
    repeat (3) run(1'b0, 1'b1);
    repeat (3) run(1'b1, 1'b0);
    repeat (3) run(1'b0, 1'b0, 1'b0);
    repeat (2) run(1'b0, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
