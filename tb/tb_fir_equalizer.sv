// Testbench for fir_equalizer with 12 taps: random coefficients and samples,
// compared every cycle with a reference convolution (rounded, saturated)
// computed here; checks the one-cycle latency and that clear empties the
// delay line.
module tb_fir_equalizer;
  localparam int NT = 12, IW = 8, CWID = 10, CFRAC = 7, OW = 8;
  logic clk = 0, rst_n = 0, clear, in_valid, out_valid;
  logic signed [NT-1:0][CWID-1:0] coef;
  logic signed [IW-1:0] in_sample;
  logic signed [OW-1:0] out_sample;
  int checks = 0, failures = 0;
  int hist [$];
  int c [NT];

  fir_equalizer #(.NTAPS(NT), .IW(IW), .CWID(CWID), .CFRAC(CFRAC), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_out();
    longint acc;
    acc = 0;
    for (int k = 0; k < NT; k++) if (k < hist.size()) acc += longint'(hist[hist.size() - 1 - k]) * c[k];
    acc = (acc + (1 << (CFRAC - 1))) >>> CFRAC;
    if (acc > 127) acc = 127;
    if (acc < -128) acc = -128;
    return int'(acc);
  endfunction

  initial begin
    int e;
    clear = 0; in_valid = 0; in_sample = 0;
    for (int k = 0; k < NT; k++) begin
      c[k] = int'($urandom % 161) - 80;
      coef[k] = CWID'(c[k]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n == 200) begin
        clear = 1; in_valid = 0; hist.delete();
        @(negedge clk);
        clear = 0;
      end
      in_valid = ($urandom % 5 != 0);
      in_sample = IW'(int'($urandom % 121) - 60);
      if (in_valid) begin
        hist.push_back(int'(in_sample));
        e = expect_out();
      end
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) failures++;
      if (in_valid) begin
        checks++;
        if (int'(out_sample) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d exp %0d", n, out_sample, e);
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
