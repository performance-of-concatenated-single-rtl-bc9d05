// Testbench for drp_interleaver at the document's frame length L = 3072.
// The reference permutation is computed here from Eq. (1)-(3) independently
// of the design and is first checked to be a permutation. A frame of entries
// holding their own index goes through an interleaver instance, whose output
// order must follow the permutation, then through a de-interleaver instance,
// which must restore the original order. The read-out must take L cycles.
module tb_drp_interleaver;
  localparam int L = 3072, DW = 12, AW = 12;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int perm [L];
  int inv  [L];
  bit seen [L];

  logic          i_wr_valid, i_rd_start, i_rd_valid, i_rd_done;
  logic [AW-1:0] i_wr_idx, i_rd_idx;
  logic [DW-1:0] i_wr_data, i_rd_data;
  logic          d_rd_start, d_rd_valid, d_rd_done;
  logic [AW-1:0] d_rd_idx;
  logic [DW-1:0] d_rd_data;

  drp_interleaver #(.L(L), .DW(DW), .DEINTERLEAVE(1'b0)) u_il (
    .clk, .rst_n, .wr_valid(i_wr_valid), .wr_idx(i_wr_idx), .wr_data(i_wr_data),
    .rd_start(i_rd_start), .rd_valid(i_rd_valid), .rd_ready(1'b1),
    .rd_idx(i_rd_idx), .rd_data(i_rd_data), .rd_done(i_rd_done));

  drp_interleaver #(.L(L), .DW(DW), .DEINTERLEAVE(1'b1)) u_dil (
    .clk, .rst_n, .wr_valid(i_rd_valid), .wr_idx(i_rd_idx), .wr_data(i_rd_data),
    .rd_start(d_rd_start), .rd_valid(d_rd_valid), .rd_ready(1'b1),
    .rd_idx(d_rd_idx), .rd_data(d_rd_data), .rd_done(d_rd_done));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, q, cyc;
    // reference: read dither R=8 (m=3, n=5), relative prime (m'=17, b'=1897),
    // write dither W=8 (s=1, p=3)
    for (int i = 0; i < L; i++) begin
      r = (i / 8) * 8 + (3 + 5 * i) % 8;
      q = (17 + 1897 * r) % L;
      perm[i] = (q / 8) * 8 + (1 + 3 * q) % 8;
    end
    for (int i = 0; i < L; i++) begin
      if (seen[perm[i]]) failures++;
      seen[perm[i]] = 1;
      inv[perm[i]] = i;
    end
    checks++;
    i_wr_valid = 0; i_wr_idx = 0; i_wr_data = 0; i_rd_start = 0; d_rd_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      i_wr_valid = 1; i_wr_idx = AW'(i); i_wr_data = DW'(i);
    end
    @(negedge clk);
    i_wr_valid = 0; i_rd_start = 1;
    @(negedge clk);
    i_rd_start = 0;
    cyc = 0;
    while (!i_rd_done) begin
      if (i_rd_valid) begin
        checks++;
        if (int'(i_rd_data) != inv[i_rd_idx]) begin
          failures++;
          if (failures < 10) $display("il pos %0d: got %0d exp %0d", i_rd_idx, i_rd_data, inv[i_rd_idx]);
        end
        cyc++;
      end
      @(negedge clk);
    end
    checks++;
    if (cyc != L) begin failures++; $display("interleaver read took %0d cycles", cyc); end
    d_rd_start = 1;
    @(negedge clk);
    d_rd_start = 0;
    while (!d_rd_done) begin
      if (d_rd_valid) begin
        checks++;
        if (d_rd_data != d_rd_idx) begin
          failures++;
          if (failures < 10) $display("dil pos %0d: got %0d", d_rd_idx, d_rd_data);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
