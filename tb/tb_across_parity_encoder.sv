// Testbench for across_parity_encoder: all 64 data columns of the 6-track
// configuration; the data tracks must be copied to recorded tracks 0-2 and 4-6
// and each group of four recorded tracks must have an odd number of ones.
module tb_across_parity_encoder;
  logic [5:0] data_col;
  logic [7:0] coded_col;
  int checks = 0, failures = 0;

  across_parity_encoder #(.K(3), .NGROUPS(2)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      data_col = 6'(v);
      #1;
      checks += 3;
      if (coded_col[2:0] != data_col[2:0] || coded_col[6:4] != data_col[5:3]) failures++;
      if ($countones(coded_col[3:0]) % 2 != 1) failures++;
      if ($countones(coded_col[7:4]) % 2 != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
