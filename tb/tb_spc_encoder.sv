// Testbench for spc_encoder: random valid/ready traffic; every output bit is
// compared with a reference stream built in the testbench (three data bits,
// then the bit that makes the four odd). Also checks the full-rate case:
// with input and output always ready, 4 output bits per 3 input bits.
module tb_spc_encoder;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit;
  int checks = 0, failures = 0;
  bit ref_q[$];
  bit data[$];
  int ones;

  spc_encoder #(.K(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nwords, input bit random_flow);
    int sent, got, cyc;
    bit b;
    data.delete(); ref_q.delete();
    for (int w = 0; w < nwords; w++) begin
      ones = 0;
      for (int k = 0; k < 3; k++) begin
        b = 1'($urandom);
        data.push_back(b); ref_q.push_back(b); ones += b;
      end
      ref_q.push_back((ones % 2) == 0);   // odd total
    end
    sent = 0; got = 0; cyc = 0;
    in_valid = 0; out_ready = 0; in_bit = 0;
    while (got < nwords * 4) begin
      in_valid  = (sent < data.size()) && (!random_flow || ($urandom % 4 != 0));
      in_bit    = (sent < data.size()) ? data[sent] : 1'b0;
      out_ready = !random_flow || ($urandom % 3 != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_bit !== ref_q[got]) begin
          failures++;
          if (failures < 10) $display("mismatch at bit %0d: got %0d exp %0d", got, out_bit, ref_q[got]);
        end
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(posedge clk); #1;
      cyc++;
    end
    if (!random_flow) begin
      checks++;
      if (cyc != nwords * 4) begin
        failures++;
        $display("rate: %0d cycles for %0d output bits", cyc, nwords * 4);
      end
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_bit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(200, 1'b0);
    run(300, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
