// Bit-serial odd single-parity-check encoder.
//
// After every K data bits (K = 3, the document's code) it inserts one parity
// bit chosen so that the K+1 bits hold an odd number of ones; the document
// picks odd parity because it also limits runs of equal bits on the medium.
// Data bits pass straight through (combinational valid/ready path); while the
// parity bit is being emitted, in_ready is low for one accepted output, so the
// output stream runs at (K+1)/K of the input rate. The same encoder serves the
// first and the second along-track parity of both coding approaches.
//
// Interface: valid/ready streams, one bit per transfer. Reset (active low)
// restarts the code-word count, so a frame must start on a code-word boundary.
module spc_encoder #(
  parameter int unsigned K = 3     // data bits per parity bit
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);
  localparam int unsigned CNTW = $clog2(K + 1);

  logic [CNTW-1:0] cnt;   // data bits of the current word already sent
  logic            par;   // XOR of those bits
  logic            emit_parity;

  assign emit_parity = (cnt == CNTW'(K));

  always_comb begin
    if (emit_parity) begin
      out_valid = 1'b1;
      out_bit   = ~par;
      in_ready  = 1'b0;
    end else begin
      out_valid = in_valid;
      out_bit   = in_bit;
      in_ready  = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      par <= 1'b0;
    end else if (out_valid && out_ready) begin
      if (emit_parity) begin
        cnt <= '0;
        par <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
        par <= par ^ in_bit;
      end
    end
  end

endmodule
