// Dithered relative prime (DRP) interleaver / de-interleaver frame buffer.
//
// The permutation is the document's three stages, Eq. (1)-(3), computed by
// tdmr_pkg::drp_index: a read dither inside blocks of R positions, a relative
// prime step (M2 + B2*i) mod L over the whole frame, and a write dither inside
// blocks of W positions. L = 3072 (one track after the first parity) and
// R = 8 are the document's values; the offsets and multipliers M, N, M2, B2, S,
// P and the write dither length W are not given and are chosen here so that
// every stage is a permutation (N and P odd, B2 prime to L).
//
// The buffer holds one frame of DW-bit entries (DW = 1 for coded bits in the
// encoder, DW = 4 costs for soft symbols in the decoder):
//   interleaver   (DEINTERLEAVE = 0): entry i is written to address pi(i) and
//                 the frame is read out in address order.
//   de-interleaver (DEINTERLEAVE = 1): entry k is written to address k and
//                 read-out position a fetches address pi(a), undoing the above.
// Writes give their frame position wr_idx. A pulse on rd_start then streams
// the whole frame out (valid/ready, one entry per cycle when ready is high,
// asynchronous memory read), ending with a one-cycle rd_done. The caller must
// not write while a read-out is running.
module drp_interleaver #(
  parameter int unsigned L            = 3072,
  parameter int unsigned DW           = 1,
  parameter bit          DEINTERLEAVE = 1'b0,
  parameter int unsigned R            = 8,
  parameter int unsigned M            = 3,
  parameter int unsigned N            = 5,
  parameter int unsigned M2           = 17,
  parameter int unsigned B2           = 1897,
  parameter int unsigned W            = 8,
  parameter int unsigned S            = 1,
  parameter int unsigned P            = 3,
  localparam int unsigned AW          = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  logic [AW-1:0] wr_idx,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_start,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [AW-1:0] rd_idx,
  output logic [DW-1:0] rd_data,
  output logic          rd_done
);
  import tdmr_pkg::*;

  logic [DW-1:0] mem [L];
  logic [AW-1:0] rcnt;
  logic          reading;
  logic [AW-1:0] waddr, raddr;

  function automatic logic [AW-1:0] perm(input logic [AW-1:0] i);
    return AW'(drp_index(int'(i), L, R, M, N, M2, B2, W, S, P));
  endfunction

  assign waddr    = DEINTERLEAVE ? wr_idx : perm(wr_idx);
  assign raddr    = DEINTERLEAVE ? perm(rcnt) : rcnt;
  assign rd_valid = reading;
  assign rd_idx   = rcnt;
  assign rd_data  = mem[raddr];

  always_ff @(posedge clk) begin
    if (wr_valid) mem[waddr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading <= 1'b0;
      rcnt    <= '0;
      rd_done <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      if (!reading) begin
        if (rd_start) begin
          reading <= 1'b1;
          rcnt    <= '0;
        end
      end else if (rd_ready) begin
        if (rcnt == AW'(L - 1)) begin
          reading <= 1'b0;
          rd_done <= 1'b1;
        end
        rcnt <= rcnt + 1'b1;
      end
    end
  end

endmodule
