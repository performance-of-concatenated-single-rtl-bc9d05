// Sector encoder for both concatenated single-parity coding approaches and
// for uncoded sectors.
//
// A sector has NT recorded tracks of NB bits (8 x 4096 in the document).
//   SCHEME_ALONG (Fig. 1): each of the NT tracks takes NB*9/16 user bits
//     (2304): an odd parity bit after every 3 bits gives L = NB*3/4 bits (3072),
//     the DRP interleaver permutes them, and a second odd parity bit after
//     every 3 interleaved bits gives NB bits.
//   SCHEME_ACROSS (Fig. 2): NT*3/4 data tracks (6) of L user bits each get the
//     along-track parity (L -> NB bits); then, column by column, an odd parity
//     track is added after every 3 data tracks (tracks 3 and 7 of 8).
//   SCHEME_UNCODED: NT x NB user bits are written as they are (the uncoded
//     reference the coded approaches are compared against).
// The coded sector is collected in an NT x NB bit buffer and then streamed
// out track by track, position by position, as it would be written on the
// shingled medium. The order of the user bits is track-major too; in the
// second scheme user track d lands on recorded track d + d/3.
//
// Interface: start (one cycle, with scheme) begins a sector; user bits and
// coded bits are valid/ready streams; done pulses after the last coded bit.
// Rate: one user bit per cycle except while a parity bit is inserted; the
// interleaver adds one pass of L cycles per track in the first scheme, the
// across-track parity one pass of NB cycles per sector in the second.
module tdmr_encoder #(
  parameter int unsigned NT = 8,
  parameter int unsigned NB = 4096,
  parameter int unsigned DRP_M  = 3,
  parameter int unsigned DRP_N  = 5,
  parameter int unsigned DRP_M2 = 17,
  parameter int unsigned DRP_B2 = 1897,
  parameter int unsigned DRP_S  = 1,
  parameter int unsigned DRP_P  = 3,
  localparam int unsigned L   = NB * 3 / 4,
  localparam int unsigned TW  = $clog2(NT + 1),
  localparam int unsigned PW  = $clog2(NB + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  tdmr_pkg::scheme_e   scheme,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic                in_bit,
  output logic                out_valid,
  input  logic                out_ready,
  output logic                out_bit,
  output logic [TW-1:0]       out_track,
  output logic [PW-1:0]       out_pos,
  output logic                done,
  output logic                busy
);
  import tdmr_pkg::*;

  localparam int unsigned ND = NT * 3 / 4;
  localparam int unsigned AW = $clog2(L);

  typedef enum logic [2:0] {IDLE, ENC1, ENC2, PAR, OUT} state_e;

  state_e         state;
  scheme_e        sch;
  logic [TW-1:0]  trk;          // user track being encoded
  logic [PW-1:0]  cnt;          // first-parity output count / position
  logic           sect [NT * NB];

  // recorded track of the current user track
  logic [TW-1:0]  rec_trk;
  assign rec_trk = (sch == SCHEME_ACROSS) ? TW'(int'(trk) + int'(trk) / 3) : trk;

  // ------------------------------------------------------ first parity
  logic e1_in_valid, e1_in_ready, e1_out_valid, e1_out_bit;
  assign e1_in_valid = (state == ENC1) && (sch != SCHEME_UNCODED) && in_valid;
  assign in_ready    = (state == ENC1) && ((sch == SCHEME_UNCODED) || e1_in_ready);

  spc_encoder #(.K(3)) u_enc1 (
    .clk, .rst_n,
    .in_valid(e1_in_valid), .in_ready(e1_in_ready), .in_bit,
    .out_valid(e1_out_valid), .out_ready(1'b1), .out_bit(e1_out_bit)
  );

  // --------------------------------------------------- DRP interleaver
  logic          il_wr_valid, il_rd_start, il_rd_valid, il_rd_ready, il_rd_done;
  logic [AW-1:0] il_rd_idx;
  logic [0:0]    il_rd_data;
  assign il_wr_valid = (state == ENC1) && (sch == SCHEME_ALONG) && e1_out_valid;
  assign il_rd_start = (state == ENC1) && (sch == SCHEME_ALONG) && e1_out_valid
                       && (cnt == PW'(L - 1));

  drp_interleaver #(
    .L(L), .DW(1), .DEINTERLEAVE(1'b0), .R(8), .M(DRP_M), .N(DRP_N),
    .M2(DRP_M2), .B2(DRP_B2), .W(8), .S(DRP_S), .P(DRP_P)
  ) u_il (
    .clk, .rst_n,
    .wr_valid(il_wr_valid), .wr_idx(AW'(cnt)), .wr_data(e1_out_bit),
    .rd_start(il_rd_start), .rd_valid(il_rd_valid), .rd_ready(il_rd_ready),
    .rd_idx(il_rd_idx), .rd_data(il_rd_data), .rd_done(il_rd_done)
  );

  // ----------------------------------------------------- second parity
  logic e2_out_valid, e2_out_bit;
  spc_encoder #(.K(3)) u_enc2 (
    .clk, .rst_n,
    .in_valid(il_rd_valid), .in_ready(il_rd_ready), .in_bit(il_rd_data[0]),
    .out_valid(e2_out_valid), .out_ready(1'b1), .out_bit(e2_out_bit)
  );

  // ---------------------------------------------- across-track parity
  logic [ND-1:0] col_data;
  logic [NT-1:0] col_coded;
  always_comb begin
    for (int d = 0; d < ND; d++) col_data[d] = sect[(d + d / 3) * NB + int'(cnt)];
  end
  across_parity_encoder #(.K(3), .NGROUPS(NT / 4)) u_apar (
    .data_col(col_data), .coded_col(col_coded)
  );

  // ------------------------------------------------------------ output
  logic [TW-1:0] otrk;
  logic [PW-1:0] opos;
  assign out_valid = (state == OUT);
  assign out_bit   = sect[int'(otrk) * NB + int'(opos)];
  assign out_track = otrk;
  assign out_pos   = opos;
  assign busy      = (state != IDLE);

  always_ff @(posedge clk) begin
    if (state == ENC1 && sch == SCHEME_UNCODED && in_valid)
      sect[int'(trk) * NB + int'(cnt)] <= in_bit;
    if (state == ENC1 && sch == SCHEME_ACROSS && e1_out_valid)
      sect[int'(rec_trk) * NB + int'(cnt)] <= e1_out_bit;
    if (state == ENC2 && e2_out_valid)
      sect[int'(trk) * NB + int'(cnt)] <= e2_out_bit;
    if (state == PAR)
      for (int g = 0; g < NT / 4; g++)
        sect[(4 * g + 3) * NB + int'(cnt)] <= col_coded[4 * g + 3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      sch   <= SCHEME_ALONG;
      trk   <= '0;
      cnt   <= '0;
      otrk  <= '0;
      opos  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= ENC1;
          sch   <= scheme;
          trk   <= '0;
          cnt   <= '0;
        end
        ENC1: if (sch == SCHEME_UNCODED) begin
          if (in_valid) begin
            if (cnt == PW'(NB - 1)) begin
              cnt <= '0;
              if (trk == TW'(NT - 1)) begin
                state <= OUT;
                otrk  <= '0;
                opos  <= '0;
              end else trk <= trk + 1'b1;
            end else cnt <= cnt + 1'b1;
          end
        end else if (e1_out_valid) begin
          if (sch == SCHEME_ALONG) begin
            if (cnt == PW'(L - 1)) begin
              state <= ENC2;
              cnt   <= '0;
            end else cnt <= cnt + 1'b1;
          end else begin
            if (cnt == PW'(NB - 1)) begin
              cnt <= '0;
              if (trk == TW'(ND - 1)) state <= PAR;
              else trk <= trk + 1'b1;
            end else cnt <= cnt + 1'b1;
          end
        end
        ENC2: if (e2_out_valid) begin
          if (cnt == PW'(NB - 1)) begin
            cnt <= '0;
            if (trk == TW'(NT - 1)) begin
              state <= OUT;
              otrk  <= '0;
              opos  <= '0;
            end else begin
              trk   <= trk + 1'b1;
              state <= ENC1;
            end
          end else cnt <= cnt + 1'b1;
        end
        PAR: begin
          if (cnt == PW'(NB - 1)) begin
            state <= OUT;
            otrk  <= '0;
            opos  <= '0;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        OUT: if (out_ready) begin
          if (opos == PW'(NB - 1)) begin
            opos <= '0;
            if (otrk == TW'(NT - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else otrk <= otrk + 1'b1;
          end else opos <= opos + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
