// Sector detector / decoder for both concatenated single-parity approaches and
// for uncoded sectors.
//
// A sector of NT recorded tracks is read by NR = NT+1 readers. Reader r sees
// track r as its main track and track r-1 as the interfering side track;
// reader 0's side track and reader NT's main track are the guard bands (all
// zeros) around the sector. The readers' samples arrive one reader after the
// other, NB samples each, and each reader passes through:
//   fir_equalizer -> multitrack_map (64-state joint detector that also applies
//   the parity at every fourth position) -> parity positions removed ->
//   SCHEME_ALONG  (Fig. 1): drp_interleaver used as de-interleaver, then
//                 spc_app_decoder for the first parity (L -> L*3/4 positions);
//   SCHEME_ACROSS (Fig. 2): nothing more (L positions);
//   SCHEME_UNCODED: no parity anywhere, all NB positions are kept.
// The resulting pair-symbol costs are saved per reader in the column store.
// When all readers are done, every column (one along-track position of all
// readers) goes through across_track_map, which removes the ITI and decides
// each track's bit, and in SCHEME_ACROSS through across_spc_decoder, which
// decodes the across-track parity and drops the parity tracks.
//
// Interface: start (one cycle) latches scheme and ITI weights; samples are a
// valid/ready stream (in_ready is low while a reader's backward pass and
// de-interleaving run: the input stalls); decoded columns come out one per
// cycle on out_valid with their position out_col, without back-pressure.
// out_bits holds all NT tracks in SCHEME_ALONG and SCHEME_UNCODED and the
// NT*3/4 data tracks in its low bits (upper bits 0) in SCHEME_ACROSS. done pulses after the last
// column. Per reader about 2*NB cycles (+ L in SCHEME_ALONG), then one cycle
// per column plus a pipeline of 2-3 cycles.
module tdmr_decoder #(
  parameter int unsigned NT     = 8,
  parameter int unsigned NB     = 4096,
  parameter int unsigned SW     = 8,
  parameter int unsigned NTAPS  = 12,
  parameter int unsigned CWID   = 10,
  parameter int unsigned CFRAC  = 7,
  parameter int unsigned DRP_M  = 3,
  parameter int unsigned DRP_N  = 5,
  parameter int unsigned DRP_M2 = 17,
  parameter int unsigned DRP_B2 = 1897,
  parameter int unsigned DRP_S  = 1,
  parameter int unsigned DRP_P  = 3,
  localparam int unsigned L     = NB * 3 / 4,
  localparam int unsigned CLW   = $clog2(NB + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  tdmr_pkg::scheme_e             scheme,
  input  logic [6:0]                    iti_main,
  input  logic [6:0]                    iti_side,
  input  logic signed [NTAPS-1:0][CWID-1:0] eq_coef,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [SW-1:0]          in_sample,
  output logic                          out_valid,
  output logic [CLW-1:0]                out_col,
  output logic [NT-1:0]                 out_bits,
  output logic                          done,
  output logic                          busy
);
  import tdmr_pkg::*;

  localparam int unsigned NR = NT + 1;
  localparam int unsigned ND = NT * 3 / 4;
  localparam int unsigned RW = $clog2(NR + 1);
  localparam int unsigned PW = $clog2(NB);
  localparam int unsigned AW = $clog2(L);
  localparam int unsigned NW = $clog2(NB + 1);

  typedef enum logic [2:0] {IDLE, R_START, R_FEED, R_DEINT, R_DRAIN, COLS, FLUSH} state_e;

  state_e        state;
  scheme_e       sch;
  logic [RW-1:0] rdr;         // reader being processed
  logic [NW-1:0] fed;         // samples accepted for this reader
  logic [CLW-1:0] col;        // column being read out
  logic [CLW-1:0] ncols;
  logic          g_side, g_main;

  sym_cost_t     app_ram [NB][NR];   // saved pair-symbol costs, per column and reader

  assign g_side = (rdr == '0);
  assign g_main = (rdr == RW'(NT));
  assign busy   = (state != IDLE);

  // ------------------------------------------------------ equalizer + MAP
  logic                 eq_valid;
  logic signed [SW-1:0] eq_sample;
  logic                 mt_in_ready, mt_out_valid, mt_done;
  logic [PW-1:0]        mt_out_pos;
  sym_cost_t            mt_out_cost;

  assign in_ready = (state == R_FEED) && (fed < NW'(NB));

  fir_equalizer #(.NTAPS(NTAPS), .IW(SW), .CWID(CWID), .CFRAC(CFRAC), .OW(SW)) u_eq (
    .clk, .rst_n, .clear(state == R_START), .coef(eq_coef),
    .in_valid(in_valid && in_ready), .in_sample,
    .out_valid(eq_valid), .out_sample(eq_sample)
  );

  multitrack_map #(.NB(NB), .SW(SW)) u_map (
    .clk, .rst_n, .start(state == R_START),
    .guard_main(g_main), .guard_side(g_side), .parity_en(sch != SCHEME_UNCODED),
    .iti_main, .iti_side,
    .in_valid(eq_valid), .in_ready(mt_in_ready), .in_sample(eq_sample),
    .out_valid(mt_out_valid), .out_pos(mt_out_pos), .out_cost(mt_out_cost),
    .done(mt_done), .busy()
  );

  // drop the second (outermost) parity: positions 3, 7, 11, ...
  logic          keep;
  logic [PW-1:0] kidx;
  assign keep = mt_out_valid && ((mt_out_pos[1:0] != 2'd3) || sch == SCHEME_UNCODED);
  assign kidx = (sch == SCHEME_UNCODED) ? PW'(mt_out_pos)
              : PW'(3 * (int'(mt_out_pos) >> 2) + int'(mt_out_pos[1:0]));

  // ------------------------------------------- de-interleaver + SPC decoder
  logic          di_rd_valid, di_rd_done;
  logic [AW-1:0] di_rd_idx;
  sym_cost_t     di_rd_data;
  sym_cost_t [3:0] grp;
  logic          sd_in_valid, sd_out_valid;
  sym_cost_t [2:0] sd_out_cost;
  logic [AW-1:0] sd_word, sd_word_q;

  drp_interleaver #(
    .L(L), .DW($bits(sym_cost_t)), .DEINTERLEAVE(1'b1), .R(8), .M(DRP_M), .N(DRP_N),
    .M2(DRP_M2), .B2(DRP_B2), .W(8), .S(DRP_S), .P(DRP_P)
  ) u_dil (
    .clk, .rst_n,
    .wr_valid(keep && sch == SCHEME_ALONG), .wr_idx(AW'(kidx)), .wr_data(mt_out_cost),
    .rd_start(mt_done && sch == SCHEME_ALONG), .rd_valid(di_rd_valid), .rd_ready(1'b1),
    .rd_idx(di_rd_idx), .rd_data(di_rd_data), .rd_done(di_rd_done)
  );

  // collect code words of four de-interleaved positions
  always_ff @(posedge clk) begin
    if (di_rd_valid) grp[di_rd_idx[1:0]] <= di_rd_data;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_in_valid <= 1'b0;
      sd_word     <= '0;
      sd_word_q   <= '0;
    end else begin
      sd_in_valid <= di_rd_valid && (di_rd_idx[1:0] == 2'd3);
      sd_word     <= di_rd_idx >> 2;
      sd_word_q   <= sd_word;
    end
  end

  spc_app_decoder u_spc (
    .clk, .rst_n, .guard_main(g_main), .guard_side(g_side),
    .in_valid(sd_in_valid), .in_cost(grp),
    .out_valid(sd_out_valid), .out_cost(sd_out_cost)
  );

  always_ff @(posedge clk) begin
    if (keep && sch != SCHEME_ALONG) app_ram[kidx][rdr] <= mt_out_cost;
    if (sd_out_valid)
      for (int k = 0; k < 3; k++) app_ram[3 * int'(sd_word_q) + k][rdr] <= sd_out_cost[k];
  end

  // ------------------------------------------------ across-track stages
  logic            at_in_valid, at_out_valid, as_out_valid;
  sym_cost_t [NT:0] at_in_cost;
  bit_cost_t [NT-1:0] at_out_cost;
  logic [NT-1:0]   at_out_bit;
  bit_cost_t [ND-1:0] as_out_cost;
  logic [ND-1:0]   as_out_bit;
  logic [CLW-1:0]  col_q1, col_q2;

  assign at_in_valid = (state == COLS);
  always_comb begin
    for (int r = 0; r < NR; r++) at_in_cost[r] = app_ram[PW'(col)][r];
  end

  across_track_map #(.NT(NT)) u_atm (
    .clk, .rst_n, .in_valid(at_in_valid), .in_cost(at_in_cost),
    .out_valid(at_out_valid), .out_cost(at_out_cost), .out_bit(at_out_bit)
  );

  across_spc_decoder #(.K(3), .NGROUPS(NT / 4)) u_asd (
    .clk, .rst_n, .in_valid(at_out_valid && sch == SCHEME_ACROSS), .in_cost(at_out_cost),
    .out_valid(as_out_valid), .out_cost(as_out_cost), .out_bit(as_out_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q1 <= '0;
      col_q2 <= '0;
    end else begin
      col_q1 <= col;
      col_q2 <= col_q1;
    end
  end

  always_comb begin
    if (sch != SCHEME_ACROSS) begin
      out_valid = at_out_valid;
      out_col   = col_q1;
      out_bits  = at_out_bit;
    end else begin
      out_valid = as_out_valid;
      out_col   = col_q2;
      out_bits  = NT'(as_out_bit);
    end
  end

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      sch   <= SCHEME_ALONG;
      rdr   <= '0;
      fed   <= '0;
      col   <= '0;
      ncols <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sch   <= scheme;
          ncols <= (scheme == SCHEME_ALONG) ? CLW'(L * 3 / 4) :
                   (scheme == SCHEME_ACROSS) ? CLW'(L) : CLW'(NB);
          rdr   <= '0;
          state <= R_START;
        end
        R_START: begin
          fed   <= '0;
          state <= R_FEED;
        end
        R_FEED: begin
          if (in_valid && in_ready) fed <= fed + 1'b1;
          if (mt_done) state <= (sch == SCHEME_ALONG) ? R_DEINT : R_DRAIN;
        end
        R_DEINT: if (di_rd_done) state <= R_DRAIN;
        R_DRAIN: if (!sd_in_valid && !sd_out_valid) begin
          if (rdr == RW'(NT)) begin
            state <= COLS;
            col   <= '0;
          end else begin
            rdr   <= rdr + 1'b1;
            state <= R_START;
          end
        end
        COLS: begin
          if (col == ncols - 1'b1) state <= FLUSH;
          col <= col + 1'b1;
        end
        FLUSH: if (!at_out_valid && !as_out_valid) begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
