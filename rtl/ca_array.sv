// ca_array: the two-dimensional cell array of the CA simulator.
//
// ROWS x COLS copies of ca_cell, each wired to its four neighbours (the fifth
// neighbour of the model, the cell itself, is its own registers). Row 0 is
// the bottom row, column 0 the leftmost column. A levelled circuit occupies
// the columns in pairs: an even column holds the fanin cells of one level,
// the odd column to its right the fanout cells of the same level. Column 0
// holds one buffer fanin cell per primary input; its left neighbour is the
// pattern port, so pi_valid acts as the NewPipe state of a virtual column -1
// and pi_word[r] is the word it offers to row r. The primary-output cells
// (Detecting / Detected) of the rightmost column drive po_valid / po_word.
//
// Configuration is an addressed write of one cell per clock (cfg_we with
// cfg_col / cfg_row). Fault injection (inj_we) marks the one addressed cell
// as faulty with stuck-at value inj_val, clears the mark everywhere else,
// and returns every primary-output cell to Detecting; with inj_en low no
// cell is marked. col_busy[c] is high while any cell of column c holds work;
// the host can time a single pattern with it to find the pipeline period.
//
// With col_sync high, each column has a ca_colsync that holds every hand-over
// to the next column until all participating cells of the column are done.
//
// Latency: one clock per row a signal travels, one per chained fanin cell,
// one for `done`, one for the NewPipe hand-over to the next column. The
// array geometry follows the published model; the addressed configuration
// port, the fault-injection port and col_busy are this design's own.
module ca_array
  import ca_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration
  input  logic                   cfg_we,
  input  logic [CW-1:0]          cfg_col,
  input  logic [RW-1:0]          cfg_row,
  input  cell_cfg_t              cfg_data,
  // fault injection
  input  logic                   inj_we,
  input  logic                   inj_en,
  input  logic [CW-1:0]          inj_col,
  input  logic [RW-1:0]          inj_row,
  input  logic                   inj_val,
  input  logic                   fault_mode,
  input  logic                   col_sync,
  // patterns in (left edge)
  input  logic                   pi_valid,
  input  word_t [ROWS-1:0]       pi_word,
  // results out (right edge)
  output logic [ROWS-1:0]        po_valid,
  output word_t [ROWS-1:0]       po_word,
  output logic [ROWS-1:0]        po_detected,
  output logic                   any_detected,
  output logic [COLS-1:0]        col_busy
);

  // neighbour nets, indexed [column][row]
  logic   newpipe   [COLS][ROWS];
  word_t  word      [COLS][ROWS];
  logic   done      [COLS][ROWS];
  cnt_t   fanout_no [COLS][ROWS];
  token_t up_out    [COLS][ROWS];
  token_t dn_out    [COLS][ROWS];
  logic   take_bel  [COLS][ROWS];
  logic   acc_v     [COLS][ROWS];
  word_t  acc       [COLS][ROWS];
  logic   pov       [COLS][ROWS];
  logic [COLS-1:0][ROWS-1:0] det;
  logic [COLS-1:0][ROWS-1:0] busy;
  logic [COLS-1:0][ROWS-1:0] sync_ok;
  logic [COLS-1:0][ROWS-1:0] sync_cmp;
  logic [COLS-1:0]           col_rel;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      logic   l_newpipe, l_done, bel_acc_v, abv_take;
      word_t  l_word, bel_acc;
      cnt_t   l_fanout_no;
      token_t up_in, dn_in;

      if (c == 0) begin : g_left_edge
        assign l_newpipe   = pi_valid;
        assign l_word      = pi_word[r];
        assign l_done      = 1'b0;
        assign l_fanout_no = '0;
      end else begin : g_left
        assign l_newpipe   = newpipe[c-1][r];
        assign l_word      = word[c-1][r];
        assign l_done      = done[c-1][r];
        assign l_fanout_no = fanout_no[c-1][r];
      end

      if (r == 0) begin : g_bottom_edge
        assign up_in     = '0;
        assign bel_acc_v = 1'b0;
        assign bel_acc   = '0;
      end else begin : g_below
        assign up_in     = up_out[c][r-1];
        assign bel_acc_v = acc_v[c][r-1];
        assign bel_acc   = acc[c][r-1];
      end

      if (r == ROWS - 1) begin : g_top_edge
        assign dn_in    = '0;
        assign abv_take = 1'b0;
      end else begin : g_above
        assign dn_in    = dn_out[c][r+1];
        assign abv_take = take_bel[c][r+1];
      end

      ca_cell u_cell (
        .clk         (clk),
        .rst_n       (rst_n),
        .cfg_we      (cfg_we && (cfg_col == CW'(c)) && (cfg_row == RW'(r))),
        .cfg_in      (cfg_data),
        .inj_we      (inj_we),
        .inj_sel     (inj_en && (inj_col == CW'(c)) && (inj_row == RW'(r))),
        .inj_val     (inj_val),
        .fault_mode  (fault_mode),
        .col_sync    (col_sync),
        .col_rel     (col_rel[c]),
        .l_newpipe   (l_newpipe),
        .l_word      (l_word),
        .l_done      (l_done),
        .l_fanout_no (l_fanout_no),
        .newpipe     (newpipe[c][r]),
        .word_o      (word[c][r]),
        .done        (done[c][r]),
        .fanout_no_o (fanout_no[c][r]),
        .up_in       (up_in),
        .up_out      (up_out[c][r]),
        .dn_in       (dn_in),
        .dn_out      (dn_out[c][r]),
        .bel_acc_v   (bel_acc_v),
        .bel_acc     (bel_acc),
        .take_bel    (take_bel[c][r]),
        .acc_v_o     (acc_v[c][r]),
        .acc_o       (acc[c][r]),
        .abv_take    (abv_take),
        .po_valid    (pov[c][r]),
        .detected    (det[c][r]),
        .sync_ok     (sync_ok[c][r]),
        .sync_cmp    (sync_cmp[c][r]),
        .busy        (busy[c][r])
      );
    end
    assign col_busy[c] = |busy[c];

    ca_colsync #(.ROWS(ROWS)) u_sync (
      .en  (col_sync),
      .ok  (sync_ok[c]),
      .cmp (sync_cmp[c]),
      .rel (col_rel[c])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_out
    assign po_valid[r]    = pov[COLS-1][r];
    assign po_word[r]     = word[COLS-1][r];
    assign po_detected[r] = det[COLS-1][r];
  end
  assign any_detected = |det;

  initial begin
    assert (ROWS <= 2 ** (REG_W - 1))
      else $error("ROWS must fit the signed %0d-bit offset register", REG_W);
  end

endmodule
