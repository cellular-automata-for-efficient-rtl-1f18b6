// ca_top: cellular-automaton logic and fault simulation engine.
//
// A combinational gate netlist, levelled and laid out by host software, is
// preloaded into a ROWS x COLS array of cells (ca_array). Patterns then
// stream through the array column by column: every column works on one
// pattern while the columns to its right work on earlier ones, and every
// machine word carries WORD_W patterns at once. In fault mode the low half of
// each word simulates the good machine and the high half the machine with the
// injected stuck-at fault; the primary-output cells compare the halves.
//
// Interface: the host writes cell configurations one per clock (cfg_*),
// chooses a fault site (inj_*), sets the pipeline period t_d and the rows of
// the primary outputs (po_mask), then streams patterns in (s_*) and reads
// results (m_*). ca_ctrl spaces patterns t_d clocks apart and gathers the
// outputs; col_busy lets the host time one pattern through each column.
// col_sync selects column synchronisation: every column hands its results
// to the next one in a single clock once all its cells are done.
module ca_top
  import ca_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CW-1:0]     cfg_col,
  input  logic [RW-1:0]     cfg_row,
  input  cell_cfg_t         cfg_data,
  input  logic              inj_we,
  input  logic              inj_en,
  input  logic [CW-1:0]     inj_col,
  input  logic [RW-1:0]     inj_row,
  input  logic              inj_val,
  input  logic              fault_mode,
  input  logic              col_sync,
  input  logic [15:0]       t_d,
  input  logic [ROWS-1:0]   po_mask,
  input  logic              s_valid,
  output logic              s_ready,
  input  word_t [ROWS-1:0]  s_word,
  output logic              m_valid,
  output word_t [ROWS-1:0]  m_word,
  output logic              m_detected,
  output logic              any_detected,
  output logic [31:0]       n_issued,
  output logic [31:0]       n_done,
  output logic [COLS-1:0]   col_busy
);

  logic             pi_valid;
  word_t [ROWS-1:0] pi_word;
  logic [ROWS-1:0]  po_valid, po_detected;
  word_t [ROWS-1:0] po_word;

  ca_ctrl #(.ROWS(ROWS)) u_ctrl (
    .clk, .rst_n, .t_d, .po_mask,
    .s_valid, .s_ready, .s_word,
    .pi_valid, .pi_word, .po_valid, .po_word, .po_detected,
    .m_valid, .m_word, .m_detected, .n_issued, .n_done
  );

  ca_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n,
    .cfg_we, .cfg_col, .cfg_row, .cfg_data,
    .inj_we, .inj_en, .inj_col, .inj_row, .inj_val, .fault_mode, .col_sync,
    .pi_valid, .pi_word,
    .po_valid, .po_word, .po_detected, .any_detected, .col_busy
  );

endmodule
