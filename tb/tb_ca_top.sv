// tb_ca_top: end-to-end test of the CA simulator at a reduced array size
// (16 rows, 12 columns = 6 levels): random layered networks, pipelined logic
// simulation and fault simulation. See tb_ca_top_body.svh for the flow.
module tb_ca_top;
  import ca_pkg::*;
  import tb_ln_pkg::*;

  localparam int ROWS = 16;
  localparam int COLS = 12;
  localparam int NETS = 6;
  localparam int PATS = 12;
  localparam int FAULTS = 6;
  localparam int MAXN_LVL = 5;
  localparam int WATCHDOG = 400000;
  localparam int RW = $clog2(ROWS);
  localparam int CW = $clog2(COLS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_we = 0, inj_we = 0, inj_en = 0, inj_val = 0, fault_mode = 0, col_sync = 0, s_valid = 0;
  logic [CW-1:0] cfg_col = '0, inj_col = '0;
  logic [RW-1:0] cfg_row = '0, inj_row = '0;
  cell_cfg_t cfg_data = '0;
  logic [15:0] t_d = 16'd1;
  logic [ROWS-1:0] po_mask = '0;
  word_t [ROWS-1:0] s_word = '0, m_word;
  logic s_ready, m_valid, m_detected, any_detected;
  logic [31:0] n_issued, n_done;
  logic [COLS-1:0] col_busy;

  ca_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  `include "tb_ca_top_body.svh"
endmodule
