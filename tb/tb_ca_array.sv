// tb_ca_array: self-checking test of the cell array with random layered
// networks.
//
// For each of several random networks the array is configured cell by cell,
// then patterns are applied one at a time: logic simulation (all 8 bits are
// independent patterns) is checked word for word against a levelled
// reference evaluation, and fault simulation (both halves carry the same 4
// patterns, one random fanin line stuck in the high half) is checked for the
// output words and the Detected flags. A single pattern must also finish
// within a bound derived from the array size.
module tb_ca_array;
  import ca_pkg::*;
  import tb_ln_pkg::*;

  localparam int ROWS = 16;
  localparam int COLS = 8;
  localparam int RW = $clog2(ROWS);
  localparam int CW = $clog2(COLS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_we = 0, inj_we = 0, inj_en = 0, inj_val = 0, fault_mode = 0, col_sync = 0, pi_valid = 0;
  logic [CW-1:0] cfg_col = '0, inj_col = '0;
  logic [RW-1:0] cfg_row = '0, inj_row = '0;
  cell_cfg_t cfg_data = '0;
  word_t [ROWS-1:0] pi_word = '0;
  logic [ROWS-1:0] po_valid, po_detected;
  word_t [ROWS-1:0] po_word;
  logic any_detected;
  logic [COLS-1:0] col_busy;

  ca_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        cfg_we = 1; cfg_col = CW'(c); cfg_row = RW'(r); cfg_data = cfg[c][r];
      end
    @(negedge clk);
    cfg_we = 0;
  endtask

  // apply one pattern set and collect the outputs of the last level
  task automatic run_one(input word_t pi [MAXN], output word_t po [MAXN], output int cyc);
    int got = 0;
    int n = nn[nlev-1];
    for (int k = 0; k < MAXN; k++) po[k] = '0;
    @(negedge clk);
    for (int k = 0; k < nn[0]; k++) pi_word[btop[0][k]] = pi[k];
    pi_valid = 1;
    @(negedge clk);
    pi_valid = 0;
    cyc = 1;
    while (got < n && cyc < 4000) begin
      for (int k = 0; k < n; k++)
        if (po_valid[btop[nlev-1][k]]) begin
          po[k] = po_word[btop[nlev-1][k]];
          got++;
        end
      @(negedge clk);
      cyc++;
    end
    while (|col_busy) @(negedge clk);
  endtask

  initial begin
    word_t pi [MAXN], po [MAXN], ref_po [MAXN];
    int cyc, fl, fk, fj;
    bit fv, exp_det;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int net = 0; net < 12; net++) begin
      split_mode = !net[0];
      while (!gen(COLS / 2, ROWS, 5, 3)) ;
      load();
      // logic simulation
      fault_mode = 0;
      for (int p = 0; p < 6; p++) begin
        for (int k = 0; k < MAXN; k++) pi[k] = word_t'($urandom);
        run_one(pi, po, cyc);
        eval(pi, ref_po, -1, 0, 0, 1'b0);
        for (int k = 0; k < nn[nlev-1]; k++)
          check(po[k] == ref_po[k], $sformatf("net %0d pattern %0d output %0d: got %h want %h",
                                              net, p, k, po[k], ref_po[k]));
        // latency bound: per column, travel <= 2*ROWS rows, chain <= ROWS, +4
        check(cyc <= COLS * (3 * ROWS + 4), $sformatf("latency %0d cycles", cyc));
      end
      // fault simulation: one random fanin line stuck at a random value
      fault_mode = 1;
      fl = rnd(0, nlev - 1);
      fk = rnd(0, nn[fl] - 1);
      fj = rnd(0, nfi[fl][fk] - 1);
      fv = bit'(rnd(0, 1));
      @(negedge clk);
      inj_we = 1; inj_en = 1; inj_val = fv;
      inj_col = CW'(2 * fl);
      inj_row = RW'(btop[fl][fk] - nfi[fl][fk] + 1 + fj);
      @(negedge clk);
      inj_we = 0;
      check(!any_detected, "injection clears Detected");
      exp_det = 0;
      for (int p = 0; p < 4; p++) begin
        for (int k = 0; k < MAXN; k++) begin
          automatic logic [HALF_W-1:0] h = HALF_W'($urandom);
          pi[k] = {h, h};
        end
        run_one(pi, po, cyc);
        eval(pi, ref_po, fl, fk, fj, fv);
        for (int k = 0; k < nn[nlev-1]; k++) begin
          check(po[k] == ref_po[k], $sformatf("net %0d fault pattern %0d output %0d: got %h want %h",
                                              net, p, k, po[k], ref_po[k]));
          if (ref_po[k][HALF_W-1:0] != ref_po[k][WORD_W-1:HALF_W]) exp_det = 1;
        end
        check(any_detected == exp_det, $sformatf("net %0d detected flag %0b want %0b",
                                                 net, any_detected, exp_det));
      end
      // remove the fault
      @(negedge clk);
      inj_we = 1; inj_en = 0;
      @(negedge clk);
      inj_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
