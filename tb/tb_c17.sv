// tb_c17: the ISCAS-85 benchmark c17 (five inputs, six two-input NAND gates,
// two outputs) run on the CA simulator.
//
//   G10 = NAND(G1, G3)   G11 = NAND(G3, G6)   G16 = NAND(G2, G11)
//   G19 = NAND(G11, G7)  G22 = NAND(G10, G16) G23 = NAND(G16, G19)
//
// As a layered network the three edges that skip a level (G2 -> G16,
// G7 -> G19, G10 -> G22) get a buffer node on the skipped level, giving four
// levels, 8 columns and at most 6 cells per column; deeper arrays are filled
// with buffer levels behind the outputs. The testbench runs all 32 input
// combinations (four 8-pattern words) in logic mode and checks both outputs
// against the equations above, then fault-simulates both stuck-at values on
// every fanin line (4 patterns per word, 8 words per fault), checks the
// outputs and the detection flag, and reports the fault coverage.
module tb_c17;
  import ca_pkg::*;
  import tb_ln_pkg::*;

  localparam int ROWS = 8;
  localparam int COLS = 8;
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

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic void set_node(int l, int k, int n, int a, int b, bit nand_g);
    nfi[l][k] = n;
    fi[l][k][0] = a;
    fi[l][k][1] = b;
    gop[l][k] = OP_AND;
    ginv[l][k] = nand_g;
  endfunction

  function automatic bit build_c17();
    nlev = COLS / 2;
    nn[0] = 5;                       // G1 G2 G3 G6 G7
    for (int k = 0; k < 5; k++) set_node(0, k, 1, 0, 0, 0);
    nn[1] = 4;                       // G10 G11 buf(G2) buf(G7)
    set_node(1, 0, 2, 0, 2, 1);
    set_node(1, 1, 2, 2, 3, 1);
    set_node(1, 2, 1, 1, 0, 0);
    set_node(1, 3, 1, 4, 0, 0);
    nn[2] = 3;                       // G16 G19 buf(G10)
    set_node(2, 0, 2, 2, 1, 1);
    set_node(2, 1, 2, 1, 3, 1);
    set_node(2, 2, 1, 0, 0, 0);
    nn[3] = 2;                       // G22 G23
    set_node(3, 0, 2, 2, 0, 1);
    set_node(3, 1, 2, 0, 1, 1);
    for (int l = 4; l < nlev; l++) begin
      nn[l] = 2;
      set_node(l, 0, 1, 0, 0, 0);
      set_node(l, 1, 1, 1, 0, 0);
    end
    return finalize(ROWS);
  endfunction

  // the circuit equations, bit-parallel
  function automatic void c17_ref(input word_t g1, g2, g3, g6, g7, output word_t g22, g23);
    word_t g10, g11, g16, g19;
    g10 = ~(g1 & g3);
    g11 = ~(g3 & g6);
    g16 = ~(g2 & g11);
    g19 = ~(g11 & g7);
    g22 = ~(g10 & g16);
    g23 = ~(g16 & g19);
  endfunction

  // pattern w of a sweep: bit b of each input word is bit i of combination
  // index (w * per_word + b % per_word)
  function automatic word_t combo_bit(int w, int per_word, int i);
    word_t x = '0;
    for (int b = 0; b < WORD_W; b++) begin
      int idx = w * per_word + (b % per_word);
      x[b] = idx[i];
    end
    return x;
  endfunction

  task automatic load();
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        cfg_we = 1; cfg_col = CW'(c); cfg_row = RW'(r); cfg_data = cfg[c][r];
      end
    @(negedge clk);
    cfg_we = 0;
    po_mask = '0;
    for (int k = 0; k < nn[nlev-1]; k++) po_mask[btop[nlev-1][k]] = 1'b1;
  endtask

  // run nw words back to back; checks outputs against the equations (no
  // fault) or the levelled reference (with fault); returns detection
  task automatic sweep(input int nw, input int per_word, input int fl, input int fk,
                       input int fj, input bit fv, output bit det);
    word_t pi [MAXN], po [MAXN];
    word_t g22, g23;
    int sent = 0, got = 0;
    logic s_ready_q;
    det = 0;
    while (got < nw) begin
      @(negedge clk);
      s_valid = (sent < nw);
      if (sent < nw) begin
        s_word = '0;
        for (int i = 0; i < 5; i++) s_word[btop[0][i]] = combo_bit(sent, per_word, i);
      end
      @(posedge clk);
      if (s_valid && s_ready) sent++;
      #1;
      if (m_valid) begin
        for (int i = 0; i < 5; i++) pi[i] = combo_bit(got, per_word, i);
        if (fl < 0) begin
          c17_ref(pi[0], pi[1], pi[2], pi[3], pi[4], g22, g23);
          po[0] = g22; po[1] = g23;
        end else eval(pi, po, fl, fk, fj, fv);
        for (int k = 0; k < 2; k++) begin
          check(m_word[btop[nlev-1][k]] == po[k],
                $sformatf("word %0d output G2%0d: got %h want %h (fault %0d/%0d/%0d sa%0b)",
                          got, 2 + k, m_word[btop[nlev-1][k]], po[k], fl, fk, fj, fv));
          if (po[k][HALF_W-1:0] != po[k][WORD_W-1:HALF_W]) det = 1;
        end
        if (fl >= 0) check(m_detected == det, $sformatf("detection flag, fault %0d/%0d/%0d sa%0b",
                                                       fl, fk, fj, fv));
        got++;
      end
    end
    @(negedge clk);
    s_valid = 0;
    while (|col_busy) @(negedge clk);
  endtask

  task automatic measure_td(output int td);
    int f [COLS], e [COLS];
    for (int c = 0; c < COLS; c++) begin f[c] = -1; e[c] = -1; end
    @(negedge clk);
    s_valid = 1;
    @(negedge clk);
    s_valid = 0;
    while (!m_valid) begin
      for (int c = 0; c < COLS; c++)
        if (col_busy[c]) begin
          if (f[c] < 0) f[c] = cycle;
          e[c] = cycle;
        end
      @(negedge clk);
    end
    while (|col_busy) @(negedge clk);
    td = 1;
    for (int c = 0; c + 1 < COLS; c++)
      if (e[c+1] - f[c] + 1 > td) td = e[c+1] - f[c] + 1;
  endtask

  initial begin
    int td, nfaults = 0, ndet = 0, t0;
    bit det;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(build_c17(), "c17 fits the array");
    check(rows_used == 6, $sformatf("c17 uses %0d rows, 6 expected", rows_used));
    load();
    measure_td(td);
    t_d = 16'(td);
    $display("c17: %0d rows, t_d %0d clocks", rows_used, td);
    // logic simulation: 32 combinations, 8 per word
    t0 = cycle;
    sweep(4, 8, -1, 0, 0, 1'b0, det);
    $display("c17 logic simulation of 32 patterns: %0d clocks", cycle - t0);
    // fault simulation: every fanin line, both stuck-at values
    fault_mode = 1;
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < nn[l]; k++)
        for (int j = 0; j < nfi[l][k]; j++)
          for (int v = 0; v < 2; v++) begin
            @(negedge clk);
            inj_we = 1; inj_en = 1; inj_val = v[0];
            inj_col = CW'(2 * l);
            inj_row = RW'(btop[l][k] - nfi[l][k] + 1 + j);
            @(negedge clk);
            inj_we = 0;
            sweep(8, 4, l, k, j, v[0], det);
            nfaults++;
            if (det) ndet++;
          end
    $display("c17 fault simulation: %0d of %0d fanin-line faults detected", ndet, nfaults);
    check(ndet > 0 && nfaults == 2 * (5 + 6 + 5 + 4), "fault list complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
