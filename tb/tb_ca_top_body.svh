// Shared body of the end-to-end testbenches of ca_top. The including module
// declares ROWS, COLS, NETS, PATS, FAULTS and MAXN_LVL, and instantiates the
// top as `dut` with the signals declared below already in scope.
//
// Flow per random layered network:
//  1. configure every cell through the configuration port;
//  2. (once without and once with column synchronisation) time one pattern through the array with col_busy and derive the
//     pipeline period t_d = max over columns i of (end of work in column
//     i+1) - (start of work in column i), plus one clock;
//  3. stream PATS logic-simulation patterns back to back and check every
//     result against the reference evaluation, the result spacing (one
//     result every t_d clocks) and that several patterns were in flight;
//  4. for FAULTS random stuck-at faults on fanin lines: inject, stream
//     fault-simulation patterns (same 4 patterns in both halves) and check
//     the outputs and the sticky detection flag.
// Mechanism counters (read from inside the cells) must all be non-zero.

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- mechanisms
  localparam int NC = ROWS * COLS;
  logic [NC-1:0] m_up, m_dn, m_loc, m_wait, m_chain, m_np, m_npr, m_fault;
  for (genvar c = 0; c < COLS; c++) begin : g_pc
    for (genvar r = 0; r < ROWS; r++) begin : g_pr
      localparam int I = c * ROWS + r;
      assign m_up[I]   = dut.u_array.g_col[c].g_row[r].u_cell.ua_hit;
      assign m_dn[I]   = dut.u_array.g_col[c].g_row[r].u_cell.da_hit;
      assign m_loc[I]  = dut.u_array.g_col[c].g_row[r].u_cell.launch &&
                         dut.u_array.g_col[c].g_row[r].u_cell.p_hit;
      assign m_wait[I] = dut.u_array.g_col[c].g_row[r].u_cell.pend.v &&
                         !dut.u_array.g_col[c].g_row[r].u_cell.launch;
      assign m_chain[I] = dut.u_array.g_col[c].g_row[r].u_cell.take_bel;
      assign m_np[I]   = dut.u_array.g_col[c].g_row[r].u_cell.st == ST_NEWPIPE;
      assign m_npr[I]  = dut.u_array.g_col[c].g_row[r].u_cell.st == ST_NEWPIPERECV;
      assign m_fault[I] = dut.u_array.g_col[c].g_row[r].u_cell.hit &&
                          dut.u_array.g_col[c].g_row[r].u_cell.faulty && fault_mode;
    end
  end
  longint n_rsplit = 0;
  longint n_up = 0, n_dn = 0, n_loc = 0, n_wait = 0, n_chain = 0, n_np = 0, n_npr = 0;
  longint n_fault = 0, n_overlap = 0, n_detect = 0, n_rel = 0;
  always @(posedge clk) if (rst_n) begin
    n_up    <= n_up + $countones(m_up);
    n_dn    <= n_dn + $countones(m_dn);
    n_loc   <= n_loc + $countones(m_loc);
    n_wait  <= n_wait + $countones(m_wait);
    n_chain <= n_chain + $countones(m_chain);
    n_np    <= n_np + $countones(m_np);
    n_npr   <= n_npr + $countones(m_npr);
    n_fault <= n_fault + $countones(m_fault);
    if (n_issued - n_done >= 2) n_overlap <= n_overlap + 1;
    n_rel   <= n_rel + $countones(dut.u_array.col_rel);
  end

  // ------------------------------------------------------------ helpers
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  function automatic word_t [ROWS-1:0] to_rows(word_t pi [MAXN]);
    word_t [ROWS-1:0] w = '0;
    for (int k = 0; k < nn[0]; k++) w[btop[0][k]] = pi[k];
    return w;
  endfunction

  // one pattern alone; returns the pipeline period for this placement
  task automatic measure_td(output int td, output int lat);
    int f [COLS], e [COLS];
    int t0;
    for (int c = 0; c < COLS; c++) begin f[c] = -1; e[c] = -1; end
    t_d = 16'd1;
    @(negedge clk);
    s_valid = 1; s_word = '0;
    t0 = cycle;
    @(negedge clk);
    s_valid = 0;
    while (!m_valid) begin
      for (int c = 0; c < COLS; c++)
        if (col_busy[c]) begin
          if (f[c] < 0) f[c] = cycle;
          e[c] = cycle;
        end
      @(negedge clk);
      if (cycle - t0 > 100000) break;
    end
    lat = cycle - t0;
    while (|col_busy) @(negedge clk);
    td = 1;
    for (int c = 0; c + 1 < COLS; c++)
      if (e[c+1] - f[c] + 1 > td) td = e[c+1] - f[c] + 1;
  endtask

  // stream n patterns back to back and check them; pat[p] are the inputs
  task automatic stream(input int n, input bit fmode, input int fl, input int fk,
                        input int fj, input bit fv, input int td, input string tag);
    word_t pats [$][MAXN];
    int sent = 0, got = 0, last_m = -1;
    bit det_so_far = 0;
    for (int p = 0; p < n; p++) begin
      word_t pi [MAXN];
      for (int k = 0; k < MAXN; k++) begin
        if (fmode) begin
          automatic logic [HALF_W-1:0] h = HALF_W'($urandom);
          pi[k] = {h, h};
        end else pi[k] = word_t'($urandom);
      end
      pats.push_back(pi);
    end
    while (got < n) begin
      @(negedge clk);
      if (s_valid && s_ready_q) sent++;
      s_valid = (sent < n);
      if (sent < n) s_word = to_rows(pats[sent]);
      if (m_valid) begin
        word_t ref_po [MAXN];
        eval(pats[got], ref_po, fmode ? fl : -1, fk, fj, fv);
        for (int k = 0; k < nn[nlev-1]; k++) begin
          check(m_word[btop[nlev-1][k]] == ref_po[k],
                $sformatf("%s pattern %0d output %0d: got %h want %h", tag, got, k,
                          m_word[btop[nlev-1][k]], ref_po[k]));
          if (ref_po[k][HALF_W-1:0] != ref_po[k][WORD_W-1:HALF_W]) det_so_far = 1;
        end
        if (fmode) check(m_detected == det_so_far, $sformatf("%s detection after pattern %0d", tag, got));
        if (last_m >= 0)
          check(cycle - last_m == td, $sformatf("%s result spacing %0d, t_d %0d", tag, cycle - last_m, td));
        if (det_so_far) n_detect++;
        last_m = cycle;
        got++;
      end
    end
    s_valid = 0;
    while (|col_busy) @(negedge clk);
  endtask

  // s_ready as sampled at the clock edge the handshake happened on
  logic s_ready_q;
  always @(posedge clk) s_ready_q <= s_ready;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int td, lat, fl, fk, fj;
    bit fv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int net = 0; net < NETS; net++) begin
      split_mode = !net[0];
      while (!gen(COLS / 2, ROWS, MAXN_LVL, 3)) ;
      n_rsplit += longint'(n_recv_up) + longint'(n_recv_dn);
      load();
      fault_mode = 0;
      for (int m = 0; m < 2; m++) begin
        col_sync = m[0];
        measure_td(td, lat);
        check(td > 1 && td < lat, $sformatf("pipeline period %0d below latency %0d", td, lat));
        $display("net %0d: %0d levels, %0d rows used, column sync %0d, latency %0d, t_d %0d",
                 net, nlev, rows_used, m, lat, td);
        t_d = 16'(td);
        stream(PATS, 1'b0, 0, 0, 0, 1'b0, td, $sformatf("net %0d sync %0d logic", net, m));
      end
      fault_mode = 1;
      for (int f = 0; f < FAULTS; f++) begin
        if (f == FAULTS / 2) begin
          col_sync = 1'b0;
          measure_td(td, lat);
          t_d = 16'(td);
        end
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
        stream(4, 1'b1, fl, fk, fj, fv, td, $sformatf("net %0d fault %0d", net, f));
      end
      @(negedge clk);
      inj_we = 1; inj_en = 0;
      @(negedge clk);
      inj_we = 0;
    end
    $display("mechanisms: up %0d down %0d local %0d path-wait %0d chain %0d newpipe %0d newpiperecv %0d fault-forced %0d overlap-cycles %0d detected %0d column-releases %0d split-recv %0d",
             n_up, n_dn, n_loc, n_wait, n_chain, n_np, n_npr, n_fault, n_overlap, n_detect, n_rel, n_rsplit);
    check(n_rel > 0, "column synchronisation released a column");
    check(n_rsplit > 0, "FanoutRecv started a fanout block away from its own row");
    check(n_up > 0, "upward propagation happened");
    check(n_dn > 0, "downward propagation happened");
    check(n_loc > 0, "local delivery happened");
    check(n_wait > 0, "wait for a busy path happened");
    check(n_chain > 0, "multi-cell input accumulation happened");
    check(n_np > 0, "NewPipe (multi-target distribution) happened");
    check(n_npr > 0, "NewPipeRecv happened");
    check(n_fault > 0, "fault forcing happened");
    check(n_overlap > 0, "several patterns in flight");
    check(n_detect > 0, "a fault was detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
