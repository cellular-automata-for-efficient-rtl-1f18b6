// tb_ln_pkg: testbench support for the CA simulator.
//
// Builds a random layered network (LN): level 0 holds the primary inputs,
// every node of level L >= 1 takes its inputs only from level L-1, every node
// below the last level drives at least one node, and the nodes of the last
// level are the primary outputs. Each node is an AND/OR/XOR gate with an
// optional inversion (one-input nodes are buffers or inverters).
//
// place() lays the LN out on a ROWS x COLS array, COLS = 2 * levels. Each
// node gets a band of max(fanin, fanout) rows, bands stacked from row 0 up;
// its fanin cells sit at the band bottom of column 2L (bottom one BotFanin,
// top one holding FanoutNo), its fanout cells at the band top of column 2L+1
// (top one FanoutRecv with OffReg 0, or Detecting on the last level). With
// split_mode set, a node may instead get max band fanin + fanout rows, with
// its fanout block wholly above or below the FanoutRecv cell (OffReg < 0 or
// > 0), which then only starts the distribution. The
// receiving fanin cell of an edge is the cell right of its fanout cell; its
// OffReg is its own row minus the row of the target fanin cell. Unused fanin
// cells are one-cell BotFanin nodes that never receive anything. Node fanin
// cells and edge fanout cells take part in column synchronisation.
//
// eval() is the independent reference: a plain levelled evaluation of the
// LN on WORD_W-bit words, with an optional stuck-at fault that replaces the
// high half of one fanin line.
package tb_ln_pkg;
  import ca_pkg::*;

  localparam int MAXL = 64;   // levels
  localparam int MAXN = 16;   // nodes per level
  localparam int MAXF = 4;    // fanin per node
  localparam int MAXO = 16;   // fanout per node
  localparam int MAXR = 128;  // rows
  localparam int MAXC = 128;  // columns

  int nlev;
  int nn   [MAXL];
  int nfi  [MAXL][MAXN];
  int fi   [MAXL][MAXN][MAXF];   // fanin j of node -> node index on level-1
  op_e gop [MAXL][MAXN];
  bit  ginv[MAXL][MAXN];
  int nfo  [MAXL][MAXN];
  int fo_n [MAXL][MAXN][MAXO];   // fanout k -> node on level+1
  int fo_j [MAXL][MAXN][MAXO];   // ... and its input index there
  int btop [MAXL][MAXN];         // top fanin row (FanoutRecv sits right of it)
  int otop [MAXL][MAXN];         // top row of the fanout block
  bit split_mode = 0;            // allow fanout blocks apart from FanoutRecv
  int bbot [MAXL][MAXN];         // band bottom row
  cell_cfg_t cfg [MAXC][MAXR];
  int rows_used;

  // statistics of a placement
  int n_up, n_down, n_local, n_multi_in, n_inv, n_multi_out, n_recv_up, n_recv_dn;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // Returns 1 when an LN that fits `rows` rows was generated.
  function automatic bit gen(int levels, int rows, int max_nodes, int max_fi);
    nlev = levels;
    for (int l = 0; l < nlev; l++) begin
      nn[l] = rnd(1, max_nodes);
      for (int k = 0; k < nn[l]; k++) begin
        nfo[l][k] = 0;
        gop[l][k] = op_e'(rnd(0, 2));
        ginv[l][k] = bit'(rnd(0, 1));
        if (l == 0) begin
          nfi[l][k] = 1;
          gop[l][k] = OP_AND;
          ginv[l][k] = 1'b0;
        end else begin
          int want = rnd(1, (max_fi < nn[l-1]) ? max_fi : nn[l-1]);
          nfi[l][k] = 0;
          while (nfi[l][k] < want) begin
            int u = rnd(0, nn[l-1] - 1);
            bit dup = 0;
            for (int j = 0; j < nfi[l][k]; j++) if (fi[l][k][j] == u) dup = 1;
            if (!dup) begin
              fi[l][k][nfi[l][k]] = u;
              nfi[l][k]++;
            end
          end
        end
      end
      // every node of the previous level must drive something
      if (l > 0) begin
        for (int u = 0; u < nn[l-1]; u++) begin
          bit used = 0;
          for (int k = 0; k < nn[l]; k++)
            for (int j = 0; j < nfi[l][k]; j++) if (fi[l][k][j] == u) used = 1;
          if (!used) begin
            int k = rnd(0, nn[l] - 1);
            if (nfi[l][k] >= MAXF) return 0;
            fi[l][k][nfi[l][k]] = u;
            nfi[l][k]++;
          end
        end
      end
    end
    return finalize(rows);
  endfunction

  // Builds the fanout lists of the LN held in nn / nfi / fi and places it.
  function automatic bit finalize(int rows);
    for (int l = 0; l < nlev; l++)
      for (int k = 0; k < nn[l]; k++) nfo[l][k] = 0;
    for (int l = 1; l < nlev; l++)
      for (int k = 0; k < nn[l]; k++)
        for (int j = 0; j < nfi[l][k]; j++) begin
          int u = fi[l][k][j];
          if (nfo[l-1][u] >= MAXO) return 0;
          fo_n[l-1][u][nfo[l-1][u]] = k;
          fo_j[l-1][u][nfo[l-1][u]] = j;
          nfo[l-1][u]++;
        end
    return place(rows);
  endfunction

  function automatic bit place(int rows);
    rows_used = 0;
    n_up = 0; n_down = 0; n_local = 0; n_recv_up = 0; n_recv_dn = 0; n_multi_in = 0; n_inv = 0; n_multi_out = 0;
    for (int l = 0; l < nlev; l++) begin
      int base = 0;
      for (int k = 0; k < nn[l]; k++) begin
        int fo = (l == nlev - 1) ? 1 : nfo[l][k];
        int mode = (split_mode && l < nlev - 1) ? rnd(0, 2) : 0;
        int h = (mode != 0) ? nfi[l][k] + fo : ((nfi[l][k] > fo) ? nfi[l][k] : fo);
        bbot[l][k] = base;
        if (mode == 1) begin         // fanout block above FanoutRecv: upward
          btop[l][k] = base + nfi[l][k] - 1;
          otop[l][k] = base + h - 1;
        end else if (mode == 2) begin  // fanout block below FanoutRecv: downward
          btop[l][k] = base + h - 1;
          otop[l][k] = base + fo - 1;
        end else begin
          btop[l][k] = base + h - 1;
          otop[l][k] = base + h - 1;
        end
        base += h;
      end
      if (base > rows) return 0;
      if (base > rows_used) rows_used = base;
    end
    for (int c = 0; c < 2 * nlev; c++)
      for (int r = 0; r < rows; r++) begin
        cfg[c][r] = '0;
        if (c % 2 == 0) begin
          cfg[c][r].state = ST_BOTFANIN;
          cfg[c][r].top = 1'b1;
        end else cfg[c][r].state = ST_FANOUT;
      end
    for (int l = 0; l < nlev; l++)
      for (int k = 0; k < nn[l]; k++) begin
        int t = btop[l][k];
        int b = t - nfi[l][k] + 1;
        for (int j = 0; j < nfi[l][k]; j++) begin
          cfg[2*l][b+j].state = (j == 0) ? ST_BOTFANIN : ST_FANIN;
          cfg[2*l][b+j].op    = gop[l][k];
          cfg[2*l][b+j].inv   = ginv[l][k];
          cfg[2*l][b+j].top   = (j == nfi[l][k] - 1);
          cfg[2*l][b+j].part  = 1'b1;
        end
        cfg[2*l][t].fanout_no = cnt_t'((l == nlev - 1) ? 1 : nfo[l][k]);
        if (nfi[l][k] > 1) n_multi_in++;
        if (ginv[l][k]) n_inv++;
        if (l == nlev - 1) cfg[2*l+1][t].state = ST_DETECTING;
        else begin
          // edge q leaves from row otop-q; its receiver sits right of it
          for (int q = 0; q < nfo[l][k]; q++) begin
            int v = fo_n[l][k][q];
            int j = fo_j[l][k][q];
            int src = otop[l][k] - q;
            int dst = btop[l+1][v] - nfi[l+1][v] + 1 + j;
            cfg[2*l+1][src].part = 1'b1;
            cfg[2*l+2][src].off = off_t'(src - dst);
            if (src > dst) n_down++;
            else if (src < dst) n_up++;
            else n_local++;
          end
          cfg[2*l+1][t].state = ST_FANOUTRECV;
          cfg[2*l+1][t].off = off_t'(t - otop[l][k]);
          if (otop[l][k] > t) n_recv_up++;
          else if (otop[l][k] < t) n_recv_dn++;
          if (nfo[l][k] > 1) n_multi_out++;
        end
      end
    return 1;
  endfunction

  // Reference evaluation. fault_l < 0: no fault. Otherwise input fault_j of
  // node fault_k on level fault_l has its high half stuck at fault_v.
  function automatic void eval(input word_t pi [MAXN], output word_t po [MAXN],
                               input int fault_l, input int fault_k,
                               input int fault_j, input bit fault_v);
    word_t val [MAXL][MAXN];
    for (int l = 0; l < nlev; l++)
      for (int k = 0; k < nn[l]; k++) begin
        word_t acc = '0;
        for (int j = 0; j < nfi[l][k]; j++) begin
          word_t x = (l == 0) ? pi[k] : val[l-1][fi[l][k][j]];
          if (l == fault_l && k == fault_k && j == fault_j)
            x[WORD_W-1:HALF_W] = {HALF_W{fault_v}};
          acc = (j == 0) ? x : gate_op(gop[l][k], acc, x);
        end
        val[l][k] = ginv[l][k] ? ~acc : acc;
      end
    for (int k = 0; k < MAXN; k++)
      po[k] = (k < nn[nlev-1]) ? val[nlev-1][k] : '0;
  endfunction

endpackage
