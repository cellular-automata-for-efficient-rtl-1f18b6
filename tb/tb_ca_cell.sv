// tb_ca_cell: self-checking test of one CA cell with its neighbours driven
// by the testbench.
//
// Covered: capture from the left and local delivery, launch of a signal on
// the downward and upward paths with the offset the receiving cell holds,
// pass-through and one-row-per-clock stepping, the free-path rule (a local
// signal waits while a passing one uses the register), delivery to a fanin
// cell, the fanin chain (BotFanin / Fanin / top with inversion and `done`),
// FanoutRecv distribution in both directions, the one-cycle NewPipe state,
// fault injection on a fanin cell, and the Detecting / Detected compare.
module tb_ca_cell;
  import ca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      cfg_we, inj_we, inj_sel, inj_val, fault_mode, col_sync, col_rel;
  logic      sync_ok, sync_cmp;
  cell_cfg_t cfg_in;
  logic      l_newpipe, l_done, bel_acc_v, abv_take;
  word_t     l_word, bel_acc;
  cnt_t      l_fanout_no;
  token_t    up_in, dn_in, up_out, dn_out;
  logic      newpipe, done, take_bel, acc_v_o, po_valid, detected, busy;
  word_t     word_o, acc_o;
  cnt_t      fanout_no_o;

  ca_cell dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_inputs();
    cfg_we = 0; inj_we = 0; inj_sel = 0; inj_val = 0;
    l_newpipe = 0; l_done = 0; l_word = '0; l_fanout_no = '0;
    up_in = '0; dn_in = '0; bel_acc_v = 0; bel_acc = '0; abv_take = 0;
  endtask

  task automatic configure(input state_e s, input int off, input int fno,
                           input op_e o, input bit inv, input bit top);
    @(negedge clk);
    cfg_we = 1;
    cfg_in = '{state: s, off: off_t'(off), fanout_no: cnt_t'(fno), op: o, inv: inv, top: top,
               part: 1'b1};
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic token_t tok(bit up, int off, int cnt, word_t sig);
    token_t t;
    t.v = 1; t.up = up; t.off = off_t'(off); t.cnt = cnt_t'(cnt); t.sig = sig;
    return t;
  endfunction

  // watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w;
    idle_inputs();
    fault_mode = 0;
    col_sync = 0; col_rel = 0;
    cfg_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1: BotFanin+top NOT gate, OffReg 0: capture, deliver, done
    configure(ST_BOTFANIN, 0, 2, OP_AND, 1'b1, 1'b1);
    check(fanout_no_o == 8'd2, "FanoutNo kept by top fanin cell");
    l_newpipe = 1; l_word = 8'hA5;
    @(negedge clk); l_newpipe = 0;          // cycle 1: captured into pending
    @(negedge clk);                         // cycle 2: delivered, in_v
    @(negedge clk);                         // cycle 3: acc loaded
    check(done == 0, "no done before accumulation");
    @(negedge clk);                         // cycle 4: done pulse
    check(done == 1 && word_o == 8'h5A, "NOT gate result and done");
    @(negedge clk);
    check(done == 0, "done is one cycle");
    check(busy == 0, "cell idle after gate evaluation");

    // ---- 2: capture with OffReg +3: signal leaves on the downward path
    configure(ST_FANIN, 3, 0, OP_AND, 1'b0, 1'b0);
    l_newpipe = 1; l_word = 8'h3C;
    @(negedge clk); l_newpipe = 0;
    @(negedge clk);
    check(dn_out.v && !dn_out.up && dn_out.off == 3 && dn_out.cnt == 1 && dn_out.sig == 8'h3C,
          "downward launch with offset 3");
    check(!up_out.v, "nothing on the upward path");
    @(negedge clk);
    check(!dn_out.v, "launch is a single entry");

    // ---- 3: OffReg -2 with the upward path busy: waits for a free slot
    configure(ST_FANIN, -2, 0, OP_AND, 1'b0, 1'b0);
    l_newpipe = 1; l_word = 8'h77;
    @(negedge clk); l_newpipe = 0;
    up_in = tok(1, -3, 1, 8'h11);             // passing entry, steps to -2
    @(negedge clk);
    check(up_out.v && up_out.off == -2 && up_out.sig == 8'h11, "passing entry stepped and forwarded");
    up_in = tok(1, -5, 1, 8'h22);
    @(negedge clk);
    check(up_out.v && up_out.off == -4 && up_out.sig == 8'h22, "second passing entry has priority");
    up_in = '0;
    @(negedge clk);
    check(up_out.v && up_out.off == -2 && up_out.sig == 8'h77, "local entry launched once path free");

    // ---- 4: fanin chain: Fanin cell delivered from above, combines with below
    configure(ST_FANIN, 0, 0, OP_OR, 1'b0, 1'b0);
    dn_in = tok(0, 1, 1, 8'h0F);              // steps to 0 here: delivered
    @(negedge clk); dn_in = '0;
    check(!dn_out.v, "delivered entry not forwarded");
    bel_acc_v = 1; bel_acc = 8'hF0;
    #1 check(take_bel == 1, "takes partial result from below");
    @(negedge clk); bel_acc_v = 0;
    check(acc_v_o && acc_o == 8'hFF, "OR of own input and partial result");
    check(!done, "non-top cell raises no done");
    abv_take = 1;
    @(negedge clk); abv_take = 0;
    check(!acc_v_o, "partial result released after the cell above took it");

    // ---- 5: top Fanin cell, XOR with inversion
    configure(ST_FANIN, 0, 4, OP_XOR, 1'b1, 1'b1);
    up_in = tok(1, -1, 1, 8'h66);
    @(negedge clk); up_in = '0;
    bel_acc_v = 1; bel_acc = 8'h0F;
    @(negedge clk); bel_acc_v = 0;
    @(negedge clk);
    check(done && word_o == ~(8'h66 ^ 8'h0F), "XNOR at the top cell");

    // ---- 6: FanoutRecv, OffReg 0, FanoutNo 3: itself first target, then down
    configure(ST_FANOUTRECV, 0, 0, OP_AND, 1'b0, 1'b0);
    l_done = 1; l_word = 8'h9C; l_fanout_no = 3;
    @(negedge clk); l_done = 0;
    @(negedge clk);
    check(newpipe && word_o == 8'h9C, "FanoutRecv delivers to itself (NewPipeRecv)");
    check(dn_out.v && dn_out.off == 0 && dn_out.cnt == 2, "remaining two targets below");
    @(negedge clk);
    check(!newpipe, "NewPipeRecv lasts one cycle");

    // ---- 7: FanoutRecv, OffReg -4 (block top 4 rows up), FanoutNo 2
    configure(ST_FANOUTRECV, -4, 0, OP_AND, 1'b0, 1'b0);
    l_done = 1; l_word = 8'h42; l_fanout_no = 2;
    @(negedge clk); l_done = 0;
    @(negedge clk);
    check(up_out.v && up_out.off == -3 && up_out.cnt == 2 && !newpipe,
          "upward distribution aimed at the block bottom");

    // ---- 8: Fanout cell as a middle target of a downward distribution
    configure(ST_FANOUT, 0, 0, OP_AND, 1'b0, 1'b0);
    dn_in = tok(0, 0, 2, 8'hC3);
    @(negedge clk); dn_in = '0;
    check(newpipe && word_o == 8'hC3, "Fanout target shows NewPipe");
    check(dn_out.v && dn_out.cnt == 1 && dn_out.off == 0, "count decremented and forwarded");
    @(negedge clk);
    check(!newpipe, "back to Fanout");
    dn_in = tok(0, 2, 1, 8'h01);              // not yet at its target
    @(negedge clk); dn_in = '0;
    check(!newpipe && dn_out.v && dn_out.off == 1, "non-target passes the entry on");

    // ---- 9: fault injection on a fanin cell (stuck-at-1 on the faulty half)
    fault_mode = 1;
    configure(ST_BOTFANIN, 0, 1, OP_AND, 1'b0, 1'b1);
    inj_we = 1; inj_sel = 1; inj_val = 1;
    @(negedge clk); inj_we = 0; inj_sel = 0;
    l_newpipe = 1; l_word = 8'h05;
    @(negedge clk); l_newpipe = 0;
    repeat (3) @(negedge clk);
    check(word_o == 8'hF5, "stuck-at-1 forced on the faulty half only");
    inj_we = 1; inj_sel = 0;                  // fault moves elsewhere
    @(negedge clk); inj_we = 0;
    l_newpipe = 1; l_word = 8'h05;
    @(negedge clk); l_newpipe = 0;
    repeat (3) @(negedge clk);
    check(word_o == 8'h05, "fault removed");

    // ---- 10: primary-output cell
    configure(ST_DETECTING, 0, 0, OP_AND, 1'b0, 1'b0);
    l_done = 1; l_word = 8'h55;               // halves equal: not detected
    @(negedge clk); l_done = 0;
    check(po_valid && word_o == 8'h55 && !detected, "output captured, halves equal");
    l_done = 1; l_word = 8'h57;
    @(negedge clk); l_done = 0;
    check(detected, "difference between halves detected");
    l_done = 1; l_word = 8'h55;
    @(negedge clk); l_done = 0;
    check(detected, "Detected is sticky");
    inj_we = 1;
    @(negedge clk); inj_we = 0;
    check(!detected, "new fault returns the cell to Detecting");
    fault_mode = 0;
    l_done = 1; w = 8'h57; l_word = w;
    @(negedge clk); l_done = 0;
    check(!detected && word_o == w, "no compare in logic mode");

    // ---- 11: column synchronisation, fanout target waits for the release
    col_sync = 1;
    configure(ST_FANOUT, 0, 0, OP_AND, 1'b0, 1'b0);
    check(!sync_ok && !sync_cmp, "participant not finished yet");
    dn_in = tok(0, 1, 1, 8'h3E);
    @(negedge clk); dn_in = '0;
    check(!newpipe && sync_ok && sync_cmp && word_o == 8'h3E, "signal held, cell reports finished");
    @(negedge clk);
    check(!newpipe, "still held without release");
    col_rel = 1;
    @(negedge clk); col_rel = 0;
    check(newpipe && !sync_cmp, "NewPipe on release, finished flag cleared");
    @(negedge clk);
    check(!newpipe, "NewPipe one cycle after release");

    // ---- 12: column synchronisation, top fanin cell waits for the release
    configure(ST_BOTFANIN, 0, 1, OP_AND, 1'b0, 1'b1);
    l_newpipe = 1; l_word = 8'h81;
    @(negedge clk); l_newpipe = 0;
    repeat (4) @(negedge clk);
    check(!done && sync_cmp, "top cell finished but holds done");
    col_rel = 1;
    #1 check(done == 0, "done follows the release by one clock");
    @(negedge clk); col_rel = 0;
    check(done && word_o == 8'h81, "done after release");
    check(!sync_cmp, "finished flag cleared");
    col_sync = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
