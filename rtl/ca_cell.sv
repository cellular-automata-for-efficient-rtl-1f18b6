// ca_cell: one cell of the cellular-automaton logic and fault simulator.
//
// Every cell talks only to its left, right, upper and lower neighbour. What
// it does depends on its state, which the host preloads together with the
// other configuration registers:
//
// * Fanin / BotFanin (fanin column). When the left neighbour shows NewPipe or
//   NewPipeRecv, the cell takes the left word and sends it, on the upward or
//   downward data path of the column, to its target cell, OffReg rows away
//   (OffReg = own row - target row, positive means downward). A signal enters
//   a path only when no passing signal wants the same register. The cells of
//   one node are contiguous, numbered from the bottom: the BotFanin cell just
//   holds its input, every Fanin cell above combines its input with the
//   partial result from below, and the top cell applies the inversion and
//   raises `done` for one cycle towards its right neighbour. If the cell is
//   the injected fault site and fault mode is on, the upper half of its input
//   word (the faulty machine) is forced to the stuck-at value.
// * FanoutRecv (fanout column). On `done` from the left it takes the result
//   and the left cell's FanoutNo and distributes the word to the FanoutNo
//   contiguous target cells of the node. With OffReg >= 0 the block's top
//   lies OffReg rows below and the word travels down; with OffReg < 0 the top
//   lies -OffReg rows above and the word travels up. OffReg = 0 makes the cell
//   itself the first target.
// * Fanout / FanoutRecv as a target: the cell stores the word and shows
//   NewPipe (NewPipeRecv) for exactly one cycle, then returns to Fanout
//   (FanoutRecv).
// * Detecting / Detected (primary output). On `done` from the left the cell
//   captures the output word and pulses po_valid. In fault mode it compares
//   the good half (low bits) with the faulty half (high bits) and moves to
//   Detected on a difference; injecting a new fault returns it to Detecting.
//
// Column synchronisation (col_sync = 1): cells marked `part` report through
// sync_ok when they have finished their share of the current pattern (a
// fanin cell once its partial result is formed, a fanout cell once its
// signal has arrived). When every cell of the column has finished, the
// column raises `col_rel` for one clock: only then do top fanin cells raise
// `done`, and only then do the fanout targets show NewPipe, all together, so
// the next column receives all its signals in the same clock.
//
// Data-path entries move one row per clock. A fanin chain adds one clock per
// cell, `done` one more. States, the register names and the rules above
// follow the published cell; the path-entry record (with its own target
// count), the one-cycle pulses, the pending-entry register and the fault
// injection port are this design's own choices.
module ca_cell
  import ca_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // configuration (preload) and fault injection
  input  logic      cfg_we,
  input  cell_cfg_t cfg_in,
  input  logic      inj_we,       // broadcast: a new fault site is chosen
  input  logic      inj_sel,      // this cell is the new fault site
  input  logic      inj_val,      // stuck-at value
  input  logic      fault_mode,   // 1: low half good machine, high half faulty
  input  logic      col_sync,     // 1: wait for the whole column (col_rel)
  input  logic      col_rel,      // column finished the current pattern
  // left neighbour
  input  logic      l_newpipe,
  input  word_t     l_word,
  input  logic      l_done,
  input  cnt_t      l_fanout_no,
  // towards the right neighbour
  output logic      newpipe,
  output word_t     word_o,
  output logic      done,
  output cnt_t      fanout_no_o,
  // vertical data paths
  input  token_t    up_in,        // from the cell below
  output token_t    up_out,       // to the cell above
  input  token_t    dn_in,        // from the cell above
  output token_t    dn_out,       // to the cell below
  // input accumulation chain
  input  logic      bel_acc_v,
  input  word_t     bel_acc,
  output logic      take_bel,     // partial result of the cell below consumed
  output logic      acc_v_o,
  output word_t     acc_o,
  input  logic      abv_take,
  // status
  output logic      po_valid,
  output logic      detected,
  output logic      sync_ok,      // not taking part, or finished this pattern
  output logic      sync_cmp,     // finished this pattern
  output logic      busy
);

  state_e st;
  off_t   off_reg;
  cnt_t   fno;
  op_e    op;
  logic   inv, top, part;
  logic   faulty, fsig;
  logic   cmp, held;

  token_t up_q, dn_q, pend;
  logic   in_v, acc_v, done_q, pov_q;
  word_t  in_sig, acc, word_q;

  logic fanin_st, recv_st, po_st;
  assign fanin_st = (st == ST_FANIN) || (st == ST_BOTFANIN);
  assign recv_st  = (st == ST_FANOUTRECV) || (st == ST_NEWPIPERECV);
  assign po_st    = (st == ST_DETECTING) || (st == ST_DETECTED);

  // ---------------------------------------------------------------- paths
  token_t ua, da, ua_fwd, da_fwd, p_fwd;
  logic   ua_hit, da_hit, p_hit, p_needs_fwd, launch, hit;
  word_t  hit_sig;

  always_comb begin
    // entries arriving from the neighbours, one row closer to their target
    ua = up_in;
    if (ua.off < 0) ua.off = ua.off + off_t'(1);
    da = dn_in;
    if (da.off > 0) da.off = da.off - off_t'(1);
    ua_hit = ua.v && (ua.off == 0) && (ua.cnt != 0);
    da_hit = da.v && (da.off == 0) && (da.cnt != 0);
    ua_fwd = ua;
    if (ua_hit) ua_fwd.cnt = ua.cnt - cnt_t'(1);
    ua_fwd.v = ua.v && ((ua_fwd.off != 0) || (ua_fwd.cnt != 0));
    da_fwd = da;
    if (da_hit) da_fwd.cnt = da.cnt - cnt_t'(1);
    da_fwd.v = da.v && ((da_fwd.off != 0) || (da_fwd.cnt != 0));

    // the local pending entry enters its path only when the path is free
    p_hit = pend.v && (pend.off == 0) && (pend.cnt != 0);
    p_fwd = pend;
    if (p_hit) p_fwd.cnt = pend.cnt - cnt_t'(1);
    p_needs_fwd = (p_fwd.off != 0) || (p_fwd.cnt != 0);
    launch = pend.v && (!p_needs_fwd || (pend.up ? !ua_fwd.v : !da_fwd.v));

    hit = ua_hit || da_hit || (launch && p_hit);
    hit_sig = ua_hit ? ua.sig : (da_hit ? da.sig : pend.sig);
  end

  // ---------------------------------------------------------- accumulation
  logic  bot_ld, fire;
  word_t acc_n, in_eff;
  always_comb begin
    take_bel = (st == ST_FANIN) && in_v && !acc_v && bel_acc_v;
    bot_ld   = (st == ST_BOTFANIN) && in_v && !acc_v;
    acc_n    = bot_ld ? in_sig : gate_op(op, in_sig, bel_acc);
    fire     = fanin_st && top && acc_v && (!col_sync || col_rel);
    in_eff   = hit_sig;
    if (faulty && fault_mode) in_eff[WORD_W-1:HALF_W] = {HALF_W{fsig}};
  end

  // entries created this cycle by the cell itself
  token_t cap_tok;
  logic   cap;
  always_comb begin
    cap_tok = '0;
    cap     = 1'b0;
    if (fanin_st && l_newpipe) begin
      cap         = 1'b1;
      cap_tok.v   = 1'b1;
      cap_tok.up  = (off_reg < 0);
      cap_tok.off = off_reg;
      cap_tok.cnt = cnt_t'(1);
      cap_tok.sig = l_word;
    end else if (recv_st && l_done && (l_fanout_no != 0)) begin
      cap         = 1'b1;
      cap_tok.v   = 1'b1;
      cap_tok.sig = l_word;
      cap_tok.cnt = l_fanout_no;
      if (off_reg >= 0) begin
        cap_tok.up  = 1'b0;
        cap_tok.off = off_reg;
      end else begin
        // the block top is above: travel to the block bottom first
        cap_tok.up  = 1'b1;
        cap_tok.off = off_reg + off_t'(l_fanout_no) - off_t'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= ST_FANOUT;
      off_reg <= '0;
      fno     <= '0;
      op      <= OP_AND;
      inv     <= 1'b0;
      top     <= 1'b0;
      part    <= 1'b0;
      cmp     <= 1'b0;
      held    <= 1'b0;
      faulty  <= 1'b0;
      fsig    <= 1'b0;
      up_q    <= '0;
      dn_q    <= '0;
      pend    <= '0;
      in_v    <= 1'b0;
      acc_v   <= 1'b0;
      done_q  <= 1'b0;
      pov_q   <= 1'b0;
      in_sig  <= '0;
      acc     <= '0;
      word_q  <= '0;
    end else if (cfg_we) begin
      st      <= cfg_in.state;
      off_reg <= cfg_in.off;
      fno     <= cfg_in.fanout_no;
      op      <= cfg_in.op;
      inv     <= cfg_in.inv;
      top     <= cfg_in.top;
      part    <= cfg_in.part;
      cmp     <= 1'b0;
      held    <= 1'b0;
      faulty  <= 1'b0;
      fsig    <= 1'b0;
      up_q    <= '0;
      dn_q    <= '0;
      pend    <= '0;
      in_v    <= 1'b0;
      acc_v   <= 1'b0;
      done_q  <= 1'b0;
      pov_q   <= 1'b0;
      word_q  <= '0;
    end else begin
      // vertical paths: passing entries have priority over the local one
      if (ua_fwd.v) up_q <= ua_fwd;
      else if (launch && p_needs_fwd && pend.up) up_q <= p_fwd;
      else up_q <= '0;
      if (da_fwd.v) dn_q <= da_fwd;
      else if (launch && p_needs_fwd && !pend.up) dn_q <= p_fwd;
      else dn_q <= '0;

      if (cap) pend <= cap_tok;
      else if (launch) pend <= '0;

      done_q <= 1'b0;
      pov_q  <= 1'b0;
      if (col_rel) cmp <= 1'b0;

      unique case (st)
        ST_FANIN, ST_BOTFANIN: begin
          if (hit) begin
            in_v   <= 1'b1;
            in_sig <= in_eff;
          end
          if (take_bel || bot_ld) begin
            acc_v <= 1'b1;
            acc   <= acc_n;
            if (col_sync && part) cmp <= 1'b1;
          end
          if (fire) begin
            done_q <= 1'b1;
            word_q <= acc ^ {WORD_W{inv}};
            in_v   <= 1'b0;
            acc_v  <= 1'b0;
          end else if (!top && acc_v && abv_take) begin
            in_v  <= 1'b0;
            acc_v <= 1'b0;
          end
        end
        ST_FANOUT, ST_NEWPIPE: begin
          st <= ST_FANOUT;
          if (hit) begin
            word_q <= hit_sig;
            if (col_sync) begin
              held <= 1'b1;
              if (part) cmp <= 1'b1;
            end else st <= ST_NEWPIPE;
          end else if (held && col_rel) begin
            held <= 1'b0;
            st   <= ST_NEWPIPE;
          end
        end
        ST_FANOUTRECV, ST_NEWPIPERECV: begin
          st <= ST_FANOUTRECV;
          if (hit) begin
            word_q <= hit_sig;
            if (col_sync) begin
              held <= 1'b1;
              if (part) cmp <= 1'b1;
            end else st <= ST_NEWPIPERECV;
          end else if (held && col_rel) begin
            held <= 1'b0;
            st   <= ST_NEWPIPERECV;
          end
        end
        default: begin  // ST_DETECTING, ST_DETECTED
          if (l_done) begin
            word_q <= l_word;
            pov_q  <= 1'b1;
            if (fault_mode && (l_word[HALF_W-1:0] != l_word[WORD_W-1:HALF_W]))
              st <= ST_DETECTED;
          end
        end
      endcase

      if (inj_we) begin
        faulty <= inj_sel;
        fsig   <= inj_val;
        if (po_st) st <= ST_DETECTING;
      end
    end
  end

  assign up_out      = up_q;
  assign dn_out      = dn_q;
  assign newpipe     = (st == ST_NEWPIPE) || (st == ST_NEWPIPERECV);
  assign word_o      = word_q;
  assign done        = done_q;
  assign fanout_no_o = fno;
  assign acc_v_o     = acc_v;
  assign acc_o       = acc;
  assign po_valid    = pov_q;
  assign detected    = (st == ST_DETECTED);
  assign sync_ok     = !part || cmp;
  assign sync_cmp    = cmp;
  assign busy        = pend.v || up_q.v || dn_q.v || in_v || acc_v || done_q || newpipe || held;

  // A cell serves one signal per pattern; overlapping patterns mean the
  // pipeline period was chosen too short.
  a_one_hit: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({ua_hit, da_hit, launch && p_hit}));
  a_pend_free: assert property (@(posedge clk) disable iff (!rst_n || cfg_we)
                                cap |-> (!pend.v || launch));

endmodule
