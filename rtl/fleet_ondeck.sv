// fleet_ondeck: the On Deck controller of a dock.
//
// It decodes the instruction at the head of the pump and carries out the
// specification's on-deck table:
//   * An outer-looping instruction (OS=0) waits, while OLC>0, until the hatch
//     is sealed, i.e. until the whole loop body has entered the pump.
//   * It executes if its predicate holds and OLC>0. A setOuter with OS=1 is
//     the one exception: it ignores OLC, so that an epilogue can restart a
//     loop after OLC reached zero. Other one-shot instructions are treated
//     like the rest (predicate and OLC>0), as the specification says OLC
//     applies to all instructions but that one.
//   * When it retires, an OS=0 instruction is copied back into the pump if
//     OLC>0 (whether or not it executed); otherwise it is dropped.
//   * move is inner-looping: it executes ILC+1 times and leaves ILC=0. The
//     other instructions execute once in one cycle and leave ILC alone.
//   * A move with I=1 and one of Ti, Di, Do set is torpedoable while it
//     executes: a waiting torpedo then clears ILC and OLC (which unseals the
//     hatch), is consumed, and the move is dropped without a copy.
//
// One iteration of move runs through up to three steps, each waiting for
// its handshake: Ti (take a token from the token destination; output dock
// only, ignored at an input dock), Di (take a word from the data destination
// at an input dock or from the ship at an output dock; Dc also latches it in
// D), then the outputs. At an input dock, Do presents D to the ship and To
// sends a token to the fabric; at an output dock, Do sends D as a data packet
// and To sends a token packet (with both set one data packet is sent). The
// path is the move's path field, or D[11:1] when PD is set. Ti and Di may
// complete in the same cycle; outputs start the cycle after the last input
// completes, so that a word just latched is the one sent. An iteration with
// no waits takes one cycle; a non-move instruction takes one cycle.
//
// The move fields, the ordering of its steps, the treatment of the reserved
// predicate and OS=1 choices marked "to discuss" in the specification are this
// design's own. A torpedo withdraws an output offer that has not been taken.
module fleet_ondeck
  import fleet_pkg::*;
#(
  parameter bit          IS_OUTPUT = 1'b0,
  parameter int unsigned LC_W      = 14
) (
  input  logic   clk,
  input  logic   rst_n,
  // pump head (On Deck)
  input  logic   od_valid,
  input  instr_t od_instr,
  output logic   retire,
  output logic   recirc,
  input  logic   sealed,
  // loop counters
  input  logic [LC_W-1:0] ilc,
  input  logic [LC_W-1:0] olc,
  output logic   lc_torpedo,
  output logic   lc_set_inner,
  output logic   lc_set_outer,
  output logic   lc_dec_inner,
  output logic   lc_dec_outer,
  output logic [LC_W-1:0] lc_value,
  // flags
  output pred_e  pred,
  input  logic   pred_true,
  output logic   fl_set,
  output logic [5:0] fl_next_a,
  output logic [5:0] fl_next_b,
  output logic [5:0] fl_next_s,
  // data latch
  input  word_t  d,
  output logic   dl_capture,
  output word_t  dl_in,
  output logic   dl_lit_en,
  output op_e    dl_lit_op,
  output logic [1:0]  dl_sel,
  output logic [18:0] dl_literal,
  // torpedo destination
  input  logic   torp_valid,
  output logic   torp_ready,
  // fabric destination: data (input dock) or token (output dock)
  input  logic   fin_valid,
  output logic   fin_ready,
  input  word_t  fin_word,
  // fabric source
  output logic    fout_valid,
  input  logic    fout_ready,
  output packet_t fout_pkt,
  // ship side: to the ship (input dock) and from the ship (output dock)
  output logic   to_ship_valid,
  input  logic   to_ship_ready,
  output word_t  to_ship_data,
  input  logic   from_ship_valid,
  output logic   from_ship_ready,
  input  word_t  from_ship_data,
  // observation of what happened this cycle
  output logic   ev_torpedo,
  output logic   ev_wait_seal,
  output logic   ev_iter
);
  dec_t dc;
  logic olc_pos, exec_en, active, is_move, wait_seal, torp_fire;
  logic need_t, need_d, need_so, need_fo;
  logic t_done, d_done, so_done, fo_done;
  logic t_fire, d_fire, so_fire, fo_fire;
  logic t_cmp, d_cmp, out_start, out_ok, iter_done;
  logic src_valid;

  assign dc        = decode(od_instr);
  assign pred      = dc.pred;
  assign olc_pos   = (olc != '0);
  assign wait_seal = od_valid && !dc.os && olc_pos && !sealed;
  assign exec_en   = pred_true && (olc_pos || (dc.os && dc.op == OP_SETOUTER));
  assign active    = od_valid && !wait_seal;
  assign is_move   = (dc.op == OP_MOVE);

  // What each step of a move needs at this kind of dock.
  assign need_t  = IS_OUTPUT && dc.ti;
  assign need_d  = dc.di;
  assign need_so = !IS_OUTPUT && dc.dout;
  assign need_fo = IS_OUTPUT ? (dc.dout || dc.tout) : dc.tout;

  assign torp_fire = active && exec_en && is_move && dc.intr &&
                     (dc.ti || dc.di || dc.dout) && torp_valid;

  assign src_valid = IS_OUTPUT ? from_ship_valid : fin_valid;

  always_comb begin
    t_fire  = 1'b0; d_fire = 1'b0; so_fire = 1'b0; fo_fire = 1'b0;
    t_cmp   = 1'b0; d_cmp  = 1'b0; out_start = 1'b0; out_ok = 1'b0;
    fin_ready       = 1'b0;
    from_ship_ready = 1'b0;
    to_ship_valid   = 1'b0;
    fout_valid      = 1'b0;
    if (active && exec_en && is_move && !torp_fire) begin
      // Ti
      if (need_t && !t_done) begin
        fin_ready = 1'b1;
        t_fire    = fin_valid;
      end
      t_cmp = !need_t || t_done || t_fire;
      // Di
      if (need_d && !d_done && t_cmp) begin
        if (IS_OUTPUT) from_ship_ready = 1'b1;
        else           fin_ready       = 1'b1;
        d_fire = src_valid;
      end
      d_cmp = !need_d || d_done || d_fire;
      // outputs, once all inputs are in and latched
      out_start = t_cmp && (!need_d || d_done);
      if (need_so && !so_done && out_start) begin
        to_ship_valid = 1'b1;
        so_fire       = to_ship_ready;
      end
      if (need_fo && !fo_done && out_start) begin
        fout_valid = 1'b1;
        fo_fire    = fout_ready;
      end
      out_ok = (!need_so || so_done || so_fire) && (!need_fo || fo_done || fo_fire);
    end
  end

  assign iter_done = t_cmp && d_cmp && out_ok;

  assign to_ship_data   = d;
  assign fout_pkt.token = IS_OUTPUT ? !dc.dout : 1'b1;
  assign fout_pkt.path  = dc.pd ? d[PATH_W-1:0] : dc.path;
  assign fout_pkt.payload = d;

  assign dl_capture = d_fire && dc.dc;
  assign dl_in      = IS_OUTPUT ? from_ship_data : fin_word;
  assign dl_lit_en  = active && exec_en &&
                      (dc.op == OP_LITERAL || dc.op == OP_LITHI || dc.op == OP_LITLO);
  assign dl_lit_op  = dc.op;
  assign dl_sel     = dc.sel;
  assign dl_literal = dc.literal;

  assign fl_set    = active && exec_en && dc.op == OP_SETFLAGS;
  assign fl_next_a = dc.next_a;
  assign fl_next_b = dc.next_b;
  assign fl_next_s = dc.next_s;

  // Loop counter commands.
  logic lc_exec;
  assign lc_exec      = active && exec_en &&
                        (dc.op == OP_SETINNER || dc.op == OP_SETOUTER);
  assign lc_torpedo   = torp_fire;
  assign torp_ready   = torp_fire;
  assign lc_set_inner = lc_exec && dc.op == OP_SETINNER &&
                        (dc.lc_mode == LC_LITERAL || dc.lc_mode == LC_DATA);
  assign lc_set_outer = lc_exec && dc.op == OP_SETOUTER &&
                        (dc.lc_mode == LC_LITERAL || dc.lc_mode == LC_DATA);
  assign lc_dec_outer = lc_exec && dc.op == OP_SETOUTER && dc.lc_mode == LC_DEC;
  // A repeating move counts ILC down; setInner in decrement mode does too.
  assign lc_dec_inner = (lc_exec && dc.op == OP_SETINNER && dc.lc_mode == LC_DEC) ||
                        (active && exec_en && is_move && !torp_fire && iter_done &&
                         ilc != '0);
  assign lc_value     = (dc.lc_mode == LC_DATA) ? d[LC_W-1:0] : LC_W'(dc.lc_lit);

  // Retirement of the instruction on deck.
  always_comb begin
    retire = 1'b0;
    recirc = 1'b0;
    if (active) begin
      if (torp_fire) begin
        retire = 1'b1;
      end else if (exec_en && is_move) begin
        retire = iter_done && (ilc == '0);
        recirc = retire && !dc.os && olc_pos;
      end else begin
        retire = 1'b1;
        recirc = !dc.os && olc_pos;
      end
    end
  end

  // Step completion of the move in progress.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_done  <= 1'b0;
      d_done  <= 1'b0;
      so_done <= 1'b0;
      fo_done <= 1'b0;
    end else if (retire || iter_done || torp_fire) begin
      t_done  <= 1'b0;
      d_done  <= 1'b0;
      so_done <= 1'b0;
      fo_done <= 1'b0;
    end else begin
      if (t_fire)  t_done  <= 1'b1;
      if (d_fire)  d_done  <= 1'b1;
      if (so_fire) so_done <= 1'b1;
      if (fo_fire) fo_done <= 1'b1;
    end
  end

  assign ev_torpedo   = torp_fire;
  assign ev_wait_seal = wait_seal;
  assign ev_iter      = active && exec_en && is_move && !torp_fire && iter_done;

  // A copy is only written back together with a retirement.
  assert property (@(posedge clk) disable iff (!rst_n) recirc |-> retire);
  // Nothing retires from an empty pump.
  assert property (@(posedge clk) disable iff (!rst_n) retire |-> od_valid);

endmodule
