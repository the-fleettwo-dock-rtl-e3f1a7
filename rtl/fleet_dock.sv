// fleet_dock: one FleetTwo dock, the programmable element between a ship
// port and the switch fabric.
//
// Instructions arrive at the instruction destination as 37-bit words whose
// upper 26 bits are the instruction (the lower 11 bits held the dispatch
// path). They queue in the horn fifo, pass the hatch into the pump and
// execute at On Deck, where they move words between the fabric, the data
// latch and the ship, load literals, set flags and set the loop counters. An
// outer loop is formed by the instructions in the pump copying themselves back
// into it while OLC>0; a tail instruction seals the hatch behind the loop body
// so that the next instructions (the epilogue) wait in the horn fifo until
// OLC is set to zero, by a decrement, a setOuter or a torpedo.
//
// IS_OUTPUT selects the kind of dock:
//   input dock  (0): fabric -> data destination fifo -> D -> ship; it sends
//                    tokens to the fabric.
//   output dock (1): ship -> D -> fabric (data or token packets); its fabric
//                    destination takes tokens.
// Each fabric destination, including the torpedo destination, has its own
// fifo, so a torpedo is never stuck behind queued data. The unused ship-side
// handshake of each kind is held idle.
//
// Interface timing: every handshake is valid/ready, transferring on a rising
// clock edge where both are high. Reset is asynchronous, active low. The
// structure follows the specification's dock drawings; the fifo depths and counter
// width are this design's choices.
module fleet_dock
  import fleet_pkg::*;
#(
  parameter bit          IS_OUTPUT   = 1'b0,
  parameter int unsigned PUMP_DEPTH  = 4,
  parameter int unsigned HORN_DEPTH  = 4,
  parameter int unsigned DEST_DEPTH  = 4,
  parameter int unsigned TORP_DEPTH  = 1,
  parameter int unsigned LC_W        = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  // instruction destination
  input  logic    instr_valid,
  output logic    instr_ready,
  input  word_t   instr_word,
  // torpedo destination (payload ignored)
  input  logic    torp_valid,
  output logic    torp_ready,
  // data destination (input dock) or token destination (output dock)
  input  logic    dest_valid,
  output logic    dest_ready,
  input  word_t   dest_word,
  // source into the switch fabric
  output logic    fout_valid,
  input  logic    fout_ready,
  output packet_t fout_pkt,
  // ship side
  output logic    to_ship_valid,
  input  logic    to_ship_ready,
  output word_t   to_ship_data,
  input  logic    from_ship_valid,
  output logic    from_ship_ready,
  input  word_t   from_ship_data,
  // state, for observation
  output logic    sealed,
  output logic [LC_W-1:0] ilc,
  output logic [LC_W-1:0] olc,
  output logic    flag_a,
  output logic    flag_b,
  output logic    flag_s,
  output word_t   d,
  output logic    ev_torpedo,
  output logic    ev_wait_seal,
  output logic    ev_iter
);
  // horn -> pump
  logic   hp_valid, hp_ready;
  instr_t hp_instr;
  logic   od_valid, retire, recirc;
  instr_t od_instr;
  logic [$clog2(PUMP_DEPTH+1)-1:0] pump_count;

  // loop counters
  logic lc_torpedo, lc_set_inner, lc_set_outer, lc_dec_inner, lc_dec_outer;
  logic [LC_W-1:0] lc_value;
  logic olc_zeroed;

  // flags
  pred_e pred;
  logic  pred_true, fl_set, s_load, s_value;
  logic [5:0] fl_next_a, fl_next_b, fl_next_s;

  // data latch
  logic  dl_capture, dl_lit_en;
  word_t dl_in;
  op_e   dl_lit_op;
  logic [1:0]  dl_sel;
  logic [18:0] dl_literal;

  // destination fifos
  logic  tq_valid, tq_ready;
  logic  fq_valid, fq_ready;
  word_t fq_word;
  logic [0:0] tq_unused;
  logic [$clog2(TORP_DEPTH+1)-1:0] tq_count;
  logic [$clog2(DEST_DEPTH+1)-1:0] fq_count;

  fleet_horn #(.HORN_DEPTH(HORN_DEPTH)) u_horn (
    .clk, .rst_n,
    .in_valid(instr_valid), .in_ready(instr_ready),
    .in_instr(instr_of_word(instr_word)),
    .out_valid(hp_valid), .out_ready(hp_ready), .out_instr(hp_instr),
    .unseal(olc_zeroed), .sealed
  );

  fleet_pump #(.DEPTH(PUMP_DEPTH)) u_pump (
    .clk, .rst_n,
    .in_valid(hp_valid), .in_ready(hp_ready), .in_instr(hp_instr),
    .od_valid, .od_instr, .retire, .recirc, .count(pump_count)
  );

  fleet_fifo #(.WIDTH(1), .DEPTH(TORP_DEPTH)) u_torp_dest (
    .clk, .rst_n,
    .in_valid(torp_valid), .in_ready(torp_ready), .in_data(1'b1),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_data(tq_unused),
    .count(tq_count)
  );

  fleet_fifo #(.WIDTH(WORD_W), .DEPTH(DEST_DEPTH)) u_dest (
    .clk, .rst_n,
    .in_valid(dest_valid), .in_ready(dest_ready), .in_data(dest_word),
    .out_valid(fq_valid), .out_ready(fq_ready), .out_data(fq_word),
    .count(fq_count)
  );

  fleet_loop_counters #(.LC_W(LC_W)) u_lc (
    .clk, .rst_n,
    .torpedo(lc_torpedo), .set_inner(lc_set_inner), .set_outer(lc_set_outer),
    .dec_inner(lc_dec_inner), .dec_outer(lc_dec_outer), .value(lc_value),
    .ilc, .olc, .olc_zeroed
  );

  fleet_flags u_flags (
    .clk, .rst_n,
    .set_en(fl_set), .next_a(fl_next_a), .next_b(fl_next_b), .next_s(fl_next_s),
    .s_load, .s_value, .pred, .pred_true, .flag_a, .flag_b, .flag_s
  );

  fleet_data_latch u_dl (
    .clk, .rst_n,
    .capture(dl_capture), .in_word(dl_in),
    .lit_en(dl_lit_en), .lit_op(dl_lit_op), .sel(dl_sel), .literal(dl_literal),
    .d, .s_load, .s_value
  );

  fleet_ondeck #(.IS_OUTPUT(IS_OUTPUT), .LC_W(LC_W)) u_ondeck (
    .clk, .rst_n,
    .od_valid, .od_instr, .retire, .recirc, .sealed,
    .ilc, .olc,
    .lc_torpedo, .lc_set_inner, .lc_set_outer, .lc_dec_inner, .lc_dec_outer, .lc_value,
    .pred, .pred_true, .fl_set, .fl_next_a, .fl_next_b, .fl_next_s,
    .d, .dl_capture, .dl_in, .dl_lit_en, .dl_lit_op, .dl_sel, .dl_literal,
    .torp_valid(tq_valid), .torp_ready(tq_ready),
    .fin_valid(fq_valid), .fin_ready(fq_ready), .fin_word(fq_word),
    .fout_valid, .fout_ready, .fout_pkt,
    .to_ship_valid, .to_ship_ready, .to_ship_data,
    .from_ship_valid, .from_ship_ready, .from_ship_data,
    .ev_torpedo, .ev_wait_seal, .ev_iter
  );

endmodule
