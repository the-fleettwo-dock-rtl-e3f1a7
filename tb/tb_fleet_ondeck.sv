// tb_fleet_ondeck: directed cases of the on-deck table, run on an input-dock
// and an output-dock controller that share their inputs. The testbench plays
// the pump, the counters, the flags and the data latch: it sets the
// instruction on deck and the counter values and checks, cycle by cycle,
// the retire/write-back decision, the commands to the other blocks, the
// handshakes of move, inner looping and the torpedo.
module tb_fleet_ondeck;
  import fleet_pkg::*;
  localparam int unsigned LC_W = 14;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // shared inputs
  logic   od_valid, sealed, pred_true, torp_valid, fin_valid, fout_ready;
  logic   to_ship_ready, from_ship_valid;
  instr_t od_instr;
  logic [LC_W-1:0] ilc, olc;
  word_t  d, fin_word, from_ship_data;

  // outputs per instance: index 0 input dock, 1 output dock
  logic [1:0] retire, recirc, lc_torpedo, lc_set_inner, lc_set_outer, lc_dec_inner, lc_dec_outer;
  logic [1:0][LC_W-1:0] lc_value;
  pred_e [1:0] pred;
  logic [1:0] fl_set, dl_capture, dl_lit_en, torp_ready, fin_ready, fout_valid;
  logic [1:0] to_ship_valid, from_ship_ready, ev_torpedo, ev_wait_seal, ev_iter;
  logic [1:0][5:0] fl_next_a, fl_next_b, fl_next_s;
  word_t [1:0] dl_in, to_ship_data;
  op_e [1:0] dl_lit_op;
  logic [1:0][1:0] dl_sel;
  logic [1:0][18:0] dl_literal;
  packet_t [1:0] fout_pkt;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    fleet_ondeck #(.IS_OUTPUT(g == 1), .LC_W(LC_W)) dut (
      .clk, .rst_n, .od_valid, .od_instr, .retire(retire[g]), .recirc(recirc[g]), .sealed,
      .ilc, .olc, .lc_torpedo(lc_torpedo[g]), .lc_set_inner(lc_set_inner[g]),
      .lc_set_outer(lc_set_outer[g]), .lc_dec_inner(lc_dec_inner[g]),
      .lc_dec_outer(lc_dec_outer[g]), .lc_value(lc_value[g]),
      .pred(pred[g]), .pred_true, .fl_set(fl_set[g]), .fl_next_a(fl_next_a[g]),
      .fl_next_b(fl_next_b[g]), .fl_next_s(fl_next_s[g]),
      .d, .dl_capture(dl_capture[g]), .dl_in(dl_in[g]), .dl_lit_en(dl_lit_en[g]),
      .dl_lit_op(dl_lit_op[g]), .dl_sel(dl_sel[g]), .dl_literal(dl_literal[g]),
      .torp_valid, .torp_ready(torp_ready[g]),
      .fin_valid, .fin_ready(fin_ready[g]), .fin_word,
      .fout_valid(fout_valid[g]), .fout_ready, .fout_pkt(fout_pkt[g]),
      .to_ship_valid(to_ship_valid[g]), .to_ship_ready, .to_ship_data(to_ship_data[g]),
      .from_ship_valid, .from_ship_ready(from_ship_ready[g]), .from_ship_data,
      .ev_torpedo(ev_torpedo[g]), .ev_wait_seal(ev_wait_seal[g]), .ev_iter(ev_iter[g])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle_inputs();
    torp_valid = 0; fin_valid = 0; fout_ready = 0; to_ship_ready = 0; from_ship_valid = 0;
  endtask

  // Put an instruction on deck and clear the per-move state with a reset.
  task automatic load(instr_t i, int o, int il, bit s, bit p);
    @(negedge clk);
    rst_n = 0; #1; rst_n = 1;
    od_valid = 1; od_instr = i; olc = LC_W'(o); ilc = LC_W'(il); sealed = s; pred_true = p;
    idle_inputs();
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    od_valid = 0; od_instr = '0; olc = 0; ilc = 0; sealed = 0; pred_true = 0;
    d = '0; fin_word = '0; from_ship_data = '0;
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. outer-looping instruction waits for the hatch to be sealed
    load(enc_setflags(1'b0, PRED_ALWAYS, F_NA, 6'b0, 6'b0), 3, 0, 0, 1);
    check(retire == 2'b00 && fl_set == 2'b00 && ev_wait_seal == 2'b11, "wait for sealed");
    // 2. sealed: executes and is written back
    sealed = 1; #1;
    check(retire == 2'b11 && recirc == 2'b11 && fl_set == 2'b11, "execute and recirculate");
    check(fl_next_a[0] == F_NA, "setFlags field");
    // 3. OLC=0: dropped, not executed
    load(enc_setflags(1'b0, PRED_ALWAYS, F_NA, 6'b0, 6'b0), 0, 0, 0, 1);
    check(retire == 2'b11 && recirc == 2'b00 && fl_set == 2'b00 && ev_wait_seal == 2'b00, "OLC=0 drops");
    // 4. predicate false, OLC>0, sealed: not executed but written back
    load(enc_litlo(1'b0, PRED_A, 19'h1234), 2, 0, 1, 0);
    check(retire == 2'b11 && recirc == 2'b11 && dl_lit_en == 2'b00, "pred false recirculates");
    // 5. one-shot setOuter runs with OLC=0
    load(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd7), 0, 0, 0, 1);
    check(lc_set_outer == 2'b11 && lc_value[0] == 14'd7 && retire == 2'b11 && recirc == 2'b00, "OS=1 setOuter");
    // 6. one-shot literal with OLC=0 is not executed
    load(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h5), 0, 0, 0, 1);
    check(dl_lit_en == 2'b00 && retire == 2'b11, "OS=1 literal needs OLC>0");
    // 7. one-shot literal with OLC>0 runs without waiting for the hatch
    load(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h5), 1, 0, 0, 1);
    check(dl_lit_en == 2'b11 && dl_sel[0] == 2'b10 && dl_literal[1] == 19'h5 && recirc == 2'b00, "OS=1 literal");
    // 8. setInner from the data latch, setOuter decrement
    d = 37'h1_2345_6789;
    load(enc_setloop(1'b0, 1'b1, PRED_ALWAYS, LC_DATA, 14'd0), 1, 0, 0, 1);
    check(lc_set_inner == 2'b11 && lc_value[1] == 14'h2789, "setInner from D");
    load(enc_setloop(1'b1, 1'b0, PRED_ALWAYS, LC_DEC, 14'd0), 1, 0, 1, 1);
    check(lc_dec_outer == 2'b11 && lc_set_outer == 2'b00 && recirc == 2'b11, "setOuter decrement");

    // 9. input dock move Di Dc Do To, ILC=0
    load(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 11'h2A5), 1, 0, 0, 1);
    check(fin_ready[0] == 1 && retire[0] == 0, "input move waits for data");
    fin_valid = 1; fin_word = 37'h0_0000_0ABC; #1;
    check(dl_capture[0] == 1 && dl_in[0] == 37'h0_0000_0ABC && to_ship_valid[0] == 0, "capture");
    @(negedge clk); fin_valid = 0; d = 37'h0_0000_0ABC; #1;
    check(fin_ready[0] == 0 && to_ship_valid[0] == 1 && fout_valid[0] == 1, "outputs offered after capture");
    check(to_ship_data[0] == d && fout_pkt[0].token == 1 && fout_pkt[0].path == 11'h2A5, "outputs");
    to_ship_ready = 1; #1;
    check(retire[0] == 0, "token not yet taken");
    @(negedge clk); to_ship_ready = 0; fout_ready = 1; #1;
    check(to_ship_valid[0] == 0 && fout_valid[0] == 1 && retire[0] == 1 && recirc[0] == 0, "move done");

    // 10. inner loop: ILC=2 gives three iterations of a token send
    load(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'h3), 1, 2, 1, 1);
    fout_ready = 1;
    for (int k = 2; k >= 0; k--) begin
      #1;
      check(ev_iter[0] && lc_dec_inner[0] == (k != 0) && retire[0] == (k == 0), "inner iteration");
      check(recirc[0] == (k == 0), "inner loop write-back on last iteration");
      @(negedge clk); ilc = LC_W'(k > 0 ? k - 1 : 0);
    end

    // 11. output dock move Ti Di Dc Do with path from data
    load(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1, 11'h0), 1, 0, 0, 1);
    check(fin_ready[1] == 1 && from_ship_ready[1] == 0, "output move waits for token first");
    from_ship_valid = 1; from_ship_data = 37'h1_0000_0123; #1;
    check(dl_capture[1] == 0, "no capture before token");
    fin_valid = 1; #1;
    check(from_ship_ready[1] == 1 && dl_capture[1] == 1 && dl_in[1] == 37'h1_0000_0123, "token and data same cycle");
    @(negedge clk); fin_valid = 0; from_ship_valid = 0; d = 37'h1_0000_0123; #1;
    check(fout_valid[1] == 1 && fout_pkt[1].token == 0 && fout_pkt[1].path == 11'h123 &&
          fout_pkt[1].payload == d, "data packet to path from D");
    fout_ready = 1; #1;
    check(retire[1] == 1, "output move done");

    // 12. torpedo: interruptible move waiting for data
    load(enc_move(1'b1, 1'b0, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 11'h0), 2, 3, 1, 1);
    check(torp_ready == 2'b00 && retire == 2'b00, "waiting move");
    torp_valid = 1; #1;
    check(torp_ready == 2'b11 && lc_torpedo == 2'b11 && retire == 2'b11 && recirc == 2'b00 &&
          ev_torpedo == 2'b11, "torpedo");
    check(fin_ready == 2'b00 && from_ship_ready == 2'b00, "torpedo takes no data");
    // not interruptible: the torpedo waits
    load(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 11'h0), 2, 0, 1, 1);
    torp_valid = 1; #1;
    check(torp_ready == 2'b00 && lc_torpedo == 2'b00 && retire == 2'b00, "I=0 not torpedoable");
    // a literal is never torpedoable
    load(enc_literal(1'b0, PRED_ALWAYS, 2'b00, 19'h1), 2, 0, 1, 1);
    torp_valid = 1; #1;
    check(torp_ready == 2'b00 && dl_lit_en == 2'b11, "literal not torpedoable");
    // 13. empty pump: nothing retires
    load('0, 1, 0, 1, 1);
    od_valid = 0; #1;
    check(retire == 2'b00 && fl_set == 2'b00 && dl_lit_en == 2'b00, "empty");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
