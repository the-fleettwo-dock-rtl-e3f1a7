// tb_fleet_dock: whole-dock programs on an input dock and an output dock.
// The testbench plays the switch fabric (it delivers instruction words, data,
// tokens and torpedoes, and collects packets) and the ship (it takes words
// from the input dock and offers words to the output dock). Each scenario
// resets the docks, sends a program, and compares what reaches the ship or
// the fabric with the sequence the program must produce:
//   A  outer loop of three instructions run 3 times, tail, then an epilogue
//      that must wait behind the sealed hatch until OLC reaches zero
//   B  inner loop (setInner 2, one move runs 3 times) and predicates
//   C  torpedo ending a long loop, with the epilogue running afterwards
//   D  output dock loop waiting for tokens, then a flag-predicated token
//      send that depends on S following bit 37 of a literalhi
//   E  OLC loaded from the data latch; an epilogue that sets OLC to zero,
//      so that the next one-shot literal is not executed
//   F  output dock inner loop waiting for tokens, ended by a torpedo that
//      also clears ILC; the instructions behind it then run
module tb_fleet_dock;
  import fleet_pkg::*;
  localparam int unsigned LC_W = 14;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // [0] input dock, [1] output dock
  logic [1:0] instr_valid, instr_ready, torp_valid, torp_ready, dest_valid, dest_ready;
  word_t [1:0] instr_word, dest_word, d, to_ship_data, from_ship_data;
  logic [1:0] fout_valid, fout_ready, to_ship_valid, to_ship_ready, from_ship_valid, from_ship_ready;
  packet_t [1:0] fout_pkt;
  logic [1:0] sealed, flag_a, flag_b, flag_s, ev_torpedo, ev_wait_seal, ev_iter;
  logic [1:0][LC_W-1:0] ilc, olc;

  for (genvar g = 0; g < 2; g++) begin : g_dock
    fleet_dock #(.IS_OUTPUT(g == 1)) dut (
      .clk, .rst_n,
      .instr_valid(instr_valid[g]), .instr_ready(instr_ready[g]), .instr_word(instr_word[g]),
      .torp_valid(torp_valid[g]), .torp_ready(torp_ready[g]),
      .dest_valid(dest_valid[g]), .dest_ready(dest_ready[g]), .dest_word(dest_word[g]),
      .fout_valid(fout_valid[g]), .fout_ready(fout_ready[g]), .fout_pkt(fout_pkt[g]),
      .to_ship_valid(to_ship_valid[g]), .to_ship_ready(to_ship_ready[g]), .to_ship_data(to_ship_data[g]),
      .from_ship_valid(from_ship_valid[g]), .from_ship_ready(from_ship_ready[g]),
      .from_ship_data(from_ship_data[g]),
      .sealed(sealed[g]), .ilc(ilc[g]), .olc(olc[g]), .flag_a(flag_a[g]), .flag_b(flag_b[g]),
      .flag_s(flag_s[g]), .d(d[g]), .ev_torpedo(ev_torpedo[g]), .ev_wait_seal(ev_wait_seal[g]),
      .ev_iter(ev_iter[g])
    );
  end

  always #5 clk = ~clk;

  // fabric and ship queues
  word_t  iq[2][$];      // instruction words to deliver
  word_t  dq[2][$];      // data (input dock) or tokens (output dock) to deliver
  word_t  sq[$];         // words the ship offers to the output dock
  word_t  ship_got[$];   // words the input dock gave its ship
  packet_t pkt_got[2][$];
  int     n_torp[2];
  int     cyc;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // Drivers: offer the head of each queue; pop on handshake.
  always @(negedge clk) begin
    for (int g = 0; g < 2; g++) begin
      instr_valid[g] = iq[g].size() != 0;
      instr_word[g]  = iq[g].size() != 0 ? iq[g][0] : '0;
      dest_valid[g]  = dq[g].size() != 0;
      dest_word[g]   = dq[g].size() != 0 ? dq[g][0] : '0;
      torp_valid[g]  = n_torp[g] != 0;
      fout_ready[g]  = $urandom_range(0, 3) != 0;
    end
    to_ship_ready[0]   = $urandom_range(0, 3) != 0;
    from_ship_valid[1] = sq.size() != 0;
    from_ship_data[1]  = sq.size() != 0 ? sq[0] : '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int g = 0; g < 2; g++) begin
        if (instr_valid[g] && instr_ready[g]) void'(iq[g].pop_front());
        if (dest_valid[g] && dest_ready[g]) void'(dq[g].pop_front());
        if (torp_valid[g] && torp_ready[g]) n_torp[g]--;
        if (fout_valid[g] && fout_ready[g]) pkt_got[g].push_back(fout_pkt[g]);
      end
      if (to_ship_valid[0] && to_ship_ready[0]) ship_got.push_back(to_ship_data[0]);
      if (from_ship_valid[1] && from_ship_ready[1]) void'(sq.pop_front());
    end
  end

  function automatic word_t w(instr_t i);
    return {i, 11'h000};
  endfunction

  task automatic restart();
    rst_n = 0;
    for (int g = 0; g < 2; g++) begin
      iq[g].delete(); dq[g].delete(); pkt_got[g].delete(); n_torp[g] = 0;
    end
    sq.delete(); ship_got.delete();
    from_ship_valid[0] = 0; from_ship_data[0] = '0; to_ship_ready[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
  endtask

  task automatic wait_until(ref word_t q[$], input int n, input int limit);
    for (int k = 0; k < limit && q.size() < n; k++) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen_wait_seal, seen_iter, seen_torp, seen_sealed;
  always @(posedge clk) begin
    if (|ev_wait_seal) seen_wait_seal++;
    if (|ev_iter)      seen_iter++;
    if (|ev_torpedo)   seen_torp++;
    if (|sealed)       seen_sealed++;
  end

  initial begin
    cyc = 0;
    for (int g = 0; g < 2; g++) n_torp[g] = 0;
    restart();

    // ---------------- A: outer loop and epilogue (input dock)
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd3)));
    iq[0].push_back(w(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'h0)));
    iq[0].push_back(w(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'h05)));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b0, PRED_ALWAYS, LC_DEC, 14'd0)));
    iq[0].push_back(w(enc_tail()));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[0].push_back(w(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h00077)));
    iq[0].push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 11'h0)));
    for (int k = 0; k < 5; k++) dq[0].push_back(37'h0_1000_0000 + 37'(k));
    wait_until(ship_got, 4, 2000);
    repeat (20) @(posedge clk);
    check(ship_got.size() == 4, "A: four words to the ship");
    if (ship_got.size() == 4) begin
      for (int k = 0; k < 3; k++) check(ship_got[k] == 37'h0_1000_0000 + 37'(k), "A: loop data");
      check(ship_got[3] == 37'h77, "A: epilogue literal after the loop");
    end
    check(pkt_got[0].size() == 3, "A: three tokens");
    foreach (pkt_got[0][k]) check(pkt_got[0][k].token && pkt_got[0][k].path == 11'h05, "A: token path");
    check(dq[0].size() + int'(g_dock[0].dut.fq_count) == 2, "A: two data words left unread");
    check(olc[0] == 14'd1 && !sealed[0], "A: OLC from epilogue, hatch open");

    // ---------------- B: inner loop and predicates (input dock)
    restart();
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[0].push_back(w(enc_setloop(1'b0, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd2)));
    iq[0].push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'h0)));
    iq[0].push_back(w(enc_setflags(1'b1, PRED_ALWAYS, F_A | F_NA, 6'b0, 6'b0)));
    iq[0].push_back(w(enc_literal(1'b1, PRED_B, 2'b10, 19'h00BBB)));
    iq[0].push_back(w(enc_literal(1'b1, PRED_A, 2'b10, 19'h00AAA)));
    iq[0].push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 11'h0)));
    for (int k = 0; k < 4; k++) dq[0].push_back(37'h0_2000_0000 + 37'(k));
    wait_until(ship_got, 4, 2000);
    repeat (20) @(posedge clk);
    check(ship_got.size() == 4, "B: four words");
    if (ship_got.size() == 4) begin
      for (int k = 0; k < 3; k++) check(ship_got[k] == 37'h0_2000_0000 + 37'(k), "B: inner loop data");
      check(ship_got[3] == 37'h00AAA, "B: predicated literal");
    end
    check(ilc[0] == 0 && flag_a[0] && !flag_b[0], "B: ILC left at zero, flags");
    check(dq[0].size() + int'(g_dock[0].dut.fq_count) == 1, "B: one word left");

    // ---------------- C: torpedo (input dock)
    restart();
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1000)));
    iq[0].push_back(w(enc_move(1'b1, 1'b0, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'h0)));
    iq[0].push_back(w(enc_tail()));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[0].push_back(w(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h00ccc)));
    iq[0].push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 11'h0)));
    dq[0].push_back(37'h11); dq[0].push_back(37'h22);
    wait_until(ship_got, 2, 2000);
    repeat (30) @(posedge clk);
    check(ship_got.size() == 2 && sealed[0] && olc[0] == 14'd1000, "C: loop running and waiting");
    n_torp[0] = 1;
    wait_until(ship_got, 3, 2000);
    repeat (20) @(posedge clk);
    check(n_torp[0] == 0, "C: torpedo consumed");
    check(ship_got.size() == 3 && ship_got[ship_got.size()-1] == 37'hccc, "C: epilogue after torpedo");
    check(!sealed[0] && olc[0] == 14'd1, "C: hatch reopened");

    // ---------------- D: output dock, tokens, S flag and predicates
    restart();
    iq[1].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd2)));
    iq[1].push_back(w(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'h09)));
    iq[1].push_back(w(enc_setloop(1'b1, 1'b0, PRED_ALWAYS, LC_DEC, 14'd0)));
    iq[1].push_back(w(enc_tail()));
    iq[1].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[1].push_back(w(enc_lithi(1'b1, PRED_ALWAYS, 18'h20000)));
    iq[1].push_back(w(enc_setflags(1'b1, PRED_ALWAYS, F_S, F_NS, 6'b0)));
    iq[1].push_back(w(enc_move(1'b0, 1'b1, PRED_A, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'h04)));
    iq[1].push_back(w(enc_move(1'b0, 1'b1, PRED_B, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'h06)));
    sq.push_back(37'h1_0000_00AA); sq.push_back(37'h0_0000_00BB);
    repeat (60) @(posedge clk);
    check(pkt_got[1].size() == 0, "D: no send before a token");
    dq[1].push_back('0);
    repeat (60) @(posedge clk);
    check(pkt_got[1].size() == 1, "D: one send per token");
    dq[1].push_back('0);
    for (int k = 0; k < 200 && pkt_got[1].size() < 3; k++) @(posedge clk);
    repeat (20) @(posedge clk);
    check(pkt_got[1].size() == 3, "D: three packets");
    if (pkt_got[1].size() == 3) begin
      check(!pkt_got[1][0].token && pkt_got[1][0].payload == 37'h1_0000_00AA && pkt_got[1][0].path == 11'h09, "D: data 1");
      check(!pkt_got[1][1].token && pkt_got[1][1].payload == 37'h0_0000_00BB && pkt_got[1][1].path == 11'h09, "D: data 2");
      check(pkt_got[1][2].token && pkt_got[1][2].path == 11'h04, "D: token by flag A from S");
    end
    check(!flag_s[1] && flag_a[1] && !flag_b[1], "D: flags (setFlags with an empty nextS clears S)");

    // ---------------- E: OLC from D, OLC set to zero (input dock)
    restart();
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[0].push_back(w(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h00002)));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_DATA, 14'd0)));
    iq[0].push_back(w(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'h0)));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b0, PRED_ALWAYS, LC_DEC, 14'd0)));
    iq[0].push_back(w(enc_tail()));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd0)));
    iq[0].push_back(w(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h00099)));
    iq[0].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[0].push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 11'h0)));
    for (int k = 0; k < 3; k++) dq[0].push_back(37'h0_3000_0000 + 37'(k));
    wait_until(ship_got, 3, 2000);
    repeat (20) @(posedge clk);
    check(ship_got.size() == 3, "E: three words");
    if (ship_got.size() == 3) begin
      check(ship_got[0] == 37'h0_3000_0000 && ship_got[1] == 37'h0_3000_0001, "E: two passes from OLC=D");
      check(ship_got[2] == 37'h0_3000_0001, "E: literal skipped while OLC=0");
    end

    // ---------------- F: torpedo in an inner loop (output dock)
    restart();
    iq[1].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[1].push_back(w(enc_setloop(1'b0, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd5)));
    iq[1].push_back(w(enc_move(1'b1, 1'b1, PRED_ALWAYS, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'h08)));
    iq[1].push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq[1].push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'h09)));
    dq[1].push_back('0); dq[1].push_back('0);
    repeat (80) @(posedge clk);
    check(pkt_got[1].size() == 2 && ilc[1] == 14'd3, "F: two of six iterations, ILC counting down");
    n_torp[1] = 1;
    repeat (40) @(posedge clk);
    check(n_torp[1] == 0 && ilc[1] == 0 && olc[1] == 14'd1, "F: torpedo cleared ILC, epilogue set OLC");
    check(pkt_got[1].size() == 3, "F: three tokens");
    if (pkt_got[1].size() == 3) begin
      check(pkt_got[1][0].path == 11'h08 && pkt_got[1][1].path == 11'h08, "F: inner loop tokens");
      check(pkt_got[1][2].path == 11'h09 && pkt_got[1][2].token, "F: token after torpedo");
    end

    check(seen_wait_seal > 0 && seen_iter > 0 && seen_torp == 2 && seen_sealed > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
