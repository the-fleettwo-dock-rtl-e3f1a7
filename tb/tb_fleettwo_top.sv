// tb_fleettwo_top: end-to-end run of both docks at their default sizes.
//
// The testbench is the switch fabric and the two ships. The output dock
// streams N words from its ship into the fabric (path 1), which carries them
// to the input dock's data destination; the input dock hands each word to its
// ship and returns a credit token (path 2) to the output dock's token
// destination. The output dock sends a word only after it has taken a token,
// so at most two words are in flight. Programs:
//   input dock : setOuter 1; setInner 1; move To  (inner loop: 2 credits)
//                setOuter 1000; loop { move I Di Dc Do; move To }; tail
//                epilogue: setOuter 1; literal 0x5EED; move Do
//   output dock: setOuter N; loop { move Ti Di Dc Do; setOuter dec }; tail
//                epilogue: setOuter 1; literalhi (bit 37 set); setFlags A:=S,
//                B:=~S; move[if B] To path 4; move[if A] To path 3;
//                setInner 1; move Di Dc Do PD (twice: dispatch two
//                instruction words from the ship, each to the path in its
//                own low 11 bits, here the input dock's instruction
//                destination, path 7)
// The input dock's loop is ended by a torpedo once the ship has N words. The
// test checks every word's value and order, the credit count, the end
// markers, and that each mechanism occurred: wait for the sealed hatch,
// write-back into the pump, sealing and unsealing, inner looping, torpedo,
// a skipped predicate, S loading, dispatch, and stalls on both ship
// handshakes.
module tb_fleettwo_top;
  import fleet_pkg::*;
  localparam int N = 40;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;

  logic    in_instr_valid, in_instr_ready, in_torp_valid, in_torp_ready;
  logic    in_data_valid, in_data_ready, in_tok_valid, in_tok_ready;
  word_t   in_instr_word, in_data_word, in_ship_data, out_instr_word, out_ship_data;
  packet_t in_tok_pkt, out_pkt;
  logic    in_ship_valid, in_ship_ready;
  logic    out_instr_valid, out_instr_ready, out_torp_valid, out_torp_ready;
  logic    out_tok_valid, out_tok_ready, out_pkt_valid, out_pkt_ready;
  logic    out_ship_valid, out_ship_ready;
  logic [1:0] sealed, ev_torpedo, ev_wait_seal, ev_iter;
  logic [1:0][13:0] ilc, olc;
  logic [1:0][2:0] flags;
  word_t [1:0] d;

  fleettwo_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic word_t w(instr_t i);
    return {i, 11'h000};
  endfunction

  function automatic word_t src_word(int k);
    return {k[0], 4'h0, 32'(k * 32'h9E37_79B9)};
  endfunction

  word_t iq_in[$], iq_out[$], ship_src[$], ship_got[$], data_net[$];
  int    tok_net, n_torp, n_done3, n_done4, n_bad_path, n_dispatch;

  // fabric and ship drivers
  always @(negedge clk) begin
    in_instr_valid  = iq_in.size() != 0;
    in_instr_word   = iq_in.size() != 0 ? iq_in[0] : '0;
    out_instr_valid = iq_out.size() != 0;
    out_instr_word  = iq_out.size() != 0 ? iq_out[0] : '0;
    in_data_valid   = data_net.size() != 0;
    in_data_word    = data_net.size() != 0 ? data_net[0] : '0;
    out_tok_valid   = tok_net != 0;
    in_torp_valid   = n_torp != 0;
    out_torp_valid  = 1'b0;
    out_ship_valid  = ship_src.size() != 0 && $urandom_range(0, 3) != 0;
    out_ship_data   = ship_src.size() != 0 ? ship_src[0] : '0;
    in_ship_ready   = ((cyc / 64) % 3 == 1) ? 1'b0 : ($urandom_range(0, 3) != 0);
    out_pkt_ready   = $urandom_range(0, 4) != 0;
    in_tok_ready    = $urandom_range(0, 4) != 0;
  end

  int st_in_ship, st_out_ship, n_recirc, n_inner, n_seal, n_unseal, n_skip, n_s_load;
  logic [1:0] sealed_q;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_instr_valid && in_instr_ready) void'(iq_in.pop_front());
      if (out_instr_valid && out_instr_ready) void'(iq_out.pop_front());
      if (in_data_valid && in_data_ready) void'(data_net.pop_front());
      if (out_tok_valid && out_tok_ready) tok_net--;
      if (in_torp_valid && in_torp_ready) n_torp--;
      if (out_ship_valid && out_ship_ready) void'(ship_src.pop_front());
      if (in_ship_valid && in_ship_ready) ship_got.push_back(in_ship_data);
      if (out_pkt_valid && out_pkt_ready) begin
        case (out_pkt.path)
          11'd1:   if (!out_pkt.token) data_net.push_back(out_pkt.payload); else n_bad_path++;
          11'd3:   n_done3++;
          11'd7:   if (!out_pkt.token) begin iq_in.push_back(out_pkt.payload); n_dispatch++; end
                   else n_bad_path++;
          11'd4:   n_done4++;
          default: n_bad_path++;
        endcase
      end
      if (in_tok_valid && in_tok_ready) begin
        if (in_tok_pkt.path == 11'd2 && in_tok_pkt.token) tok_net++;
        else n_bad_path++;
      end
      // mechanism counters
      if (in_ship_valid && !in_ship_ready) st_in_ship++;
      if (out_ship_ready && !out_ship_valid) st_out_ship++;
      if (dut.u_in_dock.retire && dut.u_in_dock.recirc) n_recirc++;
      if (dut.u_out_dock.retire && dut.u_out_dock.recirc) n_recirc++;
      if (ev_iter[0] && ilc[0] != 0) n_inner++;
      if (dut.u_out_dock.od_valid && dut.u_out_dock.retire && !dut.u_out_dock.pred_true) n_skip++;
      if (dut.u_out_dock.s_load) n_s_load++;
      for (int g = 0; g < 2; g++) begin
        if (sealed[g] && !sealed_q[g]) n_seal++;
        if (!sealed[g] && sealed_q[g]) n_unseal++;
      end
    end
    sealed_q <= sealed;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_wait_seal;
  always @(posedge clk) if (|ev_wait_seal) n_wait_seal++;

  initial begin
    tok_net = 0; n_torp = 0; n_done3 = 0; n_done4 = 0; n_bad_path = 0; n_dispatch = 0; sealed_q = '0;
    for (int k = 0; k < N; k++) ship_src.push_back(src_word(k));
    // two instruction words for the input dock, each with its dispatch path
    ship_src.push_back({enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h00D15), 11'd7});
    ship_src.push_back({enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 11'd0), 11'd7});

    // input dock program
    iq_in.push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq_in.push_back(w(enc_setloop(1'b0, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq_in.push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'd2)));
    iq_in.push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1000)));
    iq_in.push_back(w(enc_move(1'b1, 1'b0, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'd0)));
    iq_in.push_back(w(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'd2)));
    iq_in.push_back(w(enc_tail()));
    iq_in.push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq_in.push_back(w(enc_literal(1'b1, PRED_ALWAYS, 2'b10, 19'h05EED)));
    iq_in.push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 11'd0)));

    // output dock program
    iq_out.push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'(N))));
    iq_out.push_back(w(enc_move(1'b0, 1'b0, PRED_ALWAYS, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 11'd1)));
    iq_out.push_back(w(enc_setloop(1'b1, 1'b0, PRED_ALWAYS, LC_DEC, 14'd0)));
    iq_out.push_back(w(enc_tail()));
    iq_out.push_back(w(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq_out.push_back(w(enc_lithi(1'b1, PRED_ALWAYS, 18'h20000)));
    iq_out.push_back(w(enc_setflags(1'b1, PRED_ALWAYS, F_S, F_NS, 6'b0)));
    iq_out.push_back(w(enc_move(1'b0, 1'b1, PRED_B, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'd4)));
    iq_out.push_back(w(enc_move(1'b0, 1'b1, PRED_A, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 11'd3)));
    iq_out.push_back(w(enc_setloop(1'b0, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'd1)));
    iq_out.push_back(w(enc_move(1'b0, 1'b1, PRED_ALWAYS, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1, 11'd0)));

    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int k = 0; k < 20000 && ship_got.size() < N; k++) @(posedge clk);
    check(ship_got.size() == N, "all words reached the input ship");
    repeat (50) @(posedge clk);
    check(ship_got.size() == N, "nothing more before the torpedo");
    check(sealed[0] && olc[0] != 0, "input loop still waiting");
    n_torp = 1;
    for (int k = 0; k < 2000 && ship_got.size() < N + 2; k++) @(posedge clk);
    repeat (50) @(posedge clk);

    check(ship_got.size() == N + 2, "epilogue and dispatched words after torpedo");
    for (int k = 0; k < N && k < ship_got.size(); k++)
      check(ship_got[k] == src_word(k), $sformatf("word %0d", k));
    if (ship_got.size() == N + 2) begin
      check(ship_got[N] == 37'h5EED, "epilogue literal");
      check(ship_got[N+1] == 37'h0D15, "literal from a dispatched instruction");
    end
    check(n_dispatch == 2, "two instructions dispatched");
    check(ship_src.size() == 0, "output ship drained");
    check(n_done3 == 1 && n_done4 == 0, "predicated end marker");
    check(n_bad_path == 0, "packet paths");
    // 2 initial credits + one per word, N taken by the output dock
    check(tok_net + int'(dut.u_out_dock.fq_count) == 2, "credits left");
    check(!sealed[0] && !sealed[1], "both hatches open");

    $display("mechanisms: wait_seal=%0d recirc=%0d seal=%0d unseal=%0d inner=%0d torpedo=%0d skip=%0d s_load=%0d dispatch=%0d in_ship_stall=%0d out_ship_idle=%0d cycles=%0d",
             n_wait_seal, n_recirc, n_seal, n_unseal, n_inner, 1 - n_torp, n_skip, n_s_load, n_dispatch, st_in_ship, st_out_ship, cyc);
    check(n_wait_seal > 0, "wait for sealed hatch happened");
    check(n_recirc > 0, "write-back into the pump happened");
    check(n_seal >= 2 && n_unseal >= 2, "hatch sealed and unsealed in both docks");
    check(n_inner > 0, "inner loop happened");
    check(n_torp == 0, "torpedo happened");
    check(n_skip > 0, "predicate skip happened");
    check(n_s_load > 0, "S load happened");
    check(n_dispatch > 0, "dispatch happened");
    check(st_in_ship > 0 && st_out_ship > 0, "ship-side stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
