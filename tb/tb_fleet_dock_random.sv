// tb_fleet_dock_random: random dock programs against an instruction-level
// reference model.
//
// Each program is a list of blocks. A one-shot block is a setOuter OS=1
// followed by random one-shot instructions. A loop block is a setOuter OS=1
// n, one to three random outer-looping instructions, a setOuter decrement and
// a tail. The random instructions are literal, literalhi, literallo,
// setFlags, setInner, setOuter and move with random fields and predicates.
// The same program runs on an input dock and on an output dock, with the
// fabric and ship handshakes stalling at random. The model executes the
// program sequentially: a loop body is repeated while OLC>0, every
// instruction is gated by its predicate and by OLC>0 (except setOuter OS=1),
// and a move runs ILC+1 times. At the end of every program the words given
// to the ship, the packets sent into the fabric, the number of words and
// tokens taken, and the final D, flags, ILC and OLC must match the model.
module tb_fleet_dock_random;
  import fleet_pkg::*;
  localparam int unsigned LC_W = 14;
  localparam int NPROG = 400;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [1:0] instr_valid, instr_ready, torp_ready, dest_valid, dest_ready;
  word_t [1:0] instr_word, dest_word, d, to_ship_data, from_ship_data;
  logic [1:0] fout_valid, fout_ready, to_ship_valid, to_ship_ready, from_ship_valid, from_ship_ready;
  packet_t [1:0] fout_pkt;
  logic [1:0] sealed, flag_a, flag_b, flag_s, ev_torpedo, ev_wait_seal, ev_iter;
  logic [1:0][LC_W-1:0] ilc, olc;

  for (genvar g = 0; g < 2; g++) begin : g_dock
    fleet_dock #(.IS_OUTPUT(g == 1)) dut (
      .clk, .rst_n,
      .instr_valid(instr_valid[g]), .instr_ready(instr_ready[g]), .instr_word(instr_word[g]),
      .torp_valid(1'b0), .torp_ready(torp_ready[g]),
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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ stimulus
  instr_t prog[$];
  int     iq_pos[2];
  int     n_in[2];          // words delivered at the data destination / by the ship
  int     n_taken[2];       // words actually taken by Di
  int     n_tok_taken;      // tokens taken at the output dock
  word_t  ship_got[$];
  packet_t pkt_got[2][$];

  function automatic word_t data_word(int g, int k);
    return {k[3], 4'(g), 32'(k * 32'h9E37_79B9 + 32'h1234)};
  endfunction

  always @(negedge clk) begin
    for (int g = 0; g < 2; g++) begin
      instr_valid[g] = iq_pos[g] < prog.size() && $urandom_range(0, 3) != 0;
      instr_word[g]  = iq_pos[g] < prog.size() ? {prog[iq_pos[g]], 11'h0} : '0;
      fout_ready[g]  = $urandom_range(0, 3) != 0;
    end
    // input dock data destination, output dock token destination
    dest_valid[0] = $urandom_range(0, 2) != 0;
    dest_word[0]  = data_word(0, n_in[0]);
    dest_valid[1] = $urandom_range(0, 2) != 0;
    dest_word[1]  = '0;
    to_ship_ready[0]   = $urandom_range(0, 3) != 0;
    to_ship_ready[1]   = 1'b0;
    from_ship_valid[0] = 1'b0;
    from_ship_data[0]  = '0;
    from_ship_valid[1] = $urandom_range(0, 2) != 0;
    from_ship_data[1]  = data_word(1, n_in[1]);
  end

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      if (instr_valid[g] && instr_ready[g]) iq_pos[g]++;
      if (fout_valid[g] && fout_ready[g]) pkt_got[g].push_back(fout_pkt[g]);
    end
    if (dest_valid[0] && dest_ready[0]) n_in[0]++;
    if (g_dock[0].dut.u_ondeck.d_fire) n_taken[0]++;
    if (from_ship_valid[1] && from_ship_ready[1]) begin n_in[1]++; n_taken[1]++; end
    if (dest_valid[1] && dest_ready[1]) n_tok_taken++;
    if (to_ship_valid[0] && to_ship_ready[0]) ship_got.push_back(to_ship_data[0]);
  end

  // ------------------------------------------------------------ generator
  function automatic pred_e rpred();
    int r = $urandom_range(0, 9);
    return r < 5 ? PRED_ALWAYS : (r < 7 ? PRED_A : (r < 9 ? PRED_B : PRED_NEVER));
  endfunction

  function automatic instr_t rinstr(logic os);
    int k = $urandom_range(0, 9);
    case (k)
      0: return enc_literal(os, rpred(), 2'($urandom), 19'($urandom));
      1: return enc_lithi(os, rpred(), 18'($urandom));
      2: return enc_litlo(os, rpred(), 19'($urandom));
      3: return enc_setflags(os, rpred(), 6'($urandom), 6'($urandom), 6'($urandom));
      4: return enc_setloop(1'b0, os, rpred(), ($urandom_range(0, 2) == 0) ? LC_DEC : LC_LITERAL,
                            14'($urandom_range(0, 2)));
      5: if (os) return enc_setloop(1'b1, os, rpred(), ($urandom_range(0, 3) == 0) ? LC_DEC : LC_LITERAL,
                                   14'($urandom_range(0, 2)));
         else   return enc_setflags(os, rpred(), 6'($urandom), 6'($urandom), 6'($urandom));
      default: return enc_move($urandom_range(0, 1), os, rpred(), $urandom_range(0, 1),
                               $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1),
                               $urandom_range(0, 1), $urandom_range(0, 1), 11'($urandom));
    endcase
  endfunction

  task automatic gen_program();
    int nblk = $urandom_range(1, 5);
    prog.delete();
    for (int b = 0; b < nblk; b++) begin
      if ($urandom_range(0, 1)) begin
        int n = $urandom_range(1, 6);
        prog.push_back(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'($urandom_range(1, 3))));
        for (int i = 0; i < n; i++) prog.push_back(rinstr(1'b1));
      end else begin
        int n = $urandom_range(1, 3);
        prog.push_back(enc_setloop(1'b1, 1'b1, PRED_ALWAYS, LC_LITERAL, 14'($urandom_range(1, 3))));
        for (int i = 0; i < n; i++) prog.push_back(rinstr(1'b0));
        prog.push_back(enc_setloop(1'b1, 1'b0, PRED_ALWAYS, LC_DEC, 14'd0));
        prog.push_back(enc_tail());
      end
    end
  endtask

  // ------------------------------------------------------------ model
  // Model state per dock, index 0 input dock, 1 output dock.
  logic  m_a[2], m_b[2], m_s[2];
  word_t m_d[2];
  int    m_ilc[2], m_olc[2], m_ndata[2], m_ntok[2];
  word_t m_ship[$];
  packet_t m_pkt[2][$];

  function automatic bit m_pred(int g, pred_e p);
    case (p)
      PRED_A: return m_a[g];
      PRED_B: return m_b[g];
      PRED_ALWAYS: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic void m_exec(int g, instr_t i);
    dec_t x;
    bit run;
    logic [5:0] in6;
    int v, cur;
    packet_t p;
    x = decode(i);
    run = m_pred(g, x.pred) && (m_olc[g] > 0 || (x.os && x.op == OP_SETOUTER));
    if (!run) return;
    case (x.op)
      OP_LITERAL: begin
        case (x.sel)
          2'b00: m_d[g] = {x.literal[17:0], 19'h0};
          2'b01: m_d[g] = {x.literal[17:0], 19'h7FFFF};
          2'b10: m_d[g] = {18'h0, x.literal};
          default: m_d[g] = {18'h3FFFF, x.literal};
        endcase
        m_s[g] = m_d[g][36];
      end
      OP_LITHI: begin m_d[g][36:19] = x.literal[17:0]; m_s[g] = m_d[g][36]; end
      OP_LITLO: m_d[g][18:0] = x.literal;
      OP_SETFLAGS: begin
        in6 = {m_a[g], !m_a[g], m_b[g], !m_b[g], m_s[g], !m_s[g]};
        m_a[g] = |(x.next_a & in6); m_b[g] = |(x.next_b & in6); m_s[g] = |(x.next_s & in6);
      end
      OP_SETINNER, OP_SETOUTER: begin
        v = (x.lc_mode == LC_DATA) ? int'(m_d[g][LC_W-1:0]) : int'(x.lc_lit);
        cur = (x.op == OP_SETINNER) ? m_ilc[g] : m_olc[g];
        if (x.lc_mode == LC_DEC) v = (cur > 0) ? cur - 1 : 0;
        if (x.lc_mode == LC_NONE) v = cur;
        if (x.op == OP_SETINNER) m_ilc[g] = v; else m_olc[g] = v;
      end
      OP_MOVE: begin
        for (int r = 0; r <= m_ilc[g]; r++) begin
          if (g == 1 && x.ti) m_ntok[g]++;
          if (x.di) begin
            if (x.dc) begin m_d[g] = data_word(g, m_ndata[g]); m_s[g] = m_d[g][36]; end
            m_ndata[g]++;
          end
          p.path = x.pd ? m_d[g][PATH_W-1:0] : x.path;
          p.payload = m_d[g];
          p.token = 1'b1;
          if (g == 0) begin
            if (x.dout) m_ship.push_back(m_d[g]);
            if (x.tout) m_pkt[g].push_back(p);
          end else if (x.dout || x.tout) begin
            p.token = !x.dout;
            m_pkt[g].push_back(p);
          end
        end
        m_ilc[g] = 0;
      end
      default: ;
    endcase
  endfunction

  function automatic void m_run(int g);
    int p, q;
    p = 0;
    while (p < prog.size()) begin
      if (opcode(prog[p]) == OP_TAIL) begin
        p++;
      end else if (!decode(prog[p]).os) begin
        // a loop body: the run of OS=0 instructions up to the tail
        q = p;
        while (opcode(prog[q]) != OP_TAIL) q++;
        while (m_olc[g] > 0)
          for (int k = p; k < q; k++) if (m_olc[g] > 0) m_exec(g, prog[k]);
        p = q + 1;
      end else begin
        m_exec(g, prog[p]);
        p++;
      end
    end
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_iter_seen = 0;
    for (int n = 0; n < NPROG; n++) begin
      int idle;
      rst_n = 0;
      gen_program();
      for (int g = 0; g < 2; g++) begin
        iq_pos[g] = 0; n_in[g] = 0; n_taken[g] = 0; pkt_got[g].delete();
      end
      n_tok_taken = 0; ship_got.delete();
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1;
      // run until both docks have taken the whole program and gone idle
      idle = 0;
      for (int c = 0; c < 2000 && idle < 30; c++) begin
        @(posedge clk);
        if (iq_pos[0] == prog.size() && iq_pos[1] == prog.size() &&
            g_dock[0].dut.u_pump.count == 0 && g_dock[1].dut.u_pump.count == 0 &&
            !g_dock[0].dut.u_horn.horn_valid && !g_dock[1].dut.u_horn.horn_valid) idle++;
        else idle = 0;
        if (ev_iter != 0) n_iter_seen++;
      end
      check(idle >= 30, $sformatf("program %0d finished", n));
      m_ship.delete();
      for (int g = 0; g < 2; g++) begin
        m_a[g] = 0; m_b[g] = 0; m_s[g] = 0; m_d[g] = '0; m_ilc[g] = 0; m_olc[g] = 0;
        m_ndata[g] = 0; m_ntok[g] = 0; m_pkt[g].delete();
        m_run(g);
        check(d[g] == m_d[g] && {flag_a[g], flag_b[g], flag_s[g]} == {m_a[g], m_b[g], m_s[g]} &&
              int'(ilc[g]) == m_ilc[g] && int'(olc[g]) == m_olc[g],
              $sformatf("program %0d dock %0d final state", n, g));
        check(pkt_got[g].size() == m_pkt[g].size(),
              $sformatf("program %0d dock %0d packet count %0d/%0d", n, g, pkt_got[g].size(), m_pkt[g].size()));
        for (int k = 0; k < pkt_got[g].size() && k < m_pkt[g].size(); k++)
          check(pkt_got[g][k].token == m_pkt[g][k].token && pkt_got[g][k].path == m_pkt[g][k].path &&
                (pkt_got[g][k].token || pkt_got[g][k].payload == m_pkt[g][k].payload),
                $sformatf("program %0d dock %0d packet %0d", n, g, k));
      end
      check(ship_got.size() == m_ship.size(), $sformatf("program %0d ship count", n));
      for (int k = 0; k < ship_got.size() && k < m_ship.size(); k++)
        check(ship_got[k] == m_ship[k], $sformatf("program %0d ship word %0d", n, k));
      check(n_taken[0] == m_ndata[0], $sformatf("program %0d input dock words taken", n));
      check(n_taken[1] == m_ndata[1] && n_tok_taken - int'(g_dock[1].dut.fq_count) == m_ntok[1],
            $sformatf("program %0d output dock words and tokens taken", n));
    end
    check(n_iter_seen > 0, "moves executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
