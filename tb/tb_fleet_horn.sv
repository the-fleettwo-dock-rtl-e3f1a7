// tb_fleet_horn: instructions and tails go into the horn at random; the pump
// side takes them at random and unseal pulses arrive at random. A model
// checks that instructions pass in order only while the hatch is unsealed,
// that a tail seals the hatch and never reaches the pump, and that unseal
// opens it again.
module tb_fleet_horn;
  import fleet_pkg::*;
  localparam int unsigned HD = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, unseal, sealed;
  instr_t in_instr, out_instr;
  int checks = 0, failures = 0;
  instr_t q[$];
  bit m_sealed;
  int n_tail = 0, n_pass = 0;

  fleet_horn #(.HORN_DEPTH(HD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit is_tail(instr_t i);
    return opcode(i) == OP_TAIL;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; unseal = 0; in_instr = '0; m_sealed = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit exp_pass, exp_tail;
      @(negedge clk);
      check(sealed == m_sealed, "sealed state");
      check(in_ready == (q.size() < HD), "in_ready");
      exp_pass = !m_sealed && q.size() > 0 && !is_tail(q[0]);
      check(out_valid == exp_pass, "out_valid");
      if (exp_pass) check(out_instr == q[0], "order");
      in_valid  = $urandom_range(0, 1);
      in_instr  = ($urandom_range(0, 5) == 0) ? enc_tail() : enc_literal(1'b0, PRED_ALWAYS, 2'b10, 19'($urandom));
      out_ready = $urandom_range(0, 3) != 0;
      unseal    = m_sealed && ($urandom_range(0, 9) == 0);
      @(posedge clk);
      exp_tail = !m_sealed && q.size() > 0 && is_tail(q[0]);
      if (exp_tail) begin void'(q.pop_front()); m_sealed = 1; n_tail++; end
      else begin
        if (exp_pass && out_ready) begin void'(q.pop_front()); n_pass++; end
        if (unseal) m_sealed = 0;
      end
      if (in_valid && in_ready) q.push_back(in_instr);
    end
    check(n_tail > 20 && n_pass > 100, "coverage of tails and passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
