// tb_fleet_flags: exhaustive check of the setFlags OR-of-inputs rule over all
// flag states and field values, of S following D bit 37, and of the
// predicate codes.
module tb_fleet_flags;
  import fleet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic set_en, s_load, s_value, pred_true, flag_a, flag_b, flag_s;
  logic [5:0] next_a, next_b, next_s;
  pred_e pred;
  int checks = 0, failures = 0;

  fleet_flags dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic ref_or(logic [5:0] f, logic a, logic b, logic s);
    logic r = 1'b0;
    if (f[5]) r |= a;
    if (f[4]) r |= !a;
    if (f[3]) r |= b;
    if (f[2]) r |= !b;
    if (f[1]) r |= s;
    if (f[0]) r |= !s;
    return r;
  endfunction

  // Put the flags in state {a,b,s} using constant fields (A := a, ...).
  task automatic force_state(logic a, logic b, logic s);
    @(negedge clk);
    set_en = 1; s_load = 0;
    next_a = a ? (F_A | F_NA) : 6'b0;
    next_b = b ? (F_B | F_NB) : 6'b0;
    next_s = s ? (F_S | F_NS) : 6'b0;
    @(negedge clk);
    set_en = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_en = 0; s_load = 0; s_value = 0; next_a = 0; next_b = 0; next_s = 0;
    pred = PRED_ALWAYS;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check({flag_a, flag_b, flag_s} == 3'b000, "reset value");
    for (int st = 0; st < 8; st++) begin
      for (int f = 0; f < 64; f++) begin
        logic a, b, s;
        {a, b, s} = 3'(st);
        force_state(a, b, s);
        check({flag_a, flag_b, flag_s} == {a, b, s}, "state setup");
        // predicates
        pred = PRED_A;      #1 check(pred_true == a, "pred A");
        pred = PRED_B;      #1 check(pred_true == b, "pred B");
        pred = PRED_ALWAYS; #1 check(pred_true == 1'b1, "pred always");
        pred = PRED_NEVER;  #1 check(pred_true == 1'b0, "pred reserved");
        // setFlags with field f for A, rotated fields for B and S
        set_en = 1;
        next_a = 6'(f); next_b = 6'(f ^ 6'h15); next_s = 6'(63 - f);
        @(negedge clk);
        set_en = 0;
        check(flag_a == ref_or(6'(f), a, b, s), "nextA");
        check(flag_b == ref_or(6'(f ^ 6'h15), a, b, s), "nextB");
        check(flag_s == ref_or(6'(63 - f), a, b, s), "nextS");
      end
    end
    // S follows bit 37 of the data latch
    for (int k = 0; k < 8; k++) begin
      logic v, a0, b0;
      v = 1'(k); a0 = flag_a; b0 = flag_b;
      s_load = 1; s_value = v;
      @(negedge clk);
      s_load = 0;
      check(flag_s == v && flag_a == a0 && flag_b == b0, "S load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
