// tb_fleet_data_latch: every literal form and capture, against values worked
// out from the literal table, with the S update that follows bit 37.
module tb_fleet_data_latch;
  import fleet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic capture, lit_en, s_load, s_value;
  word_t in_word, d, exp_d;
  op_e lit_op;
  logic [1:0] sel;
  logic [18:0] literal;
  int checks = 0, failures = 0;

  fleet_data_latch dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s d=%h exp=%h", what, d, exp_d); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; lit_en = 0; lit_op = OP_LITERAL; sel = 0; literal = 0; in_word = 0;
    exp_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(d == '0, "reset");
    for (int n = 0; n < 2000; n++) begin
      int k;
      logic exp_sl;
      k = $urandom_range(0, 5);
      capture = 0; lit_en = 0;
      literal = 19'($urandom);
      in_word = {5'($urandom), $urandom};
      sel = 2'($urandom);
      exp_sl = 1'b1;
      case (k)
        0: begin capture = 1; exp_d = in_word; end
        1: begin lit_en = 1; lit_op = OP_LITHI;
                 for (int b = 0; b < 18; b++) exp_d[19 + b] = literal[b]; end
        2: begin lit_en = 1; lit_op = OP_LITLO; exp_sl = 1'b0;
                 for (int b = 0; b < 19; b++) exp_d[b] = literal[b]; end
        3, 4: begin lit_en = 1; lit_op = OP_LITERAL;
                 for (int b = 0; b < 18; b++) exp_d[19 + b] = sel[1] ? sel[0] : literal[b];
                 for (int b = 0; b < 19; b++) exp_d[b] = sel[1] ? literal[b] : sel[0];
           end
        default: exp_sl = 1'b0;   // idle: D holds
      endcase
      #1;
      check(s_load == exp_sl, "s_load");
      if (exp_sl) check(s_value == exp_d[36], "s_value");
      @(negedge clk);
      check(d == exp_d, $sformatf("load kind %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
