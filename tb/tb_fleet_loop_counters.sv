// tb_fleet_loop_counters: random commands against a reference model of ILC
// and OLC, and the unseal pulse that follows every write of zero to OLC.
module tb_fleet_loop_counters;
  localparam int unsigned LC_W = 14;
  logic clk = 0, rst_n = 0;
  logic torpedo, set_inner, set_outer, dec_inner, dec_outer, olc_zeroed;
  logic [LC_W-1:0] value, ilc, olc;
  int checks = 0, failures = 0;
  int m_ilc, m_olc;
  bit m_zero;

  fleet_loop_counters #(.LC_W(LC_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ilc=%0d/%0d olc=%0d/%0d z=%0b/%0b", what, ilc, m_ilc, olc, m_olc, olc_zeroed, m_zero); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {torpedo, set_inner, set_outer, dec_inner, dec_outer} = '0;
    value = '0;
    m_ilc = 0; m_olc = 0; m_zero = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int c;
      @(negedge clk);
      check(ilc == LC_W'(m_ilc) && olc == LC_W'(m_olc) && olc_zeroed == m_zero, "state");
      {torpedo, set_inner, set_outer, dec_inner, dec_outer} = '0;
      c = $urandom_range(0, 9);
      value = ($urandom_range(0, 3) == 0) ? '0 : LC_W'($urandom_range(0, 5));
      case (c)
        0: torpedo = 1;
        1, 2: set_inner = 1;
        3, 4: set_outer = 1;
        5, 6: dec_inner = 1;
        7, 8: dec_outer = 1;
        default: ;
      endcase
      @(posedge clk);
      m_zero = 0;
      if (torpedo) begin m_ilc = 0; m_olc = 0; m_zero = 1; end
      else begin
        if (set_inner) m_ilc = int'(value);
        if (dec_inner && m_ilc > 0) m_ilc--;
        if (set_outer) begin m_olc = int'(value); m_zero = (value == 0); end
        if (dec_outer) begin if (m_olc > 0) m_olc--; m_zero = (m_olc == 0); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
