// tb_fleet_pump: random fills, retirements and write-backs against a queue
// model. A retirement with recirc must put the same instruction back at the
// tail in the same cycle and block a new entry in that cycle.
module tb_fleet_pump;
  import fleet_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, od_valid, retire, recirc;
  instr_t in_instr, od_instr;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_recirc = 0;
  instr_t q[$];

  fleet_pump #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; retire = 0; recirc = 0; in_instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      instr_t h;
      @(negedge clk);
      check(count == q.size(), "count");
      check(od_valid == (q.size() != 0), "od_valid");
      if (q.size() != 0) check(od_instr == q[0], "on deck");
      in_valid = $urandom_range(0, 1);
      in_instr = instr_t'($urandom);
      retire   = od_valid && $urandom_range(0, 1);
      recirc   = retire && $urandom_range(0, 2) != 0;
      #1;
      check(in_ready == (q.size() < DEPTH && !recirc), "in_ready");
      @(posedge clk);
      if (retire) begin
        h = q.pop_front();
        if (recirc) begin q.push_back(h); n_recirc++; end
      end
      if (in_valid && in_ready) q.push_back(in_instr);
    end
    check(n_recirc > 100, "write-backs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
