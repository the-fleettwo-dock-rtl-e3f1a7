// tb_fleet_fifo: random pushes and pops against a queue model. Checks the
// data order, the count, that in_ready falls exactly when DEPTH words are
// held, and that a word written in one cycle is readable in the next.
module tb_fleet_fifo;
  localparam int unsigned W = 37, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, cycles = 0;
  logic [W-1:0] model[$];

  fleet_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cycles++;
      check(count == model.size(), "count");
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() != 0), "out_valid");
      if (out_valid && model.size() != 0) check(out_data == model[0], "data order");
      in_valid  = ($urandom_range(0, 99) < ((n / 500) % 2 ? 80 : 35));
      out_ready = ($urandom_range(0, 99) < ((n / 500) % 2 ? 35 : 80));
      in_data   = {$urandom, $urandom};
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
