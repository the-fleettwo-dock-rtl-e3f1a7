// fleet_loop_counters: the inner (ILC) and outer (OLC) loop counters.
//
// ILC counts the extra executions of an inner-looping instruction: such an
// instruction runs ILC+1 times and leaves ILC at 0. OLC counts the passes of
// an outer loop; the loop ends when it reaches zero. Both are LC_W bits wide
// and reset to 0.
//
// Commands (one per cycle, torpedo first):
//   torpedo             ILC <= 0, OLC <= 0
//   set_inner           ILC <= value     (literal or data latch, chosen outside)
//   set_outer           OLC <= value
//   dec_outer           OLC <= OLC-1, saturating at 0
//   dec_inner           ILC <= ILC-1, saturating at 0
// olc_zeroed pulses in the cycle after OLC was set to zero for any reason (a
// torpedo, a set to zero, a decrement to zero); the hatch uses it to unseal.
// The width and the decrement command are this design's choices: the specification
// names a decrement mode of the loop instruction but gives no counter width.
module fleet_loop_counters #(
  parameter int unsigned LC_W = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            torpedo,
  input  logic            set_inner,
  input  logic            set_outer,
  input  logic            dec_inner,
  input  logic            dec_outer,
  input  logic [LC_W-1:0] value,
  output logic [LC_W-1:0] ilc,
  output logic [LC_W-1:0] olc,
  output logic            olc_zeroed
);
  logic            olc_write;
  logic [LC_W-1:0] olc_next;

  always_comb begin
    olc_write = 1'b1;
    olc_next  = olc;
    if (torpedo)         olc_next = '0;
    else if (set_outer)  olc_next = value;
    else if (dec_outer)  olc_next = (olc == '0) ? '0 : olc - 1'b1;
    else                 olc_write = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ilc        <= '0;
      olc        <= '0;
      olc_zeroed <= 1'b0;
    end else begin
      olc        <= olc_next;
      olc_zeroed <= olc_write && (olc_next == '0);
      if (torpedo)        ilc <= '0;
      else if (set_inner) ilc <= value;
      else if (dec_inner) ilc <= (ilc == '0) ? '0 : ilc - 1'b1;
    end
  end

endmodule
