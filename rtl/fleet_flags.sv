// fleet_flags: the dock's three flags A, B and S and the predicate test.
//
// A and B are general-purpose flags; S is the summary flag. The predicate
// output evaluates a two-bit predicate code against the current flags: 00 "if
// A", 10 "if B", 11 "always"; the code 01 is left open by the specification and is
// treated here as "never". setFlags (set_en) gives each flag the OR of the
// inputs selected by its 6-bit field, bits 6..1 selecting A, ~A, B, ~B, S and
// ~S of the old flag values; an empty field gives 0. Whenever bit 37 of the
// data latch is loaded, s_load carries that bit into S. If both happen in one
// cycle, setFlags wins (they cannot, in the dock). All flags reset to 0, a
// choice of this design. Updates take effect on the next clock edge.
module fleet_flags
  import fleet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       set_en,
  input  logic [5:0] next_a,
  input  logic [5:0] next_b,
  input  logic [5:0] next_s,
  input  logic       s_load,
  input  logic       s_value,
  input  pred_e      pred,
  output logic       pred_true,
  output logic       flag_a,
  output logic       flag_b,
  output logic       flag_s
);
  logic [5:0] inputs;

  // Input vector in the order of the setFlags fields, most significant first.
  assign inputs = {flag_a, !flag_a, flag_b, !flag_b, flag_s, !flag_s};

  always_comb begin
    unique case (pred)
      PRED_A:      pred_true = flag_a;
      PRED_B:      pred_true = flag_b;
      PRED_ALWAYS: pred_true = 1'b1;
      default:     pred_true = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_a <= 1'b0;
      flag_b <= 1'b0;
      flag_s <= 1'b0;
    end else if (set_en) begin
      flag_a <= |(next_a & inputs);
      flag_b <= |(next_b & inputs);
      flag_s <= |(next_s & inputs);
    end else if (s_load) begin
      flag_s <= s_value;
    end
  end

endmodule
