// fleet_data_latch: the dock's 37-bit data latch D.
//
// D is loaded in one of four ways, at most one per cycle:
//   capture     D <= in_word (a word taken from the data destination at an
//               input dock, or from the ship at an output dock)
//   literalhi   D[37:20] <= Literal[18:1]; D[19:1] unchanged
//   literallo   D[19:1]  <= Literal[19:1]; D[37:20] unchanged
//   literal     by SEL: 00 D = {Literal[18:1], 19 zeros}
//                       01 D = {Literal[18:1], 19 ones}
//                       10 D = {18 zeros, Literal[19:1]}
//                       11 D = {18 ones,  Literal[19:1]}
// These follow the specification's literal table. Each load that writes bit 37
// also raises s_load with the new bit 37 as s_value so that the S flag
// follows it; literallo does not write bit 37. D resets to 0, a choice of
// this design. The new value is visible after the clock edge.
module fleet_data_latch
  import fleet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        capture,
  input  word_t       in_word,
  input  logic        lit_en,
  input  op_e         lit_op,
  input  logic [1:0]  sel,
  input  logic [18:0] literal,
  output word_t       d,
  output logic        s_load,
  output logic        s_value
);
  word_t d_next;
  logic  load;

  always_comb begin
    d_next = d;
    load   = 1'b1;
    if (capture) begin
      d_next = in_word;
    end else if (lit_en && lit_op == OP_LITHI) begin
      d_next[36:19] = literal[17:0];
    end else if (lit_en && lit_op == OP_LITLO) begin
      d_next[18:0] = literal[18:0];
      load         = 1'b0;
    end else if (lit_en && lit_op == OP_LITERAL) begin
      unique case (sel)
        2'b00: d_next = {literal[17:0], 19'h00000};
        2'b01: d_next = {literal[17:0], 19'h7FFFF};
        2'b10: d_next = {18'h00000, literal[18:0]};
        2'b11: d_next = {18'h3FFFF, literal[18:0]};
      endcase
    end else begin
      load = 1'b0;
    end
  end

  assign s_load  = load;
  assign s_value = d_next[36];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d <= '0;
    else        d <= d_next;
  end

endmodule
