// fleet_horn: the instruction horn, the small fifo in front of it, and the
// hatch.
//
// Instructions arriving at the dock's instruction destination queue in a small
// fifo whose head is the instruction horn. The hatch between the horn and the
// pump is either sealed or unsealed; it is unsealed after reset. While it is
// unsealed, the horn's instruction moves into the pump whenever the pump can
// take it. A tail instruction passing the hatch seals it and is consumed
// there; it never enters the pump. While the hatch is sealed, later
// instructions (typically a loop epilogue) wait in the horn fifo. The hatch is
// unsealed again by the unseal input, which the loop counters raise whenever
// the outer loop counter is set to zero.
//
// Interface: in_* is the instruction destination (valid/ready, one 26-bit
// instruction), out_* goes to the pump. sealed shows the hatch state.
// Timing: an instruction written in cycle t can pass the hatch in cycle t+1;
// a tail seals the hatch from the next cycle; unseal takes effect the next
// cycle. The fifo depth (HORN_DEPTH) is this design's choice.
module fleet_horn
  import fleet_pkg::*;
#(
  parameter int unsigned HORN_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  output logic   out_valid,
  input  logic   out_ready,
  output instr_t out_instr,
  input  logic   unseal,
  output logic   sealed
);
  logic   horn_valid, horn_ready;
  instr_t horn_instr;
  logic   is_tail;
  logic [$clog2(HORN_DEPTH+1)-1:0] horn_count;

  fleet_fifo #(.WIDTH(INSTR_W), .DEPTH(HORN_DEPTH)) u_horn_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_instr),
    .out_valid(horn_valid), .out_ready(horn_ready), .out_data(horn_instr),
    .count(horn_count)
  );

  assign is_tail    = (opcode(horn_instr) == OP_TAIL);
  // A tail is swallowed by the hatch; anything else passes into the pump.
  assign out_valid  = horn_valid && !sealed && !is_tail;
  assign out_instr  = horn_instr;
  assign horn_ready = !sealed && (is_tail || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   sealed <= 1'b0;
    else if (horn_valid && !sealed && is_tail)    sealed <= 1'b1;
    else if (unseal)                              sealed <= 1'b0;
  end

endmodule
