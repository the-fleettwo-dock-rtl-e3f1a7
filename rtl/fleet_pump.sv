// fleet_pump: the dock's circular fifo of instruction latches.
//
// The pump holds up to DEPTH instructions. Its oldest entry is the On Deck
// stage, where the instruction executes; the others form the instruction
// fifo. When the instruction on deck retires it leaves the pump, and if
// recirc is set a copy of it is written back at the tail of the fifo (the
// "fill IF0 with a copy of self" step of an outer loop) in the same cycle, so
// the number of held instructions is unchanged. The loop body of an outer
// loop must therefore fit in DEPTH entries, On Deck included.
//
// Interface: in_* (valid/ready) takes instructions through the hatch;
// od_valid/od_instr show the On Deck stage; retire pops it, recirc with retire
// writes it back. in_ready is low when the pump is full or a copy is being
// written back this cycle. DEPTH is this design's choice (the specification draws a
// multi-stage fifo but print no number).
module fleet_pump
  import fleet_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  output logic   od_valid,
  output instr_t od_instr,
  input  logic   retire,
  input  logic   recirc,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  instr_t        slots [DEPTH];
  logic [AW-1:0] head, tail;
  logic          pop, push_copy, push_new;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign od_valid  = (count != '0);
  assign od_instr  = slots[head];
  assign pop       = retire && od_valid;
  assign push_copy = pop && recirc;
  assign in_ready  = (count < ($clog2(DEPTH+1))'(DEPTH)) && !push_copy;
  assign push_new  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (pop) head <= next_ptr(head);
      if (push_copy || push_new) tail <= next_ptr(tail);
      case ({push_copy || push_new, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push_copy)     slots[tail] <= slots[head];
    else if (push_new) slots[tail] <= in_instr;
  end

endmodule
