// fleet_pkg: word, instruction and packet formats shared by the dock blocks.
//
// A machine word is 37 bits. An instruction is 26 bits, so that an instruction
// and an 11-bit dispatch path share one word: word bits 37..12 hold the
// instruction and bits 11..1 the path from the dispatching dock to the
// executing dock. In this file bit k of the 1-based numbering is index k-1.
//
// Instruction layout (26 bits, index 25..0):
//   [25] I   interruptible (may be torpedoed)
//   [24] OS  one shot: 0 = part of the outer loop, 1 = runs once
//   [23:22] P predicate: 00 if A, 10 if B, 11 always, 01 reserved (never)
//   [21:0]  body, decoded by bits [21:19]:
//     1 SEL  literal    SEL=[20:19], Literal[19:1]=[18:0]
//     0 11   literalhi  Literal[18:1]=[17:0] -> D[37:20]
//     0 10   literallo  Literal[19:1]=[18:0] -> D[19:1]
//     0 00   move       [18]Ti [17]Di [16]Dc [15]Do [14]To [13]PD,
//                       [12:11] reserved, [10:0] path
//     0 01   [18]=0 setFlags: [17:12] nextA, [11:6] nextB, [5:0] nextS
//            [18]=1 [17:16]: 00 setInner, 01 setOuter, 10 tail, 11 no-op
//                   setInner/setOuter: [15:14] mode (00 literal,
//                   01 from data latch, 10 decrement), [13:0] literal
// The literal family and the setFlags input order (A, ~A, B, ~B, S, ~S from
// the most significant bit down) follow the specification; the codes of move,
// setFlags, setInner, setOuter and tail, and the move fields, are this
// design's own, placed in the two opcodes the literal family leaves free.
package fleet_pkg;

  localparam int unsigned WORD_W  = 37;
  localparam int unsigned INSTR_W = 26;
  localparam int unsigned PATH_W  = 11;
  localparam int unsigned LIT_W   = 14;   // literal field of setInner/setOuter

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PATH_W-1:0]  path_t;

  // A packet as it leaves a dock for the switch fabric. A token carries no
  // meaningful payload.
  typedef struct packed {
    logic  token;
    path_t path;
    word_t payload;
  } packet_t;

  typedef enum logic [1:0] {
    PRED_A      = 2'b00,
    PRED_NEVER  = 2'b01,
    PRED_B      = 2'b10,
    PRED_ALWAYS = 2'b11
  } pred_e;

  typedef enum logic [3:0] {
    OP_MOVE,
    OP_LITERAL,
    OP_LITHI,
    OP_LITLO,
    OP_SETFLAGS,
    OP_SETINNER,
    OP_SETOUTER,
    OP_TAIL,
    OP_NOP
  } op_e;

  typedef enum logic [1:0] {
    LC_LITERAL = 2'b00,
    LC_DATA    = 2'b01,
    LC_DEC     = 2'b10,
    LC_NONE    = 2'b11
  } lc_mode_e;

  // Decoded fields of one instruction.
  typedef struct packed {
    logic       intr;
    logic       os;
    pred_e      pred;
    op_e        op;
    logic [1:0] sel;
    logic [18:0] literal;
    logic       ti, di, dc, dout, tout, pd;
    path_t      path;
    logic [5:0] next_a, next_b, next_s;
    lc_mode_e   lc_mode;
    logic [LIT_W-1:0] lc_lit;
  } dec_t;

  function automatic op_e opcode(instr_t i);
    if (i[21])                 return OP_LITERAL;
    else if (i[20:19] == 2'b11) return OP_LITHI;
    else if (i[20:19] == 2'b10) return OP_LITLO;
    else if (i[20:19] == 2'b00) return OP_MOVE;
    else if (!i[18])           return OP_SETFLAGS;
    else begin
      case (i[17:16])
        2'b00:   return OP_SETINNER;
        2'b01:   return OP_SETOUTER;
        2'b10:   return OP_TAIL;
        default: return OP_NOP;
      endcase
    end
  endfunction

  function automatic dec_t decode(instr_t i);
    dec_t d;
    d.intr    = i[25];
    d.os      = i[24];
    d.pred    = pred_e'(i[23:22]);
    d.op      = opcode(i);
    d.sel     = i[20:19];
    d.literal = i[18:0];
    d.ti      = i[18];
    d.di      = i[17];
    d.dc      = i[16];
    d.dout    = i[15];
    d.tout    = i[14];
    d.pd      = i[13];
    d.path    = i[10:0];
    d.next_a  = i[17:12];
    d.next_b  = i[11:6];
    d.next_s  = i[5:0];
    d.lc_mode = lc_mode_e'(i[15:14]);
    d.lc_lit  = i[13:0];
    return d;
  endfunction

  // Instruction word of a dispatched packet: the instruction sits in the
  // upper 26 bits, the dispatch path in the lower 11.
  function automatic instr_t instr_of_word(word_t w);
    return w[WORD_W-1:PATH_W];
  endfunction

  // Encoders used by testbenches and by anyone assembling dock programs.
  function automatic instr_t enc_head(logic intr, logic os, pred_e p);
    instr_t i = '0;
    i[25] = intr; i[24] = os; i[23:22] = p;
    return i;
  endfunction

  function automatic instr_t enc_move(logic intr, logic os, pred_e p,
                                      logic ti, logic di, logic dc,
                                      logic dout, logic tout, logic pd,
                                      path_t path);
    instr_t i = enc_head(intr, os, p);
    i[21:19] = 3'b000;
    i[18] = ti; i[17] = di; i[16] = dc; i[15] = dout; i[14] = tout; i[13] = pd;
    i[10:0] = path;
    return i;
  endfunction

  function automatic instr_t enc_literal(logic os, pred_e p, logic [1:0] sel,
                                         logic [18:0] lit);
    instr_t i = enc_head(1'b0, os, p);
    i[21] = 1'b1; i[20:19] = sel; i[18:0] = lit;
    return i;
  endfunction

  function automatic instr_t enc_lithi(logic os, pred_e p, logic [17:0] lit);
    instr_t i = enc_head(1'b0, os, p);
    i[21:19] = 3'b011; i[17:0] = lit;
    return i;
  endfunction

  function automatic instr_t enc_litlo(logic os, pred_e p, logic [18:0] lit);
    instr_t i = enc_head(1'b0, os, p);
    i[21:19] = 3'b010; i[18:0] = lit;
    return i;
  endfunction

  function automatic instr_t enc_setflags(logic os, pred_e p, logic [5:0] na,
                                          logic [5:0] nb, logic [5:0] ns);
    instr_t i = enc_head(1'b0, os, p);
    i[21:19] = 3'b001; i[18] = 1'b0;
    i[17:12] = na; i[11:6] = nb; i[5:0] = ns;
    return i;
  endfunction

  function automatic instr_t enc_setloop(logic outer, logic os, pred_e p,
                                         lc_mode_e m, logic [LIT_W-1:0] lit);
    instr_t i = enc_head(1'b0, os, p);
    i[21:19] = 3'b001; i[18] = 1'b1;
    i[17:16] = outer ? 2'b01 : 2'b00;
    i[15:14] = m; i[13:0] = lit;
    return i;
  endfunction

  function automatic instr_t enc_tail();
    instr_t i = '0;
    i[21:19] = 3'b001; i[18] = 1'b1; i[17:16] = 2'b10;
    return i;
  endfunction

  // setFlags input selectors, one bit per input
  localparam logic [5:0] F_A = 6'b100000, F_NA = 6'b010000,
                         F_B = 6'b001000, F_NB = 6'b000100,
                         F_S = 6'b000010, F_NS = 6'b000001;

endpackage
