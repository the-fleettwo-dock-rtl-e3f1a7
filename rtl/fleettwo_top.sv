// fleettwo_top: the two kinds of FleetTwo dock, side by side.
//
// A ship port of a Fleet is served either by an input dock, which takes words
// from the switch fabric and presents them to the ship, or by an output dock,
// which takes words from the ship and sends them into the fabric as data or
// token packets. This top holds one of each, as the two drawings of a dock
// show them, with the signals that lead to the switch fabric and to the ship
// brought out as ports (prefix in_ for the input dock, out_ for the output
// dock). The switch fabric and the ships are outside this design. All
// handshakes are valid/ready; reset is asynchronous and active low.
module fleettwo_top
  import fleet_pkg::*;
#(
  parameter int unsigned PUMP_DEPTH = 4,
  parameter int unsigned HORN_DEPTH = 4,
  parameter int unsigned DEST_DEPTH = 4,
  parameter int unsigned LC_W       = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  // input dock: fabric side
  input  logic    in_instr_valid,
  output logic    in_instr_ready,
  input  word_t   in_instr_word,
  input  logic    in_torp_valid,
  output logic    in_torp_ready,
  input  logic    in_data_valid,
  output logic    in_data_ready,
  input  word_t   in_data_word,
  output logic    in_tok_valid,
  input  logic    in_tok_ready,
  output packet_t in_tok_pkt,
  // input dock: ship side
  output logic    in_ship_valid,
  input  logic    in_ship_ready,
  output word_t   in_ship_data,
  // output dock: fabric side
  input  logic    out_instr_valid,
  output logic    out_instr_ready,
  input  word_t   out_instr_word,
  input  logic    out_torp_valid,
  output logic    out_torp_ready,
  input  logic    out_tok_valid,
  output logic    out_tok_ready,
  output logic    out_pkt_valid,
  input  logic    out_pkt_ready,
  output packet_t out_pkt,
  // output dock: ship side
  input  logic    out_ship_valid,
  output logic    out_ship_ready,
  input  word_t   out_ship_data,
  // dock state, for observation
  output logic [1:0] sealed,
  output logic [1:0][LC_W-1:0] ilc,
  output logic [1:0][LC_W-1:0] olc,
  output logic [1:0][2:0] flags,      // {A, B, S}
  output word_t [1:0] d,
  output logic [1:0] ev_torpedo,
  output logic [1:0] ev_wait_seal,
  output logic [1:0] ev_iter
);
  // Unused ship-side handshakes of each dock kind.
  logic  in_from_ship_ready, out_to_ship_valid;
  word_t out_to_ship_data;

  fleet_dock #(
    .IS_OUTPUT(1'b0), .PUMP_DEPTH(PUMP_DEPTH), .HORN_DEPTH(HORN_DEPTH),
    .DEST_DEPTH(DEST_DEPTH), .LC_W(LC_W)
  ) u_in_dock (
    .clk, .rst_n,
    .instr_valid(in_instr_valid), .instr_ready(in_instr_ready), .instr_word(in_instr_word),
    .torp_valid(in_torp_valid), .torp_ready(in_torp_ready),
    .dest_valid(in_data_valid), .dest_ready(in_data_ready), .dest_word(in_data_word),
    .fout_valid(in_tok_valid), .fout_ready(in_tok_ready), .fout_pkt(in_tok_pkt),
    .to_ship_valid(in_ship_valid), .to_ship_ready(in_ship_ready), .to_ship_data(in_ship_data),
    .from_ship_valid(1'b0), .from_ship_ready(in_from_ship_ready), .from_ship_data('0),
    .sealed(sealed[0]), .ilc(ilc[0]), .olc(olc[0]),
    .flag_a(flags[0][2]), .flag_b(flags[0][1]), .flag_s(flags[0][0]), .d(d[0]),
    .ev_torpedo(ev_torpedo[0]), .ev_wait_seal(ev_wait_seal[0]), .ev_iter(ev_iter[0])
  );

  fleet_dock #(
    .IS_OUTPUT(1'b1), .PUMP_DEPTH(PUMP_DEPTH), .HORN_DEPTH(HORN_DEPTH),
    .DEST_DEPTH(DEST_DEPTH), .LC_W(LC_W)
  ) u_out_dock (
    .clk, .rst_n,
    .instr_valid(out_instr_valid), .instr_ready(out_instr_ready), .instr_word(out_instr_word),
    .torp_valid(out_torp_valid), .torp_ready(out_torp_ready),
    .dest_valid(out_tok_valid), .dest_ready(out_tok_ready), .dest_word('0),
    .fout_valid(out_pkt_valid), .fout_ready(out_pkt_ready), .fout_pkt(out_pkt),
    .to_ship_valid(out_to_ship_valid), .to_ship_ready(1'b0), .to_ship_data(out_to_ship_data),
    .from_ship_valid(out_ship_valid), .from_ship_ready(out_ship_ready), .from_ship_data(out_ship_data),
    .sealed(sealed[1]), .ilc(ilc[1]), .olc(olc[1]),
    .flag_a(flags[1][2]), .flag_b(flags[1][1]), .flag_s(flags[1][0]), .d(d[1]),
    .ev_torpedo(ev_torpedo[1]), .ev_wait_seal(ev_wait_seal[1]), .ev_iter(ev_iter[1])
  );

endmodule
