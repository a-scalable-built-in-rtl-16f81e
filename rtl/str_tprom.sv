// str_tprom: test pattern ROM (TPROM) of one test module.
//
// Holds, for D-flit input FIFOs, the pattern sequence X followed by X'
// (Table 1 of the document: X = All-0, All-1, All-1, All-0, ... for depth D,
// X' its complement), so a test packet carries 2D pattern flits and every
// FIFO register and every 2-to-1 MUX of the FIFO read tree sees a 0->1 and
// a 1->0 transition. Two read ports: one for the packet generator, one for
// the output response analyzer. It also holds the order of this TM's test
// packets (which the document places in the TMs): for a round number it
// tells whether this TM sends, to whom, and whether it should receive a
// packet. The contents follow from N, D and the TM's place; the round order
// is str_pkg's. Combinational.
module str_tprom
  import str_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned D    = 4,
  parameter side_e       SIDE = SIDE_W,
  parameter int unsigned POS  = 1
) (
  input  logic [7:0]     pg_idx,    // pattern flit index 0 .. 2D-1
  output logic           pg_bit,
  input  logic [7:0]     ora_idx,
  output logic           ora_bit,
  input  logic [7:0]     round,
  output logic           send,      // this TM sends a test packet in `round`
  output pkt_desc_t      desc,
  output logic           expect_rx  // this TM receives a test packet in `round`
);
  function automatic logic [2*D-1:0] build_rom();
    logic [2*D-1:0] r;
    for (int i = 0; i < int'(D); i++) begin
      r[i]     = pat_x(i);
      r[D + i] = !pat_x(i);
    end
    return r;
  endfunction

  localparam logic [2*D-1:0] ROM = build_rom();

  assign pg_bit  = (int'(pg_idx)  < 2 * int'(D)) ? ROM[pg_idx[$clog2(2*D)-1:0]]  : 1'b0;
  assign ora_bit = (int'(ora_idx) < 2 * int'(D)) ? ROM[ora_idx[$clog2(2*D)-1:0]] : 1'b0;

  always_comb begin
    logic [2*CW-1:0] turn, dcoord;
    logic [31:0]     r;
    side_e           dside;
    r         = int'(round);
    send      = (r < n_rounds(N)) && (round_src_side(r, N) == SIDE);
    expect_rx = (r < n_rounds(N)) && (round_dst_side(r, N) == SIDE);
    turn      = round_turn(r, POS, N);
    dside     = round_dst_side(r, N);
    dcoord    = tm_coord(dside, round_dst_pos(r, POS, N), N);
    desc      = '0;
    if (is_ss_round(r, N)) begin
      desc.kind  = PK_SS;
      desc.dst_x = turn[2*CW-1:CW];
      desc.dst_y = turn[CW-1:0];
      desc.aux_x = dcoord[2*CW-1:CW];
      desc.aux_y = dcoord[CW-1:0];
    end else begin
      desc.kind  = PK_TEST;
      desc.yx    = (SIDE == SIDE_N || SIDE == SIDE_S);
      desc.dst_x = dcoord[2*CW-1:CW];
      desc.dst_y = dcoord[CW-1:0];
      desc.aux_x = turn[2*CW-1:CW];
      desc.aux_y = turn[CW-1:0];
    end
  end
endmodule
