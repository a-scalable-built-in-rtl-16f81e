// str_addr_decoder: address decoder (AD) of one router input port.
//
// Looks at the flit at the front of the input FIFO and, when it is a head
// (or single-flit) packet, extracts the destination coordinates, the routing
// order bit and the packet kind from the header (field layout of str_pkg).
// Purely combinational. The document names the block only; the header layout
// is this implementation's.
module str_addr_decoder
  import str_pkg::*;
(
  input  flit_t         flit,
  input  logic          valid,
  output logic          is_head,
  output logic          is_last,
  output logic [CW-1:0] dst_x,
  output logic [CW-1:0] dst_y,
  output logic          yx,
  output pkt_kind_e     kind
);
  header_t h;
  assign h       = header_t'(flit.payload);
  assign is_head = valid && (flit.ftype == FT_HEAD || flit.ftype == FT_SINGLE);
  assign is_last = valid && (flit.ftype == FT_TAIL || flit.ftype == FT_SINGLE);
  assign dst_x   = h.dst_x;
  assign dst_y   = h.dst_y;
  assign yx      = h.yx;
  assign kind    = h.kind;
endmodule
