// str_pkt_gen: packet generator (PG) of a test module.
//
// Builds flit `idx` of a packet from its descriptor. A test packet (kind
// PK_TEST or PK_SS) is a head flit followed by the 2D pattern flits X then X'
// read from the TPROM (every payload bit equal to the pattern bit), the last
// one typed as tail: 2D+1 flits. A fault-isolation packet is a head flit
// addressed to the faulty router followed by a tail flit carrying the 25 mask
// bits (RII enables in bits 19:0, ROI enables in bits 24:20). The header
// source field is this TM's coordinate. Combinational; `len` is the packet
// length in flits. The document states the parts (head, patterns or FI
// information, tail); the encodings are this implementation's.
module str_pkt_gen
  import str_pkg::*;
#(
  parameter int unsigned D     = 4,
  parameter int unsigned SRC_X = 0,
  parameter int unsigned SRC_Y = 1
) (
  input  pkt_desc_t  desc,
  input  logic [7:0] idx,
  output logic [7:0] pat_idx,   // to the TPROM
  input  logic       pat_bit,
  output flit_t      flit,
  output logic [7:0] len
);
  header_t h;
  always_comb begin
    h       = '0;
    h.kind  = desc.kind;
    h.yx    = desc.yx;
    h.dst_x = desc.dst_x;
    h.dst_y = desc.dst_y;
    h.src_x = CW'(SRC_X);
    h.src_y = CW'(SRC_Y);
    h.aux_x = desc.aux_x;
    h.aux_y = desc.aux_y;
  end

  assign len     = (desc.kind == PK_FI) ? 8'd2 : 8'(2 * D + 1);
  assign pat_idx = idx - 8'd1;

  always_comb begin
    if (idx == 8'd0) begin
      flit.ftype   = FT_HEAD;
      flit.payload = PAY_W'(h);
    end else if (desc.kind == PK_FI) begin
      flit.ftype   = FT_TAIL;
      flit.payload = PAY_W'(desc.cfg);
    end else begin
      flit.ftype   = (idx == len - 8'd1) ? FT_TAIL : FT_BODY;
      flit.payload = {PAY_W{pat_bit}};
    end
  end
endmodule
