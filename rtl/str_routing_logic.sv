// str_routing_logic: routing logic (RL) of one router input port.
//
// Dimension-ordered routing for the generic X-Y router: X first, then Y, and
// the local port when both coordinates match. A header bit selects Y-first
// order instead; test packets that start on the north or south ring side use
// it so that they can turn east or west inside the mesh (the document's Turn
// tests need both NE/NW/SE/SW and WN/WS/EN/ES turns, and it does not say how
// these packets are steered). Output: one-hot request over the five output
// ports (N, E, S, W, L). Combinational.
module str_routing_logic
  import str_pkg::*;
#(
  parameter int unsigned X = 1,
  parameter int unsigned Y = 1
) (
  input  logic [CW-1:0]    dst_x,
  input  logic [CW-1:0]    dst_y,
  input  logic             yx,
  output logic [NPORT-1:0] req
);
  logic [CW-1:0] mx, my;
  assign mx = CW'(X);
  assign my = CW'(Y);

  always_comb begin
    req = '0;
    if (!yx) begin
      if      (dst_x > mx) req[P_E] = 1'b1;
      else if (dst_x < mx) req[P_W] = 1'b1;
      else if (dst_y > my) req[P_N] = 1'b1;
      else if (dst_y < my) req[P_S] = 1'b1;
      else                 req[P_L] = 1'b1;
    end else begin
      if      (dst_y > my) req[P_N] = 1'b1;
      else if (dst_y < my) req[P_S] = 1'b1;
      else if (dst_x > mx) req[P_E] = 1'b1;
      else if (dst_x < mx) req[P_W] = 1'b1;
      else                 req[P_L] = 1'b1;
    end
  end
endmodule
