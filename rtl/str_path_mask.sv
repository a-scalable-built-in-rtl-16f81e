// str_path_mask: datapaths traversed by one test packet of the schedule.
//
// For test round `round` and the sending TM at position `pos` of that
// round's sending side, lists every router datapath (20 per router, Table 2
// order, router index (y-1)*N + (x-1)) that the packet passes. A packet runs
// straight from its ring side to its turn router, then straight to the
// receiving side: the routers before the turn router use their Thru datapath
// in the travel direction, the turn router its Turn datapath (or, for a
// Source/Sink test, the datapath into the local port and the one out of it),
// and the routers after it the Thru datapath of the new direction. Also gives
// the ring indices of the sending and the receiving TM. Combinational; used by
// the controller's diagnosis.
module str_path_mask
  import str_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [7:0]     round,
  input  logic [7:0]     pos,
  output logic [NDP-1:0] mask [N*N],
  output logic [7:0]     tx_tm,
  output logic [7:0]     rx_tm
);
  always_comb begin
    logic [31:0]     r, p, ep, xp, tx, ty;
    side_e           s, d;
    logic [2*CW-1:0] t;
    logic            seg1, seg2;
    r  = int'(round);
    p  = int'(pos);
    s  = round_src_side(r, N);
    d  = round_dst_side(r, N);
    ep = side_port(s);
    xp = side_port(d);
    t  = round_turn(r, p, N);
    tx = int'(t[2*CW-1:CW]);
    ty = int'(t[CW-1:0]);
    tx_tm = 8'(tm_index(s, p, N));
    rx_tm = 8'(tm_index(d, round_dst_pos(r, p, N), N));
    for (int y = 1; y <= int'(N); y++) begin
      for (int x = 1; x <= int'(N); x++) begin
        mask[(y - 1) * N + x - 1] = '0;
        case (s)
          SIDE_W:  seg1 = (y == int'(ty)) && (x < int'(tx));
          SIDE_E:  seg1 = (y == int'(ty)) && (x > int'(tx));
          SIDE_N:  seg1 = (x == int'(tx)) && (y > int'(ty));
          default: seg1 = (x == int'(tx)) && (y < int'(ty));
        endcase
        case (d)
          SIDE_W:  seg2 = (y == int'(ty)) && (x < int'(tx));
          SIDE_E:  seg2 = (y == int'(ty)) && (x > int'(tx));
          SIDE_N:  seg2 = (x == int'(tx)) && (y > int'(ty));
          default: seg2 = (x == int'(tx)) && (y < int'(ty));
        endcase
        if (seg1) mask[(y - 1) * N + x - 1][dp_idx(ep, opposite(ep))] = 1'b1;
        if (seg2) mask[(y - 1) * N + x - 1][dp_idx(opposite(xp), xp)] = 1'b1;
        if (x == int'(tx) && y == int'(ty)) begin
          if (is_ss_round(r, N)) begin
            mask[(y - 1) * N + x - 1][dp_idx(ep, P_L)] = 1'b1;
            mask[(y - 1) * N + x - 1][dp_idx(P_L, xp)] = 1'b1;
          end else begin
            mask[(y - 1) * N + x - 1][dp_idx(ep, xp)] = 1'b1;
          end
        end
      end
    end
  end
endmodule
