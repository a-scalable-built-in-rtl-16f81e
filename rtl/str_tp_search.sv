// str_tp_search: through-path (TP) search over the isolation state of the
// mesh.
//
// A through path is a straight run of routers that a packet may cross
// without turning. The paths cross routers that have faults. A TP in one
// direction is usable when the straight datapath for that direction (SN, NS,
// WE or EW) is still enabled in every router it passes through. For
// router V and each direction d, this block works out `reach[V][d]`: how
// many routers in a row, next to V in direction d, have their d-straight
// datapath enabled. A TP from V to a router k hops away in direction d is
// valid exactly when reach[V][d] >= k-1. A fault-tolerant routing function
// can then look up whether a straight line across a faulty region exists.
// Direction indices follow the port numbering: 0 = N, 1 = E, 2 = S, 3 = W.
//
// From the document: tracing the SN, NS, WE and EW datapaths of the faulty
// routers, and the rule that a TP is valid if the straight datapaths of the
// routers it passes are fault-free. This design's choices:
//   - the flow chart's loop over the faulty routers is unrolled into
//     combinational logic over all routers (a fault-free router passes
//     trivially);
//   - the result is given as a reach count per router and direction;
//   - the input is the 20 RII enables of each router.
// Purely combinational; it is valid one cycle after the isolation masks
// settle.
module str_tp_search
  import str_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [NDP-1:0]           rii   [N*N],    // RII enables (1 = datapath usable)
  output logic [3:0][$clog2(N)-1:0] reach [N*N]    // per direction N, E, S, W
);
  localparam int unsigned RW = $clog2(N);

  for (genvar y = 1; y <= N; y++) begin : g_y
    for (genvar x = 1; x <= N; x++) begin : g_x
      for (genvar d = 0; d < 4; d++) begin : g_d
        localparam int DX = (d == P_E) ? 1 : (d == P_W) ? -1 : 0;
        localparam int DY = (d == P_N) ? 1 : (d == P_S) ? -1 : 0;
        // straight datapath of the k-th router ahead, 0 outside the mesh
        logic [N-1:0] pass;
        assign pass[0] = 1'b1;
        for (genvar k = 1; k < N; k++) begin : g_k
          localparam int XK = x + DX * k;
          localparam int YK = y + DY * k;
          if (XK >= 1 && XK <= N && YK >= 1 && YK <= N) begin : g_in
            assign pass[k] = rii[(YK - 1) * N + XK - 1][dp_idx(opposite(d), d)];
          end else begin : g_out
            assign pass[k] = 1'b0;
          end
        end
        // length of the leading run of passable routers
        always_comb begin
          logic run;
          run = 1'b1;
          reach[(y - 1) * N + x - 1][d] = '0;
          for (int k = 1; k < int'(N); k++) begin
            run = run & pass[k];
            if (run) reach[(y - 1) * N + x - 1][d] = RW'(k);
          end
        end
      end
    end
  end
endmodule
