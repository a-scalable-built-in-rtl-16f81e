// str_mesh: N x N 2D mesh of 20-path routers, each with a redirector at its
// local port.
//
// Router (x,y), x,y = 1..N, sits at flat index (y-1)*N + (x-1); y grows to
// the north. Neighbouring routers are linked N<->S and E<->W. The links at
// the mesh boundary go to the 4N test modules of the surrounding test ring
// and are brought out as arrays indexed by the TM's ring position
// (str_pkg::tm_index: west side bottom to top, north side west to east, east
// side top to bottom, south side east to west). Each router's local port goes
// through a str_redirector to the IP ports `ip_*`. All links are valid/ready.
module str_mesh
  import str_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned D = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // TM -> router boundary links
  input  logic       tm_in_valid [4*N],
  input  flit_t      tm_in_flit  [4*N],
  output logic       tm_in_ready [4*N],
  // router -> TM boundary links
  output logic       tm_out_valid[4*N],
  output flit_t      tm_out_flit [4*N],
  input  logic       tm_out_ready[4*N],
  // IP ports of every router
  input  logic       ip_in_valid [N*N],
  input  flit_t      ip_in_flit  [N*N],
  output logic       ip_in_ready [N*N],
  output logic       ip_out_valid[N*N],
  output flit_t      ip_out_flit [N*N],
  input  logic       ip_out_ready[N*N],
  // fault emulation hooks and status
  input  fault_inj_t fault       [N*N],
  output logic [CFG_W-1:0] cfg   [N*N],
  output logic       cfg_written [N*N],
  output logic       looped      [N*N]
);
  logic [NPORT-1:0] r_in_valid  [N*N];
  flit_t            r_in_flit   [N*N][NPORT];
  logic [NPORT-1:0] r_in_ready  [N*N];
  logic [NPORT-1:0] r_out_valid [N*N];
  flit_t            r_out_flit  [N*N][NPORT];
  logic [NPORT-1:0] r_out_ready [N*N];

  for (genvar y = 1; y <= N; y++) begin : g_row
    for (genvar x = 1; x <= N; x++) begin : g_col
      localparam int unsigned V = (y - 1) * N + (x - 1);

      str_router #(.D(D), .X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .in_valid(r_in_valid[V]), .in_flit(r_in_flit[V]), .in_ready(r_in_ready[V]),
        .out_valid(r_out_valid[V]), .out_flit(r_out_flit[V]), .out_ready(r_out_ready[V]),
        .fault(fault[V]), .cfg(cfg[V]), .cfg_written(cfg_written[V])
      );

      str_redirector #(.X(x), .Y(y)) u_redir (
        .clk, .rst_n,
        .r_out_valid(r_out_valid[V][P_L]), .r_out_flit(r_out_flit[V][P_L]),
        .r_out_ready(r_out_ready[V][P_L]),
        .r_in_valid(r_in_valid[V][P_L]), .r_in_flit(r_in_flit[V][P_L]),
        .r_in_ready(r_in_ready[V][P_L]),
        .ip_in_valid(ip_in_valid[V]), .ip_in_flit(ip_in_flit[V]), .ip_in_ready(ip_in_ready[V]),
        .ip_out_valid(ip_out_valid[V]), .ip_out_flit(ip_out_flit[V]),
        .ip_out_ready(ip_out_ready[V]),
        .looped(looped[V])
      );

      // west port
      if (x == 1) begin : g_w_tm
        localparam int unsigned T = tm_index(SIDE_W, y, N);
        assign r_in_valid[V][P_W] = tm_in_valid[T];
        assign r_in_flit[V][P_W]  = tm_in_flit[T];
        assign tm_in_ready[T]     = r_in_ready[V][P_W];
        assign tm_out_valid[T]    = r_out_valid[V][P_W];
        assign tm_out_flit[T]     = r_out_flit[V][P_W];
        assign r_out_ready[V][P_W] = tm_out_ready[T];
      end else begin : g_w_nb
        assign r_in_valid[V][P_W]  = r_out_valid[V-1][P_E];
        assign r_in_flit[V][P_W]   = r_out_flit[V-1][P_E];
        assign r_out_ready[V][P_W] = r_in_ready[V-1][P_E];
      end
      // east port
      if (x == N) begin : g_e_tm
        localparam int unsigned T = tm_index(SIDE_E, y, N);
        assign r_in_valid[V][P_E] = tm_in_valid[T];
        assign r_in_flit[V][P_E]  = tm_in_flit[T];
        assign tm_in_ready[T]     = r_in_ready[V][P_E];
        assign tm_out_valid[T]    = r_out_valid[V][P_E];
        assign tm_out_flit[T]     = r_out_flit[V][P_E];
        assign r_out_ready[V][P_E] = tm_out_ready[T];
      end else begin : g_e_nb
        assign r_in_valid[V][P_E]  = r_out_valid[V+1][P_W];
        assign r_in_flit[V][P_E]   = r_out_flit[V+1][P_W];
        assign r_out_ready[V][P_E] = r_in_ready[V+1][P_W];
      end
      // south port
      if (y == 1) begin : g_s_tm
        localparam int unsigned T = tm_index(SIDE_S, x, N);
        assign r_in_valid[V][P_S] = tm_in_valid[T];
        assign r_in_flit[V][P_S]  = tm_in_flit[T];
        assign tm_in_ready[T]     = r_in_ready[V][P_S];
        assign tm_out_valid[T]    = r_out_valid[V][P_S];
        assign tm_out_flit[T]     = r_out_flit[V][P_S];
        assign r_out_ready[V][P_S] = tm_out_ready[T];
      end else begin : g_s_nb
        assign r_in_valid[V][P_S]  = r_out_valid[V-N][P_N];
        assign r_in_flit[V][P_S]   = r_out_flit[V-N][P_N];
        assign r_out_ready[V][P_S] = r_in_ready[V-N][P_N];
      end
      // north port
      if (y == N) begin : g_n_tm
        localparam int unsigned T = tm_index(SIDE_N, x, N);
        assign r_in_valid[V][P_N] = tm_in_valid[T];
        assign r_in_flit[V][P_N]  = tm_in_flit[T];
        assign tm_in_ready[T]     = r_in_ready[V][P_N];
        assign tm_out_valid[T]    = r_out_valid[V][P_N];
        assign tm_out_flit[T]     = r_out_flit[V][P_N];
        assign r_out_ready[V][P_N] = tm_out_ready[T];
      end else begin : g_n_nb
        assign r_in_valid[V][P_N]  = r_out_valid[V+N][P_S];
        assign r_in_flit[V][P_N]   = r_out_flit[V+N][P_S];
        assign r_out_ready[V][P_N] = r_in_ready[V+N][P_S];
      end
    end
  end
endmodule
