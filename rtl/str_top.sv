// str_top: N x N on-chip network with the Surrounding Test Ring (STR)
// built-in self-recovery architecture.
//
// Instantiates the mesh of 20-path routers (str_mesh, with an address
// redirector at every local port), 4N test modules (str_tm) facing every
// boundary router port, and the controller (str_ctrl) at the south-west
// corner. The controller and the TMs form a ring: the controller's shift
// output feeds TM 0 (west side, bottom), the ring runs clockwise around the
// mesh and TM 4N-1 (south side, west end) feeds the controller back; all TMs
// also receive the controller's broadcast command word.
//
// Use: after reset, pulse `bisr_start` (warm-up). The controller tests every
// datapath with test packets between TMs, collects the results over the
// ring, diagnoses faulty datapaths, FIFOs and MUXs, and sends fault-isolation
// packets that write the isolation masks of the faulty routers; `bisr_done`
// then rises and the network carries normal traffic on the `ip_*` ports of
// the routers (flits of str_pkg::flit_t, valid/ready, X-Y routed). The IPs
// must stay idle while `bisr_busy` is high. `tp_reach` is the through-path
// search (str_tp_search) over the RII masks, for a fault-tolerant routing
// function to consult; the routers here route X-Y and do not use it. `fault` is a fault-emulation hook
// (stuck-at-0 on one payload bit of chosen FIFOs, MUXs or MUX legs), tied to
// zero in silicon. Defaults: a 4x4 mesh with 4-flit buffers of 34-bit flits,
// the configuration of the document's area and test-time comparison.
module str_top
  import str_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned D = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bisr_start,
  output logic             bisr_busy,
  output logic             bisr_done,
  output logic [7:0]       fi_sent,
  output logic [7:0]       unreachable,
  output logic [NDP-1:0]   diag_ff     [N*N],  // diagnosed fault-free datapaths
  output logic [CFG_W-1:0] router_cfg  [N*N],  // isolation masks in the routers
  output logic [3:0][$clog2(N)-1:0] tp_reach [N*N], // through-path reach per direction
  output logic             looped      [N*N],  // redirector turned a test packet
  input  fault_inj_t       fault       [N*N],
  input  logic             ip_in_valid [N*N],
  input  flit_t            ip_in_flit  [N*N],
  output logic             ip_in_ready [N*N],
  output logic             ip_out_valid[N*N],
  output flit_t            ip_out_flit [N*N],
  input  logic             ip_out_ready[N*N]
);
  logic    tm_in_valid [4*N];
  flit_t   tm_in_flit  [4*N];
  logic    tm_in_ready [4*N];
  logic    tm_out_valid[4*N];
  flit_t   tm_out_flit [4*N];
  logic    tm_out_ready[4*N];
  logic    ring        [4*N+1];
  logic    cfg_written [N*N];
  tm_cmd_t cmd;

  str_mesh #(.N(N), .D(D)) u_mesh (
    .clk, .rst_n,
    .tm_in_valid, .tm_in_flit, .tm_in_ready,
    .tm_out_valid, .tm_out_flit, .tm_out_ready,
    .ip_in_valid, .ip_in_flit, .ip_in_ready,
    .ip_out_valid, .ip_out_flit, .ip_out_ready,
    .fault, .cfg(router_cfg), .cfg_written, .looped
  );

  for (genvar t = 0; t < 4 * N; t++) begin : g_tm
    str_tm #(.N(N), .D(D), .SIDE(tm_side(t, N)), .POS(tm_pos(t, N))) u_tm (
      .clk, .rst_n, .cmd,
      .sr_in(ring[t]), .sr_out(ring[t+1]),
      .tx_valid(tm_in_valid[t]), .tx_flit(tm_in_flit[t]), .tx_ready(tm_in_ready[t]),
      .rx_valid(tm_out_valid[t]), .rx_flit(tm_out_flit[t]), .rx_ready(tm_out_ready[t]),
      .busy()
    );
  end

  str_ctrl #(.N(N), .D(D)) u_ctrl (
    .clk, .rst_n, .start(bisr_start), .cmd,
    .sr_out(ring[0]), .sr_in(ring[4*N]),
    .busy(bisr_busy), .done(bisr_done), .ff(diag_ff),
    .fi_sent, .unreachable
  );

  logic [NDP-1:0] rii [N*N];
  for (genvar v = 0; v < N * N; v++) begin : g_rii
    assign rii[v] = router_cfg[v][NDP-1:0];
  end

  str_tp_search #(.N(N)) u_tp (.rii, .reach(tp_reach));
endmodule
