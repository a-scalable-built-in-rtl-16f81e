// str_router: generic 5-port wormhole router with the fault-isolation (FI)
// circuits of the 20-path router model.
//
// Each of the five input ports (N, E, S, W, L) has a D-flit FIFO, an address
// decoder and an X-Y routing logic; each output port has a 4x1 round-robin
// arbiter and a 4-to-1 MUX fed by the other four FIFOs (no U-turns, so 20
// input-output datapaths, numbered as str_pkg::dp_idx). No virtual channels.
// Between every routing logic and arbiter sits a request-in isolation cell
// (RII, 20 of them) and behind every arbiter a request-out isolation cell
// (ROI, 5): mask registers, enabled at reset, that the self-recovery flow
// overwrites so that faulty FIFOs, MUX legs and MUXs are never used.
//
// Links use valid/ready: a flit moves when both are high. `in_ready` is the
// FIFO's not-full flag. A flit entering an empty FIFO can leave in the next
// cycle, so a hop costs one cycle. A fault-isolation packet (head of kind
// PK_FI addressed to this router, followed by one flit carrying the 25 mask
// bits) is taken off the input link before the FIFO and never forwarded, so a
// router can be reconfigured whatever its own FIFOs hold. Capturing FI packets
// on the link and the per-datapath RII registers are this implementation's
// choices; the document shows one register per isolation cell (Fig. 21).
// `fault` holds the fault-emulation test hooks (zero in a real chip).
module str_router
  import str_pkg::*;
#(
  parameter int unsigned D = 4,
  parameter int unsigned X = 1,
  parameter int unsigned Y = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPORT-1:0] in_valid,
  input  flit_t            in_flit  [NPORT],
  output logic [NPORT-1:0] in_ready,
  output logic [NPORT-1:0] out_valid,
  output flit_t            out_flit [NPORT],
  input  logic [NPORT-1:0] out_ready,
  input  fault_inj_t       fault,
  output logic [CFG_W-1:0] cfg,        // current RII (19:0) and ROI (24:20) enables
  output logic             cfg_written // pulses when an FI packet reconfigured the router
);
  // input-side signals
  flit_t            fifo_q   [NPORT];
  logic [NPORT-1:0] fifo_full, fifo_empty, fifo_wr, fifo_rd;
  logic [NPORT-1:0] fi_wait_q;     // FI head seen, next flit holds the masks
  logic [NPORT-1:0] cap_we;
  logic [NPORT-1:0] head_is_fi;
  logic [NPORT-1:0] route_cur [NPORT];
  logic [NPORT-1:0] route_q   [NPORT];
  logic [NPORT-1:0] front_head, front_last;
  logic [NPORT-1:0] rin   [NPORT];  // rin[i][o]
  logic [NPORT-1:0] arin  [NPORT];  // after RII
  logic [NDP-1:0]   rii_en;
  logic [NPORT-1:0] roi_en;
  logic             cfg_we;
  logic [CFG_W-1:0] cfg_new;

  // output-side signals
  logic [3:0]       grant [NPORT];
  logic [NPORT-1:0] grant_valid, arout, transfer, release_o;

  function automatic int unsigned leg_port(input int unsigned o, input int unsigned k);
    return (k < o) ? k : k + 1;
  endfunction

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    header_t          h_in;
    logic [CW-1:0]    dx, dy;
    logic             yx;
    pkt_kind_e        kind;
    logic [NPORT-1:0] req;

    assign h_in = header_t'(in_flit[i].payload);
    assign head_is_fi[i] = (in_flit[i].ftype == FT_HEAD || in_flit[i].ftype == FT_SINGLE)
                        && h_in.kind == PK_FI && h_in.dst_x == CW'(X) && h_in.dst_y == CW'(Y);
    assign in_ready[i] = !fifo_full[i];
    assign cap_we[i]   = in_valid[i] && in_ready[i] && fi_wait_q[i];
    assign fifo_wr[i]  = in_valid[i] && !fi_wait_q[i] && !head_is_fi[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) fi_wait_q[i] <= 1'b0;
      else if (in_valid[i] && in_ready[i]) begin
        if (fi_wait_q[i])       fi_wait_q[i] <= 1'b0;
        else if (head_is_fi[i]) fi_wait_q[i] <= (in_flit[i].ftype == FT_HEAD);
      end
    end

    str_fifo #(.D(D), .W(FLIT_W)) u_fifo (
      .clk, .rst_n,
      .wr_en(fifo_wr[i]), .wr_data(in_flit[i]),
      .rd_en(fifo_rd[i]), .rd_data(fifo_q[i]),
      .full(fifo_full[i]), .empty(fifo_empty[i]),
      .sa0(fault.fifo[i])
    );

    str_addr_decoder u_ad (
      .flit(fifo_q[i]), .valid(!fifo_empty[i]),
      .is_head(front_head[i]), .is_last(front_last[i]),
      .dst_x(dx), .dst_y(dy), .yx(yx), .kind(kind)
    );

    str_routing_logic #(.X(X), .Y(Y)) u_rl (
      .dst_x(dx), .dst_y(dy), .yx(yx), .req(req)
    );

    // the route of a packet is decided on its head and held until its tail
    assign route_cur[i] = front_head[i] ? req : route_q[i];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) route_q[i] <= '0;
      else if (fifo_rd[i] && front_head[i]) route_q[i] <= req;
    end

    for (genvar o = 0; o < NPORT; o++) begin : g_rii
      if (o != i) begin : g_cell
        assign rin[i][o] = !fifo_empty[i] && route_cur[i][o];
        str_iso_cell u_rii (
          .clk, .rst_n,
          .cfg_we(cfg_we), .cfg_en(cfg_new[dp_idx(i, o)]),
          .req_in(rin[i][o]), .req_out(arin[i][o]), .en(rii_en[dp_idx(i, o)])
        );
      end else begin : g_none
        assign rin[i][o]  = 1'b0;
        assign arin[i][o] = 1'b0;
      end
    end
  end

  // FI packet capture: the lowest-numbered port wins if two arrive together
  always_comb begin
    cfg_we  = 1'b0;
    cfg_new = '1;
    for (int i = NPORT - 1; i >= 0; i--) begin
      if (cap_we[i]) begin
        cfg_we  = 1'b1;
        cfg_new = in_flit[i].payload[CFG_W-1:0];
      end
    end
  end
  assign cfg         = {roi_en, rii_en};
  assign cfg_written = cfg_we;

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    logic [3:0]        leg_req;
    logic [FLIT_W-1:0] leg_data [4];
    logic [3:0]        leg_flt;
    logic [FLIT_W-1:0] mux_out;
    logic [3:0]        leg_last;

    for (genvar k = 0; k < 4; k++) begin : g_leg
      assign leg_req[k]  = arin[leg_port(o, k)][o];
      assign leg_data[k] = fifo_q[leg_port(o, k)];
      assign leg_flt[k]  = fault.leg[dp_idx(leg_port(o, k), o)];
      assign leg_last[k] = front_last[leg_port(o, k)];
    end

    str_arbiter u_arb (
      .clk, .rst_n,
      .req(leg_req), .release_i(release_o[o]),
      .grant(grant[o]), .grant_valid(grant_valid[o])
    );

    str_mux4 #(.W(FLIT_W)) u_mux (
      .in(leg_data), .sel(grant[o]), .out(mux_out),
      .leg_sa0(leg_flt), .out_sa0(fault.mux[o])
    );

    assign arout[o] = |(grant[o] & leg_req);
    str_iso_cell u_roi (
      .clk, .rst_n,
      .cfg_we(cfg_we), .cfg_en(cfg_new[NDP + o]),
      .req_in(arout[o]), .req_out(out_valid[o]), .en(roi_en[o])
    );
    assign out_flit[o]  = flit_t'(mux_out);
    assign transfer[o]  = out_valid[o] && out_ready[o];
    assign release_o[o] = transfer[o] && |(grant[o] & leg_last);
  end

  always_comb begin
    fifo_rd = '0;
    for (int o = 0; o < NPORT; o++)
      for (int k = 0; k < 4; k++)
        if (transfer[o] && grant[o][k]) fifo_rd[leg_port(o, k)] = 1'b1;
  end

  // a FIFO is read by at most one output: its request is one-hot
  always_comb begin
    for (int i = 0; i < NPORT; i++)
      assert (!(fifo_rd[i] && fifo_empty[i]) || !rst_n);
  end
endmodule
