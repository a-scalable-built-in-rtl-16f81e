// str_ctrl: controller (CTRL) of the surrounding test ring.
//
// Sits at the south-west corner, at both ends of the TM shift-register ring,
// and runs the built-in self-recovery flow once after `start` (warm-up):
//   1. Test: for each of the 12N test rounds (str_pkg schedule: 8N rounds of
//      Thru/Turn tests along the mesh diagonals, 4N rounds of Source/Sink
//      tests column by column and row by row) broadcast `send`, wait
//      ROUND_CYCLES = (2D+1) + H*L + margin cycles (the document's bound on
//      the test time of one packet, H = 2N+2 hops of L = 1 cycle, margin 4),
//      then `round_end` so every TM records its ORA verdict.
//   2. Collect: `sr_load`, then shift the ring 4N * SRW times; the bits arrive
//      in `frame_q`, whose slice t*SRW +: SRW is then TM t's result register.
//   3. Diagnose (document's algorithm): every datapath starts faulty; for each
//      of the 12N*N test packets, one per cycle, if its receiver recorded a
//      pass, every datapath it crossed (str_path_mask) is set fault-free.
//      Then, per router, an input FIFO whose four datapaths are all faulty is
//      taken as faulty, and likewise an output MUX. A faulty FIFO is isolated
//      by clearing its four RIIs, a faulty MUX by clearing its ROI (Table 4),
//      and any other faulty datapath by clearing its own RII. Reading components off datapaths this
//      way is this implementation's rule; the document gives the mapping of
//      Table 4 only.
//   4. Isolate: for each router whose masks are not all enabled, pick a TM
//      whose straight path to it crosses only fault-free Thru datapaths
//      (west, north, east, south side in that order), shift an FI slot into
//      that TM, pulse `fi_go` and wait FI_WAIT cycles for the packet to land.
//      A router with no such path is counted in `unreachable`.
// `ff` gives the diagnosed fault-free datapaths (1 = fault-free).
module str_ctrl
  import str_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned D = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output tm_cmd_t        cmd,
  output logic           sr_out,    // to TM 0
  input  logic           sr_in,     // from TM 4N-1
  output logic           busy,
  output logic           done,
  output logic [NDP-1:0] ff [N*N],
  output logic [7:0]     fi_sent,
  output logic [7:0]     unreachable
);
  localparam int unsigned NR    = 12 * N;
  localparam int unsigned SRW   = sr_width(N);
  localparam int unsigned FRAME = 4 * N * SRW;
  localparam int unsigned ROUND_CYCLES = (2 * D + 1) + (2 * N + 2) * 1 + 4;
  localparam int unsigned FI_WAIT = 2 * N + 8;
  localparam int unsigned VW = $clog2(N * N + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_SEND, S_WAIT, S_END, S_LOAD, S_SHIFT, S_DIAG,
    S_SCAN, S_FSHIFT, S_FGO, S_FWAIT, S_DONE
  } state_e;

  state_e         st_q;
  logic [7:0]     round_q, pos_q;
  logic [15:0]    cnt_q;
  logic [FRAME-1:0] frame_q;
  logic [NDP-1:0] ff_q [N*N];
  logic [VW-1:0]  v_q;

  // ---------------- diagnosis helpers ----------------
  logic [NDP-1:0] pm_mask [N*N];
  logic [7:0]     pm_rx;
  logic           pm_pass;

  str_path_mask #(.N(N)) u_pm (
    .round(round_q), .pos(pos_q), .mask(pm_mask), .tx_tm(), .rx_tm(pm_rx)
  );
  assign pm_pass = frame_q[int'(pm_rx) * SRW + int'(round_q)];

  // masks for router v_q and the TM that can reach it
  logic [CFG_W-1:0] v_cfg;
  logic             v_has_src;
  fi_slot_t         v_slot;
  int unsigned      v_tm;

  always_comb begin
    logic [NDP-1:0]   f;
    logic [NPORT-1:0] fifo_bad, mux_bad;
    logic [31:0]      vx, vy;
    logic             ok_w, ok_e, ok_n, ok_s;
    f  = '1;
    for (int v = 0; v < int'(N * N); v++) if (int'(v_q) == v) f = ff_q[v];
    vx = (int'(v_q) % N) + 1;
    vy = (int'(v_q) / N) + 1;
    for (int p = 0; p < int'(NPORT); p++) begin
      fifo_bad[p] = 1'b1;
      mux_bad[p]  = 1'b1;
      for (int q = 0; q < int'(NPORT); q++) begin
        if (q != p) begin
          if (f[dp_idx(p, q)]) fifo_bad[p] = 1'b0;
          if (f[dp_idx(q, p)]) mux_bad[p]  = 1'b0;
        end
      end
    end
    v_cfg = '0;
    for (int p = 0; p < int'(NPORT); p++) begin
      for (int q = 0; q < int'(NPORT); q++)
        if (q != p) v_cfg[dp_idx(p, q)] = !fifo_bad[p] && (f[dp_idx(p, q)] || mux_bad[q]);
      v_cfg[NDP + p] = !mux_bad[p];
    end
    ok_w = 1'b1; ok_e = 1'b1; ok_n = 1'b1; ok_s = 1'b1;
    for (int y = 1; y <= int'(N); y++) begin
      for (int x = 1; x <= int'(N); x++) begin
        if (y == int'(vy) && x < int'(vx) && !ff_q[(y-1)*N + x-1][dp_idx(P_W, P_E)]) ok_w = 1'b0;
        if (y == int'(vy) && x > int'(vx) && !ff_q[(y-1)*N + x-1][dp_idx(P_E, P_W)]) ok_e = 1'b0;
        if (x == int'(vx) && y > int'(vy) && !ff_q[(y-1)*N + x-1][dp_idx(P_N, P_S)]) ok_n = 1'b0;
        if (x == int'(vx) && y < int'(vy) && !ff_q[(y-1)*N + x-1][dp_idx(P_S, P_N)]) ok_s = 1'b0;
      end
    end
    v_has_src = ok_w || ok_n || ok_e || ok_s;
    if      (ok_w) v_tm = tm_index(SIDE_W, vy, N);
    else if (ok_n) v_tm = tm_index(SIDE_N, vx, N);
    else if (ok_e) v_tm = tm_index(SIDE_E, vy, N);
    else           v_tm = tm_index(SIDE_S, vx, N);
    v_slot.valid = 1'b1;
    v_slot.x     = CW'(vx);
    v_slot.y     = CW'(vy);
    v_slot.cfg   = v_cfg;
  end

  // ---------------- sequencing ----------------
  always_comb begin
    cmd          = '0;
    cmd.round    = round_q;
    cmd.send     = (st_q == S_SEND);
    cmd.round_end = (st_q == S_END);
    cmd.sr_load  = (st_q == S_LOAD);
    cmd.sr_shift = (st_q == S_SHIFT) || (st_q == S_FSHIFT);
    cmd.fi_go    = (st_q == S_FGO);
  end
  assign sr_out = frame_q[FRAME-1];
  assign busy   = (st_q != S_IDLE) && (st_q != S_DONE);
  assign done   = (st_q == S_DONE);
  assign ff     = ff_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      round_q     <= '0;
      pos_q       <= 8'd1;
      cnt_q       <= '0;
      frame_q     <= '0;
      v_q         <= '0;
      fi_sent     <= '0;
      unreachable <= '0;
      for (int v = 0; v < int'(N * N); v++) ff_q[v] <= '0;
    end else begin
      if (cmd.sr_shift) frame_q <= {frame_q[FRAME-2:0], sr_in};
      case (st_q)
        S_IDLE, S_DONE: if (start) begin
          st_q        <= S_SEND;
          round_q     <= '0;
          fi_sent     <= '0;
          unreachable <= '0;
          frame_q     <= '0;
          for (int v = 0; v < int'(N * N); v++) ff_q[v] <= '0;  // all datapaths faulty
        end
        S_SEND: begin
          st_q  <= S_WAIT;
          cnt_q <= '0;
        end
        S_WAIT: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(ROUND_CYCLES - 1)) st_q <= S_END;
        end
        S_END: begin
          if (int'(round_q) == int'(NR) - 1) st_q <= S_LOAD;
          else begin
            round_q <= round_q + 8'd1;
            st_q    <= S_SEND;
          end
        end
        S_LOAD: begin
          st_q  <= S_SHIFT;
          cnt_q <= '0;
        end
        S_SHIFT: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(FRAME - 1)) begin
            st_q    <= S_DIAG;
            round_q <= '0;
            pos_q   <= 8'd1;
          end
        end
        S_DIAG: begin
          if (pm_pass)
            for (int v = 0; v < int'(N * N); v++) ff_q[v] <= ff_q[v] | pm_mask[v];
          if (int'(pos_q) == int'(N)) begin
            pos_q <= 8'd1;
            if (int'(round_q) == int'(NR) - 1) begin
              st_q <= S_SCAN;
              v_q  <= '0;
            end else round_q <= round_q + 8'd1;
          end else pos_q <= pos_q + 8'd1;
        end
        S_SCAN: begin
          if (int'(v_q) == int'(N * N)) st_q <= S_DONE;
          else if (v_cfg == '1) v_q <= v_q + 1'b1;
          else if (!v_has_src) begin
            unreachable <= unreachable + 8'd1;
            v_q         <= v_q + 1'b1;
          end else begin
            frame_q <= '0;
            frame_q[v_tm * SRW +: FI_SLOT_W] <= v_slot;
            st_q  <= S_FSHIFT;
            cnt_q <= '0;
          end
        end
        S_FSHIFT: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(FRAME - 1)) st_q <= S_FGO;
        end
        S_FGO: begin
          fi_sent <= fi_sent + 8'd1;
          st_q    <= S_FWAIT;
          cnt_q   <= '0;
        end
        S_FWAIT: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(FI_WAIT - 1)) begin
            st_q <= S_SCAN;
            v_q  <= v_q + 1'b1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
