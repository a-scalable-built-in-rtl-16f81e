// tb_str_router: self-checking test of the 20-path router at (2,2).
// Random 5-flit packets enter all five inputs towards random destinations
// while the outputs apply random back-pressure. Every packet must leave on
// the X-Y output port (computed here independently), whole and unmixed with
// other packets, in order per input/output pair. A single flit through an
// idle router must take one cycle. A fault-isolation packet must rewrite the
// masks without being forwarded; a cleared RII must hold back its datapath
// while the others flow, and a cleared ROI its output port.
module tb_str_router;
  import str_pkg::*;
  localparam int unsigned MX = 2, MY = 2;
  logic clk = 0, rst_n = 0;
  logic [NPORT-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit [NPORT];
  flit_t out_flit[NPORT];
  fault_inj_t fault;
  logic [CFG_W-1:0] cfg;
  logic cfg_written;
  int checks = 0, failures = 0;

  str_router #(.D(4), .X(MX), .Y(MY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned xy_port(input int unsigned dx, input int unsigned dy);
    if (dx > MX) return P_E;
    if (dx < MX) return P_W;
    if (dy > MY) return P_N;
    if (dy < MY) return P_S;
    return P_L;
  endfunction

  // destinations reachable from input i without a U-turn
  function automatic void pick_dst(input int unsigned i, output int unsigned dx, output int unsigned dy);
    do begin
      dx = $urandom_range(1, 3);
      dy = $urandom_range(1, 3);
    end while (xy_port(dx, dy) == i);
  endfunction

  // flits queued per input
  flit_t tx_q [NPORT][$];
  int sent_cnt [NPORT][NPORT];
  int recv_cnt [NPORT][NPORT];
  int cur_in [NPORT];      // input owning each output's current packet
  int cur_idx [NPORT];
  int last_seq [NPORT][NPORT];
  bit randomize_ready = 1;

  task automatic queue_pkt(input int unsigned i, input int unsigned dx, input int unsigned dy,
                           input int unsigned seq, input pkt_kind_e kind = PK_DATA,
                           input logic [CFG_W-1:0] fi_cfg = '0);
    header_t h;
    h = '0;
    h.kind = kind;
    h.dst_x = CW'(dx); h.dst_y = CW'(dy);
    h.src_x = CW'(i);  h.src_y = 4'(seq);
    h.aux_x = 4'(seq >> 4);
    if (kind == PK_FI) begin
      tx_q[i].push_back('{ftype: FT_HEAD, payload: PAY_W'(h)});
      tx_q[i].push_back('{ftype: FT_TAIL, payload: PAY_W'(fi_cfg)});
      return;
    end
    tx_q[i].push_back('{ftype: FT_HEAD, payload: PAY_W'(h)});
    for (int f = 1; f < 5; f++)
      tx_q[i].push_back('{ftype: (f == 4) ? FT_TAIL : FT_BODY, payload: {8'(i), 8'(seq), 16'(f)}});
    sent_cnt[i][xy_port(dx, dy)]++;
  endtask

  // drivers
  always_comb
    for (int i = 0; i < int'(NPORT); i++) begin
      in_valid[i] = rst_n && tx_q[i].size() > 0;
      in_flit[i]  = (tx_q[i].size() > 0) ? tx_q[i][0] : '0;
    end
  always @(posedge clk)
    for (int i = 0; i < int'(NPORT); i++)
      if (in_valid[i] && in_ready[i]) void'(tx_q[i].pop_front());
  always @(negedge clk)
    for (int o = 0; o < int'(NPORT); o++) out_ready[o] <= randomize_ready ? 1'($urandom_range(0, 3) != 0) : 1'b1;

  // monitors
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < int'(NPORT); o++)
      if (out_valid[o] && out_ready[o]) begin
        header_t h;
        h = header_t'(out_flit[o].payload);
        if (out_flit[o].ftype == FT_HEAD) begin
          int seq;
          check(cur_in[o] < 0, "no head inside a packet");
          check(xy_port(h.dst_x, h.dst_y) == o, $sformatf("packet for (%0d,%0d) left on port %0d", h.dst_x, h.dst_y, o));
          check(h.kind != PK_FI, "FI packet not forwarded");
          cur_in[o] = h.src_x;
          cur_idx[o] = 1;
          seq = {h.aux_x, h.src_y};
          check(seq > last_seq[h.src_x][o], "order per input/output pair");
          last_seq[h.src_x][o] = seq;
        end else begin
          check(cur_in[o] >= 0 && out_flit[o].payload[31:24] == 8'(cur_in[o]) &&
                out_flit[o].payload[15:0] == 16'(cur_idx[o]), $sformatf("body flit intact on port %0d", o));
          cur_idx[o]++;
          if (out_flit[o].ftype == FT_TAIL) begin
            if (cur_in[o] >= 0) recv_cnt[cur_in[o]][o]++;
            cur_in[o] = -1;
          end
        end
      end

  task automatic wait_drain(input int maxc);
    for (int c = 0; c < maxc; c++) begin
      bit e;
      e = 1;
      for (int i = 0; i < int'(NPORT); i++) if (tx_q[i].size() != 0) e = 0;
      if (e) break;
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int seq;
    int unsigned dx, dy;
    fault = '0;
    for (int o = 0; o < int'(NPORT); o++) begin
      cur_in[o] = -1;
      for (int i = 0; i < int'(NPORT); i++) begin
        sent_cnt[i][o] = 0; recv_cnt[i][o] = 0; last_seq[i][o] = -1;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(cfg == '1, "masks enabled after reset");
    // latency: one flit through an idle router takes one cycle
    randomize_ready = 0;
    @(negedge clk);
    @(negedge clk);
    queue_pkt(P_W, 3, 2, 0);
    @(posedge clk);  // head written into the west FIFO
    #1 check(out_valid[P_E] && out_flit[P_E].ftype == FT_HEAD, "head leaves one cycle after entry");
    wait_drain(200);
    randomize_ready = 1;
    // random traffic
    seq = 1;
    for (int n = 0; n < 40; n++)
      for (int i = 0; i < int'(NPORT); i++) begin
        pick_dst(i, dx, dy);
        queue_pkt(i, dx, dy, seq++);
      end
    wait_drain(5000);
    for (int i = 0; i < int'(NPORT); i++)
      for (int o = 0; o < int'(NPORT); o++)
        check(recv_cnt[i][o] == sent_cnt[i][o], $sformatf("count %0d->%0d: %0d of %0d", i, o, recv_cnt[i][o], sent_cnt[i][o]));

    // FI packet: clear RII of W->E and ROI of the north output
    begin
      logic [CFG_W-1:0] c;
      c = '1;
      c[dp_idx(P_W, P_E)] = 1'b0;
      c[NDP + P_N] = 1'b0;
      queue_pkt(P_S, MX, MY, 0, PK_FI, c);
      wait_drain(100);
      check(cfg == c, "FI packet wrote the masks");
    end
    for (int i = 0; i < int'(NPORT); i++)
      for (int o = 0; o < int'(NPORT); o++) begin sent_cnt[i][o] = 0; recv_cnt[i][o] = 0; end
    queue_pkt(P_W, 3, 2, seq++);   // W->E: held by its RII
    queue_pkt(P_L, 2, 3, seq++);   // L->N: held by the ROI
    queue_pkt(P_N, 3, 2, seq++);   // N->E: passes
    queue_pkt(P_E, 1, 2, seq++);   // E->W: passes
    wait_drain(300);
    check(recv_cnt[P_W][P_E] == 0, "RII holds back W->E");
    check(recv_cnt[P_L][P_N] == 0, "ROI holds back the north output");
    check(recv_cnt[P_N][P_E] == 1 && recv_cnt[P_E][P_W] == 1, "other datapaths still work");
    check(!out_valid[P_N], "north request-out masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
