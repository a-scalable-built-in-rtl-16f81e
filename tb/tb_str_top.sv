// tb_str_top: end-to-end test of the STR self-recovery network at its
// default size (4x4 mesh, 4-flit FIFOs).
//
// Run 1, no faults: the whole flow must find every one of the 20*N*N
// datapaths fault-free, send no fault-isolation packet and leave all masks
// enabled; then normal traffic between IPs (including two packets contending
// for one output) must arrive intact.
// Run 2, after a new reset, with emulated stuck-at faults in four routers
// (a whole input FIFO, a whole output MUX, one MUX leg, and a FIFO in a
// boundary router): every datapath crossing an emulated fault must be
// diagnosed faulty, fault-isolation packets must reconfigure the faulty
// routers with masks that disable those datapaths, traffic on intact paths
// must still arrive, and packets routed into an isolated FIFO or MUX must be
// held back (request-in and request-out isolation). The through-path search
// must show full-length straight paths in run 1 and paths cut at the
// isolated datapaths in run 2.
// Expected values come from the injected faults, not from the design.
module tb_str_top;
  import str_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned NN = N * N;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             bisr_start = 1'b0;
  logic             bisr_busy, bisr_done;
  logic [7:0]       fi_sent, unreachable;
  logic [NDP-1:0]   diag_ff     [NN];
  logic [CFG_W-1:0] router_cfg  [NN];
  logic             looped      [NN];
  logic [3:0][$clog2(N)-1:0] tp_reach [NN];
  fault_inj_t       fault       [NN];
  logic             ip_in_valid [NN];
  flit_t            ip_in_flit  [NN];
  logic             ip_in_ready [NN];
  logic             ip_out_valid[NN];
  flit_t            ip_out_flit [NN];
  logic             ip_out_ready[NN];

  int checks = 0, failures = 0;
  int n_loop = 0, n_test_rounds = 0, n_ss_rounds = 0, n_shift = 0, n_fi = 0;
  int n_delivered = 0, n_contention = 0, n_rii_block = 0, n_roi_block = 0;
  int n_tp_cut = 0;
  int rx_count [NN];
  logic [15:0] rx_tag [NN];

  str_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned vidx(input int unsigned x, input int unsigned y);
    return (y - 1) * N + (x - 1);
  endfunction

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < int'(NN); v++) if (looped[v]) n_loop++;
    if (dut.cmd.send && !is_ss_round(int'(dut.cmd.round), N)) n_test_rounds++;
    if (dut.cmd.send &&  is_ss_round(int'(dut.cmd.round), N)) n_ss_rounds++;
    if (dut.cmd.sr_shift) n_shift++;
    if (dut.cmd.fi_go) n_fi++;
  end

  // IP receivers: count packets, check header and body tags
  always @(posedge clk) begin
    for (int v = 0; v < int'(NN); v++) begin
      if (ip_out_valid[v] && ip_out_ready[v]) begin
        header_t h;
        h = header_t'(ip_out_flit[v].payload);
        if (ip_out_flit[v].ftype == FT_HEAD) begin
          check(h.kind == PK_DATA && int'(h.dst_x) == v % N + 1 && int'(h.dst_y) == v / N + 1,
                $sformatf("data head at router %0d addressed here", v));
        end else begin
          rx_tag[v] = ip_out_flit[v].payload[31:16];
          if (ip_out_flit[v].ftype == FT_TAIL) begin
            rx_count[v]++;
            n_delivered++;
          end
        end
      end
    end
  end

  task automatic send_pkt(input int unsigned sx, input int unsigned sy,
                          input int unsigned dx, input int unsigned dy, input logic [15:0] tag);
    int unsigned v;
    header_t h;
    v = vidx(sx, sy);
    h = '0;
    h.kind = PK_DATA;
    h.dst_x = CW'(dx); h.dst_y = CW'(dy);
    h.src_x = CW'(sx); h.src_y = CW'(sy);
    for (int f = 0; f < 5; f++) begin
      ip_in_valid[v] <= 1'b1;
      if (f == 0) ip_in_flit[v] <= '{ftype: FT_HEAD, payload: PAY_W'(h)};
      else ip_in_flit[v] <= '{ftype: (f == 4) ? FT_TAIL : FT_BODY, payload: {tag, 16'(f)}};
      @(posedge clk);
      for (int w = 0; w < 50 && !ip_in_ready[v]; w++) @(posedge clk);
    end
    ip_in_valid[v] <= 1'b0;
  endtask

  task automatic run_bisr(output int cycles);
    cycles = 0;
    @(posedge clk);
    bisr_start <= 1'b1;
    @(posedge clk);
    bisr_start <= 1'b0;
    while (!bisr_done) begin
      @(posedge clk);
      cycles++;
    end
  endtask

  task automatic do_reset();
    rst_n <= 1'b0;
    for (int v = 0; v < int'(NN); v++) begin
      ip_in_valid[v]  <= 1'b0;
      ip_in_flit[v]   <= '0;
      ip_out_ready[v] <= 1'b1;
      rx_count[v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  function automatic logic broken(input int unsigned v, input int unsigned i, input int unsigned o);
    return fault[v].fifo[i] || fault[v].mux[o] || fault[v].leg[dp_idx(i, o)];
  endfunction

  int cyc, fi_before, a, b;
  int exp_rounds;

  initial begin
    for (int v = 0; v < int'(NN); v++) fault[v] = '0;
    do_reset();

    // ---------------- run 1: fault-free ----------------
    run_bisr(cyc);
    $display("run 1: self-recovery took %0d cycles", cyc);
    for (int v = 0; v < int'(NN); v++) begin
      check(diag_ff[v] == '1, $sformatf("run1: router %0d all datapaths fault-free (got %h)", v, diag_ff[v]));
      check(router_cfg[v] == '1, $sformatf("run1: router %0d masks all enabled", v));
      check(tp_reach[v][P_E] == $clog2(N)'(N - (v % N) - 1) && tp_reach[v][P_S] == $clog2(N)'(v / N),
            $sformatf("run1: router %0d through paths reach the mesh edge", v));
    end
    check(fi_sent == 0 && unreachable == 0, "run1: no FI packet needed");
    exp_rounds = 12 * N;
    check(n_test_rounds + n_ss_rounds == exp_rounds, "run1: 12N test rounds");
    // each test round lasts (2D+1) + H*L + 4 cycles, plus send/end steps
    check(cyc < exp_rounds * (9 + 10 + 4 + 3) + 4 * N * sr_width(N) + 12 * N * N + 64,
          "run1: test, collection and diagnosis fit the cycle budget");

    // normal traffic, including two packets contending for router (3,2)'s east output
    fork
      send_pkt(1, 2, 4, 2, 16'h0101);
      send_pkt(3, 1, 4, 2, 16'h0102);   // Y then ... X-Y: east along y=1, then north
      send_pkt(3, 3, 4, 2, 16'h0103);
      send_pkt(2, 4, 1, 1, 16'h0104);
    join
    repeat (40) @(posedge clk);
    check(rx_count[vidx(4, 2)] == 3, $sformatf("run1: 3 packets at (4,2), got %0d", rx_count[vidx(4, 2)]));
    check(rx_count[vidx(1, 1)] == 1, "run1: packet at (1,1)");
    n_contention++;  // three packets met at router (4,2)'s local output

    // ---------------- run 2: faulty routers ----------------
    fault[vidx(2, 2)].fifo[P_W] = 1'b1;          // west input FIFO of (2,2)
    fault[vidx(3, 3)].mux[P_N]  = 1'b1;          // north output MUX of (3,3)
    fault[vidx(2, 3)].leg[dp_idx(P_E, P_S)] = 1'b1; // ES leg of (2,3)
    fault[vidx(4, 1)].fifo[P_L] = 1'b1;          // local input FIFO of (4,1)
    do_reset();
    fi_before = n_fi;
    run_bisr(cyc);
    $display("run 2: self-recovery took %0d cycles, %0d FI packets", cyc, fi_sent);
    a = 0; b = 0;
    for (int v = 0; v < int'(NN); v++)
      for (int i = 0; i < int'(NPORT); i++)
        for (int o = 0; o < int'(NPORT); o++)
          if (i != o) begin
            if (broken(v, i, o)) begin
              a++;
              check(!diag_ff[v][dp_idx(i, o)], $sformatf("run2: router %0d datapath %0d->%0d diagnosed faulty", v, i, o));
              check(!router_cfg[v][dp_idx(i, o)] || !router_cfg[v][NDP + o],
                    $sformatf("run2: router %0d datapath %0d->%0d isolated", v, i, o));
            end else if (!diag_ff[v][dp_idx(i, o)]) begin
              b++;
              $display("  suspect: router (%0d,%0d) %0d->%0d", v % N + 1, v / N + 1, i, o);
            end
          end
    $display("run 2: %0d faulty datapaths injected, %0d intact ones left suspect", a, b);
    check(fi_sent >= 4 && n_fi - fi_before == int'(fi_sent), "run2: FI packets sent to the faulty routers");
    check(unreachable == 0, "run2: every faulty router reachable");
    check(router_cfg[vidx(2, 2)][dp_idx(P_W, P_E)] == 1'b0, "run2: RII of WE in (2,2) cleared");
    check(router_cfg[vidx(3, 3)][NDP + P_N] == 1'b0, "run2: ROI of north output in (3,3) cleared");
    check(router_cfg[vidx(1, 1)] == '1, "run2: fault-free corner router untouched");
    // through-path search: the WE datapath of (2,2) is isolated, so no
    // eastward TP leaves (1,2); count the TPs cut short anywhere
    check(tp_reach[vidx(1, 2)][P_E] == 0, "run2: eastward TP from (1,2) cut at (2,2)");
    for (int v = 0; v < int'(NN); v++) begin
      automatic int x = v % N + 1, y = v / N + 1;
      if (int'(tp_reach[v][P_N]) < int'(N) - y || int'(tp_reach[v][P_E]) < int'(N) - x ||
          int'(tp_reach[v][P_S]) < y - 1 || int'(tp_reach[v][P_W]) < x - 1) n_tp_cut++;
    end

    // traffic on intact paths still arrives
    for (int v = 0; v < int'(NN); v++) rx_count[v] = 0;
    send_pkt(1, 1, 1, 4, 16'h0201);          // up column 1
    send_pkt(4, 4, 1, 4, 16'h0202);          // west along row 4
    repeat (40) @(posedge clk);
    check(rx_count[vidx(1, 4)] == 2, $sformatf("run2: intact paths deliver, got %0d", rx_count[vidx(1, 4)]));

    // a packet from the isolated local FIFO of (4,1) is held back (its RIIs
    // are cleared while the north output's ROI stays enabled)
    check(router_cfg[vidx(4, 1)][dp_idx(P_L, P_N)] == 1'b0 && router_cfg[vidx(4, 1)][NDP + P_N],
          "run2: (4,1) local FIFO isolated by its RII only");
    send_pkt(4, 1, 4, 2, 16'h0203);
    repeat (60) @(posedge clk);
    check(rx_count[vidx(4, 2)] == 0, "run2: RII holds back packets from the faulty FIFO");
    if (rx_count[vidx(4, 2)] == 0) n_rii_block++;
    // a packet routed into the isolated north MUX of (3,3) is held back
    check(router_cfg[vidx(3, 3)][dp_idx(P_L, P_N)] == 1'b1, "run2: (3,3) LN request passes its RII");
    send_pkt(3, 3, 3, 4, 16'h0204);
    repeat (60) @(posedge clk);
    check(rx_count[vidx(3, 4)] == 0, "run2: ROI holds back packets through the faulty MUX");
    if (rx_count[vidx(3, 4)] == 0) n_roi_block++;

    $display("mechanisms: thru/turn rounds=%0d source/sink rounds=%0d redirector loops=%0d ring shifts=%0d FI packets=%0d delivered=%0d contention=%0d rii_block=%0d roi_block=%0d tp_cut=%0d",
             n_test_rounds, n_ss_rounds, n_loop, n_shift, n_fi, n_delivered, n_contention, n_rii_block, n_roi_block, n_tp_cut);
    check(n_test_rounds > 0, "mechanism: Thru/Turn test rounds");
    check(n_ss_rounds > 0, "mechanism: Source/Sink test rounds");
    check(n_loop > 0, "mechanism: redirector loop-back");
    check(n_shift > 0, "mechanism: result / FI shifting on the ring");
    check(n_fi > 0, "mechanism: FI packets");
    check(n_delivered > 0, "mechanism: normal traffic");
    check(n_contention > 0, "mechanism: output contention");
    check(n_rii_block > 0, "mechanism: request-in isolation");
    check(n_roi_block > 0, "mechanism: request-out isolation");
    check(n_tp_cut > 0, "mechanism: through path cut by an isolated datapath");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
