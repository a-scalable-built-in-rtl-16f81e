// tb_str_mesh: packets injected at the ring-side ports of a 4x4 mesh must
// leave at the expected ring-side port (X-Y and Y-X test packets), a
// Source/Sink test packet must be turned around by the redirector of its
// router and leave on the far side, IP-to-IP data must arrive, and an FI
// packet must reconfigure only the router it is addressed to.
module tb_str_mesh;
  import str_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  logic tm_in_valid [4*N], tm_in_ready [4*N], tm_out_valid[4*N], tm_out_ready[4*N];
  flit_t tm_in_flit [4*N], tm_out_flit [4*N];
  logic ip_in_valid [N*N], ip_in_ready [N*N], ip_out_valid[N*N], ip_out_ready[N*N];
  flit_t ip_in_flit [N*N], ip_out_flit [N*N];
  fault_inj_t fault [N*N];
  logic [CFG_W-1:0] cfg [N*N];
  logic cfg_written [N*N], looped [N*N];
  int checks = 0, failures = 0;
  int tm_rx_pkts [4*N];
  int tm_rx_flits [4*N];
  int ip_rx_pkts [N*N];
  int n_looped [N*N];

  str_mesh #(.N(N), .D(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 4 * int'(N); t++)
      if (tm_out_valid[t] && tm_out_ready[t]) begin
        tm_rx_flits[t]++;
        if (tm_out_flit[t].ftype == FT_TAIL) tm_rx_pkts[t]++;
      end
    for (int v = 0; v < int'(N * N); v++) begin
      if (ip_out_valid[v] && ip_out_ready[v] && ip_out_flit[v].ftype == FT_TAIL) ip_rx_pkts[v]++;
      if (looped[v]) n_looped[v]++;
    end
  end

  task automatic send_tm(input int t, input pkt_kind_e k, input bit yx,
                         input int dx, input int dy, input int ax, input int ay, input int nflits,
                         input logic [CFG_W-1:0] body = '0);
    header_t h;
    h = '0; h.kind = k; h.yx = yx; h.dst_x = CW'(dx); h.dst_y = CW'(dy); h.aux_x = CW'(ax); h.aux_y = CW'(ay);
    for (int f = 0; f < nflits; f++) begin
      tm_in_valid[t] <= 1;
      tm_in_flit[t] <= (f == 0) ? '{ftype: FT_HEAD, payload: PAY_W'(h)}
                   : '{ftype: (f == nflits - 1) ? FT_TAIL : FT_BODY, payload: (k == PK_FI) ? PAY_W'(body) : '1};
      @(posedge clk);
      while (!tm_in_ready[t]) @(posedge clk);
    end
    tm_in_valid[t] <= 0;
  endtask

  task automatic send_ip(input int v, input int dx, input int dy);
    header_t h;
    h = '0; h.kind = PK_DATA; h.dst_x = CW'(dx); h.dst_y = CW'(dy);
    for (int f = 0; f < 5; f++) begin
      ip_in_valid[v] <= 1;
      ip_in_flit[v] <= (f == 0) ? '{ftype: FT_HEAD, payload: PAY_W'(h)}
                   : '{ftype: (f == 4) ? FT_TAIL : FT_BODY, payload: 32'(f)};
      @(posedge clk);
      while (!ip_in_ready[v]) @(posedge clk);
    end
    ip_in_valid[v] <= 0;
  endtask

  initial begin
    logic [CFG_W-1:0] c;
    for (int t = 0; t < 4 * int'(N); t++) begin
      tm_in_valid[t] = 0; tm_in_flit[t] = '0; tm_out_ready[t] = 1; tm_rx_pkts[t] = 0; tm_rx_flits[t] = 0;
    end
    for (int v = 0; v < int'(N * N); v++) begin
      ip_in_valid[v] = 0; ip_in_flit[v] = '0; ip_out_ready[v] = 1; fault[v] = '0; ip_rx_pkts[v] = 0; n_looped[v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    fork
      send_tm(tm_index(SIDE_W, 2, N), PK_TEST, 0, 2, N + 1, 0, 0, 9);   // WN turn at (2,2)
      send_tm(tm_index(SIDE_N, 3, N), PK_TEST, 1, N + 1, 2, 0, 0, 9);   // NE turn at (3,2)
      send_tm(tm_index(SIDE_W, 3, N), PK_SS, 0, 2, 3, N + 1, 3, 9);     // via local port of (2,3)
      send_ip(0, 4, 4);
    join
    repeat (30) @(posedge clk);
    check(tm_rx_pkts[tm_index(SIDE_N, 2, N)] == 1 && tm_rx_flits[tm_index(SIDE_N, 2, N)] == 9, "WN packet at north TM 2");
    check(tm_rx_pkts[tm_index(SIDE_E, 2, N)] == 1, "NE packet at east TM 2");
    check(tm_rx_pkts[tm_index(SIDE_E, 3, N)] == 1, "Source/Sink packet at east TM 3");
    check(n_looped[(3 - 1) * N + 1] == 1, "turned around at (2,3)");
    check(ip_rx_pkts[N * N - 1] == 1, "IP data (1,1) -> (4,4)");
    begin
      int tot;
      tot = 0;
      for (int t = 0; t < 4 * int'(N); t++) tot += tm_rx_pkts[t];
      check(tot == 3, "no stray packets at the ring");
    end
    // FI packet from the south TM of column 2 to router (2,3)
    c = '1; c[dp_idx(P_S, P_N)] = 1'b0;
    send_tm(tm_index(SIDE_S, 2, N), PK_FI, 1, 2, 3, 0, 0, 2, c);
    repeat (10) @(posedge clk);
    for (int v = 0; v < int'(N * N); v++)
      check(cfg[v] == ((v == (3 - 1) * N + 1) ? c : '1), $sformatf("masks of router %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
