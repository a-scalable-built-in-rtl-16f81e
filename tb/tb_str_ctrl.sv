// tb_str_ctrl: the controller against a model of the TM shift-register ring
// (4x4 mesh). The model reports every test packet as received correctly
// except the Source/Sink packet turned around at router (3,2) from west to
// east. Expected: 12N send commands spaced (2D+1) + H*L + 4 cycles apart plus
// the send and end steps, all result bits collected over the ring, exactly
// the WL and LE datapaths of (3,2) diagnosed faulty, and one FI slot shifted
// into the west TM of row 2 carrying masks that clear just those two RIIs.
module tb_str_ctrl;
  import str_pkg::*;
  localparam int unsigned N = 4, D = 4;
  localparam int unsigned SRW = sr_width(N);
  localparam int unsigned NT = 4 * N;
  logic clk = 0, rst_n = 0, start = 0;
  tm_cmd_t cmd;
  logic sr_out, sr_in, busy, done;
  logic [NDP-1:0] ff [N*N];
  logic [7:0] fi_sent, unreachable;
  logic [SRW-1:0] tm_sr [NT];
  logic [SRW-1:0] res [NT];
  int checks = 0, failures = 0;
  int n_send = 0, last_send = -1, gap = -1, cyc = 0, gap_bad = 0;
  int n_fi_go = 0;
  fi_slot_t slot_at_go [NT];

  str_ctrl #(.N(N), .D(D)) dut (.*);
  always #5 clk = ~clk;
  assign sr_in = tm_sr[NT-1][SRW-1];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ring model
  always @(posedge clk) begin
    cyc++;
    if (cmd.sr_load) for (int t = 0; t < int'(NT); t++) tm_sr[t] <= res[t];
    else if (cmd.sr_shift) begin
      tm_sr[0] <= {tm_sr[0][SRW-2:0], sr_out};
      for (int t = 1; t < int'(NT); t++) tm_sr[t] <= {tm_sr[t][SRW-2:0], tm_sr[t-1][SRW-1]};
    end
    if (cmd.send) begin
      n_send++;
      if (last_send >= 0) begin
        if (gap < 0) gap = cyc - last_send;
        else if (cyc - last_send != gap) gap_bad++;
      end
      last_send = cyc;
    end
    if (cmd.fi_go) begin
      n_fi_go++;
      for (int t = 0; t < int'(NT); t++) slot_at_go[t] = fi_slot_t'(tm_sr[t][FI_SLOT_W-1:0]);
    end
  end

  initial begin
    int rf, tf, vf;
    logic [CFG_W-1:0] exp_cfg;
    for (int t = 0; t < int'(NT); t++) begin
      tm_sr[t] = '0;
      res[t] = '0;
      for (int r = 0; r < 12 * int'(N); r++) res[t][r] = (round_dst_side(r, N) == tm_side(t, N));
    end
    rf = 8 * N + 2;                       // Source/Sink W->E through column 3
    tf = tm_index(SIDE_E, 2, N);          // received by the east TM of row 2
    res[tf][rf] = 1'b0;
    vf = (2 - 1) * N + (3 - 1);           // router (3,2)
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(n_send == 12 * N, $sformatf("12N rounds, got %0d", n_send));
    check(gap == (2 * D + 1) + (2 * N + 2) + 4 + 2 && gap_bad == 0, $sformatf("round period %0d", gap));
    for (int v = 0; v < int'(N * N); v++)
      for (int d = 0; d < int'(NDP); d++) begin
        bit e;
        e = !(v == vf && (d == dp_idx(P_W, P_L) || d == dp_idx(P_L, P_E)));
        check(ff[v][d] == e, $sformatf("router %0d datapath %0d diagnosis", v, d));
      end
    check(fi_sent == 1 && n_fi_go == 1 && unreachable == 0, "one FI packet");
    exp_cfg = '1;
    exp_cfg[dp_idx(P_W, P_L)] = 1'b0;
    exp_cfg[dp_idx(P_L, P_E)] = 1'b0;
    for (int t = 0; t < int'(NT); t++)
      if (t == tm_index(SIDE_W, 2, N))
        check(slot_at_go[t].valid && slot_at_go[t].x == 3 && slot_at_go[t].y == 2 && slot_at_go[t].cfg == exp_cfg,
              "FI slot in the west TM of row 2");
      else check(!slot_at_go[t].valid, $sformatf("no FI slot in TM %0d", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
