// tb_str_path_mask: checks the datapaths of two hand-worked packets of a 4x4
// mesh, and that the whole schedule covers every one of the 20 datapaths of
// every router (otherwise the diagnosis could never clear them), with
// exactly 8N^2 Thru/Turn and 4N^2 Source/Sink packets.
module tb_str_path_mask;
  import str_pkg::*;
  localparam int unsigned N = 4;
  logic [7:0] round, pos, tx_tm, rx_tm;
  logic [NDP-1:0] mask [N*N];
  int checks = 0, failures = 0;

  str_path_mask #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned v(input int unsigned x, input int unsigned y);
    return (y - 1) * N + x - 1;
  endfunction

  initial begin
    logic [NDP-1:0] cov [N*N];
    int bits, n_tt, n_ss;
    // round 0, west TM row 2: WE in (1,2), WN turn in (2,2), SN in (2,3), (2,4)
    round = 0; pos = 2;
    #1;
    bits = 0;
    for (int k = 0; k < int'(N * N); k++) bits += $countones(mask[k]);
    check(bits == 4, "round 0 packet crosses 4 datapaths");
    check(mask[v(1, 2)] == NDP'(1 << dp_idx(P_W, P_E)), "WE in (1,2)");
    check(mask[v(2, 2)] == NDP'(1 << dp_idx(P_W, P_N)), "WN in (2,2)");
    check(mask[v(2, 3)] == NDP'(1 << dp_idx(P_S, P_N)) && mask[v(2, 4)] == NDP'(1 << dp_idx(P_S, P_N)), "SN above");
    check(tx_tm == 1 && rx_tm == 5, "west row 2 -> north column 2");
    // round 32 (Source/Sink W->E, column 1), west TM row 2: WL and LE in (1,2), WE after
    round = 32; pos = 2;
    #1;
    check(mask[v(1, 2)] == NDP'((1 << dp_idx(P_W, P_L)) | (1 << dp_idx(P_L, P_E))), "WL and LE in (1,2)");
    check(mask[v(2, 2)] == NDP'(1 << dp_idx(P_W, P_E)) && mask[v(4, 2)] == NDP'(1 << dp_idx(P_W, P_E)), "WE after");
    check(rx_tm == 2 * N + (N - 2), "received by east row 2");
    // coverage of the whole schedule
    for (int k = 0; k < int'(N * N); k++) cov[k] = '0;
    n_tt = 0; n_ss = 0;
    for (int r = 0; r < 12 * int'(N); r++)
      for (int p = 1; p <= int'(N); p++) begin
        round = 8'(r); pos = 8'(p);
        #1;
        if (r < 8 * int'(N)) n_tt++; else n_ss++;
        for (int k = 0; k < int'(N * N); k++) cov[k] |= mask[k];
      end
    for (int k = 0; k < int'(N * N); k++) check(cov[k] == '1, $sformatf("router %0d fully covered (%b)", k, cov[k]));
    check(n_tt == 8 * N * N && n_ss == 4 * N * N, "8N^2 + 4N^2 test packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
