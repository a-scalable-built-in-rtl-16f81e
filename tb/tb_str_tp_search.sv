// tb_str_tp_search: the through-path search on a 4x4 mesh. Starts with the
// example of four faulty routers in a 2x2 block at (2,2)..(3,3):
//   - the WE datapaths of (2,2) and (3,2) are enabled, so the row-2 TP from
//     the west edge router (1,2) to the east edge router (4,2) is valid;
//   - the SN datapath of (2,3) is disabled, so the column-2 TP from (2,1) to
//     (2,4) is not.
// Then 200 random masks are checked against a reference that walks the mesh
// one router at a time.
module tb_str_tp_search;
  import str_pkg::*;
  localparam int unsigned N = 4;
  logic [NDP-1:0] rii [N*N];
  logic [3:0][$clog2(N)-1:0] reach [N*N];
  int checks = 0, failures = 0;
  logic clk = 0;

  str_tp_search #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int v_of(int x, int y);
    return (y - 1) * N + x - 1;
  endfunction

  function automatic int ref_reach(int x, int y, int d);
    int n = 0;
    int cx = x, cy = y;
    int ip = (d == 0) ? 2 : (d == 1) ? 3 : (d == 2) ? 0 : 1;
    forever begin
      case (d)
        0: cy++;
        1: cx++;
        2: cy--;
        default: cx--;
      endcase
      if (cx < 1 || cx > N || cy < 1 || cy > N) return n;
      if (!rii[v_of(cx, cy)][dp_idx(ip, d)]) return n;
      n++;
    end
  endfunction

  task automatic check_all(input string tag);
    for (int y = 1; y <= int'(N); y++)
      for (int x = 1; x <= int'(N); x++)
        for (int d = 0; d < 4; d++)
          check(int'(reach[v_of(x, y)][d]) == ref_reach(x, y, d),
                $sformatf("%s reach (%0d,%0d) dir %0d = %0d", tag, x, y, d, reach[v_of(x, y)][d]));
  endtask

  initial begin
    for (int v = 0; v < int'(N * N); v++) rii[v] = '1;
    // four faulty routers; only some of their datapaths are isolated
    rii[v_of(2, 2)][dp_idx(P_N, P_S)] = 1'b0;
    rii[v_of(3, 2)][dp_idx(P_W, P_N)] = 1'b0;
    rii[v_of(2, 3)][dp_idx(P_S, P_N)] = 1'b0;
    rii[v_of(3, 3)][dp_idx(P_E, P_W)] = 1'b0;
    #1;
    check(reach[v_of(1, 2)][P_E] >= 2, "row-2 TP (1,2) -> (4,2) valid");
    check(reach[v_of(2, 1)][P_N] < 2, "column-2 TP (2,1) -> (2,4) invalid");
    check(reach[v_of(2, 1)][P_N] == 1, "column-2 TP stops after (2,2)");
    check(reach[v_of(4, 3)][P_W] == 0, "row-3 westward TP blocked at (3,3)");
    check_all("example");
    for (int it = 0; it < 200; it++) begin
      for (int v = 0; v < int'(N * N); v++) begin
        rii[v] = '1;
        if ($urandom_range(0, 2) == 0) rii[v] = NDP'($urandom) | NDP'($urandom);
      end
      #1;
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
