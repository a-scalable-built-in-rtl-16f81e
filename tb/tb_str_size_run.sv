// tb_str_size_run: one self-recovery run of str_top at mesh size N with NF
// faulty routers, used by tb_str_sizes. Not a testbench on its own.
//
// Fault k (k < NF) goes into router (FX[k], FY[k]) and is, by k mod 4:
//   - a stuck-at input FIFO (east port);
//   - a stuck-at output MUX (south port);
//   - one broken MUX leg (WN);
//   - a stuck-at local input FIFO.
// After `go` the run pulses bisr_start and waits for bisr_done. It then
// checks:
//   - the test phase took 12N rounds of (2D+1) + (2N+2) + 4 + 2 cycles;
//   - every datapath crossing an injected fault is diagnosed faulty and its
//     request is masked (by its RII, or by the ROI for a faulty MUX);
//   - every faulty router received its FI packet, none is unreachable.
// Results come out on `checks`, `failures` and `done`.
module tb_str_size_run
  import str_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned NF = 1
) (
  input  logic clk,
  input  logic go,
  output int   checks,
  output int   failures,
  output logic done,
  output int   cycles
);
  localparam int unsigned D  = 4;
  localparam int unsigned NN = N * N;
  localparam int FX [4] = '{3, N - 2, 4, N - 1};
  localparam int FY [4] = '{3, N - 3, N - 1, 2};

  logic             rst_n = 1'b0, bisr_start = 1'b0;
  logic             bisr_busy, bisr_done;
  logic [7:0]       fi_sent, unreachable;
  logic [NDP-1:0]   diag_ff     [NN];
  logic [CFG_W-1:0] router_cfg  [NN];
  logic [3:0][$clog2(N)-1:0] tp_reach [NN];
  logic             looped      [NN];
  fault_inj_t       fault       [NN];
  logic             ip_in_valid [NN];
  flit_t            ip_in_flit  [NN];
  logic             ip_in_ready [NN];
  logic             ip_out_valid[NN];
  flit_t            ip_out_flit [NN];
  logic             ip_out_ready[NN];
  logic [NDP-1:0]   bad [NN];      // datapaths crossing an injected fault
  logic [NPORT-1:0] bad_mux [NN];
  int               n_send = 0, first_send = -1, last_send = -1, cyc = 0;

  str_top #(.N(N), .D(D)) u_top (.*);

  always @(posedge clk) begin
    cyc++;
    if (u_top.cmd.send) begin
      n_send++;
      if (first_send < 0) first_send = cyc;
      last_send = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (N=%0d, %0d faults): %s", N, NF, what);
    end
  endtask

  function automatic int vidx(int x, int y);
    return (y - 1) * N + x - 1;
  endfunction

  initial begin
    int t0;
    checks = 0; failures = 0; done = 1'b0; cycles = 0;
    for (int v = 0; v < int'(NN); v++) begin
      fault[v] = '0; ip_in_valid[v] = 1'b0; ip_in_flit[v] = '0; ip_out_ready[v] = 1'b1;
      bad[v] = '0; bad_mux[v] = '0;
    end
    for (int k = 0; k < int'(NF); k++) begin
      automatic int v = vidx(FX[k], FY[k]);
      case (k % 4)
        0: begin
          fault[v].fifo[P_E] = 1'b1;
          for (int o = 0; o < int'(NPORT); o++) if (o != P_E) bad[v][dp_idx(P_E, o)] = 1'b1;
        end
        1: begin
          fault[v].mux[P_S] = 1'b1;
          bad_mux[v][P_S] = 1'b1;
          for (int i = 0; i < int'(NPORT); i++) if (i != P_S) bad[v][dp_idx(i, P_S)] = 1'b1;
        end
        2: begin
          fault[v].leg[dp_idx(P_W, P_N)] = 1'b1;
          bad[v][dp_idx(P_W, P_N)] = 1'b1;
        end
        default: begin
          fault[v].fifo[P_L] = 1'b1;
          for (int o = 0; o < int'(NPORT - 1); o++) bad[v][dp_idx(P_L, o)] = 1'b1;
        end
      endcase
    end
    while (!go) @(posedge clk);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    bisr_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    bisr_start = 1'b0;
    while (!bisr_done) @(negedge clk);
    cycles = cyc - t0;
    check(n_send == 12 * int'(N), $sformatf("%0d test rounds", n_send));
    check(last_send - first_send == (12 * int'(N) - 1) * ((2 * D + 1) + (2 * N + 2) + 4 + 2),
          $sformatf("test phase %0d cycles", last_send - first_send));
    for (int v = 0; v < int'(NN); v++) begin
      for (int d = 0; d < int'(NDP); d++)
        if (bad[v][d]) begin
          automatic int o = (d % 4 < d / 4) ? d % 4 : d % 4 + 1;
          check(!diag_ff[v][d], $sformatf("router %0d datapath %0d diagnosed faulty", v, d));
          check(!router_cfg[v][d] || !router_cfg[v][NDP + o], $sformatf("router %0d datapath %0d masked", v, d));
        end
      for (int p = 0; p < int'(NPORT); p++)
        if (bad_mux[v][p]) check(!router_cfg[v][NDP + p], $sformatf("router %0d ROI %0d cleared", v, p));
    end
    check(int'(fi_sent) >= int'(NF) && unreachable == 0,
          $sformatf("FI packets %0d, unreachable %0d", fi_sent, unreachable));
    $display("N=%0d faults=%0d: recovery %0d cycles, %0d FI packets", N, NF, cycles, fi_sent);
    done = 1'b1;
  end
endmodule
