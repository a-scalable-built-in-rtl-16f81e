// tb_str_sizes: self-recovery at the mesh sizes the design is evaluated on.
//   - a 3x3 mesh with one faulty router: the smallest area-comparison size;
//   - an 8x8 mesh with 4 faulty routers (a faulty FIFO, a faulty MUX, a
//     broken MUX leg and a faulty local FIFO): the largest faulty-network
//     case.
// Each extra mesh size adds a whole mesh to the simulation model, so the
// other sizes (5x5, 6x6, 8x8 with 1 or 2 faults) are left out to keep the
// build time short; they differ only in N and in the fault list.
// Each run is a tb_str_size_run instance. The runs go one after another,
// and the checks of all of them are summed.
module tb_str_sizes;
  localparam int NR = 2;
  logic clk = 1'b0;
  logic go [NR];
  int   ck [NR], fl [NR], cy [NR];
  logic dn [NR];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_str_size_run #(.N(3), .NF(1)) r0 (.clk, .go(go[0]), .checks(ck[0]), .failures(fl[0]), .done(dn[0]), .cycles(cy[0]));
  tb_str_size_run #(.N(8), .NF(4)) r1 (.clk, .go(go[1]), .checks(ck[1]), .failures(fl[1]), .done(dn[1]), .cycles(cy[1]));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NR; i++) go[i] = 1'b0;
    repeat (2) @(posedge clk);   // the runs clear their done flags at time 0
    for (int i = 0; i < NR; i++) begin
      go[i] = 1'b1;
      while (!dn[i]) @(posedge clk);
    end
    for (int i = 0; i < NR; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
