// tb_str_routing_logic: exhaustive check of X-Y and Y-X routing decisions
// of a router at (2,3) for every destination on a 6x6 coordinate grid.
module tb_str_routing_logic;
  import str_pkg::*;
  logic [CW-1:0] dst_x, dst_y;
  logic yx;
  logic [NPORT-1:0] req;
  int checks = 0, failures = 0;

  str_routing_logic #(.X(2), .Y(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 6; x++)
        for (int y = 0; y < 6; y++) begin
          int unsigned p;
          dst_x = CW'(x); dst_y = CW'(y); yx = m[0];
          #1;
          if (m == 0) p = (x > 2) ? P_E : (x < 2) ? P_W : (y > 3) ? P_N : (y < 3) ? P_S : P_L;
          else        p = (y > 3) ? P_N : (y < 3) ? P_S : (x > 2) ? P_E : (x < 2) ? P_W : P_L;
          checks++;
          if (req != NPORT'(1 << p)) begin
            failures++;
            $display("FAIL: dst (%0d,%0d) yx=%0d req=%b", x, y, m, req);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
