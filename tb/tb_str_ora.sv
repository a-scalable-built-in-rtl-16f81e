// tb_str_ora: the output response analyzer passes a correct test packet and
// fails a packet with one corrupted pattern flit, a wrong address, a missing
// tail, a surplus flit, or no packet at all.
module tb_str_ora;
  import str_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, pat_bit, pass;
  flit_t in_flit = '0;
  logic [7:0] pat_idx;
  int checks = 0, failures = 0;
  localparam logic [7:0] PAT = 8'b1001_0110;

  str_ora #(.D(4), .MY_X(5), .MY_Y(2)) dut (.*);
  assign pat_bit = PAT[pat_idx[2:0]];
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mode 0 good, 1 corrupt flit 3, 2 wrong destination, 3 short, 4 extra flit, 5 nothing
  task automatic run(input int mode, input bit exp);
    header_t h;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    h = '0; h.kind = PK_SS; h.dst_x = (mode == 2) ? 4'd4 : 4'd5; h.dst_y = 2;
    if (mode != 5) begin
      for (int f = 0; f < ((mode == 3) ? 8 : (mode == 4) ? 10 : 9); f++) begin
        in_valid = 1;
        if (f == 0) in_flit = '{ftype: FT_HEAD, payload: PAY_W'(h)};
        else begin
          in_flit = '{ftype: (f >= 8) ? FT_TAIL : FT_BODY, payload: {32{PAT[(f - 1) % 8]}}};
          if (mode == 1 && f == 3) in_flit.payload[FAULT_BIT] = ~in_flit.payload[FAULT_BIT];
        end
        @(negedge clk);
        in_valid = $urandom_range(0, 1) == 1 ? 1'b0 : 1'b0;
        if (f % 3 == 1) @(negedge clk);   // gaps between flits
      end
    end
    in_valid = 0;
    repeat (2) @(negedge clk);
    check(pass == exp, $sformatf("mode %0d: pass=%0d", mode, pass));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(in_ready, "always ready");
    run(0, 1);
    run(1, 0);
    run(0, 1);
    run(2, 0);
    run(3, 0);
    run(4, 0);
    run(5, 0);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
