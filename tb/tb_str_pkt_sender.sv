// tb_str_pkt_sender: sends packets of several lengths into a sink with
// random back-pressure and checks that flits 0..len-1 arrive once each, in
// order, at one per cycle when the sink is always ready.
module tb_str_pkt_sender;
  import str_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, out_valid, out_ready = 1, busy, done;
  logic [7:0] len = 0, idx;
  flit_t flit_in, out_flit;
  int checks = 0, failures = 0;

  str_pkt_sender dut (.*);
  always #5 clk = ~clk;
  assign flit_in = '{ftype: FT_BODY, payload: 32'(idx) + 32'h100};

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      int got, cyc, l;
      bit bp;
      l  = (n % 3 == 0) ? 2 : 9;
      bp = (n >= 4);
      @(negedge clk);
      len = 8'(l); start = 1;
      @(negedge clk);
      start = 0;
      got = 0; cyc = 0;
      while (busy) begin
        out_ready = bp ? 1'($urandom) : 1'b1;
        #1;
        if (out_valid && out_ready) begin
          check(out_flit.payload == 32'(got) + 32'h100, "flit order");
          check(done == (got == l - 1), "done on last flit");
          got++;
        end
        @(negedge clk);
        cyc++;
      end
      check(got == l, $sformatf("sent %0d of %0d flits", got, l));
      if (!bp) check(cyc == l, "one flit per cycle without back-pressure");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
