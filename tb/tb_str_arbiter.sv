// tb_str_arbiter: round-robin order, grant lock for a whole packet
// (wormhole) and release on the tail for the 4x1 output arbiter.
module tb_str_arbiter;
  logic clk = 0, rst_n = 0;
  logic [3:0] req = '0, grant;
  logic release_i = 0, grant_valid;
  int checks = 0, failures = 0;

  str_arbiter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (grant=%b)", what, grant); end
  endtask

  initial begin
    int last;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(grant == 0 && !grant_valid, "no request, no grant");
    // all request: grants rotate 0,1,2,3,0 with single-cycle packets
    req = 4'b1111;
    for (int k = 0; k < 8; k++) begin
      release_i = 1;
      #1 check(grant == 4'(1 << (k % 4)), $sformatf("round-robin step %0d", k));
      @(negedge clk);
    end
    // a multi-flit packet keeps its grant while others request
    release_i = 0;
    #1 last = $clog2(grant);
    @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      req = 4'($urandom) | 4'(1 << last);
      #1 check(grant == 4'(1 << last), "grant locked during packet");
      @(negedge clk);
    end
    // the lock holds even if the owner's FIFO runs empty for a cycle
    req = 4'b1111 & ~4'(1 << last);
    #1 check(grant == 4'(1 << last), "lock held through a bubble");
    release_i = 1;
    @(negedge clk);
    release_i = 0;
    req = 4'b1111;
    #1 check(grant == 4'(1 << ((last + 1) % 4)), "next requester after release");
    // random: grant is always one of the requesters or the locked owner
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      req = 4'($urandom);
      release_i = 1'($urandom);
      #1 check($countones(grant) <= 1, "grant one-hot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
