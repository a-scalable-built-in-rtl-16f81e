// tb_str_sr: a chain of three shift registers loads parallel words and
// shifts them out serially in order, while new bits shift in behind them.
module tb_str_sr;
  localparam int unsigned W = 12;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, sin = 0;
  logic [W-1:0] ld [3];
  logic [W-1:0] q [3];
  logic s01, s12, sout;
  int checks = 0, failures = 0;

  str_sr #(.W(W)) u0 (.clk, .rst_n, .load, .load_data(ld[0]), .shift, .sin(sin), .sout(s01), .q(q[0]));
  str_sr #(.W(W)) u1 (.clk, .rst_n, .load, .load_data(ld[1]), .shift, .sin(s01), .sout(s12), .q(q[1]));
  str_sr #(.W(W)) u2 (.clk, .rst_n, .load, .load_data(ld[2]), .shift, .sin(s12), .sout(sout), .q(q[2]));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3*W-1:0] got, expv, fresh;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5; n++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) ld[k] = W'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      expv = {ld[2], ld[1], ld[0]};
      fresh = {$urandom, 4'($urandom)};
      got = '0;
      for (int b = 0; b < 3 * int'(W); b++) begin
        shift = 1; sin = fresh[3*W-1-b];
        got = {got[3*W-2:0], sout};
        @(negedge clk);
      end
      shift = 0;
      checks++;
      if (got != expv) begin failures++; $display("FAIL: shifted out %h, expected %h", got, expv); end
      checks++;
      if ({q[2], q[1], q[0]} != fresh) begin failures++; $display("FAIL: shifted in"); end
      // hold when idle
      @(negedge clk);
      checks++;
      if ({q[2], q[1], q[0]} != fresh) begin failures++; $display("FAIL: hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
