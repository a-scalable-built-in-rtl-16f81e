// tb_str_fifo: self-checking test of the router input FIFO.
// Random pushes and pops are compared with a queue model; full / empty
// flags, the one-cycle write-to-read latency, the X / X' pattern sequence
// (a 0->1 and 1->0 transition through every entry) and the stuck-at-0 hook
// are checked.
module tb_str_fifo;
  import str_pkg::*;
  localparam int unsigned D = 4;
  localparam int unsigned W = FLIT_W;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, sa0 = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  str_fifo #(.D(D), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    @(negedge clk);
    check(empty && !full, "empty after reset");
    // write one, readable next cycle
    wr_en = 1; wr_data = 34'h1_2345_6789;
    @(negedge clk);
    wr_en = 0;
    check(!empty && rd_data == 34'h1_2345_6789, "one-cycle write-to-read");
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    check(empty, "empty after pop");
    // fill to full
    for (int i = 0; i < int'(D); i++) begin
      wr_en = 1; wr_data = W'(i + 100);
      @(negedge clk);
    end
    wr_en = 1; wr_data = '1;   // ignored when full
    @(negedge clk);
    wr_en = 0;
    check(full, "full after D pushes");
    for (int i = 0; i < int'(D); i++) begin
      check(rd_data == W'(i + 100), $sformatf("order entry %0d", i));
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
    end
    check(empty, "push while full was dropped");
    // X then X' through every entry (Table 1): each register sees 0->1 or 1->0
    for (int ph = 0; ph < 2; ph++) begin
      for (int i = 0; i < int'(D); i++) begin
        wr_en = 1; wr_data = {W{(ph == 0) ? pat_x(i) : !pat_x(i)}};
        @(negedge clk);
      end
      wr_en = 0;
      for (int i = 0; i < int'(D); i++) begin
        check(rd_data == {W{(ph == 0) ? pat_x(i) : !pat_x(i)}}, "X / X' pattern read back");
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
      end
    end
    // random traffic against the model
    for (int n = 0; n < 400; n++) begin
      wr_en = $urandom_range(0, 1);
      rd_en = $urandom_range(0, 1);
      wr_data = {$urandom, 2'($urandom)};
      check(empty == (model.size() == 0) && full == (model.size() == D), "flags match model");
      if (model.size() > 0) check(rd_data == model[0], "front matches model");
      @(posedge clk);
      begin
        bit can_wr;
        can_wr = model.size() < D;
        if (rd_en && model.size() > 0) void'(model.pop_front());
        if (wr_en && can_wr) model.push_back(wr_data);
      end
      @(negedge clk);
    end
    wr_en = 0; rd_en = 0;
    // stuck-at-0 hook
    while (!empty) begin rd_en = 1; @(negedge clk); end
    rd_en = 0;
    wr_en = 1; wr_data = '1;
    @(negedge clk);
    wr_en = 0; sa0 = 1;
    #1 check(rd_data[FAULT_BIT] == 1'b0 && rd_data[FAULT_BIT-1] == 1'b1, "stuck-at-0 hook");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
