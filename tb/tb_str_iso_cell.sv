// tb_str_iso_cell: the isolation cell is transparent after reset, masks the
// request once written with 0 and passes it again when rewritten with 1.
module tb_str_iso_cell;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_en = 0, req_in = 0, req_out, en;
  int checks = 0, failures = 0;

  str_iso_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic state;
    repeat (2) @(posedge clk);
    rst_n = 1;
    state = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      req_in = 1'($urandom);
      cfg_we = (n % 5 == 0);
      cfg_en = 1'($urandom);
      #1;
      checks++;
      if (req_out != (req_in & state) || en != state) begin
        failures++;
        $display("FAIL: step %0d", n);
      end
      @(posedge clk);
      if (cfg_we) state = cfg_en;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
