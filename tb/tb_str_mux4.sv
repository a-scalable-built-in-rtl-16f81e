// tb_str_mux4: one-hot selection of the 4-to-1 output MUX and its
// stuck-at-0 hooks on an input leg and on the output.
module tb_str_mux4;
  import str_pkg::*;
  localparam int unsigned W = FLIT_W;
  logic [W-1:0] in [4];
  logic [3:0] sel, leg_sa0;
  logic out_sa0;
  logic [W-1:0] out;
  int checks = 0, failures = 0;

  str_mux4 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      int k;
      logic [W-1:0] e;
      for (int i = 0; i < 4; i++) in[i] = {$urandom, 2'($urandom)};
      k = $urandom_range(0, 3);
      sel = 4'(1 << k);
      leg_sa0 = (n % 4 == 1) ? 4'(1 << $urandom_range(0, 3)) : 4'b0;
      out_sa0 = (n % 7 == 3);
      #1;
      e = in[k];
      if (leg_sa0[k] || out_sa0) e[FAULT_BIT] = 1'b0;
      checks++;
      if (out !== e) begin failures++; $display("FAIL: sel %0d", k); end
    end
    sel = '0; leg_sa0 = '0; out_sa0 = 0;
    #1 checks++;
    if (out != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
