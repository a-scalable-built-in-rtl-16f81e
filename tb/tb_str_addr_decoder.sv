// tb_str_addr_decoder: checks header field extraction and head / last flags
// of the address decoder for random headers and every flit type.
module tb_str_addr_decoder;
  import str_pkg::*;
  flit_t flit;
  logic valid, is_head, is_last, yx;
  logic [CW-1:0] dst_x, dst_y;
  pkt_kind_e kind;
  int checks = 0, failures = 0;

  str_addr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [3:0] ex, ey;
      logic [1:0] ek, ft;
      logic ey_x;
      ex = 4'($urandom); ey = 4'($urandom); ek = 2'($urandom); ft = 2'($urandom); ey_x = 1'($urandom);
      valid = 1'($urandom);
      flit.ftype = flit_type_e'(ft);
      flit.payload = {5'b0, ek, ey_x, ex, ey, 16'($urandom)};
      #1;
      checks++;
      if (dst_x != ex || dst_y != ey || kind != pkt_kind_e'(ek) || yx != ey_x
          || is_head != (valid && ft[1]) || is_last != (valid && ft[0])) begin
        failures++;
        $display("FAIL: flit %h", flit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
