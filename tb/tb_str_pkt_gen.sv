// tb_str_pkt_gen: builds a test packet and an FI packet flit by flit and
// compares them with the expected head, pattern, tail and mask flits.
module tb_str_pkt_gen;
  import str_pkg::*;
  pkt_desc_t desc;
  logic [7:0] idx, pat_idx, len;
  logic pat_bit;
  flit_t flit;
  int checks = 0, failures = 0;
  localparam logic [7:0] PAT = 8'b1001_0110;

  str_pkt_gen #(.D(4), .SRC_X(0), .SRC_Y(3)) dut (.*);
  assign pat_bit = PAT[pat_idx[2:0]];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    header_t h;
    desc = '0;
    desc.kind = PK_TEST; desc.yx = 1'b1; desc.dst_x = 2; desc.dst_y = 5; desc.aux_x = 2; desc.aux_y = 3;
    idx = 0;
    #1 h = header_t'(flit.payload);
    check(len == 9, "test packet is 2D+1 flits");
    check(flit.ftype == FT_HEAD && h.kind == PK_TEST && h.yx && h.dst_x == 2 && h.dst_y == 5 &&
          h.src_x == 0 && h.src_y == 3 && h.aux_x == 2 && h.aux_y == 3 && h.rsvd == 0, "test head");
    for (int i = 1; i < 9; i++) begin
      idx = 8'(i);
      #1 check(flit.payload == {32{PAT[i-1]}} && flit.ftype == ((i == 8) ? FT_TAIL : FT_BODY),
               $sformatf("pattern flit %0d", i));
    end
    desc.kind = PK_FI; desc.cfg = 25'h1AB_CDEF;
    idx = 0;
    #1 h = header_t'(flit.payload);
    check(len == 2 && flit.ftype == FT_HEAD && h.kind == PK_FI, "FI head");
    idx = 1;
    #1 check(flit.ftype == FT_TAIL && flit.payload == 32'h1AB_CDEF, "FI mask flit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
