// tb_str_tm: one test module (west side, row 2, 4x4 mesh) against a model
// router port. Checks the test packet it sends in round 0, the result bits it
// records for a correct, a corrupted and a missing packet, the result word it
// shifts out on the ring, and the fault-isolation packet it sends after an FI
// slot has been shifted in.
module tb_str_tm;
  import str_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned SRW = sr_width(N);
  logic clk = 0, rst_n = 0;
  tm_cmd_t cmd = '0;
  logic sr_in = 0, sr_out, tx_valid, tx_ready = 1, rx_valid = 0, rx_ready, busy;
  flit_t tx_flit, rx_flit = '0;
  int checks = 0, failures = 0;
  flit_t got [$];
  localparam logic [7:0] PAT = 8'b1001_0110;

  str_tm #(.N(N), .D(4), .SIDE(SIDE_W), .POS(2)) dut (.*);
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

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) got.push_back(tx_flit);
  always @(negedge clk) tx_ready <= 1'($urandom_range(0, 3) != 0);

  task automatic pulse(input string what, input int r);
    @(negedge clk);
    cmd = '0;
    cmd.round = 8'(r);
    case (what)
      "send": cmd.send = 1;
      "end":  cmd.round_end = 1;
      "load": cmd.sr_load = 1;
      "fi":   cmd.fi_go = 1;
      default: ;
    endcase
    @(negedge clk);
    cmd.send = 0; cmd.round_end = 0; cmd.sr_load = 0; cmd.fi_go = 0;
  endtask

  task automatic rx_pkt(input bit corrupt);
    header_t h;
    h = '0; h.kind = PK_TEST; h.dst_x = 0; h.dst_y = 2;
    for (int f = 0; f < 9; f++) begin
      @(negedge clk);
      rx_valid = 1;
      rx_flit = (f == 0) ? '{ftype: FT_HEAD, payload: PAY_W'(h)}
              : '{ftype: (f == 8) ? FT_TAIL : FT_BODY, payload: {32{PAT[f-1]}}};
      if (corrupt && f == 2) rx_flit.payload[FAULT_BIT] = 1'b0;
    end
    @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin
    header_t h;
    logic [SRW-1:0] word;
    fi_slot_t s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // round 0: WN test packet to the north TM of column 2
    pulse("send", 0);
    repeat (30) @(posedge clk);
    check(got.size() == 9, $sformatf("9 flits sent, got %0d", got.size()));
    h = header_t'(got[0].payload);
    check(got[0].ftype == FT_HEAD && h.kind == PK_TEST && h.dst_x == 2 && h.dst_y == N + 1 && h.src_x == 0 && h.src_y == 2,
          "round 0 head");
    for (int f = 1; f < 9 && f < got.size(); f++)
      check(got[f].payload == {32{PAT[f-1]}} && got[f].ftype == ((f == 8) ? FT_TAIL : FT_BODY), "pattern flit");
    pulse("end", 0);
    // round 5 (NW): a correct packet arrives
    pulse("send", 5);
    rx_pkt(0);
    pulse("end", 5);
    // round 7 (SW): a corrupted packet arrives
    pulse("send", 7);
    rx_pkt(1);
    pulse("end", 7);
    // round 13 (NW of diagonal 1): nothing arrives
    pulse("send", 13);
    repeat (20) @(posedge clk);
    pulse("end", 13);
    // shift the results out
    pulse("load", 0);
    word = '0;
    for (int b = 0; b < int'(SRW); b++) begin
      cmd.sr_shift = 1; sr_in = 0;
      word = {word[SRW-2:0], sr_out};
      @(negedge clk);
    end
    cmd.sr_shift = 0;
    check(word == SRW'(1 << 5), $sformatf("result word %h", word));
    // shift in an FI slot and send the FI packet
    s.valid = 1; s.x = 3; s.y = 2; s.cfg = 25'h1F0_FFF7;
    word = SRW'(s);
    for (int b = 0; b < int'(SRW); b++) begin
      cmd.sr_shift = 1; sr_in = word[SRW-1-b];
      @(negedge clk);
    end
    cmd.sr_shift = 0; sr_in = 0;
    got.delete();
    pulse("fi", 0);
    repeat (10) @(posedge clk);
    h = header_t'(got[0].payload);
    check(got.size() == 2 && h.kind == PK_FI && h.dst_x == 3 && h.dst_y == 2 &&
          got[1].ftype == FT_TAIL && got[1].payload == 32'h1F0_FFF7, "FI packet");
    got.delete();
    pulse("fi", 0);
    repeat (10) @(posedge clk);
    check(got.size() == 0, "FI slot cleared after use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
