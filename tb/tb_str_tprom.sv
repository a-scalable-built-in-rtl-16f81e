// tb_str_tprom: checks the X / X' pattern contents against Table 1 of the
// method (written out here for depth 4) and the packet order of a west-side
// and a north-side TM of a 4x4 mesh against hand-worked rounds.
module tb_str_tprom;
  import str_pkg::*;
  logic [7:0] pg_idx, ora_idx, round;
  logic pg_bit, ora_bit, send, expect_rx;
  pkt_desc_t desc;
  logic [7:0] n_round;
  logic n_send, n_expect, n_pg, n_ora;
  pkt_desc_t n_desc;
  int checks = 0, failures = 0;

  // west TM at row 2 and north TM at column 3 of a 4x4 mesh
  str_tprom #(.N(4), .D(4), .SIDE(SIDE_W), .POS(2)) dut_w (
    .pg_idx, .pg_bit, .ora_idx, .ora_bit, .round, .send, .desc, .expect_rx);
  str_tprom #(.N(4), .D(4), .SIDE(SIDE_N), .POS(3)) dut_n (
    .pg_idx(pg_idx), .pg_bit(n_pg), .ora_idx(ora_idx), .ora_bit(n_ora), .round(n_round),
    .send(n_send), .desc(n_desc), .expect_rx(n_expect));

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
    // Table 1, depth 4: X = 0,1,1,0  X' = 1,0,0,1
    logic [7:0] tbl;
    tbl = 8'b1001_0110;   // bit i = pattern flit i
    for (int i = 0; i < 8; i++) begin
      pg_idx = 8'(i); ora_idx = 8'(7 - i); round = 0; n_round = 0;
      #1 check(pg_bit == tbl[i] && ora_bit == tbl[7 - i] && n_pg == tbl[i], $sformatf("pattern %0d", i));
    end
    // round 0 (diagonal 0, turn WN): west TM row 2 sends to north TM column 2 via (2,2)
    round = 0;
    #1 check(send && !expect_rx && desc.kind == PK_TEST && !desc.yx && desc.dst_x == 2 && desc.dst_y == 5,
             "round 0: WN packet to (2,5)");
    // round 9 (diagonal 1, turn WS): turn at (3,2), to south TM (3,0)
    round = 9;
    #1 check(send && desc.dst_x == 3 && desc.dst_y == 0 && desc.aux_x == 3 && desc.aux_y == 2,
             "round 9: WS packet turning at (3,2)");
    // round 4 (turn NE): the west TM only listens? no: NE ends on the east side
    round = 4;
    #1 check(!send && !expect_rx, "round 4: west TM idle");
    round = 5;  // NW: west TMs receive
    #1 check(!send && expect_rx, "round 5: west TM receives");
    // north TM column 3, round 4+8*1 (diagonal 1, NE): turn at (3, ((3-1+4-1)%4)+1 = 2) -> east TM (5,2)
    n_round = 12;
    #1 check(n_send && n_desc.yx && n_desc.dst_x == 5 && n_desc.dst_y == 2, "round 12: north TM NE packet");
    // Source/Sink: round 32 = W->E at column 1: west TM row 2 -> router (1,2), then (5,2)
    round = 32;
    #1 check(send && desc.kind == PK_SS && desc.dst_x == 1 && desc.dst_y == 2 && desc.aux_x == 5 && desc.aux_y == 2,
             "round 32: Source/Sink packet via (1,2)");
    // round 42 = N->S at row 3: north TM column 3 -> router (3,3), then (3,0)
    n_round = 42;
    #1 check(n_send && n_desc.kind == PK_SS && n_desc.dst_x == 3 && n_desc.dst_y == 3 && n_desc.aux_y == 0,
             "round 42: Source/Sink packet via (3,3)");
    round = 48;
    #1 check(!send && !expect_rx, "no round 48");
    // every test round has exactly one sending and one receiving side
    for (int r = 0; r < 48; r++) begin
      round = 8'(r); n_round = 8'(r);
      #1 check(!(send && expect_rx) && !(n_send && n_expect), "never send and receive in one round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
