// tb_str_redirector: a Source/Sink test packet leaving the router's local
// port must come straight back with destination <- auxiliary address and
// source <- this router; data packets must go to the IP; IP packets must
// enter the router and never interleave with a looped packet.
module tb_str_redirector;
  import str_pkg::*;
  logic clk = 0, rst_n = 0;
  logic r_out_valid = 0, r_out_ready, r_in_valid, r_in_ready = 1;
  logic ip_in_valid = 0, ip_in_ready, ip_out_valid, ip_out_ready = 1, looped;
  flit_t r_out_flit = '0, r_in_flit, ip_in_flit = '0, ip_out_flit;
  int checks = 0, failures = 0;
  flit_t got_r [$];
  flit_t got_ip [$];
  int n_looped = 0;

  str_redirector #(.X(3), .Y(2)) dut (.*);
  always #5 clk = ~clk;

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

  always @(posedge clk) if (rst_n) begin
    if (r_in_valid && r_in_ready) got_r.push_back(r_in_flit);
    if (ip_out_valid && ip_out_ready) got_ip.push_back(ip_out_flit);
    if (looped) n_looped++;
  end
  always @(negedge clk) r_in_ready <= 1'($urandom_range(0, 2) != 0);

  task automatic send_r(input pkt_kind_e k, input logic [7:0] tag);
    header_t h;
    h = '0; h.kind = k; h.dst_x = 3; h.dst_y = 2; h.src_x = 0; h.src_y = 2; h.aux_x = 5; h.aux_y = 2;
    for (int f = 0; f < 4; f++) begin
      r_out_valid <= 1;
      r_out_flit <= (f == 0) ? '{ftype: FT_HEAD, payload: PAY_W'(h)}
                             : '{ftype: (f == 3) ? FT_TAIL : FT_BODY, payload: {tag, 24'(f)}};
      @(posedge clk);
      while (!r_out_ready) @(posedge clk);
    end
    r_out_valid <= 0;
  endtask

  task automatic send_ip(input logic [7:0] tag);
    for (int f = 0; f < 4; f++) begin
      ip_in_valid <= 1;
      ip_in_flit <= '{ftype: (f == 0) ? FT_HEAD : (f == 3) ? FT_TAIL : FT_BODY, payload: {tag, 24'(f)}};
      @(posedge clk);
      while (!ip_in_ready) @(posedge clk);
    end
    ip_in_valid <= 0;
  endtask

  initial begin
    header_t h;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_r(PK_SS, 8'hA1);
    repeat (5) @(posedge clk);
    check(got_r.size() == 4 && got_ip.size() == 0, "looped packet went back to the router");
    h = header_t'(got_r[0].payload);
    check(h.dst_x == 5 && h.dst_y == 2 && h.src_x == 3 && h.src_y == 2 && h.aux_x == 0 && h.aux_y == 2
          && h.kind == PK_SS, "header rewritten");
    check(got_r[1].payload == {8'hA1, 24'd1} && got_r[3].ftype == FT_TAIL, "body unchanged");
    check(n_looped == 1, "one loop-back reported");
    got_r.delete();
    send_r(PK_DATA, 8'hB2);
    repeat (3) @(posedge clk);
    check(got_ip.size() == 4 && got_r.size() == 0 && got_ip[0].payload[26:25] == PK_DATA, "data packet to the IP");
    got_ip.delete();
    // concurrent loop-back and IP ingress: two whole packets, not interleaved
    fork
      send_r(PK_SS, 8'hC3);
      send_ip(8'hD4);
    join
    repeat (5) @(posedge clk);
    check(got_r.size() == 8, "both packets entered the router");
    if (got_r.size() == 8) begin
      check(got_r[0].ftype == FT_HEAD && got_r[3].ftype == FT_TAIL &&
            got_r[4].ftype == FT_HEAD && got_r[7].ftype == FT_TAIL, "packets not interleaved");
      check(got_r[1].payload[31:24] == got_r[2].payload[31:24] &&
            got_r[5].payload[31:24] == got_r[6].payload[31:24] &&
            got_r[1].payload[31:24] != got_r[5].payload[31:24], "each packet's flits together");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
