// str_redirector: address-changing circuit at the network-interface side of a
// router's local port.
//
// Source/Sink datapaths (NL ... LW) are tested by packets that enter a router,
// leave it through the local output port, and come back through the local
// input port towards a test module on the far side. This block sits between
// the router's local port and the IP's network interface. A packet leaving
// the router whose head is of kind PK_SS is looped back into the router's
// local input with its header rewritten: destination <- the auxiliary (final)
// address, source <- this router, auxiliary <- the old source. Every other
// packet goes to the IP egress port, and IP ingress packets go to the router.
// Packets are never interleaved on the router's local input: whichever of
// loop-back and ingress starts a packet owns the input until its tail
// (loop-back wins a tie). Flits pass combinationally (valid/ready), so the
// turn-around adds no cycle. The document names this function and its area
// only; the rewrite rule and the arbitration are this implementation's.
module str_redirector
  import str_pkg::*;
#(
  parameter int unsigned X = 1,
  parameter int unsigned Y = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // router local output
  input  logic  r_out_valid,
  input  flit_t r_out_flit,
  output logic  r_out_ready,
  // router local input
  output logic  r_in_valid,
  output flit_t r_in_flit,
  input  logic  r_in_ready,
  // IP / network interface side
  input  logic  ip_in_valid,
  input  flit_t ip_in_flit,
  output logic  ip_in_ready,
  output logic  ip_out_valid,
  output flit_t ip_out_flit,
  input  logic  ip_out_ready,
  output logic  looped       // a Source/Sink test packet head was turned around
);
  typedef enum logic [1:0] {OWN_NONE, OWN_LOOP, OWN_IP} own_e;

  header_t h_out, h_new;
  logic    out_head, out_last, in_last;
  logic    eg_loop_q, in_pkt_loop;
  logic    use_loop, use_ip;
  own_e    own_q;

  assign h_out    = header_t'(r_out_flit.payload);
  assign out_head = r_out_flit.ftype == FT_HEAD || r_out_flit.ftype == FT_SINGLE;
  assign out_last = r_out_flit.ftype == FT_TAIL || r_out_flit.ftype == FT_SINGLE;
  // does the flit at the router's local output belong to a loop-back packet?
  assign in_pkt_loop = out_head ? (h_out.kind == PK_SS) : eg_loop_q;

  always_comb begin
    h_new       = h_out;
    h_new.dst_x = h_out.aux_x;
    h_new.dst_y = h_out.aux_y;
    h_new.src_x = CW'(X);
    h_new.src_y = CW'(Y);
    h_new.aux_x = h_out.src_x;
    h_new.aux_y = h_out.src_y;
  end

  assign use_loop = (own_q == OWN_LOOP) || (own_q == OWN_NONE && r_out_valid && in_pkt_loop);
  assign use_ip   = !use_loop && ((own_q == OWN_IP) || (own_q == OWN_NONE && ip_in_valid));

  always_comb begin
    r_in_valid  = 1'b0;
    r_in_flit   = ip_in_flit;
    ip_in_ready = 1'b0;
    if (use_loop) begin
      r_in_valid = r_out_valid && in_pkt_loop;
      r_in_flit  = r_out_flit;
      if (out_head) r_in_flit.payload = PAY_W'(h_new);
    end else if (use_ip) begin
      r_in_valid  = ip_in_valid;
      ip_in_ready = r_in_ready;
    end
  end

  assign ip_out_valid = r_out_valid && !in_pkt_loop;
  assign ip_out_flit  = r_out_flit;
  assign r_out_ready  = in_pkt_loop ? (use_loop && r_in_ready) : ip_out_ready;
  assign in_last      = use_loop ? out_last
                                 : (ip_in_flit.ftype == FT_TAIL || ip_in_flit.ftype == FT_SINGLE);
  assign looped       = use_loop && r_out_valid && r_out_ready && out_head;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eg_loop_q <= 1'b0;
      own_q     <= OWN_NONE;
    end else begin
      if (r_out_valid && r_out_ready) eg_loop_q <= in_pkt_loop && !out_last;
      if (r_in_valid && r_in_ready) begin
        if (in_last)          own_q <= OWN_NONE;
        else if (use_loop)    own_q <= OWN_LOOP;
        else                  own_q <= OWN_IP;
      end
    end
  end
endmodule
