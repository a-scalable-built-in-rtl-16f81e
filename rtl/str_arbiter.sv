// str_arbiter: 4x1 round-robin arbiter (ARB) of one router output port.
//
// Four request inputs (the four input ports other than this output's own
// direction, after the request-in isolation cells). When no packet holds the
// output, the first requester after the last winner is granted (round-robin,
// as the document's router); the grant is then locked for the whole packet
// (wormhole switching) until `release_i` reports that the tail flit left.
// `grant` is one-hot and valid in the same cycle as the requests.
module str_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] req,
  input  logic       release_i,
  output logic [3:0] grant,
  output logic       grant_valid
);
  logic [3:0] lock_q;     // grant held for the packet in flight
  logic       locked_q;
  logic [1:0] last_q;     // last winner, for round-robin order
  logic [3:0] pick;
  logic [1:0] pick_idx;

  always_comb begin
    pick     = '0;
    pick_idx = last_q;
    for (int k = 1; k <= 4; k++) begin
      if (pick == '0 && req[(int'(last_q) + k) % 4]) begin
        pick[(int'(last_q) + k) % 4] = 1'b1;
        pick_idx = 2'((int'(last_q) + k) % 4);
      end
    end
  end

  assign grant       = locked_q ? lock_q : pick;
  assign grant_valid = |grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q   <= '0;
      locked_q <= 1'b0;
      last_q   <= 2'd3;
    end else if (locked_q) begin
      if (release_i) locked_q <= 1'b0;
    end else if (|pick) begin
      last_q <= pick_idx;
      if (!release_i) begin
        lock_q   <= pick;
        locked_q <= 1'b1;
      end
    end
  end
endmodule
