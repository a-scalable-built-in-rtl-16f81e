// str_pkt_sender: packet sender of a test module.
//
// On `start` it hands flits 0 .. len-1 (built by the packet generator from
// `idx`; `len` comes from the generator and must stay stable while busy) to the attached router's input port
// over a valid/ready link, one per cycle while the router accepts. `busy` is
// high from the cycle after `start` until the last flit is accepted; `done`
// pulses with that last transfer. A `start` while busy is ignored.
module str_pkt_sender
  import str_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] len,
  output logic [7:0] idx,
  input  flit_t      flit_in,
  output logic       out_valid,
  output flit_t      out_flit,
  input  logic       out_ready,
  output logic       busy,
  output logic       done
);
  assign out_valid = busy;
  assign out_flit  = flit_in;
  assign done      = busy && out_ready && (idx == len - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        idx  <= '0;
      end
    end else if (out_ready) begin
      if (done) busy <= 1'b0;
      else      idx  <= idx + 8'd1;
    end
  end
endmodule
