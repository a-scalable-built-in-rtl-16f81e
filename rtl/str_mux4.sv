// str_mux4: 4-to-1 output MUX of one router output port (crossbar slice).
//
// Selects one of the four input FIFO fronts with the one-hot grant of the
// port's arbiter. The fault-emulation inputs force payload bit FAULT_BIT of
// one input leg (`leg_sa0`) or of the output (`out_sa0`) to zero; they are
// test hooks of this implementation, tied to zero in a real chip.
module str_mux4
  import str_pkg::*;
#(
  parameter int unsigned W = FLIT_W
) (
  input  logic [W-1:0] in [4],
  input  logic [3:0]   sel,
  output logic [W-1:0] out,
  input  logic [3:0]   leg_sa0,
  input  logic         out_sa0
);
  always_comb begin
    logic [W-1:0] leg;
    out = '0;
    for (int k = 0; k < 4; k++) begin
      leg = in[k];
      if (leg_sa0[k]) leg[FAULT_BIT] = 1'b0;
      if (sel[k]) out = out | leg;
    end
    if (out_sa0) out[FAULT_BIT] = 1'b0;
  end
endmodule
