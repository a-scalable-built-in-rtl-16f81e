// str_sr: shift register (SR) of a test module, one segment of the ring that
// links all TMs to the controller.
//
// A multiplexer in front of the register (the "SR ctrl" input of the TM)
// selects between loading the TM's own test results in parallel (`load`) and
// shifting one bit in from the previous TM or the controller (`shift`,
// `sin` enters at bit 0, bit W-1 leaves on `sout`). The same shifting
// carries fault-isolation information from the controller to the TMs.
module str_sr #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_data,
  input  logic         shift,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= load_data;
    else if (shift) q <= {q[W-2:0], sin};
  end
  assign sout = q[W-1];
endmodule
