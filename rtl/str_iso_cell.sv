// str_iso_cell: request-in isolation (RII) or request-out isolation (ROI) cell.
//
// As drawn in the document: a request passes through an AND gate whose other
// input is a one-bit mask register. The register comes out of reset enabled
// (all datapaths usable during the test) and is overwritten by a
// fault-isolation packet (`cfg_we`, `cfg_en`) after diagnosis. An RII masks
// the request of one input FIFO towards one output arbiter; an ROI masks the
// request-out of an output port.
module str_iso_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_we,
  input  logic cfg_en,
  input  logic req_in,
  output logic req_out,
  output logic en
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      en <= 1'b1;
    else if (cfg_we) en <= cfg_en;
  end
  assign req_out = req_in & en;
endmodule
