// str_fifo: input buffer of one router port.
//
// A D-entry first-in first-out buffer (the document's router uses 4-flit
// buffers of 34-bit flits). Storage is a register array written at the
// write pointer and read through a D-to-1 multiplexer at the read pointer,
// which is the structure the X / X' test patterns are designed for.
// Interface: push when `wr_en` (ignored when full), pop when `rd_en`
// (ignored when empty); `rd_data` shows the front entry combinationally, so a
// flit written in one cycle can leave in the next. `full` / `empty` are
// decoded from a registered count. `sa0` emulates a stuck-at-0 fault on bit
// FAULT_BIT of the read data; it is a test hook of this implementation and is
// tied to zero in a real chip.
module str_fifo
  import str_pkg::*;
#(
  parameter int unsigned D = 4,
  parameter int unsigned W = FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty,
  input  logic         sa0
);
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;

  logic [W-1:0]  mem [D];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          do_wr, do_rd;

  assign full  = (cnt == (AW+1)'(D));
  assign empty = (cnt == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_comb begin
    rd_data = mem[rp];
    if (sa0) rd_data[FAULT_BIT] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(D - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(D - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
