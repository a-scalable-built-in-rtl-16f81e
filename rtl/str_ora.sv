// str_ora: output response analyzer (ORA) of a test module.
//
// Receives the flits the attached router sends to this TM (it is always
// ready) and checks one test packet per round: a head flit of kind PK_TEST or
// PK_SS addressed to this TM, then exactly 2D pattern flits equal to X then
// X' (compared with the TPROM, every payload bit), the last one a tail.
// `clear` starts a new round. `pass` is high once a complete correct packet
// has arrived and nothing wrong has been seen since `clear`; a corrupted
// pattern, a wrong header or a surplus flit keeps it low. The document gives
// the ORA's function; the checks are this implementation's.
module str_ora
  import str_pkg::*;
#(
  parameter int unsigned D    = 4,
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  flit_t      in_flit,
  output logic       in_ready,
  output logic [7:0] pat_idx,   // to the TPROM
  input  logic       pat_bit,
  output logic       pass
);
  logic [7:0] cnt_q;     // flits received in this round
  logic       err_q, done_q;
  logic       ok;
  header_t    h;

  assign in_ready = 1'b1;
  assign h        = header_t'(in_flit.payload);
  assign pat_idx  = cnt_q - 8'd1;

  always_comb begin
    if (done_q) ok = 1'b0;
    else if (cnt_q == 8'd0)
      ok = in_flit.ftype == FT_HEAD && (h.kind == PK_TEST || h.kind == PK_SS)
        && h.dst_x == CW'(MY_X) && h.dst_y == CW'(MY_Y);
    else
      ok = in_flit.payload == {PAY_W{pat_bit}}
        && in_flit.ftype == ((cnt_q == 8'(2 * D)) ? FT_TAIL : FT_BODY);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      err_q  <= 1'b0;
      done_q <= 1'b0;
    end else if (clear) begin
      cnt_q  <= '0;
      err_q  <= 1'b0;
      done_q <= 1'b0;
    end else if (in_valid) begin
      if (!ok) err_q <= 1'b1;
      if (!done_q) begin
        cnt_q <= cnt_q + 8'd1;
        if (cnt_q == 8'(2 * D)) done_q <= 1'b1;
      end
    end
  end

  assign pass = done_q && !err_q;
endmodule
