// str_tm: test module (TM) of the surrounding test ring.
//
// One TM faces each boundary router port (4N in all). It contains the five
// parts the document lists: a test pattern ROM (str_tprom), a packet
// generator (str_pkt_gen), a packet sender (str_pkt_sender), an output
// response analyzer (str_ora) and a shift register (str_sr) that is one
// segment of the ring back to the controller. Operation, driven by the
// controller's broadcast command `cmd`:
//   send      - if the TPROM schedules this TM as a sender in `round`, send
//               that round's test packet; in any case restart the ORA.
//   round_end - store the ORA verdict as result bit `round` (1 = the expected
//               packet arrived intact; 0 when no packet was expected).
//   sr_load   - copy the 12N result bits into the shift register.
//   sr_shift  - shift the ring by one bit (`sr_in` -> `sr_out`).
//   fi_go     - if the shift register holds a valid FI slot (str_pkg::fi_slot_t
//               in its low bits), send that fault-isolation packet and clear
//               the slot.
// The link to the router is valid/ready in both directions.
module str_tm
  import str_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned D    = 4,
  parameter side_e       SIDE = SIDE_W,
  parameter int unsigned POS  = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  tm_cmd_t cmd,
  input  logic    sr_in,
  output logic    sr_out,
  // to the router
  output logic    tx_valid,
  output flit_t   tx_flit,
  input  logic    tx_ready,
  // from the router
  input  logic    rx_valid,
  input  flit_t   rx_flit,
  output logic    rx_ready,
  output logic    busy
);
  localparam int unsigned NR  = 12 * N;
  localparam int unsigned SRW = sr_width(N);
  localparam logic [2*CW-1:0] ME = tm_coord(SIDE, POS, N);
  localparam int unsigned MY_X = int'(ME[2*CW-1:CW]);
  localparam int unsigned MY_Y = int'(ME[CW-1:0]);

  logic [7:0]     pg_idx, ora_idx, snd_idx, len;
  logic           pg_bit, ora_bit, sched_send, expect_rx, pass;
  pkt_desc_t      sched_desc, desc_q;
  flit_t          gen_flit;
  logic [NR-1:0]  res_q;
  logic [SRW-1:0] sr_q;
  fi_slot_t       slot;
  logic           start, fi_start, test_start;

  str_tprom #(.N(N), .D(D), .SIDE(SIDE), .POS(POS)) u_tprom (
    .pg_idx(pg_idx), .pg_bit(pg_bit), .ora_idx(ora_idx), .ora_bit(ora_bit),
    .round(cmd.round), .send(sched_send), .desc(sched_desc), .expect_rx(expect_rx)
  );

  assign slot       = fi_slot_t'(sr_q[FI_SLOT_W-1:0]);
  assign test_start = cmd.send && sched_send;
  assign fi_start   = cmd.fi_go && slot.valid;
  assign start      = (test_start || fi_start) && !busy;

  // descriptor of the packet being sent
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) desc_q <= '0;
    else if (start) begin
      if (fi_start) begin
        desc_q       <= '0;
        desc_q.kind  <= PK_FI;
        desc_q.yx    <= (SIDE == SIDE_N || SIDE == SIDE_S);
        desc_q.dst_x <= slot.x;
        desc_q.dst_y <= slot.y;
        desc_q.cfg   <= slot.cfg;
      end else begin
        desc_q <= sched_desc;
      end
    end
  end

  str_pkt_gen #(.D(D), .SRC_X(MY_X), .SRC_Y(MY_Y)) u_pg (
    .desc(desc_q), .idx(snd_idx), .pat_idx(pg_idx), .pat_bit(pg_bit),
    .flit(gen_flit), .len(len)
  );

  str_pkt_sender u_snd (
    .clk, .rst_n, .start(start), .len(len), .idx(snd_idx), .flit_in(gen_flit),
    .out_valid(tx_valid), .out_flit(tx_flit), .out_ready(tx_ready),
    .busy(busy), .done()
  );

  str_ora #(.D(D), .MY_X(MY_X), .MY_Y(MY_Y)) u_ora (
    .clk, .rst_n, .clear(cmd.send), .in_valid(rx_valid), .in_flit(rx_flit),
    .in_ready(rx_ready), .pat_idx(ora_idx), .pat_bit(ora_bit), .pass(pass)
  );

  // test results, one bit per round
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else if (cmd.round_end && int'(cmd.round) < int'(NR))
      res_q[cmd.round[$clog2(NR)-1:0]] <= expect_rx && pass;
  end

  // shift register; an FI slot is cleared when its packet starts
  logic [SRW-1:0] sr_load_data;
  always_comb begin
    sr_load_data = SRW'(res_q);
    if (!cmd.sr_load) begin
      sr_load_data = sr_q;
      sr_load_data[FI_SLOT_W-1] = 1'b0;
    end
  end

  str_sr #(.W(SRW)) u_sr (
    .clk, .rst_n, .load(cmd.sr_load || (fi_start && start)), .load_data(sr_load_data),
    .shift(cmd.sr_shift), .sin(sr_in), .sout(sr_out), .q(sr_q)
  );
endmodule
