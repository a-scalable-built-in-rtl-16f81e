// str_pkg: types, constants and schedule functions shared by the Surrounding
// Test Ring (STR) built-in self-recovery design.
//
// Flits are 34 bits wide (2-bit flit type + 32-bit payload), as in the
// evaluated router. Coordinates: the routers sit at x,y = 1..N; the test
// modules (TMs) sit on the ring around them at x = 0 (west), x = N+1 (east),
// y = 0 (south) and y = N+1 (north); y grows to the north. The header field
// layout, the coordinate system and the test-round order below are choices of
// this implementation; the document fixes only the flit width, the 20
// datapaths of Table 2 and the X / X' pattern sets of Table 1.
package str_pkg;

  localparam int unsigned FLIT_W = 34;
  localparam int unsigned PAY_W  = 32;
  localparam int unsigned CW     = 4;   // coordinate field width (meshes up to 14x14)
  localparam int unsigned NPORT  = 5;
  localparam int unsigned NDP    = 20;  // datapaths of the 20-path router model
  localparam int unsigned CFG_W  = 25;  // 20 RII enables + 5 ROI enables
  localparam int unsigned FI_SLOT_W = 1 + 2 * CW + CFG_W; // FI info held in a TM shift register
  // payload bit disturbed by the fault-emulation inputs; never used by a header
  localparam int unsigned FAULT_BIT = PAY_W - 1;

  // router port numbering
  localparam int unsigned P_N = 0;
  localparam int unsigned P_E = 1;
  localparam int unsigned P_S = 2;
  localparam int unsigned P_W = 3;
  localparam int unsigned P_L = 4;

  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_TAIL   = 2'b01,
    FT_HEAD   = 2'b10,
    FT_SINGLE = 2'b11
  } flit_type_e;

  typedef enum logic [1:0] {
    PK_DATA = 2'd0,  // normal traffic
    PK_TEST = 2'd1,  // Thru / Turn test packet
    PK_SS   = 2'd2,  // Source/Sink test packet (turned around by the NI redirector)
    PK_FI   = 2'd3   // fault-isolation packet
  } pkt_kind_e;

  typedef enum logic [1:0] {
    SIDE_W = 2'd0,
    SIDE_N = 2'd1,
    SIDE_E = 2'd2,
    SIDE_S = 2'd3
  } side_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [PAY_W-1:0]  payload;
  } flit_t;

  typedef struct packed {
    logic [4:0]    rsvd;    // [31:27], zero
    pkt_kind_e     kind;    // [26:25]
    logic          yx;      // [24] 1: route Y first
    logic [CW-1:0] dst_x;   // [23:20]
    logic [CW-1:0] dst_y;   // [19:16]
    logic [CW-1:0] src_x;   // [15:12]
    logic [CW-1:0] src_y;   // [11:8]
    logic [CW-1:0] aux_x;   // [7:4]  final destination of a Source/Sink test packet
    logic [CW-1:0] aux_y;   // [3:0]
  } header_t;

  // Fault emulation of one router (stuck-at-0 on payload bit FAULT_BIT).
  // Tied to zero in silicon; used to exercise the self-recovery flow.
  typedef struct packed {
    logic [NPORT-1:0] fifo;  // input FIFO output
    logic [NPORT-1:0] mux;   // output MUX output
    logic [NDP-1:0]   leg;   // one MUX input leg (one datapath)
  } fault_inj_t;

  // Broadcast commands from the controller to all TMs
  typedef struct packed {
    logic       send;       // start sending the packet of round `round`
    logic       round_end;  // record the ORA result of round `round`
    logic [7:0] round;
    logic       sr_load;    // copy results into the shift register
    logic       sr_shift;   // shift the ring by one bit
    logic       fi_go;      // send the FI packet held in the shift register
  } tm_cmd_t;

  // what the packet generator needs to build one packet
  typedef struct packed {
    pkt_kind_e        kind;
    logic             yx;
    logic [CW-1:0]    dst_x;
    logic [CW-1:0]    dst_y;
    logic [CW-1:0]    aux_x;
    logic [CW-1:0]    aux_y;
    logic [CFG_W-1:0] cfg;   // FI packets only
  } pkt_desc_t;

  // fault-isolation information as it sits in the low bits of a TM's shift register
  typedef struct packed {
    logic             valid;
    logic [CW-1:0]    x;
    logic [CW-1:0]    y;
    logic [CFG_W-1:0] cfg;
  } fi_slot_t;

  // shift-register length of a TM: one result bit per test round, and room
  // for one FI slot
  function automatic int unsigned sr_width(input int unsigned n);
    return (12 * n > FI_SLOT_W) ? 12 * n : FI_SLOT_W;
  endfunction

  // datapath index of input port i to output port o, in Table 2 order
  function automatic int unsigned dp_idx(input int unsigned i, input int unsigned o);
    return i * 4 + ((o < i) ? o : o - 1);
  endfunction

  function automatic int unsigned opposite(input int unsigned p);
    case (p)
      P_N: return P_S;
      P_S: return P_N;
      P_E: return P_W;
      P_W: return P_E;
      default: return P_L;
    endcase
  endfunction

  // router port facing a ring side
  function automatic int unsigned side_port(input side_e s);
    case (s)
      SIDE_W: return P_W;
      SIDE_N: return P_N;
      SIDE_E: return P_E;
      default: return P_S;
    endcase
  endfunction

  function automatic side_e opposite_side(input side_e s);
    return side_e'(s + 2'd2);
  endfunction

  // Test pattern bit i of X (Table 1): X = 0,1,1,0,1,... (Thue-Morse order,
  // so every 2-to-1 MUX of the FIFO read tree sees complementary inputs).
  function automatic logic pat_x(input int unsigned i);
    return ^i[7:0];
  endfunction

  // ring index of a TM (controller at the south-west corner, ring running
  // north along the west side, east along the north side, south along the
  // east side and west along the south side)
  function automatic int unsigned tm_index(input side_e s, input int unsigned pos, input int unsigned n);
    case (s)
      SIDE_W: return pos - 1;
      SIDE_N: return n + pos - 1;
      SIDE_E: return 2 * n + (n - pos);
      default: return 3 * n + (n - pos);
    endcase
  endfunction

  function automatic side_e tm_side(input int unsigned t, input int unsigned n);
    return side_e'(t / n);
  endfunction

  function automatic int unsigned tm_pos(input int unsigned t, input int unsigned n);
    case (t / n)
      0: return t + 1;
      1: return t - n + 1;
      2: return 3 * n - t;
      default: return 4 * n - t;
    endcase
  endfunction

  function automatic logic [2*CW-1:0] tm_coord(input side_e s, input int unsigned pos, input int unsigned n);
    logic [CW-1:0] x, y;
    case (s)
      SIDE_W: begin x = '0;               y = CW'(pos);   end
      SIDE_N: begin x = CW'(pos);         y = CW'(n + 1); end
      SIDE_E: begin x = CW'(n + 1);       y = CW'(pos);   end
      default: begin x = CW'(pos);        y = '0;         end
    endcase
    return {x, y};
  endfunction

  // ---------------- test schedule ----------------
  // Rounds 0 .. 8N-1 test Thru and Turn datapaths: round r works on diagonal
  // k = r/8 (routers with (x - y) mod N = k) and turn t = r%8 (WN, WS, EN,
  // ES, NE, NW, SE, SW). Rounds 8N .. 12N-1 test Source/Sink datapaths:
  // direction r' = (r-8N)/N (W->E, E->W, N->S, S->N) at column / row
  // (r-8N)%N + 1. Every TM of the sending side sends one packet per round.
  function automatic int unsigned n_rounds(input int unsigned n);
    return 12 * n;
  endfunction

  function automatic logic is_ss_round(input int unsigned r, input int unsigned n);
    return r >= 8 * n;
  endfunction

  function automatic side_e round_src_side(input int unsigned r, input int unsigned n);
    if (r < 8 * n) begin
      case ((r % 8) / 2)
        0: return SIDE_W;
        1: return SIDE_E;
        2: return SIDE_N;
        default: return SIDE_S;
      endcase
    end
    case ((r - 8 * n) / n)
      0: return SIDE_W;
      1: return SIDE_E;
      2: return SIDE_N;
      default: return SIDE_S;
    endcase
  endfunction

  function automatic side_e round_dst_side(input int unsigned r, input int unsigned n);
    if (r < 8 * n) begin
      case (r % 8)
        0, 2: return SIDE_N;
        1, 3: return SIDE_S;
        4, 6: return SIDE_E;
        default: return SIDE_W;
      endcase
    end
    return opposite_side(round_src_side(r, n));
  endfunction

  // router (x,y) where the packet of the sender at (side, pos) turns, or is
  // turned around by the redirector
  function automatic logic [2*CW-1:0] round_turn(input int unsigned r, input int unsigned pos,
                                                   input int unsigned n);
    side_e s;
    int unsigned k, x, y;
    s = round_src_side(r, n);
    if (r < 8 * n) begin
      k = r / 8;
      if (s == SIDE_W || s == SIDE_E) begin
        y = pos;
        x = ((pos - 1 + k) % n) + 1;
      end else begin
        x = pos;
        y = ((pos - 1 + n - k) % n) + 1;
      end
    end else begin
      k = ((r - 8 * n) % n) + 1;
      if (s == SIDE_W || s == SIDE_E) begin
        y = pos;
        x = k;
      end else begin
        x = pos;
        y = k;
      end
    end
    return {CW'(x), CW'(y)};
  endfunction

  // position of the receiving TM of the sender at pos
  function automatic int unsigned round_dst_pos(input int unsigned r, input int unsigned pos,
                                                input int unsigned n);
    logic [2*CW-1:0] t;
    side_e d;
    t = round_turn(r, pos, n);
    d = round_dst_side(r, n);
    if (d == SIDE_N || d == SIDE_S) return int'(t[2*CW-1:CW]);
    return int'(t[CW-1:0]);
  endfunction

endpackage
