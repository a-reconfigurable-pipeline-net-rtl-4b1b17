// hop_pkg: types, constants and shared arithmetic of the pipeline net that
// integrates the isomorphic Hopfield model dv/dt = L(v) * (T v + I).
//
// Numbers are signed two's-complement fixed point, FIX_W bits with FIX_FRAC
// fractional bits (Q15.16 by default). Products are truncated toward minus
// infinity (arithmetic shift) and every result saturates to the word range.
// The word format is this design's choice; the source architecture gives none.
//
// The package also holds the two tables that make the net "reconfigurable":
//  * proc_weight(): the coefficients each processor P0..P3 applies in each
//    wavefront phase (Milne Runge-Kutta start-up, eq. 9/10, then the
//    Ghoshal predictor and three correctors, eq. 8);
//  * route_src(): the source (A..L) every one of the 30 routing-network
//    outputs selects in each phase, i.e. the contents of the 30 four-bit
//    control latches.
package hop_pkg;

  localparam int FIX_W    = 32;
  localparam int FIX_FRAC = 16;
  localparam int FIX_W2   = 2*FIX_W;
  typedef logic signed [FIX_W-1:0] fix_t;
  localparam fix_t FIX_ONE = fix_t'(1) <<< FIX_FRAC;
  localparam fix_t FIX_MAX = {1'b0, {(FIX_W-1){1'b1}}};
  localparam fix_t FIX_MIN = {1'b1, {(FIX_W-1){1'b0}}};

  localparam int NUM_PROC = 4;    // P0 .. P3
  localparam int NUM_SLOT = 6;    // inputs per processor (Fig. 2: 1..6, 7..12, ...)
  localparam int NUM_SRC  = 12;   // routing inputs A..L
  localparam int NUM_DST  = 30;   // routing outputs 1..30
  localparam int SA_ROWS  = 6;    // shifter array rows
  localparam int BLK_EXTRA = 4;   // block period is n + 4 cycles

  // Routing sources, numbered as the leaves of the Fig. 3 tree: code 0 and
  // codes 13..15 are "no connection" and deliver zero.
  typedef enum logic [3:0] {
    SRC_NC = 4'd0,
    SRC_A  = 4'd1,  // P0 Fout
    SRC_B  = 4'd2,  // P1 Fout
    SRC_C  = 4'd3,  // P1 vout
    SRC_D  = 4'd4,  // P2 Fout
    SRC_E  = 4'd5,  // P3 Fout
    SRC_F  = 4'd6,  // P3 vout
    SRC_G  = 4'd7,  // SA row 1
    SRC_H  = 4'd8,  // SA row 2
    SRC_I  = 4'd9,  // SA row 3
    SRC_J  = 4'd10, // SA row 4
    SRC_K  = 4'd11, // SA row 5
    SRC_L  = 4'd12  // SA row 6
  } src_t;

  // Wavefront phases (Fig. 1).
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0, // no computation: processors keep and re-stream their results
    PH_CW0   = 3'd1, // CW0: F0 = F(v0) on P3
    PH_EULER = 3'd2, // CW1: v_{k,0} = v0 + k h F0 on P(k-1)
    PH_MRKP  = 3'd3, // CW2..CW4: five-point order improvement, eq. (9)
    PH_MRKP5 = 3'd4, // CW5: v_{5,3} on P0, eq. (10)
    PH_TRANS = 3'd5, // CW6: first GPCM wavefront, fed from the start-up values
    PH_GPCM  = 3'd6  // CW7 onwards: predictor-corrector, eq. (8)
  } phase_t;

  // Host configuration writes, broadcast to every processor.
  typedef enum logic [1:0] {
    CFG_T      = 2'd0,  // T[row][col]
    CFG_I      = 2'd1,  // I[row]
    CFG_LAMBDA = 2'd2   // lambda[row]
  } cfg_kind_t;

  typedef struct packed {
    logic      we;
    cfg_kind_t kind;
    logic [15:0] row;
    logic [15:0] col;
    fix_t      data;
  } cfg_wr_t;

  function automatic fix_t fix_sat(input logic signed [FIX_W2-1:0] x);
    if (x > FIX_W2'(FIX_MAX)) return FIX_MAX;
    if (x < FIX_W2'(FIX_MIN)) return FIX_MIN;
    return fix_t'(x);
  endfunction

  function automatic fix_t fix_add(input fix_t a, input fix_t b);
    logic signed [FIX_W2-1:0] s;
    s = FIX_W2'(a) + FIX_W2'(b);
    return fix_sat(s);
  endfunction

  function automatic fix_t fix_mul(input fix_t a, input fix_t b);
    logic signed [FIX_W2-1:0] p;
    p = FIX_W2'(a) * FIX_W2'(b);
    return fix_sat(p >>> FIX_FRAC);
  endfunction

  // num/den as a fixed-point constant, truncated toward zero.
  function automatic fix_t fix_ratio(input int num, input int den);
    logic signed [63:0] q;
    q = (64'(num) <<< FIX_FRAC) / 64'(den);
    return q[FIX_W-1:0];
  endfunction

  function automatic phase_t phase_of(input int unsigned cw);
    if (cw == 0) return PH_CW0;
    if (cw == 1) return PH_EULER;
    if (cw <= 4) return PH_MRKP;
    if (cw == 5) return PH_MRKP5;
    if (cw == 6) return PH_TRANS;
    return PH_GPCM;
  endfunction

  // Does processor `row` compute in phase `ph`? The "-" entries of Fig. 1 are
  // processors that only keep their previous results.
  function automatic logic proc_active(input int row, input phase_t ph);
    case (ph)
      PH_CW0:   return row == 3;
      PH_MRKP5: return row == 0;
      PH_IDLE:  return 1'b0;
      default:  return 1'b1;
    endcase
  endfunction

  // Coefficient of input slot `slot` (1..5) for processor `row` in phase `ph`.
  // The processor forms v = in[0] + h * sum_{s=1..5} w[s] * in[s].
  // Slot use in start-up phases: 0 = v0, 1 = F0, 2..5 = F_{1,r} .. F_{4,r}.
  // Slot use in GPCM phases:     0 = v_{k-1}^[3], 1 = F_{k+2}^[0] (P3: F_{k-3}^[3]),
  //                              2 = F_{k+1}^[1], 3 = F_k^[2], 4 = F_{k-1}^[3],
  //                              5 = F_{k-2}^[3].
  function automatic fix_t proc_weight(input int row, input phase_t ph, input int slot);
    int num [6];
    int den;
    num = '{default: 0};
    den = 1;
    case (ph)
      PH_EULER: num[1] = row + 1;                             // v_{k,0} = v0 + k h F0
      PH_MRKP: begin
        case (row)
          0: begin num = '{0, 251, 646, -264, 106, -19}; den = 720; end
          1: begin num = '{0,  29, 124,   24,   4,  -1}; den = 90;  end
          2: begin num = '{0,  27, 102,   72,  42,  -3}; den = 80;  end // 3/80 * (9,34,24,14,-1)
          default: begin num = '{0, 14, 64, 24, 64, 14}; den = 45; end // 2/45 * (7,32,12,32,7)
        endcase
      end
      PH_MRKP5: begin num = '{0, 95, -50, 600, -350, 425}; den = 144; end // 5/144 * (19,-10,120,-70,85)
      PH_TRANS, PH_GPCM: begin
        case (row)
          0: begin num = '{0, 8, -4, 8, 0, 0};  den = 3;  end
          1: begin num = '{0, 3, 9, 9, 3, 0};   den = 8;  end
          2: begin num = '{0, 0, 1, 4, 1, 0};   den = 3;  end
          default: begin num = '{0, 1, 0, 9, 19, -5}; den = 24; end
        endcase
      end
      default: ;                                             // CW0 / idle: v = in[0]
    endcase
    return fix_ratio(num[slot], den);
  endfunction

  // Routing output q-1 (q = 1..30) -> source, per phase. Outputs 1..24 feed
  // the six input slots of P0..P3; outputs 25..30 feed shifter rows 1..6.
  // Row 1 keeps v0, row 2 keeps F0 and later F_{k-3}^[3], row 3 keeps
  // F_{1,3} and later F_{k-2}^[3].
  function automatic src_t route_src_raw(input phase_t ph, input int dst);
    int p, s;
    p = dst / NUM_SLOT;
    s = dst % NUM_SLOT;
    if (dst >= NUM_PROC*NUM_SLOT) begin
      case (ph)
        PH_CW0:   return (dst == 24) ? SRC_G : SRC_NC;
        PH_EULER: return (dst == 24) ? SRC_G : (dst == 25) ? SRC_E : SRC_NC;
        PH_MRKP, PH_MRKP5:
          return (dst == 24) ? SRC_G : (dst == 25) ? SRC_H : (dst == 26) ? SRC_A : SRC_NC;
        PH_TRANS: return (dst == 25) ? SRC_I : (dst == 26) ? SRC_B : SRC_NC;
        PH_GPCM:  return (dst == 25) ? SRC_I : (dst == 26) ? SRC_E : SRC_NC;
        default:  return SRC_NC;
      endcase
    end
    case (ph)
      PH_CW0:   return SRC_NC;          // P3 takes v0 on its own input
      PH_EULER: return (s == 0) ? SRC_G : (s == 1) ? SRC_E : SRC_NC;
      PH_MRKP, PH_MRKP5: begin
        case (s)
          0: return SRC_G;
          1: return SRC_H;
          2: return SRC_A;
          3: return SRC_B;
          4: return SRC_D;
          default: return SRC_E;
        endcase
      end
      PH_TRANS, PH_GPCM: begin
        case (s)
          0: return (ph == PH_TRANS) ? SRC_C : SRC_F;
          1: return (p == 3) ? SRC_H : SRC_A;
          2: return (ph == PH_TRANS) ? SRC_E : SRC_B;
          3: return SRC_D;
          4: return (ph == PH_TRANS) ? SRC_B : SRC_E;
          default: return SRC_I;
        endcase
      end
      default: return SRC_NC;
    endcase
  endfunction

  function automatic src_t route_src(input phase_t ph, input int dst);
    int p, s;
    p = dst / NUM_SLOT;
    s = dst % NUM_SLOT;
    // a derivative slot whose coefficient is zero is left unconnected
    if (dst < NUM_PROC*NUM_SLOT && s != 0 && ph != PH_MRKP5 && proc_weight(p, ph, s) == '0)
      return SRC_NC;
    return route_src_raw(ph, dst);
  endfunction

  // Shifter rows that shift in phase `ph` (the others keep their contents).
  function automatic logic [SA_ROWS-1:0] sa_shift_mask(input phase_t ph);
    case (ph)
      PH_CW0:            return 6'b000001;
      PH_EULER:          return 6'b000011;
      PH_MRKP, PH_MRKP5: return 6'b000111;
      PH_TRANS, PH_GPCM: return 6'b000110;
      default:           return 6'b000000;
    endcase
  endfunction

endpackage
