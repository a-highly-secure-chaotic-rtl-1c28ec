// Shared types, constants and dual-rail cell functions of the dual-hiding
// asynchronous-logic AES-128 accelerator.
//
// Every data bit of the asynchronous core travels on two rails {t, f}:
//   {0,0} = NULL (spacer), {1,0} = valid 1, {0,1} = valid 0, {1,1} never occurs.
// A dual-rail cell of a 2-input gate is built as a strongly indicating
// minterm (DIMS) cell: each of the four rail minterms a.x & b.y drives the
// true or the false output rail according to the gate's truth table, so the
// output stays NULL until both inputs are valid and returns to NULL as soon
// as either input does.  With four rail inputs and two rail outputs, one
// such cell fits a single dual-output 6-input LUT, which is the area-saving
// mapping this design relies on; the gate set (AND, OR, XOR, NAND, NOR, XNOR)
// is the one the accelerator uses.
//
// The S-box works in the composite field GF((2^4)^2): GF(2^4) uses x^4+x+1,
// the extension uses y^2+y+lambda with lambda = 0xC.  DELTA_COLS and
// DINV_COLS give, for each input bit j, the image of that bit under the
// isomorphism (AES field -> composite field) and its inverse.  They were
// derived for this design; with them the dummy S-box input p = 0x08 gives
// the GF(2^4) inverter output q = 0x1, the pair of values the zero-value
// compensation uses.
package aes_dr_pkg;

  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_NULL = '{t: 1'b0, f: 1'b0};

  typedef dr_t [3:0]   dr_nib_t;
  typedef dr_t [7:0]   dr_byte_t;
  typedef dr_t [31:0]  dr_word_t;
  typedef dr_t [127:0] dr_block_t;

  typedef enum logic [2:0] {
    G_AND  = 3'd0,
    G_OR   = 3'd1,
    G_XOR  = 3'd2,
    G_NAND = 3'd3,
    G_NOR  = 3'd4,
    G_XNOR = 3'd5
  } gate_e;

  // Composite-field constants.
  localparam logic [3:0] GF4_LAMBDA = 4'hC;
  localparam logic [7:0][7:0] DELTA_COLS = {8'he2, 8'h3c, 8'hda, 8'h34, 8'h4e, 8'h44, 8'h21, 8'h01};
  localparam logic [7:0][7:0] DINV_COLS  = {8'h3b, 8'he4, 8'h03, 8'hf3, 8'h50, 8'he0, 8'h5c, 8'h01};
  // Zero-value compensation: dummy input p and expected inverter output q.
  localparam logic [7:0] ZV_P = 8'h08;
  localparam logic [3:0] ZV_Q = 4'h1;
  localparam logic [7:0] AFFINE_C = 8'h63;

  // Rcon of the last (tenth) round, and the value the Rcon state machine
  // produces after it, which stops the rings.
  localparam logic [7:0] RCON_FIRST = 8'h01;
  localparam logic [7:0] RCON_LAST  = 8'h36;
  localparam logic [7:0] RCON_STOP  = 8'h6c;

  // Number of delay-randomizer groups (A, B, C, D).
  localparam int unsigned N_GROUPS = 4;

  // Latch bit i of a randomized latch is released by group grp_of(i).
  function automatic int unsigned grp_of(int unsigned i);
    return i % N_GROUPS;
  endfunction

  // ---------------------------------------------------------------- cells
  function automatic dr_t dr_enc(logic b);
    return '{t: b, f: ~b};
  endfunction

  function automatic logic dr_is_valid(dr_t a);
    return a.t | a.f;
  endfunction

  function automatic logic dr_is_null(dr_t a);
    return ~(a.t | a.f);
  endfunction

  function automatic dr_t dr_not(dr_t a);
    return '{t: a.f, f: a.t};
  endfunction

  // Truth table index is {a, b}: bit 0 = (0,0) ... bit 3 = (1,1).
  function automatic logic [3:0] gate_tt(gate_e g);
    case (g)
      G_AND:   return 4'b1000;
      G_OR:    return 4'b1110;
      G_XOR:   return 4'b0110;
      G_NAND:  return 4'b0111;
      G_NOR:   return 4'b0001;
      default: return 4'b1001;  // G_XNOR
    endcase
  endfunction

  function automatic dr_t dr_gate(gate_e g, dr_t a, dr_t b);
    logic [3:0] m;
    logic [3:0] tt;
    tt   = gate_tt(g);
    m[0] = a.f & b.f;
    m[1] = a.f & b.t;
    m[2] = a.t & b.f;
    m[3] = a.t & b.t;
    return '{t: |(m & tt), f: |(m & ~tt)};
  endfunction

  function automatic dr_t dr_xor(dr_t a, dr_t b);
    return dr_gate(G_XOR, a, b);
  endfunction

  function automatic dr_t dr_and(dr_t a, dr_t b);
    return dr_gate(G_AND, a, b);
  endfunction

  // Dual-rail 2:1 multiplexer: y = s ? a : b, NULL while s is NULL.
  function automatic dr_t dr_mux(dr_t s, dr_t a, dr_t b);
    return '{t: (s.t & a.t) | (s.f & b.t), f: (s.t & a.f) | (s.f & b.f)};
  endfunction

  // ------------------------------------------------------- vector helpers
  function automatic dr_byte_t dr_enc8(logic [7:0] v);
    dr_byte_t r;
    for (int i = 0; i < 8; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  function automatic dr_nib_t dr_xor4(dr_nib_t a, dr_nib_t b);
    dr_nib_t r;
    for (int i = 0; i < 4; i++) r[i] = dr_xor(a[i], b[i]);
    return r;
  endfunction

  function automatic dr_byte_t dr_xor8(dr_byte_t a, dr_byte_t b);
    dr_byte_t r;
    for (int i = 0; i < 8; i++) r[i] = dr_xor(a[i], b[i]);
    return r;
  endfunction

  function automatic dr_word_t dr_xor32(dr_word_t a, dr_word_t b);
    dr_word_t r;
    for (int i = 0; i < 32; i++) r[i] = dr_xor(a[i], b[i]);
    return r;
  endfunction

  // XOR with a constant only swaps rails, so it keeps NULL as NULL.
  function automatic dr_byte_t dr_xor8_const(dr_byte_t a, logic [7:0] c);
    dr_byte_t r;
    for (int i = 0; i < 8; i++) r[i] = c[i] ? dr_not(a[i]) : a[i];
    return r;
  endfunction

  // Dual-rail xtime (multiply by 2 in GF(2^8), AES polynomial 0x11B).
  function automatic dr_byte_t dr_xtime(dr_byte_t a);
    dr_byte_t r;
    r[0] = a[7];
    r[1] = dr_xor(a[0], a[7]);
    r[2] = a[1];
    r[3] = dr_xor(a[2], a[7]);
    r[4] = dr_xor(a[3], a[7]);
    r[5] = a[4];
    r[6] = a[5];
    r[7] = a[6];
    return r;
  endfunction

  // Dual-rail equality with a constant: valid once every bit is valid.
  function automatic dr_t dr_eq8_const(dr_byte_t a, logic [7:0] c);
    logic all_match;
    logic any_miss;
    logic all_valid;
    all_match = 1'b1;
    any_miss  = 1'b0;
    all_valid = 1'b1;
    for (int i = 0; i < 8; i++) begin
      all_match &= c[i] ? a[i].t : a[i].f;
      any_miss  |= c[i] ? a[i].f : a[i].t;
      all_valid &= dr_is_valid(a[i]);
    end
    return '{t: all_match, f: any_miss & all_valid};
  endfunction

  // ----------------------------------------------------- single-rail GF
  function automatic logic [3:0] gf4_mul(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] gf4_inv(logic [3:0] a);
    logic [3:0] r;
    r = 4'h0;
    for (int b = 1; b < 16; b++) if (gf4_mul(a, 4'(b)) == 4'h1) r = 4'(b);
    return r;
  endfunction

  // Columns of GF(2^4)-linear maps, built at elaboration.
  function automatic logic [3:0][3:0] cols_square();
    logic [3:0][3:0] c;
    for (int j = 0; j < 4; j++) c[j] = gf4_mul(4'(1 << j), 4'(1 << j));
    return c;
  endfunction

  function automatic logic [3:0][3:0] cols_lambda();
    logic [3:0][3:0] c;
    for (int j = 0; j < 4; j++) c[j] = gf4_mul(GF4_LAMBDA, 4'(1 << j));
    return c;
  endfunction

  // AES affine matrix: output bit i takes input bits i, i+4, i+5, i+6, i+7.
  function automatic logic [7:0][7:0] cols_affine();
    logic [7:0][7:0] c;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        int unsigned d;
        d = (j - i + 8) % 8;
        c[j][i] = (d == 0) || (d >= 4);
      end
    return c;
  endfunction

  // ----------------------------------------------- dual-rail linear maps
  // out[i] = XOR of in[j] over all j whose column has bit i set.  Every row
  // of the maps used here has at least one bit, so NULL propagates.
  function automatic dr_nib_t dr_lin4(logic [3:0][3:0] cols, dr_nib_t a);
    dr_nib_t r;
    for (int i = 0; i < 4; i++) begin
      logic first;
      first = 1'b1;
      r[i]  = DR_NULL;
      for (int j = 0; j < 4; j++)
        if (cols[j][i]) begin
          r[i]  = first ? a[j] : dr_xor(r[i], a[j]);
          first = 1'b0;
        end
    end
    return r;
  endfunction

  function automatic dr_byte_t dr_lin8(logic [7:0][7:0] cols, dr_byte_t a);
    dr_byte_t r;
    for (int i = 0; i < 8; i++) begin
      logic first;
      first = 1'b1;
      r[i]  = DR_NULL;
      for (int j = 0; j < 8; j++)
        if (cols[j][i]) begin
          r[i]  = first ? a[j] : dr_xor(r[i], a[j]);
          first = 1'b0;
        end
    end
    return r;
  endfunction

  // Dual-rail GF(2^4) multiplier: 16 AND cells and an XOR reduction.
  function automatic dr_nib_t dr_gf4_mul(dr_nib_t a, dr_nib_t b);
    dr_t c [7];
    dr_nib_t r;
    for (int k = 0; k < 7; k++) c[k] = DR_NULL;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        dr_t pp;
        pp = dr_and(a[i], b[j]);
        c[i+j] = (i == 0 || j == 3) ? pp : dr_xor(c[i+j], pp);
      end
    // x^4 = x + 1, x^5 = x^2 + x, x^6 = x^3 + x^2
    r[0] = dr_xor(c[0], c[4]);
    r[1] = dr_xor(dr_xor(c[1], c[4]), c[5]);
    r[2] = dr_xor(dr_xor(c[2], c[5]), c[6]);
    r[3] = dr_xor(c[3], c[6]);
    return r;
  endfunction

  // Dual-rail GF(2^4) inverter as a minterm (DIMS) table: exactly one of
  // the 16 minterms fires for a valid input, none for NULL.
  function automatic dr_nib_t dr_gf4_inv(dr_nib_t a);
    dr_nib_t r;
    for (int i = 0; i < 4; i++) r[i] = DR_NULL;
    for (int m = 0; m < 16; m++) begin
      logic hit;
      logic [3:0] v;
      hit = 1'b1;
      for (int k = 0; k < 4; k++) hit &= m[k] ? a[k].t : a[k].f;
      v = gf4_inv(4'(m));
      for (int i = 0; i < 4; i++) begin
        r[i].t |= hit & v[i];
        r[i].f |= hit & ~v[i];
      end
    end
    return r;
  endfunction

endpackage
