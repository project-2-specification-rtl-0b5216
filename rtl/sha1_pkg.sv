// sha1_pkg: types, constants and step functions shared by the SHA-1 cores.
//
// The working state is the five 32-bit words A..E, kept as a packed struct.
// The additive constant K_t and the logic function f_t are chosen by which
// quarter of the 80 steps t falls in (0-19, 20-39, 40-59, 60-79), as in the
// SHA-1 standard. The initial value (IV) is the standard SHA-1 one.
package sha1_pkg;

  localparam int unsigned NUM_STEPS = 80;   // steps per 512-bit block
  localparam int unsigned WORD_W    = 32;
  localparam int unsigned BLOCK_W   = 512;
  localparam int unsigned DIGEST_W  = 160;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [6:0]        step_t;        // 0..79

  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } state_t;

  // Which group of 20 steps a step belongs to; selects f_t and K_t.
  typedef enum logic [1:0] {
    PH_CH  = 2'd0,   // steps  0..19: f = (B & C) | (~B & D), K = 5A827999
    PH_PA1 = 2'd1,   // steps 20..39: f = B ^ C ^ D,          K = 6ED9EBA1
    PH_MAJ = 2'd2,   // steps 40..59: f = majority(B, C, D),  K = 8F1BBCDC
    PH_PA2 = 2'd3    // steps 60..79: f = B ^ C ^ D,          K = CA62C1D6
  } phase_e;

  localparam word_t K_CONST [4] = '{32'h5A82_7999, 32'h6ED9_EBA1,
                                    32'h8F1B_BCDC, 32'hCA62_C1D6};

  localparam state_t IV = '{a: 32'h6745_2301, b: 32'hEFCD_AB89,
                            c: 32'h98BA_DCFE, d: 32'h1032_5476,
                            e: 32'hC3D2_E1F0};

  function automatic phase_e step_phase(input step_t t);
    if (t < 7'd20)      return PH_CH;
    else if (t < 7'd40) return PH_PA1;
    else if (t < 7'd60) return PH_MAJ;
    else                return PH_PA2;
  endfunction

  function automatic word_t rotl(input word_t x, input int unsigned k);
    return (x << k) | (x >> (WORD_W - k));
  endfunction

  function automatic word_t f_func(input phase_e ph, input word_t b,
                                   input word_t c, input word_t d);
    unique case (ph)
      PH_CH:   return (b & c) | (~b & d);
      PH_MAJ:  return (b & c) | (b & d) | (c & d);
      default: return b ^ c ^ d;
    endcase
  endfunction

  // Word-wise sum of two states: the chaining-value update H + {A..E}.
  function automatic state_t state_add(input state_t x, input state_t y);
    state_t r;
    r.a = x.a + y.a;
    r.b = x.b + y.b;
    r.c = x.c + y.c;
    r.d = x.d + y.d;
    r.e = x.e + y.e;
    return r;
  endfunction

endpackage
