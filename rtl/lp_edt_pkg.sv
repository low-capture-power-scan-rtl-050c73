// lp_edt_pkg -- shared types, constants and structure functions of the
// low-power EDT (embedded deterministic test) decompressor.
//
// The decompressor is a set of linear (XOR) networks whose exact wiring the
// test-generation software must know.  Every wiring choice therefore lives
// here, as constant functions evaluated at elaboration time, so that the RTL
// and any software model derive the same connections from one place:
//
//   * ring_taps()  - feedback taps of the ring generator (a primitive
//                    polynomial for each supported length);
//   * inject_pos() - ring stage into which each tester channel is injected;
//   * tap_mask()   - a pseudo-random, collision-free choice of TAPS inputs
//                    out of WIDTH for output number IDX.  It defines both the
//                    phase shifter (outputs = XOR of 3 shadow bits) and the
//                    control block's XOR network (outputs = XOR of 3 control
//                    bits).
//
// The document names these networks and states their purpose but not their
// wiring; all the numbers here are this design's own choice.
package lp_edt_pkg;

  // Widest vector any of the XOR-mapping functions below must handle.
  localparam int unsigned MAX_W = 1024;

  // Which constant a gated scan chain receives.
  //   CONST_ZERO : AND gating, a gated chain is fed 0 (the main scheme).
  //   CONST_ONE  : OR gating, a gated chain is fed 1 (the stated alternative).
  //   CONST_BOTH : AND plus OR gating with two control signals per chain:
  //                about 50 % of chains get 0, 25 % get 1, 25 % decompressor.
  typedef enum logic [1:0] {
    CONST_ZERO = 2'd0,
    CONST_ONE  = 2'd1,
    CONST_BOTH = 2'd2
  } const_mode_e;

  // Where the shadow register takes its reload command from.
  //   HOLD_PARITY  : odd parity of the channel bits injected in this cycle.
  //   HOLD_CHANNEL : a dedicated control channel, one bit per shift cycle.
  typedef enum logic {
    HOLD_PARITY  = 1'b0,
    HOLD_CHANNEL = 1'b1
  } hold_src_e;

  // Feedback taps (exponents strictly between 0 and LEN) of a primitive
  // polynomial x^LEN + sum(x^t) + 1.  Unused entries are 0.
  typedef int unsigned taps_t [4];

  function automatic taps_t ring_taps(int unsigned len);
    taps_t t;
    case (len)
      8:       t = '{6, 5, 4, 0};
      16:      t = '{15, 13, 4, 0};
      24:      t = '{23, 22, 17, 0};
      32:      t = '{22, 2, 1, 0};
      48:      t = '{47, 21, 20, 0};
      64:      t = '{63, 61, 60, 0};
      default: t = '{22, 2, 1, 0};
    endcase
    return t;
  endfunction

  // Ring stage fed by channel CH: the channels are spread evenly round the
  // ring, one injector each, in the middle of each 1/NCH arc.
  function automatic int unsigned inject_pos(int unsigned ch, int unsigned nch,
                                             int unsigned len);
    return ((2 * ch + 1) * len) / (2 * nch);
  endfunction

  // Mask of TAPS distinct positions out of WIDTH for output IDX.  A 32-bit
  // xorshift generator seeded by IDX and SALT picks each position; a position
  // already taken moves to the next free one.
  function automatic logic [MAX_W-1:0] tap_mask(int unsigned idx,
                                                 int unsigned width,
                                                 int unsigned taps,
                                                 int unsigned salt);
    logic [MAX_W-1:0] m;
    logic [31:0]      x;
    int unsigned      p;
    m = '0;
    x = 32'(idx) * 32'h9E37_79B9 ^ 32'(salt) * 32'h85EB_CA6B ^ 32'h1234_5677;
    for (int unsigned k = 0; k < taps && k < width; k++) begin
      x = x ^ (x << 13);
      x = x ^ (x >> 17);
      x = x ^ (x << 5);
      p = int'(x % 32'(width));
      while (m[p]) p = (p + 1) % width;
      m[p] = 1'b1;
    end
    return m;
  endfunction

  // Salts of the phase shifter and the XOR network.  Besides keeping the two
  // wirings unrelated, they are the first values for which no two outputs
  // share the same tap set at the default sizes (164 outputs over 32 shadow
  // bits; 492 outputs over 48 control bits).
  localparam int unsigned PS_SALT = 7;
  localparam int unsigned XN_SALT = 2478;

endpackage
