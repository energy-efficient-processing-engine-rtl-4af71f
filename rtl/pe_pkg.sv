// pe_pkg: number formats shared by the LDPC processing engine.
//
// The engine exchanges 5-bit signed messages: one sign bit (bit 4) and a
// 4-bit magnitude (bits 3:0), i.e. sign-magnitude. Inside, the difference
// Q = L(q_j) - R_ij needs six bits (range -30..+30) and is kept in two's
// complement; its magnitude |Q| needs five bits, which is why the minimum
// search uses a 5-bit comparator. The 5-bit width and the 1+4 split follow
// the document; the sign-magnitude reading and the internal widths are this
// design's choice.
package pe_pkg;

  localparam int unsigned MSG_W  = 5;          // message width (sign + magnitude)
  localparam int unsigned MAG_W  = MSG_W - 1;  // message magnitude width
  localparam int unsigned Q_W    = MSG_W + 1;  // two's-complement width of Q
  localparam int unsigned QMAG_W = MSG_W;      // width of |Q|

  // Sign-magnitude message.
  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } msg_t;

  typedef logic signed [Q_W-1:0] q_t;
  typedef logic [QMAG_W-1:0]     qmag_t;

  localparam int MSG_MAX = (1 << MAG_W) - 1;   // largest message magnitude, 15

  // Value of a sign-magnitude message as a signed integer.
  function automatic int msg_value(msg_t m);
    return m.sign ? -int'(m.mag) : int'(m.mag);
  endfunction

  // Signed integer to sign-magnitude message, saturated to +/-MSG_MAX.
  // Zero is always encoded with a clear sign bit.
  function automatic msg_t msg_sat(int v);
    msg_t m;
    int   a;
    a      = (v < 0) ? -v : v;
    if (a > MSG_MAX) a = MSG_MAX;
    m.mag  = MAG_W'(a);
    m.sign = (v < 0) && (a != 0);
    return m;
  endfunction

endpackage
