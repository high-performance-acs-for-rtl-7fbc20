// viterbi_pkg: types, constants and trellis functions shared by the
// reconfigurable T-algorithm Viterbi decoder.
//
// Code family (K = 7, 64 states, 6 memory bits).  A state is split into two
// 3-bit halves, s = {H, L}.  In a mode with k information bits per step
// (k = 3, 2, 1 for rates 3/4, 2/3, 1/2) the next state is
//     ns = {L, H[2-k:0], u[k-1:0]}       (for k = 3 the H part is empty)
// so every state has 2^k predecessors
//     pred_j(ns) = {j[k-1:0], ns[2:k], ns[5:3]},   j = 0 .. 2^k-1,
// which is exactly the set of adders that the reconfigurable ACS enables per
// mode (8, 4 or 2).  The k+1 code bits of a branch are
//     c = {u ^ h(s), g(s)},   g(s) = ^H,
// so all 2^k branches leaving a state carry the 2^k code words of one parity
// (the "even" or "odd" branch-metric group), and because the successor's H
// equals the present L, the parity used one step later is ^L.  The 64 states
// fall into four clusters of 16 by cluster(s) = {^H, ^L}; the minimum over any
// two-step extension of a cluster is then its minimum path metric plus one
// even/odd group minimum per step, which is what the precomputation uses.
// The two-step structure follows the precomputation scheme the decoder is
// built on; the concrete generator (h, g and the state ordering) is this
// design's own choice.
//
// Path metrics are kept modulo 2^PM_W and compared through the sign of their
// difference, so they never need rescaling as long as the live metrics span
// less than half the range.  Each metric carries a valid bit: a state that
// was never reached, or was purged by the T-algorithm, is invalid and never
// wins a comparison.
package viterbi_pkg;

  localparam int unsigned STATE_W      = 6;
  localparam int unsigned NUM_STATES   = 64;
  localparam int unsigned MAX_K        = 3;   // information bits per step, rate 3/4
  localparam int unsigned MAX_N        = 4;   // code bits per step, rate 3/4
  localparam int unsigned NUM_BM       = 16;  // 2^MAX_N code words
  localparam int unsigned NUM_PRED     = 8;   // 2^MAX_K incoming branches
  localparam int unsigned BM_W         = 3;   // Hamming distance 0..4
  localparam int unsigned PM_W         = 10;  // modular path metric width
  localparam int unsigned TH_W         = 8;   // T-algorithm threshold width
  localparam int unsigned NUM_CLUSTERS = 4;
  localparam int unsigned CLUSTER_SIZE = 16;

  // Mode encoding of the reconfigurable ACS.
  typedef enum logic [1:0] {
    MODE_R34 = 2'b00,
    MODE_R23 = 2'b01,
    MODE_R12 = 2'b10
  } mode_e;

  typedef logic [STATE_W-1:0] state_t;
  typedef logic [BM_W-1:0]    bm_t;
  typedef logic [MAX_K-1:0]   sym_t;

  typedef struct packed {
    logic            valid;
    logic [PM_W-1:0] val;
  } pm_t;

  localparam pm_t PM_INVALID = '{valid: 1'b0, val: '0};

  function automatic int unsigned k_of(mode_e m);
    case (m)
      MODE_R23: return 2;
      MODE_R12: return 1;
      default:  return 3;
    endcase
  endfunction

  // True when a < b in modular arithmetic.
  function automatic logic val_lt(logic [PM_W-1:0] a, logic [PM_W-1:0] b);
    logic [PM_W-1:0] d;
    d = a - b;
    return d[PM_W-1];
  endfunction

  // Minimum of two metrics; invalid loses, a tie keeps a.
  function automatic pm_t pm_min2(pm_t a, pm_t b);
    if (!a.valid) return b;
    if (!b.valid) return a;
    return val_lt(b.val, a.val) ? b : a;
  endfunction

  // True when metric b is strictly better than a (used by index trees).
  function automatic logic pm_better(pm_t a, pm_t b);
    if (!b.valid) return 1'b0;
    if (!a.valid) return 1'b1;
    return val_lt(b.val, a.val);
  endfunction

  function automatic pm_t pm_add(pm_t a, logic [PM_W-1:0] x);
    pm_t r;
    r.valid = a.valid;
    r.val   = a.val + x;
    return r;
  endfunction

  function automatic state_t next_state(state_t s, sym_t u, mode_e m);
    case (m)
      MODE_R23: return {s[2:0], s[3], u[1:0]};
      MODE_R12: return {s[2:0], s[4:3], u[0]};
      default:  return {s[2:0], u};
    endcase
  endfunction

  function automatic state_t pred_state(state_t ns, logic [2:0] j, mode_e m);
    case (m)
      MODE_R23: return {j[1:0], ns[2], ns[5:3]};
      MODE_R12: return {j[0], ns[2:1], ns[5:3]};
      default:  return {j, ns[5:3]};
    endcase
  endfunction

  // Information symbol carried by every branch entering ns.
  function automatic sym_t sym_of(state_t ns, mode_e m);
    case (m)
      MODE_R23: return {1'b0, ns[1:0]};
      MODE_R12: return {2'b00, ns[0]};
      default:  return ns[2:0];
    endcase
  endfunction

  function automatic logic [2:0] h_of(state_t s);
    return {s[2] ^ s[3], s[1] ^ s[5] ^ s[3], s[0] ^ s[4]};
  endfunction

  function automatic logic g_of(state_t s);
    return ^s[5:3];
  endfunction

  // Code word (index of its branch metric) of the branch leaving s with u.
  function automatic logic [MAX_N-1:0] codeword(state_t s, sym_t u, mode_e m);
    logic [2:0] x;
    x = u ^ h_of(s);
    case (m)
      MODE_R23: return {1'b0, x[1:0], g_of(s)};
      MODE_R12: return {2'b00, x[0], g_of(s)};
      default:  return {x, g_of(s)};
    endcase
  endfunction

  function automatic logic [1:0] cluster_of(state_t s);
    return {^s[5:3], ^s[2:0]};
  endfunction

  // i-th member (0..15) of cluster c, in a fixed order.
  function automatic state_t cluster_member(logic [1:0] c, logic [3:0] i);
    logic [2:0] hi, lo;
    hi = {i[3:2], ^i[3:2] ^ c[1]};
    lo = {i[1:0], ^i[1:0] ^ c[0]};
    return {hi, lo};
  endfunction

endpackage
