`timescale 1ps/1ps
// apcdp_pkg: types and netlist tables shared by the APCDP (asynchronous pipeline with a
// constructed critical data path) multiplier.
//
// Encoding. A dual-rail bit (dr_t) is a pair of monotonic domino rails: t=1 means a valid 1,
// f=1 a valid 0, both low the spacer that precharge leaves behind (four-phase, return to zero).
// Single-rail bits are plain logic: 0 until the domino gate that drives them discharges.
//
// Pipeline word. Every stage carries one word of W = 6*N+1 single-rail bits laid out as
//   a[N-1:0] | b[N-1:0] | s[N-1:0] | c[N-1:0] | p[2N-1:0] | r
// a, b are the operands, s/c the carry-save sum and carry vectors of the array, p the product
// bits already final, r the carry of the final ripple adder. Bits a stage does not need are
// simply not driven (no gate) and stay at 0.
//
// Stage k (0 <= k < 2N) of the 8x8 array multiplier:
//   k = 0         partial products of row 0: p0 = a0 b0, s_j = a_j b0.
//   1 <= k < N    one carry-save row: sum/carry of (a_j b_k, s_{j+1}, c_j); p_k is the j=0 sum.
//   k = N+m       one bit of the final ripple adder: p_{N+m} = s_{m+1} + c_m + r.
// Every other live bit is copied by a domino buffer, since a latch-free pipeline has no other
// storage. The critical (dual-rail, SLG) bit of stage k is always p_k. The stage partition and
// this word layout are this implementation's own choice; the original design specifies only an 8x8 array
// multiplier built from gate-level APCDP stages.
package apcdp_pkg;

  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_ZERO   = '{t: 1'b0, f: 1'b1};
  localparam dr_t DR_ONE    = '{t: 1'b1, f: 1'b0};

  // Gate kinds used by the multiplier. SUM and CARRY take the partial product x0&x1 as their
  // first operand, so one complex domino gate does the AND and the full-adder bit.
  typedef enum logic [2:0] {
    G_NONE  = 3'd0,  // no gate: output stays at 0
    G_BUF   = 3'd1,  // y = x0
    G_AND   = 3'd2,  // y = x0 & x1
    G_SUM   = 3'd3,  // y = (x0 & x1) ^ x2 ^ x3
    G_CARRY = 3'd4   // y = maj(x0 & x1, x2, x3)
  } gate_e;

  // One gate: its kind and the word positions of its four inputs. A position >= W reads a
  // constant 0.
  typedef struct packed {
    gate_e       g;
    logic [15:0] i0;
    logic [15:0] i1;
    logic [15:0] i2;
    logic [15:0] i3;
  } gate_spec_t;

  function automatic int word_w(int n);
    return 6 * n + 1;
  endfunction
  function automatic int pos_a(int n, int j); return j;         endfunction
  function automatic int pos_b(int n, int j); return n + j;     endfunction
  function automatic int pos_s(int n, int j); return 2 * n + j; endfunction
  function automatic int pos_c(int n, int j); return 3 * n + j; endfunction
  function automatic int pos_p(int n, int j); return 4 * n + j; endfunction
  function automatic int pos_r(int n);        return 6 * n;     endfunction
  function automatic int pos_zero(int n);     return 6 * n + 1; endfunction

  function automatic gate_spec_t mk(gate_e g, int i0, int i1, int i2, int i3);
    gate_spec_t s;
    s.g  = g;
    s.i0 = 16'(i0);
    s.i1 = 16'(i1);
    s.i2 = 16'(i2);
    s.i3 = 16'(i3);
    return s;
  endfunction

  // The gate that drives word position i in stage k of an n x n multiplier.
  function automatic gate_spec_t gate_spec(int n, int k, int i);
    int z;
    int x;
    z = pos_zero(n);
    gate_spec = mk(G_NONE, z, z, z, z);
    if (k == 0) begin
      for (int j = 0; j < n; j++) begin
        if (i == pos_a(n, j) || (j >= 1 && i == pos_b(n, j))) gate_spec = mk(G_BUF, i, z, z, z);
        if (j >= 1 && i == pos_s(n, j)) gate_spec = mk(G_AND, pos_a(n, j), pos_b(n, 0), z, z);
      end
      if (i == pos_p(n, 0)) gate_spec = mk(G_AND, pos_a(n, 0), pos_b(n, 0), z, z);
    end else if (k < n) begin
      for (int j = 0; j < n; j++) begin
        x = (j < n - 1) ? pos_s(n, j + 1) : z;
        if (k < n - 1 && i == pos_a(n, j)) gate_spec = mk(G_BUF, i, z, z, z);
        if (j > k && i == pos_b(n, j)) gate_spec = mk(G_BUF, i, z, z, z);
        if (j >= 1 && i == pos_s(n, j))
          gate_spec = mk(G_SUM, pos_a(n, j), pos_b(n, k), x, pos_c(n, j));
        if (i == pos_c(n, j)) gate_spec = mk(G_CARRY, pos_a(n, j), pos_b(n, k), x, pos_c(n, j));
      end
      for (int j = 0; j < k; j++)
        if (i == pos_p(n, j)) gate_spec = mk(G_BUF, i, z, z, z);
      if (i == pos_p(n, k))
        gate_spec = mk(G_SUM, pos_a(n, 0), pos_b(n, k), pos_s(n, 1), pos_c(n, 0));
    end else begin
      int m;
      m = k - n;
      x = (m < n - 1) ? pos_s(n, m + 1) : z;
      for (int j = 0; j < k; j++)
        if (i == pos_p(n, j)) gate_spec = mk(G_BUF, i, z, z, z);
      for (int j = 0; j < n; j++) begin
        if (j > m + 1 && i == pos_s(n, j)) gate_spec = mk(G_BUF, i, z, z, z);
        if (j > m && i == pos_c(n, j)) gate_spec = mk(G_BUF, i, z, z, z);
      end
      if (i == pos_p(n, k)) gate_spec = mk(G_SUM, x, x, pos_c(n, m), pos_r(n));
      if (m < n - 1 && i == pos_r(n)) gate_spec = mk(G_CARRY, x, x, pos_c(n, m), pos_r(n));
    end
  endfunction

  // Word position of the critical bit, the one built from an SLG, in stage k.
  function automatic int crit_pos(int n, int k);
    return pos_p(n, k);
  endfunction

  // True when stage k+1 needs word bit i of stage k in dual-rail form: it feeds the SLG or a
  // gate that is not monotonic (SUM). Only such bits get an encoding splitter.
  function automatic bit needs_split(int n, int k, int i);
    gate_spec_t s;
    if (k + 1 >= 2 * n) return 1'b0;
    for (int q = 0; q < word_w(n); q++) begin
      s = gate_spec(n, k + 1, q);
      if ((s.g == G_SUM || q == crit_pos(n, k + 1)) &&
          (int'(s.i0) == i || int'(s.i1) == i || int'(s.i2) == i || int'(s.i3) == i))
        return 1'b1;
    end
    return 1'b0;
  endfunction

  // Boolean function of a gate kind.
  function automatic logic gate_fn(gate_e g, logic [3:0] x);
    logic pp;
    pp = x[0] & x[1];
    case (g)
      G_BUF:   return x[0];
      G_AND:   return pp;
      G_SUM:   return pp ^ x[2] ^ x[3];
      G_CARRY: return (pp & x[2]) | (pp & x[3]) | (x[2] & x[3]);
      default: return 1'b0;
    endcase
  endfunction

  // What a domino pull-down network can already decide from the rails that are high:
  // [1] the output is 1 whatever the inputs still missing turn out to be, [0] it is 0.
  function automatic logic [1:0] gate_resolve(gate_e g, dr_t [3:0] in);
    logic one, zero, ok;
    logic [3:0] x;
    one  = 1'b1;
    zero = 1'b1;
    for (int v = 0; v < 16; v++) begin
      x  = 4'(v);
      ok = 1'b1;
      for (int j = 0; j < 4; j++)
        if ((in[j].t && !x[j]) || (in[j].f && x[j])) ok = 1'b0;
      if (ok) begin
        if (gate_fn(g, x)) zero = 1'b0;
        else one = 1'b0;
      end
    end
    return {one, zero};
  endfunction

endpackage
