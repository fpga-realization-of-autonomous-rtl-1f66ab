// pbs_ref_pkg: reference models for the testbenches of the PBS chaotic
// generator.
//
// fx_* functions model the generator's arithmetic bit for bit: Q8.24
// two's-complement words, each product truncated toward minus infinity
// (64-bit product shifted right by 24) before it is added, sums wrapping
// at 32 bits, and the operations in the order the hardware performs them.
// The constants are derived here from their real values, not taken from
// the design. rk4_real_step is the same RK4 step in double precision, used
// to check that the fixed-point results stay close to the exact method.
package pbs_ref_pkg;

  typedef logic signed [31:0] w_t;

  typedef struct {
    w_t x;
    w_t y;
    w_t z;
  } pt_t;

  typedef struct {
    real x;
    real y;
    real z;
  } rpt_t;

  function automatic w_t to_fx(real v);
    return w_t'($rtoi(v * 16777216.0 + ((v < 0.0) ? -0.5 : 0.5)));
  endfunction

  function automatic real to_real(w_t v);
    return real'(v) / 16777216.0;
  endfunction

  function automatic w_t fmul(w_t a, w_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return w_t'(p >>> 24);
  endfunction

  function automatic w_t ref_a(); return to_fx(1.0); endfunction
  function automatic w_t ref_b(); return to_fx(1.1); endfunction
  function automatic w_t ref_c(); return to_fx(0.4); endfunction

  // delta(p) = -a*x - b*y - c*z - x^2, accumulated in hardware order.
  function automatic w_t fx_delta(pt_t p);
    w_t acc;
    acc = 32'sd0 - fmul(ref_a(), p.x);
    acc = acc - fmul(ref_b(), p.y);
    acc = acc - fmul(ref_c(), p.z);
    acc = acc - fmul(p.x, p.x);
    return acc;
  endfunction

  // Slope triple of stage s (1..4) given the previous stage's slopes.
  function automatic pt_t fx_kstage(int s, pt_t st, w_t h, pt_t kp);
    pt_t p, k;
    w_t  hs;
    if (s == 1) begin
      p = st;
    end else begin
      hs  = (s == 4) ? h : (h >>> 1);
      p.x = st.x + fmul(hs, kp.x);
      p.y = st.y + fmul(hs, kp.y);
      p.z = st.z + fmul(hs, kp.z);
    end
    k.x = p.y;
    k.y = p.z;
    k.z = fx_delta(p);
    return k;
  endfunction

  function automatic w_t fx_h6(w_t h);
    return fmul(h, to_fx(1.0 / 6.0));
  endfunction

  function automatic pt_t fx_update(pt_t st, w_t h, pt_t k1, pt_t k2, pt_t k3, pt_t k4);
    pt_t n;
    w_t  h6;
    h6  = fx_h6(h);
    n.x = st.x + fmul(h6, k1.x + 2 * k2.x + 2 * k3.x + k4.x);
    n.y = st.y + fmul(h6, k1.y + 2 * k2.y + 2 * k3.y + k4.y);
    n.z = st.z + fmul(h6, k1.z + 2 * k2.z + 2 * k3.z + k4.z);
    return n;
  endfunction

  function automatic pt_t fx_step(pt_t st, w_t h);
    pt_t k1, k2, k3, k4, zero;
    zero = '{x: 0, y: 0, z: 0};
    k1 = fx_kstage(1, st, h, zero);
    k2 = fx_kstage(2, st, h, k1);
    k3 = fx_kstage(3, st, h, k2);
    k4 = fx_kstage(4, st, h, k3);
    return fx_update(st, h, k1, k2, k3, k4);
  endfunction

  function automatic rpt_t rdot(rpt_t p);
    rpt_t d;
    d.x = p.y;
    d.y = p.z;
    d.z = -1.0 * p.x - 1.1 * p.y - 0.4 * p.z - p.x * p.x;
    return d;
  endfunction

  function automatic rpt_t radd(rpt_t p, real s, rpt_t d);
    rpt_t r;
    r.x = p.x + s * d.x;
    r.y = p.y + s * d.y;
    r.z = p.z + s * d.z;
    return r;
  endfunction

  function automatic rpt_t rk4_real_step(rpt_t p, real h);
    rpt_t k1, k2, k3, k4, n;
    k1 = rdot(p);
    k2 = rdot(radd(p, h / 2.0, k1));
    k3 = rdot(radd(p, h / 2.0, k2));
    k4 = rdot(radd(p, h, k3));
    n.x = p.x + h / 6.0 * (k1.x + 2.0 * k2.x + 2.0 * k3.x + k4.x);
    n.y = p.y + h / 6.0 * (k1.y + 2.0 * k2.y + 2.0 * k3.y + k4.y);
    n.z = p.z + h / 6.0 * (k1.z + 2.0 * k2.z + 2.0 * k3.z + k4.z);
    return n;
  endfunction

  function automatic rpt_t to_rpt(pt_t p);
    rpt_t r;
    r.x = to_real(p.x);
    r.y = to_real(p.y);
    r.z = to_real(p.z);
    return r;
  endfunction

endpackage
