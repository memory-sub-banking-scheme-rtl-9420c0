// siso_ref_pkg: reference model of the sliding-window max*-MAP decoder, for the
// testbenches. It works on whole arrays in plain integer arithmetic and knows
// nothing of sub-banks or time slots. The trellis is derived here from the
// generator polynomials of the 8-state code (feedback 1+D^2+D^3, parity
// 1+D+D^3) by simulating the shift register, independently of the RTL.
package siso_ref_pkg;

  localparam int NSTATE = 8;
  localparam int NEG    = -256;

  // encoder shift register: reg1 = newest; state number = reg1*4 + reg2*2 + reg3
  function automatic void step(input int st, input int u, output int nst, output int par);
    int r1, r2, r3, fb;
    r1 = (st / 4) % 2;
    r2 = (st / 2) % 2;
    r3 = st % 2;
    fb  = (u + r2 + r3) % 2;
    par = (fb + r1 + r3) % 2;
    nst = fb * 4 + r1 * 2 + r2;
  endfunction

  function automatic int corr(input int d);
    int a;
    a = (d < 0) ? -d : d;
    if (a == 0) return 3;
    if (a <= 3) return 2;
    if (a <= 7) return 1;
    return 0;
  endfunction

  function automatic int mstar(input int x, input int y);
    return ((x > y) ? x : y) + corr(x - y);
  endfunction

  function automatic int bm(input int ga, input int gb, input int st, input int u);
    int nst, par;
    step(st, u, nst, par);
    return u * ga + par * gb;
  endfunction

  typedef int vec_t [NSTATE];

  function automatic vec_t fwd(input vec_t a, input int ga, input int gb);
    vec_t r;
    bit   seen [NSTATE];
    int   nst, par, m;
    foreach (seen[i]) seen[i] = 0;
    for (int s = 0; s < NSTATE; s++)
      for (int u = 0; u < 2; u++) begin
        step(s, u, nst, par);
        m = a[s] + u * ga + par * gb;
        r[nst] = seen[nst] ? mstar(r[nst], m) : m;
        seen[nst] = 1;
      end
    m = r[0];
    for (int s = 0; s < NSTATE; s++) r[s] -= m;
    return r;
  endfunction

  function automatic vec_t bwd(input vec_t b, input int ga, input int gb);
    vec_t r;
    int n0, n1, p0, p1, m;
    for (int s = 0; s < NSTATE; s++) begin
      step(s, 0, n0, p0);
      step(s, 1, n1, p1);
      r[s] = mstar(p0 * gb + b[n0], ga + p1 * gb + b[n1]);
    end
    m = r[0];
    for (int s = 0; s < NSTATE; s++) r[s] -= m;
    return r;
  endfunction

  function automatic int llr(input vec_t a, input vec_t b, input int ga, input int gb);
    int acc [2];
    int nst, par, m;
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < NSTATE; s++) begin
        step(s, u, nst, par);
        m = a[s] + u * ga + par * gb + b[nst];
        acc[u] = (s == 0) ? m : mstar(acc[u], m);
      end
    return acc[1] - acc[0];
  endfunction

  function automatic vec_t start_vec();
    vec_t r;
    for (int s = 0; s < NSTATE; s++) r[s] = (s == 0) ? 0 : NEG;
    return r;
  endfunction

  function automatic vec_t zero_vec();
    vec_t r;
    for (int s = 0; s < NSTATE; s++) r[s] = 0;
    return r;
  endfunction

endpackage
