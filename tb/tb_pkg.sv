// tb_pkg: reference arithmetic shared by the correlator testbenches.
//
// rec holds full-rate sample records: rec[sig][s] is sample s (s = 2*clock +
// 0 for the even, +1 for the odd sample of a pair) of test signal sig. The
// reduced product is written here from its definition (magnitudes 3, 1, 0 for
// two, one, no high levels; sign from the two signs), independently of
// corr_pkg. exc() sums the signed products x[s]*y[s+lag] of one parity of s
// over a range; a correlator fed with low-level samples outside a burst counts
// exactly 3 per clock plus this excess.
package tb_pkg;
  localparam int NSIG = 64;
  localparam int MAXS = 8192;

  logic [1:0] rec [NSIG][MAXS];

  function automatic int w(logic [1:0] a, logic [1:0] b);
    int m;
    m = int'(a[0]) + int'(b[0]);
    m = (m == 2) ? 3 : m;
    return (a[1] == b[1]) ? m : -m;
  endfunction

  function automatic int exc(int xsig, int ysig, int lag, int par, int s0, int s1);
    int acc;
    acc = 0;
    for (int s = s0; s <= s1; s++) begin
      if ((s & 1) != par) continue;
      if (s + lag < 0 || s + lag >= MAXS || s < 0 || s >= MAXS) continue;
      acc += w(rec[xsig][s], rec[ysig][s + lag]);
    end
    return acc;
  endfunction

  // expected 17-bit point of a 32-lag correlator: two chips, each W clocks,
  // offset 3 per clock, prescaler of p bits dropped before the sum
  function automatic int point(int xsig, int ysig, int lag, int W, int p, int s0, int s1);
    return ((3 * W + exc(xsig, ysig, lag, 0, s0, s1)) >>> p)
         + ((3 * W + exc(xsig, ysig, lag, 1, s0, s1)) >>> p);
  endfunction

  // a random sample: low with random sign outside a burst, any level inside
  function automatic logic [1:0] rnd_sample(bit burst);
    logic [1:0] v;
    v = 2'($urandom);
    if (!burst) v[0] = 1'b0;
    return v;
  endfunction
endpackage
