// tb_vd_ref_pkg: reference models for the testbenches of the Viterbi
// detector.
//
// path_ref models the path memory from Update/Data; vd1_ref is a behavioural
// model of the simplified 1-D Viterbi algorithm on
// integer sample codes, written from the algorithm's definition: the
// candidate pulse (amplitude yp, polarity beta) is replaced when the new
// sample falls outside the window <0, -2*beta> (in codes, 2 signal units are
// HALF = 2^(W-1) codes; the lower border belongs to the window, the upper
// one does not, as in the carry/msb comparator). On a replacement with a
// polarity flip the old candidate is a pulse. Decisions live in a path memory
// of L bits: a candidate can only be decided while it is at most L-1 places
// deep; one that leaves undecided reads 0 (pointer memory) or 1 (exchange
// memory). step() is called once per enabled edge with the sample held in
// the sample register at that edge; after n calls, out() gives what the path
// memory shows at its output.
//
// Also: gauss() returns a standard normal value from $urandom (Box-Muller),
// quant() the offset binary code of an analog value over -2..+2.
package tb_vd_ref_pkg;

  // Path memory of l bits driven by Update/Data.
  class path_ref;
    int  l;
    bit  exch;
    int  cand;      // step index of the candidate, -1 if none
    int  n;         // steps done
    bit  dec[$];

    function new(int l_i, bit exch_i);
      l = l_i; exch = exch_i; cand = -1; n = 0;
    endfunction

    // One enabled edge. Returns 1 if a decision was written in time.
    function bit step(bit upd, bit dat);
      bit wrote;
      wrote = 1'b0;
      dec.push_back(1'b0);
      if (upd) begin
        if (cand >= 0 && (n - cand) <= l - 1) begin
          dec[cand] = dat;
          wrote     = 1'b1;
        end
        dec[n] = exch;
        cand   = n;
      end
      n++;
      return wrote;
    endfunction

    // Bit at the memory output after the last step.
    function bit out();
      if (n - l < 0) return 1'b0;
      return dec[n - l];
    endfunction

    function bit overflow();
      if (exch) return (cand >= 0) && ((n - 1 - cand) == l - 1);
      return (cand < 0) || ((n - 1 - cand) >= l - 1);
    endfunction
  endclass

  class vd1_ref;
    int      w, half;
    int      yp;
    bit      beta;      // 1: beta = +1, 0: beta = -1
    bit      last_upd, last_dat;
    path_ref path;

    function new(int w_i, int l_i, bit exch_i);
      w    = w_i;
      half = 1 << (w - 1);
      yp   = 0;
      beta = 0;
      path = new(l_i, exch_i);
    endfunction

    function void step(int y);
      int d;
      bit upd, dat;
      bit wrote;
      d = y - yp;
      if (beta) begin
        upd = (d >= 0) || (d < -half);
        dat = (d < -half);
      end else begin
        upd = (d < 0) || (d >= half);
        dat = (d >= half);
      end
      wrote = path.step(upd, dat);
      if (upd) begin
        yp   = y;
        beta = (d >= 0);
      end
      last_upd = upd;
      last_dat = dat;
    endfunction

    function bit out();
      return path.out();
    endfunction

    function bit overflow();
      return path.overflow();
    endfunction
  endclass

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFFFF, 1))) / 16777216.0;
    u2 = (real'($urandom_range(32'hFFFFFF, 0))) / 16777216.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int quant(real v, int w);
    real s;
    int  maxc;
    maxc = (1 << w) - 1;
    s = (v + 2.0) / 4.0 * real'(1 << w);
    if (s < 0.0) return 0;
    if (s >= real'(maxc)) return maxc;
    return $rtoi(s);
  endfunction

endpackage
