// flipbit_ref_pkg: reference models used by the testbenches.
//
// ref_up follows the minimax rule of the truth table logic, but finds the
// reachable values below and above exact by trying every submask of the
// previous window instead of the hardware's greedy search. ref_approx runs
// the n-bit approximation algorithm one bit at a time, as a software loop.
package flipbit_ref_pkg;

  localparam int NMAX_R = 8;
  localparam int WIN    = NMAX_R - 1;

  // e, p: the WIN window bits below bit i, already masked for n.
  function automatic bit ref_up_masked(int e, int p);
    int err_a2, err_b2, a_lo, a_hi, d_lo, d_hi;
    bit hi_found;
    a_lo = 0;
    a_hi = 0;
    hi_found = 0;
    for (int a = 0; a < (1 << WIN); a++) begin
      if ((a & ~p) != 0) continue;
      if (a <= e) begin
        if (a > a_lo) a_lo = a;
      end else if (!hi_found || a < a_hi) begin
        a_hi = a;
        hi_found = 1;
      end
    end
    err_a2 = 2 * ((1 << WIN) - e);
    d_lo = e - a_lo;
    d_hi = a_hi - e;
    if (!hi_found)             err_b2 = 2 * (d_lo + 1);
    else if (d_hi <= d_lo)     err_b2 = 2 * d_hi;
    else if (d_hi >= d_lo + 2) err_b2 = 2 * (d_lo + 1);
    else                       err_b2 = d_hi + d_lo;
    return err_a2 < err_b2;
  endfunction

  function automatic int window_mask(int n);
    int m;
    m = 0;
    for (int k = 0; k < WIN; k++) if (k >= WIN - (n - 1)) m |= (1 << k);
    return m;
  endfunction

  // exact_win/prev_win: bits i..i-7 (bit 7 of the argument is bit i).
  function automatic bit ref_up(int exact_win, int prev_win, int n);
    int m;
    m = window_mask(n);
    return ref_up_masked(exact_win & m, prev_win & m);
  endfunction

  function automatic longint unsigned ref_approx(longint unsigned prev,
                                                 longint unsigned exact,
                                                 int width, int n);
    longint unsigned out;
    bit set_ones, set_zeros;
    int ew, pw;
    out = 0;
    set_ones = 0;
    set_zeros = 0;
    prev  = prev  & ((64'd1 << width) - 1);
    exact = exact & ((64'd1 << width) - 1);
    for (int i = width - 1; i >= 0; i--) begin
      // window bits i..i-7, zero padded below bit 0
      ew = int'(((exact << 7) >> i) & 64'hFF);
      pw = int'(((prev << 7) >> i) & 64'hFF);
      if (!set_zeros) begin
        if (prev[i]) begin
          if (exact[i] || set_ones) begin
            out[i] = 1'b1;
          end else if (ref_up(ew, pw, n)) begin
            out[i] = 1'b1;
            set_zeros = 1'b1;
          end
        end else if (exact[i]) begin
          set_ones = 1'b1;
        end
      end
    end
    return out;
  endfunction

endpackage
