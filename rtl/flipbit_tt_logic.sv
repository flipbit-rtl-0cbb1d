// flipbit_tt_logic: the "truth table logic" of the n-bit approximator.
//
// Bit i of the approximate value is in question when previous[i]=1,
// exact[i]=0 and no earlier (more significant) decision has fixed the rest
// of the value. Setting approx[i]=1 rounds the value up (all lower bits then
// become 0); leaving it 0 keeps the value at or below exact for now. The
// block looks at the n-1 bits below i of exact and previous and picks the
// choice whose largest possible error is smaller (minimax), as the FLIPBIT
// scheme prescribes. Its table for n=2 is:
//     exact[i-1] previous[i-1] -> up
//         0          x             0
//         1          0             1
//         1          1             0
//
// The circuit is built once for NMAX (8) and serves every n <= NMAX: the
// NMAX-n least significant window bits are forced to 0, which yields the
// table for n. Here the minimax is computed rather than stored. With the
// NMAX-1 window bits e (exact) and p (previous), in units of the window LSB
// and with the unknown lower bits taken as a fraction x in [0,1):
//   rounding up:  worst error errA = 2^(NMAX-1) - e           (at x = 0)
//   keeping 0:    the closest reachable values are a_lo, the largest
//                 submask of p not above e, and a_hi, the smallest submask
//                 of p above e; errB = max over x of the smaller distance.
// up = (errA < errB); a tie keeps 0, which reproduces the n=2 table above.
// The error model (unknown lower bits, worst-case previous bits taken as 0)
// is this design's reading of the minimax rule; the table rows are the
// document's.
//
// Interface: purely combinational. exact_win/previous_win are bits i..i-NMAX+1
// (zero padded below bit 0); bit NMAX-1 (bit i itself) is not used here.
// nbits (1..NMAX) selects n; 0 is treated as 1.
module flipbit_tt_logic #(
  parameter int unsigned NMAX = 8
) (
  input  logic [NMAX-1:0] exact_win,
  input  logic [NMAX-1:0] previous_win,
  input  logic [3:0]      nbits,
  output logic            up
);
  localparam int unsigned W = NMAX - 1;

  logic [W-1:0] keep_mask;
  logic [W-1:0] e, p;
  logic [W-1:0] a_lo, a_hi;
  logic         hi_found;
  logic [W+2:0] err_a2, err_b2, d_lo, d_hi;

  // Keep the n-1 most significant window bits, force the rest to 0.
  always_comb begin
    keep_mask = '0;
    for (int k = 0; k < int'(W); k++) begin
      if (k >= int'(W) - (int'(nbits) - 1)) keep_mask[k] = 1'b1;
    end
  end

  assign e = exact_win[W-1:0] & keep_mask;
  assign p = previous_win[W-1:0] & keep_mask;

  // a_lo: largest submask of p that is <= e (greedy from the MSB).
  always_comb begin
    logic tight;
    tight = 1'b1;
    a_lo  = '0;
    for (int k = int'(W) - 1; k >= 0; k--) begin
      if (tight) begin
        if (e[k] && p[k])  a_lo[k] = 1'b1;
        else if (e[k])     tight   = 1'b0;
      end else if (p[k]) begin
        a_lo[k] = 1'b1;
      end
    end
  end

  // a_hi: smallest submask of p that is > e. Raise the lowest bit k with
  // e[k]=0, p[k]=1 whose upper bits of e are all available in p.
  always_comb begin
    logic [W-1:0] upper_e, upper_p;
    a_hi     = '0;
    hi_found = 1'b0;
    for (int k = 0; k < int'(W); k++) begin
      upper_e = e >> (k + 1);
      upper_p = p >> (k + 1);
      if (!hi_found && !e[k] && p[k] && ((upper_e & ~upper_p) == '0)) begin
        hi_found = 1'b1;
        a_hi     = (upper_e << (k + 1)) | (W'(1) << k);
      end
    end
  end

  // Worst-case errors, doubled so that the crossing point stays integral.
  always_comb begin
    err_a2 = ((W+3)'(1) << (W + 1)) - ((W+3)'(e) << 1);
    d_lo   = (W+3)'(e) - (W+3)'(a_lo);
    d_hi   = (W+3)'(a_hi) - (W+3)'(e);
    if (!hi_found)              err_b2 = (d_lo + 1) << 1;
    else if (d_hi <= d_lo)      err_b2 = d_hi << 1;
    else if (d_hi >= d_lo + 2)  err_b2 = (d_lo + 1) << 1;
    else                        err_b2 = d_hi + d_lo;
  end

  assign up = (err_a2 < err_b2);

endmodule
