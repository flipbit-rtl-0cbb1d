// flipbit_bit_cell: one bit of the n-bit approximator (one loop iteration
// of the n-bit approximation algorithm).
//
// Cells are chained from the most significant bit down. Two flags travel
// along the chain:
//   set_ones  - some higher bit wanted a 1 where previous held a 0, so the
//               value already lies below exact: every later bit that can be
//               1 (previous=1) is set to 1.
//   set_zeros - some higher bit was rounded up to 1 where exact held a 0, so
//               the value already lies above exact: every later bit is 0.
// For bit i:
//   approx[i]    = !set_zeros_in & previous[i] & (exact[i] | set_ones_in | up)
//   set_zeros_out = set_zeros_in | (approx[i] & !exact[i] & !set_ones_in)
//   set_ones_out  = set_ones_in  | (!set_zeros_in & exact[i] & !previous[i])
// where up comes from the truth table logic. approx[i] is never 1 where
// previous[i] is 0, so the written value needs no 0->1 flip. The gate
// structure follows the document's bit circuit; the set_zeros term follows
// its algorithm listing (set only when the bit was rounded up).
//
// Interface: combinational. exact_win/previous_win are bits i..i-NMAX+1 of
// the values, zero padded below bit 0; bit NMAX-1 is bit i itself.
module flipbit_bit_cell #(
  parameter int unsigned NMAX = 8
) (
  input  logic [NMAX-1:0] exact_win,
  input  logic [NMAX-1:0] previous_win,
  input  logic [3:0]      nbits,
  input  logic            set_ones_in,
  input  logic            set_zeros_in,
  output logic            approx,
  output logic            set_ones_out,
  output logic            set_zeros_out
);
  logic up;
  logic exact_i, previous_i, want_one;

  flipbit_tt_logic #(.NMAX(NMAX)) u_tt (
    .exact_win   (exact_win),
    .previous_win(previous_win),
    .nbits       (nbits),
    .up          (up)
  );

  assign exact_i    = exact_win[NMAX-1];
  assign previous_i = previous_win[NMAX-1];
  assign want_one   = exact_i | set_ones_in;

  assign approx        = !set_zeros_in && previous_i && (want_one || up);
  assign set_zeros_out = set_zeros_in || (approx && !want_one);
  assign set_ones_out  = set_ones_in || (!set_zeros_in && exact_i && !previous_i);

endmodule
