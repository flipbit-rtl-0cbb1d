// flipbit_approx: the FLIPBIT approximator for one 8, 16 or 32-bit value.
//
// Given the value already in flash (previous) and the value to be written
// (exact), it returns a value close to exact that has a 1 only where
// previous has a 1, so writing it needs program operations (1->0) only and
// no page erase. DATA_W copies of flipbit_bit_cell are chained from bit
// DATA_W-1 down to bit 0; the chain starts with set_ones = set_zeros = 0 and
// each cell sees NMAX bits of both inputs starting at its own bit, zero
// padded below bit 0.
//
// Narrow variables: the inputs are masked to the selected width before they
// enter the chain. The cells above the width then see zeros, produce 0 and
// leave both flags clear, so only the low 8 or 16 cells do any work, which
// is what using "only the lower blocks" amounts to.
//
// Interface: combinational, one value per use. width selects 8/16/32 bits,
// nbits selects n (1..8) of the n-bit algorithm. approx is zero above the
// selected width.
module flipbit_approx
  import flipbit_pkg::width_e, flipbit_pkg::width_bits;
#(
  parameter int unsigned W    = flipbit_pkg::DATA_W,
  parameter int unsigned NMAX = flipbit_pkg::NMAX
) (
  input  logic [W-1:0] previous,
  input  logic [W-1:0] exact,
  input  width_e       width,
  input  logic [3:0]   nbits,
  output logic [W-1:0] approx
);
  logic [W-1:0] width_mask;
  logic [W-1:0] prev_m, exact_m;
  // Values padded with NMAX-1 zeros below bit 0.
  logic [W+NMAX-2:0] prev_pad, exact_pad;
  // Flag chain: index i+1 feeds cell i; index W is the chain input.
  logic [W:0] set_ones, set_zeros;

  always_comb begin
    width_mask = '0;
    for (int k = 0; k < int'(W); k++) begin
      if (k < int'(width_bits(width))) width_mask[k] = 1'b1;
    end
  end

  assign prev_m    = previous & width_mask;
  assign exact_m   = exact & width_mask;
  assign prev_pad  = {prev_m, {(NMAX-1){1'b0}}};
  assign exact_pad = {exact_m, {(NMAX-1){1'b0}}};

  assign set_ones[W]  = 1'b0;
  assign set_zeros[W] = 1'b0;

  for (genvar i = W - 1; i >= 0; i--) begin : g_cell
    flipbit_bit_cell #(.NMAX(NMAX)) u_cell (
      .exact_win    (exact_pad[i + NMAX - 1 -: NMAX]),
      .previous_win (prev_pad[i + NMAX - 1 -: NMAX]),
      .nbits        (nbits),
      .set_ones_in  (set_ones[i+1]),
      .set_zeros_in (set_zeros[i+1]),
      .approx       (approx[i]),
      .set_ones_out (set_ones[i]),
      .set_zeros_out(set_zeros[i])
    );
  end

endmodule
