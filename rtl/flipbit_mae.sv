// flipbit_mae: absolute-error accumulator for one page.
//
// Two subtractors form exact-approx and approx-exact; the sign (MSB) of the
// first selects which one is the absolute difference, and an adder adds it
// to an enabled register. This is the structure of the document's error
// tracking circuit. The mean absolute error of a page is err_sum divided by
// the number of values; the division is avoided by the threshold comparison
// in the control logic (err_sum <= threshold * values).
//
// Interface: clr zeroes the sum (it wins over en); en adds |exact-approx|
// at the clock edge. err_sum is registered and shows the sum of all values
// accepted up to the previous edge. The subtractors are one bit wider than
// the data so that the MSB is a true sign; the accumulator width ACC_W and
// the synchronous clear are this design's choices.
module flipbit_mae
#(
  parameter int unsigned W     = flipbit_pkg::DATA_W,
  parameter int unsigned ACC_W = flipbit_pkg::ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [W-1:0]     exact,
  input  logic [W-1:0]     approx,
  output logic [ACC_W-1:0] err_sum
);
  logic [W:0]       diff_ea, diff_ae;
  logic [W-1:0]     abs_diff;
  logic [ACC_W-1:0] sum_next;

  assign diff_ea  = {1'b0, exact} - {1'b0, approx};
  assign diff_ae  = {1'b0, approx} - {1'b0, exact};
  assign abs_diff = diff_ea[W] ? diff_ae[W-1:0] : diff_ea[W-1:0];
  assign sum_next = err_sum + ACC_W'(abs_diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   err_sum <= '0;
    else if (clr) err_sum <= '0;
    else if (en)  err_sum <= sum_next;
  end

endmodule
