// tb_flipbit_bit_cell: checks one bit of the approximator against one loop
// iteration of the n-bit algorithm, written out as nested if statements,
// for random windows, flags and n.
module tb_flipbit_bit_cell;
  import flipbit_ref_pkg::*;

  logic [7:0] exact_win, previous_win;
  logic [3:0] nbits;
  logic       set_ones_in, set_zeros_in;
  logic       approx, set_ones_out, set_zeros_out;
  int checks = 0, failures = 0;

  flipbit_bit_cell #(.NMAX(8)) dut (
    .exact_win, .previous_win, .nbits, .set_ones_in, .set_zeros_in,
    .approx, .set_ones_out, .set_zeros_out
  );

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_a, e_so, e_sz;
    #1;
    for (int t = 0; t < 20000; t++) begin
      exact_win    = 8'($urandom);
      previous_win = 8'($urandom);
      nbits        = 4'($urandom_range(1, 8));
      set_ones_in  = 1'($urandom);
      set_zeros_in = 1'($urandom);
      // one iteration of the algorithm
      e_a = 0;
      e_so = set_ones_in;
      e_sz = set_zeros_in;
      if (!set_zeros_in) begin
        if (previous_win[7]) begin
          if (exact_win[7] || set_ones_in) e_a = 1;
          else if (ref_up(int'(exact_win), int'(previous_win), int'(nbits))) begin
            e_a = 1;
            e_sz = 1;
          end
        end else if (exact_win[7]) begin
          e_so = 1;
        end
      end
      #1;
      checks++;
      if ({approx, set_ones_out, set_zeros_out} !== {e_a, e_so, e_sz}) begin
        failures++;
        if (failures < 10)
          $display("FAIL e=%b p=%b n=%0d so=%b sz=%b: got %b%b%b expected %b%b%b",
                   exact_win, previous_win, nbits, set_ones_in, set_zeros_in,
                   approx, set_ones_out, set_zeros_out, e_a, e_so, e_sz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
