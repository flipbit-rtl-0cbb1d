// tb_flipbit_tt_logic: checks the truth table logic.
//
// 1. The n=2 table row by row (exact[i-1], previous[i-1]), with random bits
//    below the window, which n=2 must ignore.
// 2. Random windows for every n from 1 to 8 against the brute-force
//    reference; n=1 must never round up.
module tb_flipbit_tt_logic;
  import flipbit_ref_pkg::*;

  logic [7:0] exact_win, previous_win;
  logic [3:0] nbits;
  logic       up;
  int checks = 0, failures = 0;

  flipbit_tt_logic #(.NMAX(8)) dut (.exact_win, .previous_win, .nbits, .up);

  task automatic check(bit expected, string what);
    #1;
    checks++;
    if (up !== expected) begin
      failures++;
      $display("FAIL %s: exact_win=%b previous_win=%b n=%0d up=%b expected=%b",
               what, exact_win, previous_win, nbits, up, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    // Table for n = 2: rows with previous[i]=1, exact[i]=0.
    //   exact[i-1] previous[i-1] up
    //       0          0         0
    //       0          1         0
    //       1          0         1
    //       1          1         0
    nbits = 4'd2;
    for (int r = 0; r < 4; r++) begin
      for (int t = 0; t < 16; t++) begin
        exact_win    = {1'b0, r[1], 6'($urandom)};
        previous_win = {1'b1, r[0], 6'($urandom)};
        check((r == 2), "n=2 table row");
      end
    end
    // All n, random windows, against the reference.
    for (int n = 1; n <= 8; n++) begin
      nbits = 4'(n);
      for (int t = 0; t < 3000; t++) begin
        exact_win    = 8'($urandom);
        previous_win = 8'($urandom);
        check(ref_up(int'(exact_win), int'(previous_win), n), "random");
        if (n == 1) begin
          checks++;
          if (up) begin
            failures++;
            $display("FAIL n=1 rounded up");
          end
        end
      end
    end
    // n = 0 behaves as n = 1.
    nbits = 4'd0;
    exact_win = 8'b0111_1111;
    previous_win = 8'b1000_0000;
    check(1'b0, "n=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
