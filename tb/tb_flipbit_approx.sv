// tb_flipbit_approx: checks the 32-bit approximator.
//
// Worked examples: previous=0101, exact=0011 gives 0001 with n=1 and 0100
// with n=2; previous=212, exact=207 gives 208 with n=2. Then random values
// for every width and n against the software algorithm, and two properties
// for all of them: the result has no 1 where previous has a 0, and an exact
// value that needs no 0->1 flip is returned unchanged.
// A second instance built with NMAX=2 is the circuit hard-wired for n=2
// (no run-time choice of n); whenever n=2 it must agree with the
// configurable one.
module tb_flipbit_approx;
  import flipbit_pkg::*;
  import flipbit_ref_pkg::*;

  logic [31:0] previous, exact, approx, approx_n2;
  width_e      width;
  logic [3:0]  nbits;
  int checks = 0, failures = 0;

  flipbit_approx dut (.previous, .exact, .width, .nbits, .approx);
  flipbit_approx #(.NMAX(2)) dut_n2 (.previous, .exact, .width, .nbits,
                                     .approx(approx_n2));

  task automatic expect_eq(logic [31:0] expected, string what);
    #1;
    checks++;
    if (approx !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: prev=%h exact=%h w=%0d n=%0d approx=%h expected=%h",
                 what, previous, exact, width_bits(width), nbits, approx, expected);
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
    int wb;
    #1;
    width = WIDTH_8;
    previous = 32'b0101; exact = 32'b0011;
    nbits = 4'd1; expect_eq(32'b0001, "1-bit example");
    nbits = 4'd2; expect_eq(32'b0100, "2-bit example");
    previous = 32'd212; exact = 32'd207;
    nbits = 4'd2; expect_eq(32'd208, "212/207 example");
    checks++;
    if (approx_n2 !== 32'd208) begin
      failures++;
      $display("FAIL n=2 circuit: 212/207 gives %0d", approx_n2);
    end
    for (int w = 0; w < 3; w++) begin
      width = width_e'(w);
      wb = int'(width_bits(width));
      for (int n = 1; n <= 8; n++) begin
        nbits = 4'(n);
        for (int t = 0; t < 400; t++) begin
          previous = $urandom;
          exact    = $urandom;
          if (t % 4 == 0) exact = exact & previous;       // needs no 0->1 flip
          if (t % 4 == 1) previous = previous | $urandom; // dense previous
          expect_eq(32'(ref_approx(64'(previous), 64'(exact), wb, n)), "random");
          checks++;
          if ((approx & ~previous) != 0) begin
            failures++;
            $display("FAIL 0->1 flip: prev=%h approx=%h", previous, approx);
          end
          if (n == 2) begin
            checks++;
            if (approx_n2 !== approx) begin
              failures++;
              $display("FAIL n=2 circuit: prev=%h exact=%h gives %h, configurable %h",
                       previous, exact, approx_n2, approx);
            end
          end
          if (((exact & ~previous) & ((64'd1 << wb) - 1)) == 0) begin
            checks++;
            if (approx != (exact & 32'((64'd1 << wb) - 1))) begin
              failures++;
              $display("FAIL exact value changed: prev=%h exact=%h approx=%h",
                       previous, exact, approx);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
