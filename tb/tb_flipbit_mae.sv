// tb_flipbit_mae: checks the absolute-error accumulator: random exact and
// approximate values, random enable, and clears; the sum is compared each
// cycle with a sum kept by the testbench.
module tb_flipbit_mae;
  logic        clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [31:0] exact = 0, approx = 0;
  logic [47:0] err_sum;
  longint unsigned model;
  int checks = 0, failures = 0;

  flipbit_mae dut (.clk, .rst_n, .clr, .en, .exact, .approx, .err_sum);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (err_sum !== 48'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d sum=%0d expected=%0d", t, err_sum, model);
      end
      exact  = (t % 3 == 0) ? $urandom : 32'($urandom_range(0, 255));
      approx = (t % 5 == 0) ? $urandom : 32'($urandom_range(0, 255));
      en     = ($urandom_range(0, 3) != 0);
      clr    = ($urandom_range(0, 99) == 0);
      if (clr) model = 0;
      else if (en) model += (exact > approx) ? longint'(exact - approx) : longint'(approx - exact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
