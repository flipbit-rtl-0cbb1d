// tb_nor_flash_array: checks the page array model with short latencies:
// erase sets a page to 0xFF and leaves its neighbours alone, program only
// clears bits (old AND new), read returns the byte, each operation takes
// its latency in cycles, and the operation counters count.
module tb_nor_flash_array;
  import flipbit_pkg::*;

  localparam int PB = 16, NP = 4, RC = 2, PC = 5, EC = 20;

  logic              clk = 0, rst_n = 0, op_valid = 0;
  flash_op_e         op = FOP_READ;
  logic [ADDR_W-1:0] addr = 0;
  logic [7:0]        wdata = 0, rdata;
  logic              busy, done;
  logic [31:0]       read_count, prog_count, erase_count;
  logic [7:0]        model [PB*NP];
  int checks = 0, failures = 0;

  nor_flash_array #(.PAGE_BYTES(PB), .NUM_PAGES(NP), .READ_CYCLES(RC),
                    .PROG_CYCLES(PC), .ERASE_CYCLES(EC)) dut (
    .clk, .rst_n, .op_valid, .op, .addr, .wdata, .busy, .done, .rdata,
    .read_count, .prog_count, .erase_count
  );

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Issue one operation, return its latency in cycles (issue to done).
  task automatic do_op(flash_op_e o, int a, logic [7:0] d, output int cycles);
    @(negedge clk);
    op = o; addr = ADDR_W'(a); wdata = d; op_valid = 1;
    @(negedge clk);
    op_valid = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
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
    int c;
    logic [7:0] d;
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      do_op(FOP_ERASE, p * PB + 3, 8'h00, c);
      chk(c == EC + 1, $sformatf("erase latency %0d", c));
      for (int b = 0; b < PB; b++) model[p*PB + b] = 8'hFF;
    end
    chk(erase_count == NP, "erase count");
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom_range(0, PB*NP - 1);
      if ($urandom_range(0, 2) == 0) begin
        d = 8'($urandom);
        do_op(FOP_PROG, a, d, c);
        chk(c == PC + 1, "program latency");
        model[a] &= d;
      end else begin
        do_op(FOP_READ, a, 8'h00, c);
        chk(c == RC + 1, "read latency");
        chk(rdata == model[a], $sformatf("read %0d: %h expected %h", a, rdata, model[a]));
      end
    end
    // erase page 1 only
    do_op(FOP_ERASE, PB, 8'h00, c);
    for (int b = 0; b < PB; b++) model[PB + b] = 8'hFF;
    for (int a = 0; a < PB*NP; a++) begin
      do_op(FOP_READ, a, 8'h00, c);
      chk(rdata == model[a], $sformatf("after erase, byte %0d: %h expected %h", a, rdata, model[a]));
    end
    chk(erase_count == NP + 1, "erase count after second erase");
    chk(prog_count + read_count == 200 + PB*NP, "operation counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
