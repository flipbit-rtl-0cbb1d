// tb_page_buffer: checks a write buffer against an array kept by the
// testbench: random writes with byte enables and random reads, with the
// read data expected one cycle after the address.
module tb_page_buffer;
  logic        clk = 0, we = 0;
  logic [5:0]  waddr = 0, raddr = 0, raddr_q;
  logic [3:0]  wbe = 0;
  logic [31:0] wdata = 0, rdata, expected_q;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  bit started = 0;

  page_buffer #(.PAGE_BYTES(256)) dut (.clk, .we, .waddr, .wbe, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    // fill every word so that all reads are defined
    for (int w = 0; w < 64; w++) begin
      @(negedge clk);
      we = 1; waddr = 6'(w); wbe = 4'hF; wdata = $urandom; model[w] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (started) begin
        checks++;
        if (rdata !== expected_q) begin
          failures++;
          if (failures < 10) $display("FAIL read word %0d: %h expected %h", raddr_q, rdata, expected_q);
        end
      end
      raddr = 6'($urandom);
      // the read returns the word as it was before this cycle's write
      expected_q = model[raddr];
      raddr_q = raddr;
      started = 1;
      we = 1'($urandom);
      waddr = 6'($urandom);
      wbe = 4'($urandom);
      wdata = $urandom;
      if (we)
        for (int b = 0; b < 4; b++) if (wbe[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
