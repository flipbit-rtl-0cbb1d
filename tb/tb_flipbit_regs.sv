// tb_flipbit_regs: checks the FLIPBIT registers: reset values (empty
// region, 8-bit values, n=2, threshold 0), write and read back, clamping of
// n and of the width code, and the inclusive region check at its edges.
module tb_flipbit_regs;
  import flipbit_pkg::*;

  logic              clk = 0, rst_n = 0, wr_en = 0;
  logic [11:0]       addr = 0;
  logic [31:0]       wdata = 0, rdata;
  flipbit_cfg_t      cfg;
  logic [ADDR_W-1:0] check_addr = 0;
  logic              in_region;
  int checks = 0, failures = 0;

  flipbit_regs dut (.clk, .rst_n, .wr_en, .addr, .wdata, .rdata, .cfg, .check_addr, .in_region);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    addr = a; wdata = d; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  // Read a register: the read port is combinational.
  task automatic rd_chk(logic [11:0] a, logic [31:0] expected, string what);
    addr = a;
    #1;
    chk(rdata == expected, $sformatf("%s: read %h expected %h", what, rdata, expected));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_chk(REG_START, 32'h00FF_FFFF, "reset START");
    rd_chk(REG_END, 32'h0, "reset END");
    rd_chk(REG_TYPE, 32'h0000_0200, "reset TYPE (8-bit, n=2)");
    rd_chk(REG_THRESH, 32'h0, "reset THRESH");
    check_addr = 24'h04_0000; #1;
    chk(!in_region, "empty region after reset");
    wr(REG_START, 32'h0004_0000);
    wr(REG_END,   32'h0013_FFFF);
    wr(REG_TYPE,  32'h0000_0302);
    wr(REG_THRESH, 32'd1280);
    rd_chk(REG_START, 32'h0004_0000, "START");
    rd_chk(REG_END, 32'h0013_FFFF, "END");
    rd_chk(REG_TYPE, 32'h0000_0302, "TYPE");
    chk(cfg.width == WIDTH_32 && cfg.nbits == 4'd3, "cfg fields");
    rd_chk(REG_THRESH, 32'd1280, "THRESH");
    check_addr = 24'h03_FFFF; #1; chk(!in_region, "below start");
    check_addr = 24'h04_0000; #1; chk(in_region, "at start");
    check_addr = 24'h13_FFFF; #1; chk(in_region, "at end");
    check_addr = 24'h14_0000; #1; chk(!in_region, "past end");
    wr(REG_TYPE, 32'h0000_0F03);
    chk(cfg.width == WIDTH_32 && cfg.nbits == 4'd8, "clamp n=15 and width 3");
    wr(REG_TYPE, 32'h0000_0001);
    chk(cfg.width == WIDTH_16 && cfg.nbits == 4'd1, "clamp n=0");
    wr(REG_CMD, 32'hFFFF_FFFF);
    rd_chk(REG_THRESH, 32'd1280, "CMD offset leaves THRESH alone");
    rd_chk(REG_START, 32'h0004_0000, "CMD offset leaves START alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
