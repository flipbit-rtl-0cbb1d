// tb_flash_ctrl: checks the control logic's sequencing and decisions with
// 64-byte pages, connected to the buffers, the FLIPBIT unit and a short-
// latency page array.
//
// Checked: the busy time of load and of each commit path; that a commit
// with no page loaded does nothing; that bus writes to array addresses
// change nothing; that the threshold test is inclusive (a mean error equal
// to the threshold is still approximated, one LSB of threshold less is
// not); the accumulated-error register; and that an array read over the
// bus returns the four bytes in little-endian order.
module tb_flash_ctrl;
  import flipbit_pkg::*;

  localparam int PB = 64, NP = 4, RC = 2, PC = 4, EC = 100;
  localparam int WA_W = $clog2(PB / 4);

  logic              clk = 0, rst_n = 0;
  logic              bus_req = 0, bus_we = 0;
  logic [ADDR_W-1:0] bus_addr = 0;
  logic [3:0]        bus_be = 0;
  logic [31:0]       bus_wdata = 0, bus_rdata;
  logic              bus_ready;
  logic [4:0]        status;
  logic [31:0]       approx_commits, exact_commits, read_count, prog_count, erase_count;
  int checks = 0, failures = 0, polls = 0;

  logic              buf0_we, buf1_we;
  logic [WA_W-1:0]   buf0_waddr, buf0_raddr, buf1_waddr, buf1_raddr;
  logic [3:0]        buf0_wbe, buf1_wbe;
  logic [31:0]       buf0_wdata, buf0_rdata, buf1_wdata, buf1_rdata;
  logic [31:0]       ax_previous, ax_exact, ax_approx;
  width_e            ax_width;
  logic [3:0]        ax_nbits;
  logic              mae_clr, mae_en;
  logic [ACC_W-1:0]  mae_sum;
  logic              fl_op_valid, fl_busy, fl_done;
  flash_op_e         fl_op;
  logic [ADDR_W-1:0] fl_addr;
  logic [7:0]        fl_wdata, fl_rdata;

  flash_ctrl #(.PAGE_BYTES(PB)) dut (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_be, .bus_wdata, .bus_rdata, .bus_ready,
    .buf0_we, .buf0_waddr, .buf0_wbe, .buf0_wdata, .buf0_raddr, .buf0_rdata,
    .buf1_we, .buf1_waddr, .buf1_wbe, .buf1_wdata, .buf1_raddr, .buf1_rdata,
    .ax_previous, .ax_exact, .ax_width, .ax_nbits, .ax_approx,
    .mae_clr, .mae_en, .mae_sum,
    .fl_op_valid, .fl_op, .fl_addr, .fl_wdata, .fl_busy, .fl_done, .fl_rdata,
    .status, .approx_commits, .exact_commits
  );
  page_buffer #(.PAGE_BYTES(PB)) u_buf0 (
    .clk, .we(buf0_we), .waddr(buf0_waddr), .wbe(buf0_wbe), .wdata(buf0_wdata),
    .raddr(buf0_raddr), .rdata(buf0_rdata));
  page_buffer #(.PAGE_BYTES(PB)) u_buf1 (
    .clk, .we(buf1_we), .waddr(buf1_waddr), .wbe(buf1_wbe), .wdata(buf1_wdata),
    .raddr(buf1_raddr), .rdata(buf1_rdata));
  flipbit_approx u_approx (.previous(ax_previous), .exact(ax_exact), .width(ax_width),
                           .nbits(ax_nbits), .approx(ax_approx));
  flipbit_mae u_mae (.clk, .rst_n, .clr(mae_clr), .en(mae_en), .exact(ax_exact),
                     .approx(ax_approx), .err_sum(mae_sum));
  nor_flash_array #(.PAGE_BYTES(PB), .NUM_PAGES(NP), .READ_CYCLES(RC),
                    .PROG_CYCLES(PC), .ERASE_CYCLES(EC)) u_array (
    .clk, .rst_n, .op_valid(fl_op_valid), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata),
    .busy(fl_busy), .done(fl_done), .rdata(fl_rdata), .read_count, .prog_count, .erase_count);

  always #5 clk = ~clk;

  `include "flipbit_bus_tasks.svh"

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fill buffer 0 with one byte value.
  task automatic fill(logic [7:0] v);
    int s;
    for (int w = 0; w < PB / 4; w++) buf_wr(4 * w, {4{v}}, 4'hF, s);
  endtask

  initial begin
    int bc, s;
    logic [31:0] st, d;
    #1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // commit with nothing loaded: nothing happens
    run_cmd(4'h2, 0, bc, st);
    chk(bc == 0 && erase_count == 0 && prog_count == 0, "commit without a loaded page ignored");
    // exact write of page 1 with 0xF0 (region empty after reset)
    run_cmd(4'h1, PB, bc, st);
    chk(bc == PB * (RC + 2), $sformatf("load busy %0d", bc));
    fill(8'hF0);
    run_cmd(4'h2, PB, bc, st);
    chk(bc == EC + 2 + PB * (PC + 3), $sformatf("exact commit busy %0d", bc));
    chk(st[ST_ERASED] && !st[ST_APPROX] && !st[ST_INREGION], "exact commit status");
    chk(erase_count == 1 && prog_count == PB, "one erase, one page of programs");
    // writes to array addresses are ignored
    begin
      logic [31:0] rd;
      bus_xfer(1, 24'(PB), 32'h0, 4'hF, rd, s);
    end
    array_rd(PB + 4, d);
    chk(d == 32'hF0F0_F0F0, $sformatf("array read %h", d));
    // region = page 1, 8-bit values, n = 2
    reg_wr(REG_START, 32'(PB));
    reg_wr(REG_END, 32'(2 * PB - 1));
    reg_wr(REG_TYPE, 32'h0000_0200);
    // new value 0x0F over 0xF0: approx = 0x10 (2-bit rounds up), error 1 per value
    reg_wr(REG_THRESH, 32'd256);           // 1.0
    run_cmd(4'h1, PB, bc, st);
    fill(8'h0F);
    run_cmd(4'h2, PB, bc, st);
    chk(bc == PB + 2 + PB * (PC + 3), $sformatf("approximate commit busy %0d", bc));
    chk(st[ST_APPROX] && !st[ST_ERASED] && st[ST_INREGION], "mean error == threshold approximates");
    reg_rd(REG_ERRSUM, d);
    chk(d == PB, $sformatf("error sum %0d", d));
    array_rd(PB, d);
    chk(d == 32'h1010_1010, $sformatf("approximated page reads %h", d));
    chk(erase_count == 1, "no erase for the approximate commit");
    // 0x0F again over 0x10: approx 0x10 again, error 1 per value; a threshold
    // of 1.0 - 1/256 is now exceeded
    reg_wr(REG_THRESH, 32'd255);
    run_cmd(4'h1, PB, bc, st);
    fill(8'h0F);
    run_cmd(4'h2, PB, bc, st);
    chk(bc == PB + 2 + EC + 2 + PB * (PC + 3), $sformatf("fallback commit busy %0d", bc));
    chk(st[ST_ERASED] && !st[ST_APPROX], "mean error above threshold erases");
    array_rd(PB, d);
    chk(d == 32'h0F0F_0F0F, $sformatf("exact page reads %h", d));
    chk(erase_count == 2, "fallback erased");
    chk(approx_commits == 1 && exact_commits == 2, "commit counters");
    chk(polls > 0, "status polled while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
