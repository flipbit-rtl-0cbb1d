// tb_flipbit_flash_full: the FLIPBIT flash chip at its default size and
// timing (256-byte pages, 8192 pages, 33 MHz flash clock with 1-cycle reads,
// 990-cycle byte programs and 336,634-cycle page erases).
//
// One page goes through the complete life the chip is built for:
//   1. an exact write of 8-bit sensor-like data (erase + program);
//   2. a 1 MB approximatable region is opened around it, 8-bit values,
//      n = 2, threshold 1.0;
//   3. an update that changes each value by a small amount is approximated
//      in place: no erase, mean error within the threshold;
//   4. an update of unrelated data exceeds the threshold and falls back to
//      erase + exact program.
// Every step is checked against the software model of the approximation,
// the page is read back over the bus, and the busy time of each command is
// compared with the cycles the control logic is specified to take at these
// latencies. About 1.5 million clock cycles in all.
module tb_flipbit_flash_full;
  import flipbit_pkg::*;
  import flipbit_ref_pkg::*;

  localparam int PB = 256, RC = 1, PC = 990, EC = 336634;
  localparam int PAGE = 'h04_0100;

  logic              clk = 0, rst_n = 0;
  logic              bus_req = 0, bus_we = 0;
  logic [ADDR_W-1:0] bus_addr = 0;
  logic [3:0]        bus_be = 0;
  logic [31:0]       bus_wdata = 0, bus_rdata;
  logic              bus_ready;
  logic [4:0]        status;
  logic [31:0]       read_count, prog_count, erase_count, approx_commits, exact_commits;
  int checks = 0, failures = 0, polls = 0;

  flipbit_flash dut (
    .clk, .rst_n, .bus_req, .bus_we, .bus_addr, .bus_be, .bus_wdata, .bus_rdata,
    .bus_ready, .status, .read_count, .prog_count, .erase_count,
    .approx_commits, .exact_commits
  );

  // 33 MHz: 30 ns period
  always #15 clk = ~clk;

  `include "flipbit_bus_tasks.svh"

  logic [7:0] model [PB];
  logic [7:0] newpage [PB];

  initial begin
    #60_000_000;                         // 2 million cycles
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store_page();
    int s;
    for (int w = 0; w < PB / 4; w++)
      buf_wr(4 * w, {newpage[4*w+3], newpage[4*w+2], newpage[4*w+1], newpage[4*w]}, 4'hF, s);
  endtask

  task automatic check_page(string what);
    logic [31:0] d;
    int bad = 0;
    for (int w = 0; w < PB / 4; w++) begin
      array_rd(PAGE + 4 * w, d);
      if (d !== {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]}) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d words differ", what, bad));
  endtask

  task automatic load();
    int bc;
    logic [31:0] st;
    run_cmd(4'h1, PAGE, bc, st);
    chk(bc == PB * (RC + 2), $sformatf("load busy %0d cycles", bc));
  endtask

  // Commit newpage; in_region says whether the region covers the page.
  task automatic commit(bit in_region, int thresh, output bit ok);
    longint unsigned errsum, a;
    logic [7:0] ap [PB];
    int bc;
    logic [31:0] st, es;
    errsum = 0;
    for (int b = 0; b < PB; b++) begin
      a = ref_approx(model[b], newpage[b], 8, 2);
      ap[b] = 8'(a);
      errsum += (newpage[b] > ap[b]) ? newpage[b] - ap[b] : ap[b] - newpage[b];
    end
    ok = in_region && ((errsum << THRESH_FRAC) <= longint'(thresh) * PB);
    run_cmd(4'h2, PAGE, bc, st);
    chk(bc == (in_region ? PB + 2 : 0) + (ok ? 0 : EC + 2) + PB * (PC + 3),
        $sformatf("commit busy %0d cycles", bc));
    chk(st[ST_APPROX] == ok && st[ST_ERASED] == !ok, $sformatf("status %b", st));
    if (in_region) begin
      reg_rd(REG_ERRSUM, es);
      chk(es == 32'(errsum), $sformatf("error sum %0d expected %0d", es, errsum));
    end
    for (int b = 0; b < PB; b++) model[b] = ok ? ap[b] : newpage[b];
  endtask

  initial begin
    bit ok;
    #1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. exact write of a smooth signal
    load();
    for (int b = 0; b < PB; b++) newpage[b] = 8'(128 + ((b % 64) < 32 ? 2 * (b % 32) : 62 - 2 * (b % 32)));
    store_page();
    commit(0, 0, ok);
    chk(!ok && erase_count == 1, "initial write is exact with one erase");
    check_page("initial page");
    // 2. approximatable region of 1 MB at 0x040000, 8-bit values, n = 2
    reg_wr(REG_START, 32'h04_0000);
    reg_wr(REG_END, 32'h13_FFFF);
    reg_wr(REG_TYPE, 32'h0000_0200);
    reg_wr(REG_THRESH, 32'd256);
    // 3. small changes: approximated in place
    load();
    for (int b = 0; b < PB; b++) newpage[b] = model[b] + 8'($urandom_range(0, 2)) - 8'd1;
    store_page();
    commit(1, 256, ok);
    chk(ok && erase_count == 1, "small update approximated without erase");
    check_page("approximated page");
    // 4. unrelated data: falls back to an exact write
    load();
    for (int b = 0; b < PB; b++) newpage[b] = 8'($urandom);
    store_page();
    commit(1, 256, ok);
    chk(!ok && erase_count == 2, "large update erased");
    check_page("rewritten page");
    chk(approx_commits == 1 && exact_commits == 2, "commit counters");
    chk(prog_count == 3 * PB, "one program per byte per commit");
    chk(polls > 0, "status polled while busy");
    $display("cycles simulated: %0d", $time / 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
