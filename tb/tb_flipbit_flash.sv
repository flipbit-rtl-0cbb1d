// tb_flipbit_flash: end-to-end test of the FLIPBIT flash chip.
//
// The testbench acts as the CPU. It fills eight pages with random data
// through exact writes, opens an approximatable region over pages 2..5 and
// then runs random page updates: load the page, store new values into
// buffer 0, commit. The updates mix what the document's workloads produce:
// small changes to the previous contents (a mostly static camera scene),
// values that are often set to zero (ReLU activations), arbitrary new data
// and data that needs no 0->1 flip, with 8, 16 and 32-bit values, n from 1
// to 8 and several thresholds. A software model of the array decides each
// outcome independently (approximate each value with the software
// algorithm, sum the absolute errors, compare the mean with the threshold)
// and the whole page is read back over the bus and compared.
//
// Also checked: the status bits, the accumulated-error register, the
// erase and program counters, and the busy time of every command against
// the cycle counts the control logic is specified to take. Each mechanism
// must occur at least once: approximate commit without erase, threshold
// with and without error, fallback to erase, exact commit outside the region, error-free commit,
// each width, a status poll while busy and a bus access stalled by a
// running command.
module tb_flipbit_flash;
  import flipbit_pkg::*;
  import flipbit_ref_pkg::*;

  localparam int PB = 256, NP = 8, RC = 1, PC = 3, EC = 300;

  logic              clk = 0, rst_n = 0;
  logic              bus_req = 0, bus_we = 0;
  logic [ADDR_W-1:0] bus_addr = 0;
  logic [3:0]        bus_be = 0;
  logic [31:0]       bus_wdata = 0, bus_rdata;
  logic              bus_ready;
  logic [4:0]        status;
  logic [31:0]       read_count, prog_count, erase_count, approx_commits, exact_commits;
  int checks = 0, failures = 0, polls = 0;

  flipbit_flash #(.PAGE_BYTES(PB), .NUM_PAGES(NP), .READ_CYCLES(RC),
                  .PROG_CYCLES(PC), .ERASE_CYCLES(EC)) dut (
    .clk, .rst_n, .bus_req, .bus_we, .bus_addr, .bus_be, .bus_wdata, .bus_rdata,
    .bus_ready, .status, .read_count, .prog_count, .erase_count,
    .approx_commits, .exact_commits
  );

  always #5 clk = ~clk;

  `include "flipbit_bus_tasks.svh"

  logic [7:0] model [NP*PB];
  logic [7:0] newpage [PB];
  int n_approx = 0, n_fallback = 0, n_outside = 0, n_zero_err = 0, n_stall = 0;
  int n_approx_err = 0;
  int n_width [3] = '{0, 0, 0};
  int exp_erases = 0, exp_progs = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Store newpage into buffer 0 with 32-bit bus writes.
  task automatic store_page();
    int s;
    for (int w = 0; w < PB / 4; w++) begin
      buf_wr(4 * w, {newpage[4*w+3], newpage[4*w+2], newpage[4*w+1], newpage[4*w]}, 4'hF, s);
    end
  endtask

  task automatic check_page(int pg);
    logic [31:0] d;
    int bad = 0;
    for (int w = 0; w < PB / 4; w++) begin
      array_rd(pg * PB + 4 * w, d);
      if (d !== {model[pg*PB+4*w+3], model[pg*PB+4*w+2], model[pg*PB+4*w+1], model[pg*PB+4*w]})
        bad++;
    end
    chk(bad == 0, $sformatf("page %0d read back, %0d words differ", pg, bad));
  endtask

  // Expected outcome of a commit of newpage over page pg.
  task automatic commit_and_check(int pg, bit in_region, int wcode, int n, int thresh);
    int wb, nv, vb, bc;
    longint unsigned errsum, e, p, a;
    logic [7:0] approx_page [PB];
    bit ok;
    logic [31:0] st, es;
    wb = 8 << wcode;
    vb = wb / 8;
    nv = PB / vb;
    errsum = 0;
    for (int v = 0; v < nv; v++) begin
      e = 0; p = 0;
      for (int k = 0; k < vb; k++) begin
        e |= longint'(newpage[v*vb+k]) << (8*k);
        p |= longint'(model[pg*PB + v*vb+k]) << (8*k);
      end
      a = ref_approx(p, e, wb, n);
      errsum += (e > a) ? e - a : a - e;
      for (int k = 0; k < vb; k++) approx_page[v*vb+k] = 8'(a >> (8*k));
    end
    ok = in_region && ((errsum << THRESH_FRAC) <= longint'(thresh) * nv);
    run_cmd(4'h2, pg * PB, bc, st);
    if (in_region) begin
      reg_rd(12'h018, es);
      chk(es == 32'(errsum), $sformatf("error sum %0d expected %0d", es, errsum));
    end
    chk(st[ST_INREGION] == in_region && st[ST_APPROX] == ok && st[ST_ERASED] == !ok,
        $sformatf("status %b (region %0b ok %0b)", st, in_region, ok));
    chk(bc == (in_region ? nv + 2 : 0) + (ok ? 0 : EC + 2) + PB * (PC + 3),
        $sformatf("commit busy %0d cycles", bc));
    exp_progs += PB;
    if (ok) begin
      for (int b = 0; b < PB; b++) model[pg*PB+b] = approx_page[b];
      n_approx++;
      if (errsum == 0) n_zero_err++;
      else n_approx_err++;
    end else begin
      for (int b = 0; b < PB; b++) model[pg*PB+b] = newpage[b];
      exp_erases++;
      if (in_region) n_fallback++; else n_outside++;
    end
    if (in_region) n_width[wcode]++;
    check_page(pg);
    chk(erase_count == exp_erases && prog_count == exp_progs,
        $sformatf("counters erase %0d/%0d prog %0d/%0d", erase_count, exp_erases,
                  prog_count, exp_progs));
  endtask

  task automatic load(int pg);
    int bc;
    logic [31:0] st;
    run_cmd(4'h1, pg * PB, bc, st);
    chk(bc == PB * (RC + 2), $sformatf("load busy %0d cycles", bc));
    chk(st[ST_OPEN] && !st[ST_BUSY], "page open after load");
  endtask

  initial begin
    int pg, wcode, n, thresh, kind, s, bc;
    logic [31:0] st;
    bit inr;
    #1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Random initial contents, written exactly (the region is empty).
    for (int p = 0; p < NP; p++) begin
      load(p);
      for (int b = 0; b < PB; b++) newpage[b] = 8'($urandom);
      store_page();
      commit_and_check(p, 0, 0, 2, 0);
    end
    reg_wr(REG_START, 32'(2 * PB));
    reg_wr(REG_END, 32'(6 * PB - 1));
    for (int t = 0; t < 60; t++) begin
      pg = $urandom_range(0, NP - 1);
      inr = (pg >= 2 && pg <= 5);
      wcode = t % 3;
      n = (t % 5 == 0) ? 1 : (t % 7 == 0) ? 8 : (t % 4 == 0) ? 4 : 2;
      kind = $urandom_range(0, 3);
      thresh = (kind == 2) ? 32'd256 : (t % 2) ? 32'd1280 : 32'd26;
      reg_wr(REG_TYPE, 32'((n << 8) | wcode));
      reg_wr(REG_THRESH, 32'(thresh));
      load(pg);
      for (int b = 0; b < PB; b++) begin
        logic [7:0] old;
        old = model[pg*PB + b];
        case (kind)
          // small change in the low bits of each value
          0: newpage[b] = (b % (1 << wcode) == 0) ? old ^ 8'($urandom_range(0, 3)) : old;
          1: newpage[b] = ($urandom_range(0, 3) != 0) ? 8'h00 : 8'($urandom); // ReLU-like
          2: newpage[b] = 8'($urandom);                              // new data
          default: newpage[b] = old & 8'($urandom);                  // no 0->1 flip
        endcase
      end
      store_page();
      commit_and_check(pg, inr, wcode, n, thresh);
    end
    // A buffer write issued during a running command waits for it.
    load(2);
    for (int b = 0; b < PB; b++) newpage[b] = model[2*PB + b];
    reg_wr(REG_TYPE, 32'h0000_0200);
    begin
      logic [31:0] rd;
      bus_xfer(1, 24'h80_0010, {4'h1, 4'h0, 24'(3 * PB)}, 4'hF, rd, s);
      buf_wr(0, 32'h0, 4'h1, s);
      chk(s > 0, "buffer write stalls while a load runs");
      if (s > 0) n_stall++;
      while (status[0]) @(negedge clk);
    end
    // Mechanism coverage.
    chk(n_approx > 0, "approximate commit happened");
    chk(n_fallback > 0, "threshold fallback happened");
    chk(n_outside > 0, "commit outside the region happened");
    chk(n_zero_err > 0, "error-free commit happened");
    chk(n_approx_err > 0, "approximate commit with nonzero error happened");
    chk(n_width[0] > 0 && n_width[1] > 0 && n_width[2] > 0, "all widths used");
    chk(polls > 0, "status polled while busy");
    chk(n_stall > 0, "bus stall happened");
    chk(approx_commits == n_approx && exact_commits == n_fallback + n_outside,
        "commit counters");
    $display("approx=%0d (with error %0d) fallback=%0d outside=%0d zero_err=%0d widths=%0d/%0d/%0d erases=%0d",
             n_approx, n_approx_err, n_fallback, n_outside, n_zero_err, n_width[0], n_width[1],
             n_width[2], erase_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
