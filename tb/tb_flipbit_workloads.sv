// tb_flipbit_workloads: the two kinds of application FLIPBIT is meant for,
// run on the chip with short array latencies (16 pages of 256 bytes).
//
// Sense and send, video capture: a 64x32 8-bit grey frame (8 pages) of a
// mostly static scene, sensor noise of +-1 and a small bright object that
// moves across it, is stored into the same flash frame buffer 12 times.
// Compute and send, DNN activations: a 2 kB layer output of 8-bit ReLU
// activations (about 40% zero), recomputed for each new input, is stored
// into the same buffer 12 times; neighbouring inputs move each neuron's
// pre-activation by up to +-8. Each workload runs at a low and a high
// threshold (mean error 1.0 and 10.0), after once with the region closed (every page written
// exactly, the baseline).
//
// For each page write the testbench predicts approximate-or-erase from the
// software model and checks the chip agrees; it reads every stored page
// back; it checks that every approximated page's mean absolute error is
// within the threshold. It reports erases, the PSNR of the stored frames
// and the flash write energy from the per-operation energies (545 nJ per
// byte program, 196 uJ per page erase), and checks that FLIPBIT saves
// erases on both workloads, more at the higher threshold, and that video
// stored at threshold 1.0 stays above 40 dB PSNR. The frame
// size, noise and activation statistics are this testbench's choices.
module tb_flipbit_workloads;
  import flipbit_pkg::*;
  import flipbit_ref_pkg::*;

  localparam int PB = 256, NP = 16, RC = 1, PC = 3, EC = 300;
  localparam int W = 64, H = 32, FRAME = W * H, FPAGES = FRAME / PB;
  localparam int ROUNDS = 12;
  localparam int BASE = 4 * PB;          // frame buffer at page 4

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

  logic [7:0] model [FRAME];             // what the flash holds
  logic [7:0] data  [FRAME];             // what the application writes
  logic [7:0] bg    [FRAME];
  int         pre   [FRAME];             // typical pre-activations
  int n_mae_viol = 0;

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write data[] to the frame buffer page by page; return erases and the
  // squared error of what ends up stored.
  task automatic write_frame(bit in_region, int thresh, output int erases,
                             output longint sq_err);
    int bc, s;
    logic [31:0] st, d;
    longint unsigned errsum;
    logic [7:0] ap [PB];
    bit ok;
    erases = 0;
    sq_err = 0;
    for (int pg = 0; pg < FPAGES; pg++) begin
      run_cmd(4'h1, BASE + pg * PB, bc, st);
      for (int w = 0; w < PB / 4; w++)
        buf_wr(4 * w, {data[pg*PB+4*w+3], data[pg*PB+4*w+2], data[pg*PB+4*w+1],
                       data[pg*PB+4*w]}, 4'hF, s);
      errsum = 0;
      for (int b = 0; b < PB; b++) begin
        ap[b] = 8'(ref_approx(model[pg*PB+b], data[pg*PB+b], 8, 2));
        begin
          int d;
          d = int'(data[pg*PB+b]) - int'(ap[b]);
          if (d < 0) d = -d;
          errsum += longint'(d);
        end
      end
      ok = in_region && ((errsum << THRESH_FRAC) <= longint'(thresh) * PB);
      run_cmd(4'h2, BASE + pg * PB, bc, st);
      chk(st[ST_APPROX] == ok && st[ST_ERASED] == !ok,
          $sformatf("page %0d decision %b expected approx %0b", pg, st, ok));
      if (!ok) erases++;
      if (ok && (errsum << THRESH_FRAC) > longint'(thresh) * PB) n_mae_viol++;
      for (int b = 0; b < PB; b++) begin
        int e;
        model[pg*PB+b] = ok ? ap[b] : data[pg*PB+b];
        e = int'(model[pg*PB+b]) - int'(data[pg*PB+b]);
        sq_err += e * e;
      end
      for (int w = 0; w < PB / 4; w++) begin
        array_rd(BASE + pg * PB + 4 * w, d);
        chk(d == {model[pg*PB+4*w+3], model[pg*PB+4*w+2], model[pg*PB+4*w+1],
                  model[pg*PB+4*w]}, "stored page read back");
      end
    end
  endtask

  task automatic make_video_frame(int t);
    int ox, oy;
    ox = 4 + 3 * t;
    oy = 10 + (t % 4);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = int'(bg[y*W+x]) + $urandom_range(0, 2) - 1;
        if (x >= ox && x < ox + 6 && y >= oy && y < oy + 6) v = 230;
        data[y*W+x] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
  endtask

  // Layer output for the next input: each neuron's pre-activation is its
  // typical value plus an input-dependent change of up to +-8, then ReLU.
  task automatic make_activations();
    for (int i = 0; i < FRAME; i++) begin
      int z;
      z = pre[i] + $urandom_range(0, 16) - 8;
      data[i] = 8'((z < 0) ? 0 : z);
    end
  endtask

  // Runs one workload at one threshold (thresh < 0: region closed).
  task automatic run_workload(bit video, int thresh, output int erases, output real psnr);
    int e;
    longint sq, sq_total;
    real mse;
    if (thresh >= 0) begin
      reg_wr(REG_START, 32'(BASE));
      reg_wr(REG_END, 32'(BASE + FRAME - 1));
    end else begin
      reg_wr(REG_START, 32'hFF_FFFF);
      reg_wr(REG_END, 32'h0);
    end
    reg_wr(REG_TYPE, 32'h0000_0200);
    reg_wr(REG_THRESH, 32'((thresh < 0) ? 0 : thresh));
    erases = 0;
    sq_total = 0;
    for (int t = 0; t < ROUNDS; t++) begin
      if (video) make_video_frame(t); else make_activations();
      write_frame(thresh >= 0, (thresh < 0) ? 0 : thresh, e, sq);
      erases += e;
      sq_total += sq;
    end
    mse = real'(sq_total) / real'(ROUNDS * FRAME);
    psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
  endtask

  function automatic real energy_uj(int erases, int writes);
    return real'(erases) * 196.0 + real'(writes * PB) * 0.545;
  endfunction

  initial begin
    int e_lo, e_hi, e_base, writes, s;
    real p_lo, p_hi, p_base;
    #1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // static background: smooth gradient plus texture
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        bg[y*W+x] = 8'(60 + 2 * x + y + ((x * 7 + y * 13) % 9));
    for (int i = 0; i < FRAME; i++) pre[i] = $urandom_range(0, 100) - 40;
    writes = ROUNDS * FPAGES;
    for (int k = 0; k < 2; k++) begin
      // start each workload from an exactly written first frame
      for (int i = 0; i < FRAME; i++) data[i] = (k == 0) ? bg[i] : 8'h00;
      begin
        longint sq;
        int e;
        reg_wr(REG_START, 32'hFF_FFFF);
        reg_wr(REG_END, 32'h0);
        write_frame(0, 0, e, sq);
      end
      run_workload(k == 0, -1, e_base, p_base);
      run_workload(k == 0, 256, e_lo, p_lo);      // threshold 1.0
      run_workload(k == 0, 2560, e_hi, p_hi);     // threshold 10.0
      $display("%s: erases baseline %0d, thr 1 %0d (PSNR %0.1f dB), thr 10 %0d (PSNR %0.1f dB)",
               (k == 0) ? "video" : "activations", e_base, e_lo, p_lo, e_hi, p_hi);
      $display("  write energy uJ: baseline %0.0f, thr 1 %0.0f, thr 10 %0.0f",
               energy_uj(e_base, writes), energy_uj(e_lo, writes), energy_uj(e_hi, writes));
      chk(e_base == writes, "baseline erases every page write");
      chk(e_hi < e_base, "FLIPBIT saves erases at threshold 10");
      chk(e_hi <= e_lo, "higher threshold erases no more");
      chk(p_base == 99.0, "baseline stores exact data");
      if (k == 0) chk(p_lo > 40.0, $sformatf("video PSNR %0.1f dB at threshold 1 above 40 dB", p_lo));
    end
    chk(n_mae_viol == 0, "no approximated page above its threshold");
    chk(approx_commits > 0 && exact_commits > 0, "both commit kinds occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
