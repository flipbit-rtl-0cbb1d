// Bus tasks shared by the chip-level testbenches. They play the CPU: the
// including module declares clk, the bus signals, status, PB (page bytes),
// and the counters checks and failures.

task automatic chk(bit ok, string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures < 20) $display("FAIL %s", what);
  end
endtask

// One bus transfer. Drives at the falling edge, completes at the rising
// edge where bus_ready is high; stall_cycles counts the cycles waited.
task automatic bus_xfer(bit we, logic [23:0] a, logic [31:0] d, logic [3:0] be,
                        output logic [31:0] rd, output int stall_cycles);
  @(negedge clk);
  bus_req = 1; bus_we = we; bus_addr = a; bus_wdata = d; bus_be = be;
  #1;
  stall_cycles = 0;
  while (!bus_ready) begin
    @(negedge clk);
    #1;
    stall_cycles++;
  end
  rd = bus_rdata;
  @(posedge clk);
  #1;
  bus_req = 0; bus_we = 0;
endtask

task automatic reg_wr(logic [11:0] off, logic [31:0] d);
  logic [31:0] rd;
  int s;
  bus_xfer(1, 24'h80_0000 | 24'(off), d, 4'hF, rd, s);
endtask

task automatic reg_rd(logic [11:0] off, output logic [31:0] d);
  int s;
  bus_xfer(0, 24'h80_0000 | 24'(off), 32'h0, 4'hF, d, s);
endtask

task automatic buf_wr(int byte_off, logic [31:0] d, logic [3:0] be, output int stall);
  logic [31:0] rd;
  bus_xfer(1, 24'h80_1000 + 24'(byte_off), d, be, rd, stall);
endtask

task automatic array_rd(int a, output logic [31:0] d);
  int s;
  bus_xfer(0, 24'(a), 32'h0, 4'hF, d, s);
endtask

// Issue a command and wait for it to end; busy_cycles is the number of
// cycles the status busy bit stays high after the command is accepted.
// While busy the status register is polled over the bus once.
task automatic run_cmd(logic [3:0] op, int page_addr, output int busy_cycles,
                       output logic [31:0] st);
  logic [31:0] rd;
  int s;
  bus_xfer(1, 24'h80_0010, {op, 4'h0, 24'(page_addr)}, 4'hF, rd, s);
  busy_cycles = 0;
  @(negedge clk);
  if (status[0]) begin
    // poll once over the bus (register reads complete while busy)
    reg_rd(12'h014, st);
    chk(st[0] == 1'b1, "status read while busy shows busy");
    polls++;
    busy_cycles = 2;
    @(negedge clk);
  end
  while (status[0]) begin
    busy_cycles++;
    @(negedge clk);
  end
  reg_rd(12'h014, st);
endtask
