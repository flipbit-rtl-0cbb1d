// flipbit_flash: a NOR flash chip with FLIPBIT approximate page writes.
//
// Turning a flash bit from 1 to 0 is a cheap byte program; turning it from
// 0 to 1 needs an erase of the whole page, which costs hundreds of times
// more energy and time and wears the cells out. For error-tolerant data the
// chip therefore writes, instead of the exact value, the closest value it
// can reach with 1->0 flips only, as long as the page's mean absolute error
// stays within a programmable threshold; otherwise it falls back to an exact
// erase-and-program.
//
// Structure (as in the document's chip diagram): the control logic faces
// the bus and drives two page-sized SRAM write buffers; the FLIPBIT unit
// (approximator and error accumulator) sits between the buffers; the page
// array is written from either buffer.
//
//   bus <-> flash_ctrl --+-- page_buffer u_buf0 (exact) ----+-- nor_flash_array
//           (flipbit_regs)|         flipbit_approx, mae     |
//                         +-- page_buffer u_buf1 (approx) --+
//
// Ports: the CPU bus of flash_ctrl, the status bits, and the statistics
// the energy and lifetime figures are computed from (array reads, byte
// programs, page erases, approximate and exact page commits). All logic is
// on clk (the 33 MHz flash clock), reset is asynchronous, active low.
// Parameters default to the document's sizes: 256-byte pages, 32-bit
// approximator with n up to 8, and the array latencies of its flash part.
module flipbit_flash
  import flipbit_pkg::*;
#(
  parameter int unsigned PAGE_BYTES   = 256,
  parameter int unsigned NUM_PAGES    = 8192,
  parameter int unsigned READ_CYCLES  = 1,
  parameter int unsigned PROG_CYCLES  = 990,
  parameter int unsigned ERASE_CYCLES = 336634
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [3:0]        bus_be,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic [BUS_W-1:0]  bus_rdata,
  output logic              bus_ready,
  output logic [4:0]        status,
  output logic [31:0]       read_count,
  output logic [31:0]       prog_count,
  output logic [31:0]       erase_count,
  output logic [31:0]       approx_commits,
  output logic [31:0]       exact_commits
);
  localparam int unsigned WA_W = $clog2(PAGE_BYTES / 4);

  logic              buf0_we, buf1_we;
  logic [WA_W-1:0]   buf0_waddr, buf0_raddr, buf1_waddr, buf1_raddr;
  logic [3:0]        buf0_wbe, buf1_wbe;
  logic [31:0]       buf0_wdata, buf0_rdata, buf1_wdata, buf1_rdata;
  logic [DATA_W-1:0] ax_previous, ax_exact, ax_approx;
  width_e            ax_width;
  logic [3:0]        ax_nbits;
  logic              mae_clr, mae_en;
  logic [ACC_W-1:0]  mae_sum;
  logic              fl_op_valid, fl_busy, fl_done;
  flash_op_e         fl_op;
  logic [ADDR_W-1:0] fl_addr;
  logic [7:0]        fl_wdata, fl_rdata;

  flash_ctrl #(.PAGE_BYTES(PAGE_BYTES)) u_ctrl (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_be, .bus_wdata, .bus_rdata, .bus_ready,
    .buf0_we, .buf0_waddr, .buf0_wbe, .buf0_wdata, .buf0_raddr, .buf0_rdata,
    .buf1_we, .buf1_waddr, .buf1_wbe, .buf1_wdata, .buf1_raddr, .buf1_rdata,
    .ax_previous, .ax_exact, .ax_width, .ax_nbits, .ax_approx,
    .mae_clr, .mae_en, .mae_sum,
    .fl_op_valid, .fl_op, .fl_addr, .fl_wdata, .fl_busy, .fl_done, .fl_rdata,
    .status, .approx_commits, .exact_commits
  );

  page_buffer #(.PAGE_BYTES(PAGE_BYTES)) u_buf0 (
    .clk, .we(buf0_we), .waddr(buf0_waddr), .wbe(buf0_wbe), .wdata(buf0_wdata),
    .raddr(buf0_raddr), .rdata(buf0_rdata)
  );

  page_buffer #(.PAGE_BYTES(PAGE_BYTES)) u_buf1 (
    .clk, .we(buf1_we), .waddr(buf1_waddr), .wbe(buf1_wbe), .wdata(buf1_wdata),
    .raddr(buf1_raddr), .rdata(buf1_rdata)
  );

  flipbit_approx u_approx (
    .previous(ax_previous),
    .exact   (ax_exact),
    .width   (ax_width),
    .nbits   (ax_nbits),
    .approx  (ax_approx)
  );

  flipbit_mae u_mae (
    .clk, .rst_n,
    .clr    (mae_clr),
    .en     (mae_en),
    .exact  (ax_exact),
    .approx (ax_approx),
    .err_sum(mae_sum)
  );

  nor_flash_array #(
    .PAGE_BYTES  (PAGE_BYTES),
    .NUM_PAGES   (NUM_PAGES),
    .READ_CYCLES (READ_CYCLES),
    .PROG_CYCLES (PROG_CYCLES),
    .ERASE_CYCLES(ERASE_CYCLES)
  ) u_array (
    .clk, .rst_n,
    .op_valid(fl_op_valid), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata),
    .busy(fl_busy), .done(fl_done), .rdata(fl_rdata),
    .read_count, .prog_count, .erase_count
  );

endmodule
