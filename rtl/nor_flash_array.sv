// nor_flash_array: behavioural model of the NOR flash page array.
//
// This is a model, not synthesizable logic for a real chip: the array is
// floating-gate cells with charge pumps and sense amplifiers, a
// process-specific macro. It reproduces what FLIPBIT depends on:
//   read   returns one byte;
//   program drives selected cells of one byte from 1 to 0: the new byte is
//          old AND wdata, so a program can never turn a 0 into a 1;
//   erase  sets every byte of one page to 0xFF.
// Latencies default to the document's per-operation times at the 33 MHz
// flash clock: read 30.3 ns = 1 cycle, program 30 us = 990 cycles per byte,
// erase 10.2 ms = 336,634 cycles per 256-byte page. The page size (256 B)
// is the document's; the 8192 pages (16 Mbit) follow the flash part the
// document takes its numbers from.
//
// The model clears the page one byte per cycle during the first PAGE_BYTES
// cycles of an erase (so ERASE_CYCLES must be >= PAGE_BYTES). Contents at
// power-up are whatever the array held; the model does not preset them,
// so a page must be erased before its contents are relied on.
//
// Interface: op_valid is accepted when busy is low; done pulses for one
// cycle when the operation ends, with rdata valid for a read. Counters
// report the number of completed reads, byte programs and page erases, the
// figures from which flash energy and wear are computed.
module nor_flash_array
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
  input  logic              op_valid,
  input  flash_op_e         op,
  input  logic [ADDR_W-1:0] addr,
  input  logic [7:0]        wdata,
  output logic              busy,
  output logic              done,
  output logic [7:0]        rdata,
  output logic [31:0]       read_count,
  output logic [31:0]       prog_count,
  output logic [31:0]       erase_count
);
  localparam int unsigned BYTES = PAGE_BYTES * NUM_PAGES;
  localparam int unsigned AW    = $clog2(BYTES);
  localparam int unsigned PW    = $clog2(PAGE_BYTES);

  logic [7:0]  mem [BYTES];

  flash_op_e   cur_op;
  logic [AW-1:0] cur_addr;
  logic [7:0]  cur_data;
  logic [31:0] remaining;
  logic [31:0] elapsed;
  logic [AW-1:0] page_base;

  initial begin
    assert (ERASE_CYCLES >= PAGE_BYTES)
      else $error("ERASE_CYCLES must cover one cycle per byte of a page");
    assert (READ_CYCLES >= 1 && PROG_CYCLES >= 1)
      else $error("latencies must be at least one cycle");
  end

  assign page_base = {cur_addr[AW-1:PW], {PW{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      rdata       <= '0;
      cur_op      <= FOP_READ;
      cur_addr    <= '0;
      cur_data    <= '0;
      remaining   <= '0;
      elapsed     <= '0;
      read_count  <= '0;
      prog_count  <= '0;
      erase_count <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (op_valid) begin
          busy     <= 1'b1;
          cur_op   <= op;
          cur_addr <= addr[AW-1:0];
          cur_data <= wdata;
          elapsed  <= '0;
          case (op)
            FOP_READ:  remaining <= READ_CYCLES;
            FOP_PROG:  remaining <= PROG_CYCLES;
            default:   remaining <= ERASE_CYCLES;
          endcase
        end
      end else begin
        elapsed   <= elapsed + 1;
        remaining <= remaining - 1;
        if (remaining == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          case (cur_op)
            FOP_READ: begin
              rdata      <= mem[cur_addr];
              read_count <= read_count + 1;
            end
            FOP_PROG: prog_count <= prog_count + 1;
            default: erase_count <= erase_count + 1;
          endcase
        end
      end
    end
  end

  // Cell array: erase clears one byte of the page per cycle; a program
  // lands at the end of its latency.
  always_ff @(posedge clk) begin
    if (busy && cur_op == FOP_ERASE && elapsed < PAGE_BYTES) begin
      mem[page_base | AW'(elapsed)] <= 8'hFF;
    end else if (busy && cur_op == FOP_PROG && remaining == 1) begin
      mem[cur_addr] <= mem[cur_addr] & cur_data;
    end
  end

endmodule
