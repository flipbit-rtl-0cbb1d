// flipbit_pkg: types and constants shared by the FLIPBIT flash chip.
//
// The chip has a 24-bit byte address space seen from the bus. Addresses
// with bit 23 clear go to the NOR page array; addresses with bit 23 set go
// to the control logic: four configuration registers (approximate region
// start and end, variable type, MAE threshold), a command register, a
// status register, the last page's accumulated error, and a window onto
// write buffer 0. The four configuration registers are the ones the FLIPBIT
// scheme calls for; the command/status registers, the window and all offsets
// are this implementation's own choice.
package flipbit_pkg;

  // Bus and address geometry.
  localparam int unsigned ADDR_W = 24;
  localparam int unsigned BUS_W  = 32;

  // Widest value the approximator handles and widest truth-table window.
  localparam int unsigned DATA_W = 32;
  localparam int unsigned NMAX   = 8;

  // Threshold register format: unsigned fixed point with THRESH_FRAC
  // fractional bits, so that thresholds such as 0.1 can be expressed.
  localparam int unsigned THRESH_FRAC = 8;

  // Width of the error accumulator: 32-bit values, up to 256 per page.
  localparam int unsigned ACC_W = 48;

  // Register offsets (bit 23 of the address selects the register space).
  localparam logic [11:0] REG_START  = 12'h000;
  localparam logic [11:0] REG_END    = 12'h004;
  localparam logic [11:0] REG_TYPE   = 12'h008;
  localparam logic [11:0] REG_THRESH = 12'h00C;
  localparam logic [11:0] REG_CMD    = 12'h010;
  localparam logic [11:0] REG_STATUS = 12'h014;
  localparam logic [11:0] REG_ERRSUM = 12'h018;
  // Byte offset of the buffer-0 write window (one page long).
  localparam logic [ADDR_W-1:0] BUF_WINDOW = 24'h80_1000;

  // Command opcodes, in CMD bits [31:28]; bits [23:0] carry the page address.
  typedef enum logic [3:0] {
    CMD_NONE   = 4'h0,
    CMD_LOAD   = 4'h1,  // read a page into buffers 0 and 1
    CMD_COMMIT = 4'h2   // approximate (if in region) and write the page back
  } cmd_e;

  // Variable width code in TYPE bits [1:0]; TYPE bits [11:8] hold n (1..8).
  typedef enum logic [1:0] {
    WIDTH_8  = 2'd0,
    WIDTH_16 = 2'd1,
    WIDTH_32 = 2'd2
  } width_e;

  // Configuration held in the memory-mapped registers.
  typedef struct packed {
    logic [ADDR_W-1:0] start_addr;
    logic [ADDR_W-1:0] end_addr;
    width_e            width;
    logic [3:0]        nbits;
    logic [31:0]       thresh;
  } flipbit_cfg_t;

  // Operations of the NOR array.
  typedef enum logic [1:0] {
    FOP_READ  = 2'd0,
    FOP_PROG  = 2'd1,
    FOP_ERASE = 2'd2
  } flash_op_e;

  // Status register bits.
  localparam int unsigned ST_BUSY     = 0;  // a command is running
  localparam int unsigned ST_OPEN     = 1;  // a page is loaded in the buffers
  localparam int unsigned ST_APPROX   = 2;  // last commit programmed buffer 1, no erase
  localparam int unsigned ST_ERASED   = 3;  // last commit erased and programmed buffer 0
  localparam int unsigned ST_INREGION = 4;  // last committed page lay in the region

  // Width in bits of a width code.
  function automatic int unsigned width_bits(width_e w);
    case (w)
      WIDTH_8:  return 8;
      WIDTH_16: return 16;
      default:  return 32;
    endcase
  endfunction

endpackage
