// flipbit_regs: the four FLIPBIT configuration registers and the region check.
//
// The CPU configures FLIPBIT with ordinary stores to memory-mapped
// registers: the first and last byte address of the approximatable region,
// the variable type and the mean-absolute-error threshold. The region check
// tells the control logic whether a page address lies in the region.
//
// Registers (offsets from flipbit_pkg):
//   START  [23:0]  first byte address of the region (reset 0xFFFFFF)
//   END    [23:0]  last byte address of the region, inclusive (reset 0)
//                  The reset values give an empty region: FLIPBIT is off.
//   TYPE   [1:0]   variable width: 0 = 8, 1 = 16, 2 = 32 bits (3 reads as 32)
//          [11:8]  n of the n-bit algorithm, 1..8, clamped on write (reset 2)
//   THRESH [31:0]  MAE threshold, unsigned fixed point with THRESH_FRAC
//                  fractional bits (reset 0: only error-free approximations)
// The four registers are the document's; their encodings, reset values,
// the inclusive end address and where n is configured are this design's.
//
// Timing: writes take effect at the clock edge; reads and the region check
// are combinational.
module flipbit_regs
  import flipbit_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [11:0]       addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output flipbit_cfg_t      cfg,
  input  logic [ADDR_W-1:0] check_addr,
  output logic              in_region
);
  logic [3:0] n_wr;
  width_e     w_wr;

  always_comb begin
    if (wdata[11:8] == 4'd0)                n_wr = 4'd1;
    else if (wdata[11:8] > 4'(NMAX))        n_wr = 4'(NMAX);
    else                                    n_wr = wdata[11:8];
    w_wr = (wdata[1:0] == 2'd3) ? WIDTH_32 : width_e'(wdata[1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.start_addr <= '1;
      cfg.end_addr   <= '0;
      cfg.width      <= WIDTH_8;
      cfg.nbits      <= 4'd2;
      cfg.thresh     <= '0;
    end else if (wr_en) begin
      case (addr)
        REG_START:  cfg.start_addr <= wdata[ADDR_W-1:0];
        REG_END:    cfg.end_addr   <= wdata[ADDR_W-1:0];
        REG_TYPE: begin
          cfg.width <= w_wr;
          cfg.nbits <= n_wr;
        end
        REG_THRESH: cfg.thresh     <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    case (addr)
      REG_START:  rdata = 32'(cfg.start_addr);
      REG_END:    rdata = 32'(cfg.end_addr);
      REG_TYPE:   rdata = {20'd0, cfg.nbits, 6'd0, cfg.width};
      REG_THRESH: rdata = cfg.thresh;
      default:    rdata = '0;
    endcase
  end

  assign in_region = (check_addr >= cfg.start_addr) && (check_addr <= cfg.end_addr);

endmodule
