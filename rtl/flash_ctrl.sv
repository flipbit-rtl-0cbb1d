// flash_ctrl: control logic of the FLIPBIT flash chip.
//
// It decodes the bus, holds the FLIPBIT registers and sequences the page
// array, the two write buffers and the FLIPBIT unit. A page write goes:
//   1. LOAD command: the page is read from the array into buffer 0 and
//      buffer 1 (no erase).
//   2. The CPU stores the exact new values into buffer 0 through the
//      buffer window.
//   3. COMMIT command. If the page lies in the approximatable region, every
//      value of the page (8, 16 or 32 bits wide) is passed once through the
//      approximator: exact from buffer 0, previous from buffer 1, and the
//      approximation is written back to buffer 1 while the error
//      accumulator adds |exact - approx|. If the mean absolute error is
//      within the threshold (err_sum * 2^THRESH_FRAC <= thresh * values)
//      the page is programmed from buffer 1 without an erase. Otherwise,
//      and always for pages outside the region, the page is erased and
//      programmed from buffer 0 (an exact read-modify-write).
// Array reads from the bus are served byte by byte from the array.
//
// The load-both-buffers / approximate / compare / choose-a-buffer sequence
// is the document's. The command and status registers, the buffer window,
// the inclusive threshold test, the one-value-per-cycle sweep after the
// CPU has finished, and programming every byte of the page are this
// design's choices.
//
// Bus: a request (bus_req with address, write flag, byte enables and data)
// completes in the cycle bus_ready is high; read data is valid then.
// Register and buffer accesses complete in the cycle they are made while
// the controller is idle. During a command only register reads (status
// polling) complete; everything else waits. Array reads take four array
// reads. Writes to array addresses are accepted and ignored: the array is
// only written through the buffers.
//
// Timing per page (READ_CYCLES=r, PROG_CYCLES=p, ERASE_CYCLES=e of the
// array, B bytes, V values): LOAD takes B*(r+2) cycles; COMMIT takes V+2
// cycles of sweep and decision (in the region), then e+2 cycles of erase if
// the page is written exactly, and B*(p+3) cycles of programming.
module flash_ctrl
  import flipbit_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = 256,
  localparam int unsigned WORDS = PAGE_BYTES / 4,
  localparam int unsigned WA_W  = $clog2(WORDS),
  localparam int unsigned PW    = $clog2(PAGE_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU bus
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [3:0]        bus_be,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic [BUS_W-1:0]  bus_rdata,
  output logic              bus_ready,
  // buffer 0 (exact)
  output logic              buf0_we,
  output logic [WA_W-1:0]   buf0_waddr,
  output logic [3:0]        buf0_wbe,
  output logic [31:0]       buf0_wdata,
  output logic [WA_W-1:0]   buf0_raddr,
  input  logic [31:0]       buf0_rdata,
  // buffer 1 (previous, then approximate)
  output logic              buf1_we,
  output logic [WA_W-1:0]   buf1_waddr,
  output logic [3:0]        buf1_wbe,
  output logic [31:0]       buf1_wdata,
  output logic [WA_W-1:0]   buf1_raddr,
  input  logic [31:0]       buf1_rdata,
  // FLIPBIT approximator and error accumulator
  output logic [DATA_W-1:0] ax_previous,
  output logic [DATA_W-1:0] ax_exact,
  output width_e            ax_width,
  output logic [3:0]        ax_nbits,
  input  logic [DATA_W-1:0] ax_approx,
  output logic              mae_clr,
  output logic              mae_en,
  input  logic [ACC_W-1:0]  mae_sum,
  // page array
  output logic              fl_op_valid,
  output flash_op_e         fl_op,
  output logic [ADDR_W-1:0] fl_addr,
  output logic [7:0]        fl_wdata,
  input  logic              fl_busy,
  input  logic              fl_done,
  input  logic [7:0]        fl_rdata,
  // status and statistics
  output logic [4:0]        status,
  output logic [31:0]       approx_commits,
  output logic [31:0]       exact_commits
);
  typedef enum logic [3:0] {
    S_IDLE, S_ARD_ISSUE, S_ARD_WAIT, S_LOAD_ISSUE, S_LOAD_WAIT, S_SWEEP,
    S_DECIDE, S_ERASE_ISSUE, S_ERASE_WAIT, S_PROG_RD, S_PROG_ISSUE, S_PROG_WAIT
  } state_e;

  state_e            state;
  flipbit_cfg_t      cfg;
  logic [31:0]       regs_rdata;
  logic              in_region;
  logic [ADDR_W-1:0] page_addr;
  logic              page_open;
  logic [PW:0]       byte_idx;
  logic [1:0]        rd_k;
  logic [23:0]       rd_word;
  logic [PW:0]       v_iss, v_d;
  logic              v_d_valid;
  logic              use_buf1;
  logic              st_approx, st_erased, st_inregion;

  // ---------------------------------------------------------------- decode
  logic        is_reg, is_buf, reg_wr, buf_wr, cmd_wr;
  logic [11:0] reg_off;
  logic [ADDR_W-1:0] buf_off;
  cmd_e        cmd_op;

  assign is_reg  = bus_addr[ADDR_W-1];
  assign buf_off = bus_addr - BUF_WINDOW;
  assign is_buf  = is_reg && (bus_addr >= BUF_WINDOW) &&
                   (buf_off < ADDR_W'(PAGE_BYTES));
  assign reg_off = bus_addr[11:0];
  assign cmd_op  = cmd_e'(bus_wdata[31:28]);

  assign reg_wr = (state == S_IDLE) && bus_req && bus_we && is_reg && !is_buf &&
                  (reg_off != REG_CMD);
  assign buf_wr = (state == S_IDLE) && bus_req && bus_we && is_buf;
  assign cmd_wr = (state == S_IDLE) && bus_req && bus_we && is_reg && !is_buf &&
                  (reg_off == REG_CMD);

  flipbit_regs u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (reg_wr),
    .addr      (reg_off),
    .wdata     (bus_wdata),
    .rdata     (regs_rdata),
    .cfg       (cfg),
    .check_addr(page_addr),
    .in_region (in_region)
  );

  assign status = {st_inregion, st_erased, st_approx, page_open, state != S_IDLE};

  // Register read data.
  logic [31:0] reg_rd;
  always_comb begin
    case (reg_off)
      REG_STATUS: reg_rd = 32'(status);
      REG_ERRSUM: reg_rd = mae_sum[31:0];
      default:    reg_rd = regs_rdata;
    endcase
  end

  // ------------------------------------------------------ value geometry
  // lane_bits: log2 of values per 32-bit word (2, 1 or 0).
  logic [1:0]  lane_bits;
  logic [PW:0] n_values;
  always_comb begin
    case (cfg.width)
      WIDTH_8:  lane_bits = 2'd2;
      WIDTH_16: lane_bits = 2'd1;
      default:  lane_bits = 2'd0;
    endcase
    n_values = (PW+1)'(PAGE_BYTES) >> (2'd2 - lane_bits);
  end

  logic [WA_W-1:0] iss_word, d_word;
  logic [1:0]      d_lane;
  logic [4:0]      d_shift;
  logic [3:0]      d_be;
  always_comb begin
    iss_word = WA_W'(v_iss >> lane_bits);
    d_word   = WA_W'(v_d >> lane_bits);
    d_lane   = 2'(v_d) & 2'((1 << lane_bits) - 1);
    case (cfg.width)
      WIDTH_8:  begin d_shift = 5'(d_lane) << 3; d_be = 4'b0001 << d_lane;          end
      WIDTH_16: begin d_shift = 5'(d_lane) << 4; d_be = 4'b0011 << (2 * d_lane);    end
      default:  begin d_shift = 5'd0;            d_be = 4'b1111;                    end
    endcase
  end

  // Values are unsigned and taken from their lane, zero extended.
  logic [DATA_W-1:0] val_mask;
  assign val_mask    = (cfg.width == WIDTH_8)  ? DATA_W'(32'h0000_00FF) :
                       (cfg.width == WIDTH_16) ? DATA_W'(32'h0000_FFFF) : '1;
  assign ax_exact    = (buf0_rdata >> d_shift) & val_mask;
  assign ax_previous = (buf1_rdata >> d_shift) & val_mask;
  assign ax_width    = cfg.width;
  assign ax_nbits    = cfg.nbits;

  // Threshold test: mean |error| <= thresh, without a divider.
  logic [63:0] lhs, rhs;
  logic        thresh_ok;
  assign lhs    = 64'(mae_sum) << THRESH_FRAC;
  assign rhs    = 64'(cfg.thresh) * 64'(n_values);
  assign thresh_ok = (lhs <= rhs);

  // ------------------------------------------------------- buffer ports
  logic [7:0] prog_byte;
  assign prog_byte = 8'((use_buf1 ? buf1_rdata : buf0_rdata) >> (8 * byte_idx[1:0]));

  always_comb begin
    buf0_we    = 1'b0;
    buf0_waddr = WA_W'(byte_idx >> 2);
    buf0_wbe   = 4'b0001 << byte_idx[1:0];
    buf0_wdata = {4{fl_rdata}};
    buf1_we    = 1'b0;
    buf1_waddr = WA_W'(byte_idx >> 2);
    buf1_wbe   = 4'b0001 << byte_idx[1:0];
    buf1_wdata = {4{fl_rdata}};
    mae_en     = 1'b0;
    if (state == S_SWEEP) begin
      buf0_raddr = iss_word;
      buf1_raddr = iss_word;
    end else begin
      buf0_raddr = WA_W'(byte_idx >> 2);
      buf1_raddr = WA_W'(byte_idx >> 2);
    end
    if (buf_wr) begin
      buf0_we    = 1'b1;
      buf0_waddr = WA_W'(buf_off >> 2);
      buf0_wbe   = bus_be;
      buf0_wdata = bus_wdata;
    end
    if (state == S_LOAD_WAIT && fl_done) begin
      buf0_we = 1'b1;
      buf1_we = 1'b1;
    end
    if (state == S_SWEEP && v_d_valid) begin
      buf1_we    = 1'b1;
      buf1_waddr = d_word;
      buf1_wbe   = d_be;
      buf1_wdata = ax_approx << d_shift;
      mae_en     = 1'b1;
    end
  end

  assign mae_clr = cmd_wr && (cmd_op == CMD_COMMIT);

  // -------------------------------------------------------- page array
  always_comb begin
    fl_op_valid = 1'b0;
    fl_op       = FOP_READ;
    fl_addr     = page_addr | ADDR_W'(byte_idx[PW-1:0]);
    fl_wdata    = prog_byte;
    case (state)
      S_ARD_ISSUE: begin
        fl_op_valid = 1'b1;
        fl_addr     = {bus_addr[ADDR_W-1:2], rd_k};
      end
      S_LOAD_ISSUE:  fl_op_valid = 1'b1;
      S_ERASE_ISSUE: begin
        fl_op_valid = 1'b1;
        fl_op       = FOP_ERASE;
        fl_addr     = page_addr;
      end
      S_PROG_ISSUE: begin
        fl_op_valid = 1'b1;
        fl_op       = FOP_PROG;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ bus side
  always_comb begin
    bus_ready = 1'b0;
    bus_rdata = '0;
    if (bus_req) begin
      if (state == S_IDLE) begin
        if (is_reg) begin
          bus_ready = 1'b1;
          if (!is_buf) bus_rdata = reg_rd;
        end else if (bus_we) begin
          bus_ready = 1'b1;
        end
      end else if (state == S_ARD_WAIT) begin
        if (fl_done && rd_k == 2'd3) begin
          bus_ready = 1'b1;
          bus_rdata = {fl_rdata, rd_word};
        end
      end else if (state != S_ARD_ISSUE && is_reg && !is_buf && !bus_we) begin
        bus_ready = 1'b1;
        bus_rdata = reg_rd;
      end
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      page_addr      <= '0;
      page_open      <= 1'b0;
      byte_idx       <= '0;
      rd_k           <= '0;
      rd_word        <= '0;
      v_iss          <= '0;
      v_d            <= '0;
      v_d_valid      <= 1'b0;
      use_buf1       <= 1'b0;
      st_approx      <= 1'b0;
      st_erased      <= 1'b0;
      st_inregion    <= 1'b0;
      approx_commits <= '0;
      exact_commits  <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (bus_req && !bus_we && !is_reg) begin
            rd_k  <= '0;
            state <= S_ARD_ISSUE;
          end else if (cmd_wr && cmd_op == CMD_LOAD) begin
            page_addr <= bus_wdata[ADDR_W-1:0] & ~ADDR_W'(PAGE_BYTES - 1);
            page_open <= 1'b0;
            byte_idx  <= '0;
            state     <= S_LOAD_ISSUE;
          end else if (cmd_wr && cmd_op == CMD_COMMIT && page_open) begin
            st_inregion <= in_region;
            byte_idx    <= '0;
            v_iss       <= '0;
            v_d_valid   <= 1'b0;
            if (in_region) begin
              state <= S_SWEEP;
            end else begin
              use_buf1  <= 1'b0;
              st_approx <= 1'b0;
              st_erased <= 1'b1;
              state     <= S_ERASE_ISSUE;
            end
          end
        end
        S_ARD_ISSUE: state <= S_ARD_WAIT;
        S_ARD_WAIT: begin
          if (fl_done) begin
            rd_word[8*rd_k +: 8] <= fl_rdata;
            rd_k <= rd_k + 2'd1;
            state <= (rd_k == 2'd3) ? S_IDLE : S_ARD_ISSUE;
          end
        end
        S_LOAD_ISSUE: state <= S_LOAD_WAIT;
        S_LOAD_WAIT: begin
          if (fl_done) begin
            byte_idx <= byte_idx + 1'b1;
            if (byte_idx == (PW+1)'(PAGE_BYTES - 1)) begin
              page_open <= 1'b1;
              state     <= S_IDLE;
            end else begin
              state <= S_LOAD_ISSUE;
            end
          end
        end
        S_SWEEP: begin
          v_d_valid <= (v_iss < n_values);
          v_d       <= v_iss;
          if (v_iss < n_values) v_iss <= v_iss + 1'b1;
          if (v_d_valid && v_d == n_values - 1'b1) begin
            v_d_valid <= 1'b0;
            state     <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          use_buf1  <= thresh_ok;
          st_approx <= thresh_ok;
          st_erased <= !thresh_ok;
          state     <= thresh_ok ? S_PROG_RD : S_ERASE_ISSUE;
        end
        S_ERASE_ISSUE: state <= S_ERASE_WAIT;
        S_ERASE_WAIT:  if (fl_done) state <= S_PROG_RD;
        S_PROG_RD:     state <= S_PROG_ISSUE;
        S_PROG_ISSUE:  state <= S_PROG_WAIT;
        S_PROG_WAIT: begin
          if (fl_done) begin
            byte_idx <= byte_idx + 1'b1;
            if (byte_idx == (PW+1)'(PAGE_BYTES - 1)) begin
              page_open <= 1'b0;
              if (use_buf1) approx_commits <= approx_commits + 1;
              else          exact_commits  <= exact_commits + 1;
              state <= S_IDLE;
            end else begin
              state <= S_PROG_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The page array is only given an operation when it is idle.
  a_array_idle: assert property (@(posedge clk) disable iff (!rst_n)
    fl_op_valid |-> !fl_busy);
  // A bus master holds its request stable until it completes.
  a_bus_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req && !bus_ready |=> bus_req && $stable(bus_addr) && $stable(bus_we));

endmodule
