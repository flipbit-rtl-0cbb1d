// page_buffer: one SRAM write buffer of the flash chip, one page long.
//
// The chip has two of these between the control logic and the page array.
// Without FLIPBIT they speed up page writes and let a page be read,
// modified and written back; with FLIPBIT buffer 0 holds the exact page the
// CPU wrote and buffer 1 the previous contents, which the approximator
// overwrites with the approximate page.
//
// Organisation (this design's choice): PAGE_BYTES/4 words of 32 bits, one
// write port with byte enables and one read port with a registered output
// (data appears the cycle after the address). A read and a write of the
// same word in one cycle return the old word.
module page_buffer #(
  parameter int unsigned PAGE_BYTES = 256,
  localparam int unsigned WORDS  = PAGE_BYTES / 4,
  localparam int unsigned WA_W   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [WA_W-1:0] waddr,
  input  logic [3:0]      wbe,
  input  logic [31:0]     wdata,
  input  logic [WA_W-1:0] raddr,
  output logic [31:0]     rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++) begin
        if (wbe[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
      end
    end
    rdata <= mem[raddr];
  end

endmodule
