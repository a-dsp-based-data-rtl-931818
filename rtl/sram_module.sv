// sram_module: one static RAM module of the board's local bus memory.
//
// The board takes up to four 64-pin zig-zag static RAM modules of 256 Kbyte,
// 512 Kbyte or 1 Mbyte, or a single 64 Kbyte one. This is the memory array of
// one module, 32 bits wide, sized for the largest (1 Mbyte = 262144 words).
// A smaller module is the same array with fewer words used; the size pins
// that tell the controller which module is fitted are inputs of sram_ctrl.
//
// Interface: cs selects the module for one clock. A write stores wdata at
// addr on that clock edge. A read registers the word, so rdata holds it from
// the clock after cs until the next read. The one wait state of the board's
// RAM access is spent in the controller around this registered read.
module sram_module #(
  parameter int unsigned DEPTH = 262144,  // 32-bit words (1 Mbyte module)
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
