// vxi_regs: VXI configuration registers of the board.
//
// A VXI module answers in A16 space at C000h + 64 * logical address with a
// set of 16-bit configuration registers; the board carries the ones a VXI
// frame needs so it can also sit in a VXI crate. Only their presence is
// given for this board; their layout here is the usual VXI register-based
// device with A32 memory:
//   index 0  ID           (r)  [15:14] class 11 = register based,
//                               [13:12] 01 = A16/A32, [11:0] manufacturer
//   index 1  device type  (r)  [15:12] required memory code, [11:0] model
//   index 2  status       (r)  [15] A32 enabled, [14] MODID* line, [3] ready,
//                               [2] passed, [1] sysfail inhibit, [0] reset;
//                               other bits read 1
//            control      (w)  [15] A32 enable, [1] sysfail inhibit, [0] reset
//   index 3  offset       (r/w) A31..A16 of the A32 base of the memory window
// Other indexes read FFFFh and ignore writes.
//
// The required memory code 5 asks the resource manager for 2^(31-5) bytes =
// 64 Mbytes, the window of 16M 32-bit words that holds the board's memory
// map, so only offset[15:10] matter for the base (A31..A26).
//
// Interface: a register access is one clock with sel high; rdata is
// combinational from idx.
module vxi_regs #(
  parameter logic [11:0] MANUF_ID = 12'hFFF,  // placeholder manufacturer code
  parameter logic [11:0] MODEL    = 12'h001,
  parameter logic [3:0]  MEM_CODE = 4'd5      // 64 Mbyte A32 window
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        we,
  input  logic [4:0]  idx,       // register index (A5..A1)
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  input  logic        modid_n,   // VXI MODID line of the slot, low active
  input  logic        passed,    // board self test passed
  input  logic        ready,     // board ready
  output logic        a32_en,    // memory window enabled
  output logic [5:0]  a32_base,  // A31..A26 of the memory window
  output logic        sysfail_inh,
  output logic        board_reset
);

  logic [15:0] offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a32_en      <= 1'b0;
      offset      <= '0;
      sysfail_inh <= 1'b0;
      board_reset <= 1'b0;
    end else if (sel && we) begin
      unique case (idx)
        5'd2: begin
          a32_en      <= wdata[15];
          sysfail_inh <= wdata[1];
          board_reset <= wdata[0];
        end
        5'd3:    offset <= wdata;
        default: ;
      endcase
    end
  end

  assign a32_base = offset[15:10];

  always_comb begin
    unique case (idx)
      5'd0:    rdata = {2'b11, 2'b01, MANUF_ID};
      5'd1:    rdata = {MEM_CODE, MODEL};
      5'd2:    rdata = {a32_en, modid_n, 10'h3FF, ready, passed, sysfail_inh, board_reset};
      5'd3:    rdata = offset;
      default: rdata = 16'hFFFF;
    endcase
  end

endmodule
