// dspb_pkg: types and constants shared by the DSP acquisition board logic.
//
// The local bus joins DSP port A, the VME slave, the static RAM, the FLASH
// and the board registers. It carries 32-bit words and a 24-bit word
// address. A transfer is a request held by the master until the target
// answers with a one-cycle acknowledge (ack), optionally with err set for
// an access the target refuses.
//
// The word map follows the VME memory map of the board: static RAM from word
// 000000h (4 Mbytes = 100000h words), FLASH from F80000h, the rest undefined.
// The VME side sees the first 4000h words read only, the next 4000h words
// read/write, the remaining RAM read only. The board registers at 100000h
// (FLASH lock and erase, RAM size) are this design's own choice; they sit in
// the range the VME side sees as undefined, so only the DSP reaches them.
package dspb_pkg;

  localparam int unsigned LB_AW = 24;  // local bus word address width
  localparam int unsigned LB_DW = 32;  // local bus data width

  typedef logic [LB_AW-1:0] lb_addr_t;
  typedef logic [LB_DW-1:0] lb_data_t;

  typedef struct packed {
    logic     req;    // transfer requested, held until ack
    logic     we;     // 1 = write
    lb_addr_t addr;   // word address
    lb_data_t wdata;  // write data
  } lb_req_t;

  typedef struct packed {
    logic     ack;    // one cycle: transfer done
    logic     err;    // with ack: transfer refused
    lb_data_t rdata;  // read data, valid with ack
  } lb_rsp_t;

  // Word map
  localparam lb_addr_t SRAM_END    = 24'h0FFFFF;
  localparam lb_addr_t VME_RW_LO   = 24'h004000;
  localparam lb_addr_t VME_RW_HI   = 24'h007FFF;
  localparam lb_addr_t FLASH_BASE  = 24'hF80000;

  // Board register offsets (word address)
  localparam lb_addr_t REG_FLASH_LOCK  = 24'h100000; // r/w: eight section lock bits
  localparam lb_addr_t REG_FLASH_ERASE = 24'h100001; // w: data[2:0] = section to erase
  localparam lb_addr_t REG_SRAM_SIZE   = 24'h100002; // r: installed RAM in words

  typedef enum logic [1:0] {
    TGT_SRAM  = 2'd0,
    TGT_FLASH = 2'd1,
    TGT_REG   = 2'd2,
    TGT_NONE  = 2'd3
  } lb_target_e;

  function automatic lb_target_e lb_target(lb_addr_t a);
    if (a <= SRAM_END)          return TGT_SRAM;
    else if (a >= FLASH_BASE)   return TGT_FLASH;
    else if (a == REG_FLASH_LOCK || a == REG_FLASH_ERASE || a == REG_SRAM_SIZE)
                                return TGT_REG;
    else                        return TGT_NONE;
  endfunction

  // Memory module size codes on the two size pins of a RAM module
  function automatic logic [18:0] sram_size_words(logic [1:0] code);
    case (code)
      2'b00:   return 19'd16384;   //  64 Kbyte
      2'b01:   return 19'd65536;   // 256 Kbyte
      2'b10:   return 19'd131072;  // 512 Kbyte
      default: return 19'd262144;  //   1 Mbyte
    endcase
  endfunction

endpackage
