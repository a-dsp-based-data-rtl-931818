// lbus_decode: local bus address decoder.
//
// Routes the granted local bus transfer to its target by word address: the
// static RAM controller (000000h-0FFFFFh), the FLASH (F80000h-FFFFFFh) or the
// board registers at 100000h-100002h. The FLASH lock and erase registers are
// served by the FLASH block (its regsel input); the RAM size register is
// answered here in the clock after the request. Any other address is
// answered with err in the clock after the request.
//
// The RAM and FLASH ranges follow the board's memory map; the registers and
// the error answer are this design's own.
module lbus_decode
  import dspb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lb_req_t     req,
  output lb_rsp_t     rsp,
  output lb_req_t     sram_req,
  input  lb_rsp_t     sram_rsp,
  output lb_req_t     flash_req,
  output logic        flash_regsel,
  input  lb_rsp_t     flash_rsp,
  input  logic [23:0] sram_words   // installed RAM size in words
);

  lb_target_e tgt;
  logic       local_ack;   // register or nothing: answered here
  logic       local_err;
  lb_data_t   local_data;

  always_comb begin
    tgt          = lb_target(req.addr);
    sram_req     = req;
    flash_req    = req;
    sram_req.req = req.req && (tgt == TGT_SRAM);
    flash_regsel = (tgt == TGT_REG) && (req.addr != REG_SRAM_SIZE);
    flash_req.req = req.req && ((tgt == TGT_FLASH) || flash_regsel);
  end

  wire local_hit = req.req && !local_ack &&
                   ((tgt == TGT_NONE) || (req.addr == REG_SRAM_SIZE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_ack  <= 1'b0;
      local_err  <= 1'b0;
      local_data <= '0;
    end else begin
      local_ack  <= local_hit;
      local_err  <= (tgt == TGT_NONE) || req.we;   // size register is read only
      local_data <= 32'(sram_words);
    end
  end

  always_comb begin
    if (local_ack) begin
      rsp.ack   = 1'b1;
      rsp.err   = local_err;
      rsp.rdata = local_err ? '0 : local_data;
    end else if (sram_rsp.ack) begin
      rsp = sram_rsp;
    end else if (flash_rsp.ack) begin
      rsp = flash_rsp;
    end else begin
      rsp = '0;
    end
  end

endmodule
