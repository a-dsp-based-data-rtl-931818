// dsp_board: logic of the DSP based data acquisition board.
//
// The board is a 6U VME / half VXI card built around a floating point DSP
// with two 32-bit ports. Port A is the local bus: static RAM (up to four
// modules, 4 Mbytes) and a 128 Kbyte FLASH, shared with the VME bus, which
// reads results from the RAM and writes settings into a read/write window of
// it. Port B goes to four Industry Pack slots carrying the digitizers and
// the timing interface. The DSP itself is outside this module; its two
// ports are the dsp_a_* and dsp_b_* ports here.
//
//   VME ---- vme_slave ----+               +-- sram_ctrl -- sram_module x4
//             |            lbus_arbiter -- lbus_decode
//           vxi_regs       |               +-- flash_mem
//   DSP port A ------------+
//   DSP port B ---- ip_interface ---- IP slots 0..3
//
// Local bus arbitration gives the DSP priority; a VME cycle waits with
// DTACK* held off until the bus is free and its transfer done. RAM transfers
// take three clocks (one wait state); with the 32 MHz clock assumed for the
// board that is 42.7 Mbyte/s. The RAM size is read from the module size pins.
//
// The four RAM module arrays are inside, each sized for the largest (1
// Mbyte) module; size_code / present stand for the size pins of the fitted
// modules. A lint note that rst_n is used both synchronously and
// asynchronously comes from the disable iff of the blocks' assertions.
module dsp_board
  import dspb_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 262144,  // words per RAM module socket
  parameter int unsigned FLASH_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME / VXI bus
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_addr,
  input  logic [31:0] vme_din,
  output logic [31:0] vme_dout,
  output logic        vme_dout_en,
  output logic        vme_dtack_n,
  output logic        vme_berr_n,
  input  logic [7:0]  logical_addr,
  input  logic        vxi_modid_n,
  input  logic        self_test_passed,
  input  logic        board_ready,
  output logic        sysfail_inhibit,
  output logic        dsp_reset,
  // DSP port A (local bus master)
  input  lb_req_t     dsp_a_req,
  output lb_rsp_t     dsp_a_rsp,
  // DSP port B
  input  lb_req_t     dsp_b_req,
  output lb_rsp_t     dsp_b_rsp,
  // RAM module size pins
  input  logic [1:0]  sram_size_code [4],
  input  logic [3:0]  sram_present,
  // Industry Pack slots
  input  logic [3:0]  ip_fast_sel,
  input  logic [1:0]  ip_double_wide,
  output logic        ip_clk8,
  output logic [3:0]  ip_iosel_n,
  output logic [3:0]  ip_idsel_n,
  output logic [3:0]  ip_intsel_n,
  output logic        ip_rw_n,
  output logic [6:1]  ip_addr,
  output logic [15:0] ip_dout [4],
  output logic        ip_dout_en,
  input  logic [15:0] ip_din [4],
  input  logic [3:0]  ip_ack_n,
  input  logic [7:0]  ip_intreq_n,
  output logic [7:0]  ip_irq,
  // observation
  output logic        lbus_gnt_dsp,
  output logic        lbus_gnt_vme,
  output logic        lbus_vme_waited,
  output logic [7:0]  flash_lock,
  output logic [23:0] sram_words
);

  localparam int unsigned MAW = $clog2(SRAM_DEPTH);

  lb_req_t vme_req, bus_req, sram_req, flash_req;
  lb_rsp_t vme_rsp, bus_rsp, sram_rsp, flash_rsp;
  logic    flash_regsel;

  logic        reg_sel, reg_we;
  logic [4:0]  reg_idx;
  logic [15:0] reg_wdata, reg_rdata;
  logic        a32_en;
  logic [5:0]  a32_base;

  vme_slave u_vme (
    .clk, .rst_n,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr,
    .vme_din, .vme_dout, .vme_dout_en, .vme_dtack_n, .vme_berr_n,
    .logical_addr, .a32_en, .a32_base,
    .reg_sel, .reg_we, .reg_idx, .reg_wdata, .reg_rdata,
    .lb_req(vme_req), .lb_rsp(vme_rsp)
  );

  vxi_regs u_vxi (
    .clk, .rst_n,
    .sel(reg_sel), .we(reg_we), .idx(reg_idx), .wdata(reg_wdata), .rdata(reg_rdata),
    .modid_n(vxi_modid_n), .passed(self_test_passed), .ready(board_ready),
    .a32_en, .a32_base, .sysfail_inh(sysfail_inhibit), .board_reset(dsp_reset)
  );

  lbus_arbiter u_arb (
    .clk, .rst_n,
    .dsp_req(dsp_a_req), .dsp_rsp(dsp_a_rsp),
    .vme_req, .vme_rsp,
    .bus_req, .bus_rsp,
    .gnt_dsp(lbus_gnt_dsp), .gnt_vme(lbus_gnt_vme), .vme_waited(lbus_vme_waited)
  );

  lbus_decode u_dec (
    .clk, .rst_n,
    .req(bus_req), .rsp(bus_rsp),
    .sram_req, .sram_rsp,
    .flash_req, .flash_regsel, .flash_rsp,
    .sram_words
  );

  logic [3:0]     mod_cs;
  logic           mod_we;
  logic [MAW-1:0] mod_addr;
  logic [31:0]    mod_wdata;
  logic [31:0]    mod_rdata [4];

  sram_ctrl #(.NMOD(4), .DEPTH(SRAM_DEPTH)) u_sram_ctrl (
    .clk, .rst_n,
    .req(sram_req), .rsp(sram_rsp),
    .size_code(sram_size_code), .present(sram_present),
    .total_words(sram_words),
    .mod_cs, .mod_we, .mod_addr, .mod_wdata, .mod_rdata
  );

  for (genvar i = 0; i < 4; i++) begin : g_sram
    sram_module #(.DEPTH(SRAM_DEPTH)) u_mod (
      .clk, .cs(mod_cs[i]), .we(mod_we), .addr(mod_addr),
      .wdata(mod_wdata), .rdata(mod_rdata[i])
    );
  end

  flash_mem #(.FLASH_WAIT(FLASH_WAIT)) u_flash (
    .clk, .rst_n,
    .req(flash_req), .regsel(flash_regsel), .rsp(flash_rsp),
    .lock(flash_lock)
  );

  ip_interface u_ip (
    .clk, .rst_n,
    .pb_req(dsp_b_req), .pb_rsp(dsp_b_rsp),
    .fast_sel(ip_fast_sel), .dw(ip_double_wide),
    .ip_clk8, .ip_iosel_n, .ip_idsel_n, .ip_intsel_n, .ip_rw_n, .ip_addr,
    .ip_dout, .ip_dout_en, .ip_din, .ip_ack_n, .ip_intreq_n, .ip_irq
  );

endmodule
