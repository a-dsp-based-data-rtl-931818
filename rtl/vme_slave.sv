// vme_slave: IEEE-1014 slave interface of the DSP board.
//
// The VME bus reaches the board in two ways. A16 short I/O accesses (address
// modifiers 29h, 2Dh) at C000h + 64 * logical address go to the VXI
// configuration registers, D16. A32 data accesses (modifiers 09h, 0Ah, 0Dh,
// 0Eh) inside the 64 Mbyte window set by the VXI offset register go to the
// local bus as 32-bit word transfers, D32 only; word = A25..A2.
//
// The memory map seen from VME, in 32-bit words from the window base:
//   000000h-003FFFh  static RAM, read only
//   004000h-007FFFh  static RAM, read / write
//   008000h-0FFFFFh  static RAM, read only
//   100000h-F7FFFFh  undefined: bus error
//   F80000h-FFFFFFh  FLASH, read; writes program it unless the section is
//                    locked (the FLASH then refuses with an error)
// A refused access, or a memory access that is not D32, ends with BERR.
//
// The bus strobes are asynchronous to the board clock: AS* and DS0*/DS1* go
// through two-flop synchronizers and the address, modifier, WRITE* and data
// lines are sampled once the synchronized strobes show a cycle. The local
// bus request is then held until the arbiter has given the bus (the DSP has
// priority) and the target has answered; only then is DTACK* (or BERR*)
// driven, so the VME master just sees a longer cycle. DTACK*/BERR* are
// released when both data strobes are seen high again.
//
// The windows and the rights follow the board's memory map; the use of
// 32-bit word addresses, A32 with a 64 Mbyte window, D32-only memory
// accesses and BERR for refused accesses are this design's reading.
// rst_n also appears in the disable iff of the assertion at the end, which a
// lint tool may report as a synchronous use; the logic resets asynchronously.
module vme_slave
  import dspb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // VME bus (low-active strobes)
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
  // configuration
  input  logic [7:0]  logical_addr,
  input  logic        a32_en,
  input  logic [5:0]  a32_base,
  // VXI registers
  output logic        reg_sel,
  output logic        reg_we,
  output logic [4:0]  reg_idx,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  // local bus master
  output lb_req_t     lb_req,
  input  lb_rsp_t     lb_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_DECODE, S_LBUS, S_ACK, S_BERR, S_RELEASE} state_e;
  state_e state;

  // strobe synchronizers
  logic [1:0] as_s, ds0_s, ds1_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s  <= 2'b11;
      ds0_s <= 2'b11;
      ds1_s <= 2'b11;
    end else begin
      as_s  <= {as_s[0],  vme_as_n};
      ds0_s <= {ds0_s[0], vme_ds_n[0]};
      ds1_s <= {ds1_s[0], vme_ds_n[1]};
    end
  end
  wire as_act  = !as_s[1];
  wire ds_any  = !ds0_s[1] || !ds1_s[1];
  wire ds_both = !ds0_s[1] && !ds1_s[1];

  // sampled cycle
  logic [31:1] a_q;
  logic [5:0]  am_q;
  logic        wr_q, lword_q, both_q;
  logic [31:0] d_q;
  logic [31:0] rd_q;

  wire am_a16 = (am_q == 6'h29) || (am_q == 6'h2D);
  wire am_a32 = (am_q == 6'h09) || (am_q == 6'h0A) || (am_q == 6'h0D) || (am_q == 6'h0E);
  wire hit_reg = am_a16 && (a_q[15:6] == {2'b11, logical_addr});
  wire hit_mem = am_a32 && a32_en && (a_q[31:26] == a32_base);
  wire [23:0] word = a_q[25:2];
  wire        d32  = both_q && !lword_q && !a_q[1];

  // access rights of the VME memory map
  logic mem_ok;
  always_comb begin
    unique case (lb_target(word))
      TGT_SRAM:  mem_ok = !wr_q || (word >= VME_RW_LO && word <= VME_RW_HI);
      TGT_FLASH: mem_ok = 1'b1;
      default:   mem_ok = 1'b0;
    endcase
    mem_ok = mem_ok && d32;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      a_q     <= '0;
      am_q    <= '0;
      wr_q    <= 1'b0;
      lword_q <= 1'b1;
      both_q  <= 1'b0;
      d_q     <= '0;
      rd_q    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (as_act && ds_any) begin
          a_q     <= vme_addr;
          am_q    <= vme_am;
          wr_q    <= !vme_write_n;
          lword_q <= vme_lword_n;
          both_q  <= ds_both;
          d_q     <= vme_din;
          state   <= S_DECODE;
        end
        S_DECODE: begin
          if (hit_reg) begin
            rd_q  <= {16'h0, reg_rdata};
            state <= S_ACK;
          end else if (hit_mem) begin
            state <= mem_ok ? S_LBUS : S_BERR;
          end else begin
            state <= S_RELEASE;    // not for this board
          end
        end
        S_LBUS: if (lb_rsp.ack) begin
          rd_q  <= lb_rsp.rdata;
          state <= lb_rsp.err ? S_BERR : S_ACK;
        end
        S_ACK, S_BERR, S_RELEASE: if (!ds_any) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign reg_sel   = (state == S_DECODE) && hit_reg;
  assign reg_we    = wr_q;
  assign reg_idx   = a_q[5:1];
  assign reg_wdata = d_q[15:0];

  always_comb begin
    lb_req       = '0;
    lb_req.req   = (state == S_LBUS);
    lb_req.we    = wr_q;
    lb_req.addr  = word;
    lb_req.wdata = d_q;
  end

  assign vme_dtack_n = !(state == S_ACK);
  assign vme_berr_n  = !(state == S_BERR);
  assign vme_dout    = rd_q;
  assign vme_dout_en = (state == S_ACK) && !wr_q;

  // DTACK* and BERR* are never driven together
  a_ack_excl: assert property (@(posedge clk) disable iff (!rst_n)
                               !(!vme_dtack_n && !vme_berr_n));

endmodule
