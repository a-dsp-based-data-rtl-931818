// sram_ctrl: static RAM controller with automatic size configuration.
//
// Up to four RAM modules can be fitted. Each module reports its size on two
// size pins; the controller reads them, with a presence bit per socket, and
// lays the fitted modules end to end in socket order from word 0. A request
// inside the installed size selects one module and the offset within it; a
// request beyond it is answered with err.
//
// Timing: one wait state, three clocks per transfer. The request is seen in
// IDLE, the module is selected during the ACC (wait state) clock, and ack
// with the read data is given in the ACK clock. A master that issues its next
// request on the clock after ack gets one word every three clocks, which at
// the 32 MHz local clock assumed here is 42.7 Mbyte/s, the rate the board
// reaches with one wait state.
//
// The size codes (00 = 64 Kbyte, 01 = 256, 10 = 512, 11 = 1 Mbyte) and the
// presence bits are this design's choice; the board only says two pins per
// module let the hardware configure itself.
module sram_ctrl
  import dspb_pkg::*;
#(
  parameter int unsigned NMOD  = 4,       // RAM module sockets
  parameter int unsigned DEPTH = 262144,  // words of the largest module
  localparam int unsigned MAW  = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  lb_req_t         req,
  output lb_rsp_t         rsp,
  input  logic [1:0]      size_code [NMOD],
  input  logic [NMOD-1:0] present,
  output logic [23:0]     total_words,     // installed RAM in words
  // to the modules
  output logic [NMOD-1:0] mod_cs,
  output logic            mod_we,
  output logic [MAW-1:0]  mod_addr,
  output logic [31:0]     mod_wdata,
  input  logic [31:0]     mod_rdata [NMOD]
);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_ACK} state_e;
  state_e state;

  // module bases, from the size pins
  logic [23:0] base  [NMOD];
  logic [23:0] limit [NMOD];
  always_comb begin
    logic [23:0] acc;
    acc = '0;
    for (int i = 0; i < NMOD; i++) begin
      base[i]  = acc;
      if (present[i]) acc = acc + 24'(sram_size_words(size_code[i]));
      limit[i] = acc;
    end
    total_words = acc;
  end

  // which module a request falls in
  logic [NMOD-1:0] hit;
  logic [MAW-1:0]  off;
  always_comb begin
    hit = '0;
    off = '0;
    for (int i = 0; i < NMOD; i++) begin
      if (present[i] && req.addr >= base[i] && req.addr < limit[i]) begin
        hit[i] = 1'b1;
        off    = MAW'(req.addr - base[i]);
      end
    end
  end

  logic [NMOD-1:0] sel_q;
  logic            err_q;
  logic            we_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sel_q <= '0;
      err_q <= 1'b0;
      we_q  <= 1'b0;
      mod_addr  <= '0;
      mod_wdata <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req.req) begin
          sel_q     <= hit;
          err_q     <= (hit == '0);
          we_q      <= req.we;
          mod_addr  <= off;
          mod_wdata <= req.wdata;
          state     <= S_ACC;
        end
        S_ACC:   state <= S_ACK;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mod_cs = (state == S_ACC) ? sel_q : '0;
  assign mod_we = we_q;

  always_comb begin
    rsp.ack   = (state == S_ACK);
    rsp.err   = err_q;
    rsp.rdata = '0;
    for (int i = 0; i < NMOD; i++)
      if (sel_q[i]) rsp.rdata = mod_rdata[i];
  end

endmodule
