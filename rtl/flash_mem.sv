// flash_mem: 128 Kbyte FLASH memory with eight lockable sections.
//
// The FLASH holds the DSP program and permanent coefficients. It is 32K
// words of 32 bits split into eight sections of 4K words; each section has
// a lock bit, and a locked section refuses programming and erasing, so that
// a core program locked into it cannot be changed by mistake.
//
// Array port (regsel = 0, addr[14:0] selects the word, upper bits ignored so
// the 32K words repeat over the FLASH range of the map):
//   read    - data after FLASH_WAIT wait states
//   write   - programs the word: bits can only be cleared, new = old & wdata
// Register port (regsel = 1, addr[0] selects the register):
//   addr[0]=0  lock register, read/write, bit n locks section n
//   addr[0]=1  erase, write only: data[2:0] names a section to set to all
//              ones; the transfer is acknowledged when all 4K words are done,
//              one word per clock
// A program or erase of a locked section is acknowledged with err and
// changes nothing. Every transfer takes 2 + FLASH_WAIT clocks except erase.
//
// Eight lockable sections and 128 Kbyte follow the board description.
// Program-by-AND, the register port, the lock reset value and the wait
// states are this design's choices; the description gives no FLASH timing.
module flash_mem
  import dspb_pkg::*;
#(
  parameter int unsigned WORDS      = 32768,  // 128 Kbyte
  parameter int unsigned SECTIONS   = 8,
  parameter int unsigned FLASH_WAIT = 3,
  parameter logic [7:0]  LOCK_INIT  = 8'h00,
  localparam int unsigned AW  = $clog2(WORDS),
  localparam int unsigned SW  = $clog2(SECTIONS),
  localparam int unsigned SAW = AW - SW        // address bits inside a section
) (
  input  logic    clk,
  input  logic    rst_n,
  input  lb_req_t req,
  input  logic    regsel,
  output lb_rsp_t rsp,
  output logic [SECTIONS-1:0] lock
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_PROG, S_ERASE, S_ACK} state_e;
  state_e state;

  logic [31:0]         mem [WORDS];
  logic [AW-1:0]       a_q;
  logic [31:0]         d_q;
  logic [31:0]         rd_q;
  logic                err_q;
  logic [7:0]          wcnt;
  logic [SAW-1:0]      ecnt;
  logic [SW-1:0]       esec;

  logic [31:0]         rd_mem;
  logic                regsel_q, we_q;

  wire [SW-1:0] req_sec = req.addr[AW-1:SAW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lock  <= LOCK_INIT[SECTIONS-1:0];
      a_q   <= '0;
      d_q   <= '0;
      rd_q  <= '0;
      err_q <= 1'b0;
      wcnt  <= '0;
      ecnt  <= '0;
      esec  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req.req) begin
          a_q   <= req.addr[AW-1:0];
          d_q   <= req.wdata;
          err_q <= 1'b0;
          wcnt  <= 8'(FLASH_WAIT);
          if (regsel) begin
            if (!req.addr[0]) begin
              if (req.we) lock <= req.wdata[SECTIONS-1:0];
              rd_q  <= 32'(lock);
              state <= S_WAIT;
            end else if (req.we && !lock[req.wdata[SW-1:0]]) begin
              esec  <= req.wdata[SW-1:0];
              ecnt  <= '0;
              state <= S_ERASE;
            end else begin
              err_q <= req.we;   // erase of a locked section
              rd_q  <= '0;
              state <= S_WAIT;
            end
          end else if (req.we) begin
            err_q <= lock[req_sec];
            state <= S_WAIT;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (wcnt <= 8'd1) state <= (!regsel_q && we_q && !err_q) ? S_PROG : S_ACK;
          else              wcnt  <= wcnt - 8'd1;
        end
        S_PROG:  state <= S_ACK;
        S_ERASE: begin
          ecnt <= ecnt + 1'b1;
          if (ecnt == '1) state <= S_ACK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the array: no reset, FLASH contents survive it
  always_ff @(posedge clk) begin
    if (state == S_PROG)  mem[a_q] <= mem[a_q] & d_q;
    if (state == S_ERASE) mem[{esec, ecnt}] <= '1;
    if (state == S_WAIT)  rd_mem <= mem[a_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regsel_q <= 1'b0;
      we_q     <= 1'b0;
    end else if (state == S_IDLE && req.req) begin
      regsel_q <= regsel;
      we_q     <= req.we;
    end
  end

  assign rsp.ack   = (state == S_ACK);
  assign rsp.err   = err_q;
  assign rsp.rdata = regsel_q ? rd_q : rd_mem;

endmodule
