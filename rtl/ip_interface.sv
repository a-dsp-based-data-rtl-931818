// ip_interface: DSP port B to four Industry Pack (IP) slots.
//
// Raw data from the IP mezzanine cards (digitizers, timing interface) reaches
// the DSP on its port B, apart from the local bus on port A. This block turns
// a port B word transfer into an IP bus cycle on one of four slots.
//
// Port B word address (this design's layout):
//   addr[9:8] slot, addr[7:6] space: 0 = I/O, 1 = ID, 2 = interrupt
//   (INTSel, reads the vector), 3 = refused with err; addr[5:0] = IP A6..A1.
//
// IP cycle, counted in IP clocks ("steps"): a request is taken on a step and
// the slot's select, A6..A1, R/W* and write data are driven; on each later
// step ACK* is sampled; when it is seen, read data is latched, the select is
// dropped and port B is acknowledged; then REC steps of recovery follow
// before the next cycle may start. With a card that acknowledges at once the
// cycle repeats every 2 + REC steps:
//   8 MHz slots  (REC_SLOW = 1): 3 steps, 2 bytes per 375 ns = 5.3 Mbyte/s
//   32 MHz slots (REC_FAST = 3): 5 steps, 2 bytes per 156 ns = 12.8 Mbyte/s
// Those are the rates the board reaches; the recovery counts are chosen to
// give them. The board clock is taken as 32 MHz; an 8 MHz slot steps on every
// fourth clock and ip_clk8 is that clock brought out. The 32 MHz interface
// exists on slots FAST_SLOTS (two slots, which two is assumed: 0 and 1) and
// is used where fast_sel is also set.
//
// Double wide: a card that spans the slot pair 0/1 (dw[0]) or 2/3 (dw[1])
// gets 32-bit I/O transfers: both selects together, D15..0 on the even slot,
// D31..16 on the odd one, done when both have acknowledged; this doubles the
// rate. ID and interrupt cycles stay 16 bit on the addressed slot.
//
// IP interrupt requests (two per slot) are synchronized and brought out as
// ip_irq for the DSP interrupt inputs.
module ip_interface
  import dspb_pkg::*;
#(
  parameter logic [3:0]  FAST_SLOTS = 4'b0011,
  parameter int unsigned REC_SLOW = 1,
  parameter int unsigned REC_FAST = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // DSP port B
  input  lb_req_t     pb_req,
  output lb_rsp_t     pb_rsp,
  // configuration straps
  input  logic [3:0]  fast_sel,
  input  logic [1:0]  dw,
  // IP slots
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
  input  logic [7:0]  ip_intreq_n,   // {slot3 INT1,INT0, ..., slot0 INT1,INT0}
  output logic [7:0]  ip_irq
);

  typedef enum logic [1:0] {S_IDLE, S_SEL, S_REC, S_ERR} state_e;
  state_e state;

  // 8 MHz step
  logic [1:0] div;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 2'd1;
  end
  assign ip_clk8 = div[1];
  wire step_slow = (div == 2'd1);   // ip_clk8 rises on the next edge

  wire [1:0] rslot  = pb_req.addr[9:8];
  wire [1:0] rspace = pb_req.addr[7:6];
  wire [3:0] fast   = FAST_SLOTS & fast_sel;

  logic [1:0] space_q;
  logic       dw_q;      // double wide transfer in progress
  logic [3:0] selmask_q;   // slots taking part
  logic [3:0] acked_q;
  logic       fast_q;
  logic [1:0] rec_q;
  logic [31:0] rd_q;
  logic        ack_pb;

  wire step = fast_q ? 1'b1 : step_slow;
  // step for a new request, by the requested slot
  wire req_fast = fast[rslot];
  wire req_pair_dw = dw[rslot[1]] && (rspace == 2'd0);

  logic [3:0] selmask_n;
  always_comb begin
    selmask_n = 4'b0001 << rslot;
    if (req_pair_dw) selmask_n = 4'b0011 << {rslot[1], 1'b0};
  end
  // a double wide card runs at the 8 MHz rate unless both slots are fast
  wire new_fast = req_pair_dw ? (fast[{rslot[1], 1'b0}] && fast[{rslot[1], 1'b1}])
                              : req_fast;

  wire [3:0] acks = ~ip_ack_n & selmask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      dw_q       <= 1'b0;
      space_q    <= '0;
      selmask_q  <= '0;
      acked_q    <= '0;
      fast_q     <= 1'b0;
      rec_q      <= '0;
      rd_q       <= '0;
      ack_pb     <= 1'b0;
      ip_rw_n    <= 1'b1;
      ip_addr    <= '0;
      ip_dout    <= '{default: '0};
    end else begin
      ack_pb <= 1'b0;
      unique case (state)
        S_IDLE: if (pb_req.req && !ack_pb) begin
          if (rspace == 2'd3) begin
            state <= S_ERR;
          end else if (new_fast ? 1'b1 : step_slow) begin
            dw_q      <= req_pair_dw;
            rd_q      <= '0;
            space_q   <= rspace;
            selmask_q <= selmask_n;
            acked_q   <= '0;
            fast_q    <= new_fast;
            ip_rw_n   <= !pb_req.we;
            ip_addr   <= pb_req.addr[5:0];
            for (int s = 0; s < 4; s++)
              ip_dout[s] <= (s[0] && req_pair_dw) ? pb_req.wdata[31:16] : pb_req.wdata[15:0];
            state <= S_SEL;
          end
        end
        S_SEL: if (step) begin
          acked_q <= acked_q | acks;
          for (int s = 0; s < 4; s++)
            if (acks[s]) begin
              if (dw_q && s[0]) rd_q[31:16] <= ip_din[s];
              else              rd_q[15:0]  <= ip_din[s];
            end
          if ((acked_q | acks) == selmask_q) begin
            ack_pb <= 1'b1;
            rec_q  <= 2'(fast_q ? REC_FAST : REC_SLOW);
            state  <= S_REC;
          end
        end
        S_REC: if (step) begin
          if (rec_q <= 2'd1) state <= S_IDLE;
          else               rec_q <= rec_q - 2'd1;
        end
        S_ERR: begin
          ack_pb <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // selects are held while a card has not yet acknowledged
  wire [3:0] active = (state == S_SEL) ? (selmask_q & ~acked_q) : 4'b0;
  assign ip_iosel_n  = ~(active & {4{space_q == 2'd0}});
  assign ip_idsel_n  = ~(active & {4{space_q == 2'd1}});
  assign ip_intsel_n = ~(active & {4{space_q == 2'd2}});
  assign ip_dout_en  = (state == S_SEL) && !ip_rw_n;

  logic err_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 err_q <= 1'b0;
    else if (state == S_IDLE)   err_q <= (rspace == 2'd3);
  end

  assign pb_rsp.ack   = ack_pb;
  assign pb_rsp.err   = err_q;
  assign pb_rsp.rdata = rd_q;

  // interrupt requests
  logic [7:0] irq_s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_s1 <= '0;
      ip_irq <= '0;
    end else begin
      irq_s1 <= ~ip_intreq_n;
      ip_irq <= irq_s1;
    end
  end

endmodule
