// lbus_arbiter: local bus arbitration between DSP port A and the VME slave.
//
// Both masters reach the static RAM, the FLASH and the board registers over
// one local bus. The DSP has the higher priority, to give it the best
// performance: when the bus is free and both ask, the DSP gets it. A transfer
// once granted is not broken; the bus stays with its master until the target
// acknowledges. The VME master simply waits with its request held, so the
// VME acknowledge (DTACK) is delayed until its transfer has been done.
//
// Grant is combinational in the clock the bus is free, so arbitration adds
// no clock to a transfer. Fixed priority, no preemption and the combinational
// grant are this design's reading of "DSP having higher priority"; the
// description gives no more detail. gnt_* and vme_waited are brought out
// for observation. The assertions below use rst_n in disable iff, which is
// why a lint tool may report rst_n as used both synchronously and
// asynchronously; the logic itself only uses it as an asynchronous reset.
module lbus_arbiter
  import dspb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  lb_req_t dsp_req,
  output lb_rsp_t dsp_rsp,
  input  lb_req_t vme_req,
  output lb_rsp_t vme_rsp,
  output lb_req_t bus_req,
  input  lb_rsp_t bus_rsp,
  output logic    gnt_dsp,     // DSP holds the bus this clock
  output logic    gnt_vme,     // VME holds the bus this clock
  output logic    vme_waited   // VME asked but the DSP was granted this clock
);

  typedef enum logic [1:0] {OWN_NONE, OWN_DSP, OWN_VME} owner_e;
  owner_e owner_q, owner;

  always_comb begin
    owner = owner_q;
    if (owner_q == OWN_NONE) begin
      if (dsp_req.req)      owner = OWN_DSP;
      else if (vme_req.req) owner = OWN_VME;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           owner_q <= OWN_NONE;
    else if (bus_rsp.ack) owner_q <= OWN_NONE;
    else                  owner_q <= owner;
  end

  assign gnt_dsp    = (owner == OWN_DSP);
  assign gnt_vme    = (owner == OWN_VME);
  assign vme_waited = vme_req.req && gnt_dsp;

  always_comb begin
    unique case (owner)
      OWN_DSP: bus_req = dsp_req;
      OWN_VME: bus_req = vme_req;
      default: bus_req = '0;
    endcase
    dsp_rsp = gnt_dsp ? bus_rsp : '0;
    vme_rsp = gnt_vme ? bus_rsp : '0;
  end

  // a master keeps its request up until it is acknowledged (it may drop it
  // in the acknowledge clock itself)
  a_dsp_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (owner_q == OWN_DSP && !bus_rsp.ack) |-> dsp_req.req);
  a_vme_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (owner_q == OWN_VME && !bus_rsp.ack) |-> vme_req.req);

endmodule
