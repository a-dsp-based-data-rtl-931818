// tb_lbus_arbiter: self-checking test of the local bus arbiter.
// A slave model answers each transfer after three clocks with data derived
// from the address. Checks: the DSP wins when both ask at once, a granted
// transfer is never broken by the other master, each answer goes to the
// master that asked, and a VME request waits while the DSP holds the bus.
module tb_lbus_arbiter;
  import dspb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lb_req_t dsp_req = '0, vme_req = '0, bus_req;
  lb_rsp_t dsp_rsp, vme_rsp, bus_rsp;
  logic gnt_dsp, gnt_vme, vme_waited;
  int checks = 0, failures = 0;

  lbus_arbiter dut (.*);

  // slave: ack three clocks after a request appears, rdata = ~addr
  int scnt = 0;
  always_ff @(posedge clk) begin
    if (!bus_req.req || bus_rsp.ack) scnt <= 0;
    else                             scnt <= scnt + 1;
  end
  always_comb begin
    bus_rsp.ack   = bus_req.req && scnt == 2;
    bus_rsp.err   = 1'b0;
    bus_rsp.rdata = ~{8'h0, bus_req.addr};
  end

  // owner changes only after an ack
  logic [1:0] own_prev;
  int breaks = 0, waits = 0;
  always @(negedge clk) begin
    logic [1:0] own;
    own = {gnt_vme, gnt_dsp};
    if (own_prev != 0 && own != own_prev && !$past(bus_rsp.ack)) breaks++;
    own_prev = own;
    if (vme_waited) waits++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each master does its transfer and records when its ack came
  task automatic dsp_xfer(input logic [23:0] a, output int t_ack, output logic [31:0] q);
    dsp_req.req = 1; dsp_req.addr = a;
    do @(negedge clk); while (!dsp_rsp.ack);
    t_ack = $time / 10; q = dsp_rsp.rdata;
    @(posedge clk); #1 dsp_req = '0;
  endtask
  task automatic vme_xfer(input logic [23:0] a, output int t_ack, output logic [31:0] q);
    vme_req.req = 1; vme_req.addr = a;
    do @(negedge clk); while (!vme_rsp.ack);
    t_ack = $time / 10; q = vme_rsp.rdata;
    @(posedge clk); #1 vme_req = '0;
  endtask

  initial begin
    int td, tv;
    logic [31:0] qd, qv;
    own_prev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!gnt_dsp && !gnt_vme, "idle: no grant");
    // both at once: DSP first
    fork
      dsp_xfer(24'h000010, td, qd);
      vme_xfer(24'h004020, tv, qv);
    join
    check(td < tv, "DSP has priority");
    check(qd == ~32'h000010 && qv == ~32'h004020, "answers routed");
    check(waits > 0, "VME waited");
    // VME first, DSP asks one clock later: no preemption
    fork
      vme_xfer(24'h000111, tv, qv);
      begin repeat (2) @(negedge clk); dsp_xfer(24'h000222, td, qd); end
    join
    check(tv < td, "no preemption of a VME transfer");
    check(qd == ~32'h000222 && qv == ~32'h000111, "answers routed 2");
    // DSP streams, VME gets in only between DSP transfers
    fork
      begin
        for (int i = 0; i < 4; i++) dsp_xfer(24'(i), td, qd);
      end
      begin @(negedge clk); vme_xfer(24'h0000AA, tv, qv); end
    join
    check(qv == ~32'h0000AA, "VME done while DSP streams");
    check(breaks == 0, "no broken transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
