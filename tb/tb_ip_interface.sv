// tb_ip_interface: self-checking test of the Industry Pack interface.
// Four card models answer I/O, ID and interrupt cycles; slot 3's card adds
// wait states. A port B master runs single and back-to-back transfers.
// Checks: data and slot selection in every space, 16- and 32-bit (double
// wide) transfers, refused space 3, interrupt request routing, and the cycle
// period: 12 clocks (8 MHz slot, 5.3 Mbyte/s at 32 MHz) and 5 clocks
// (32 MHz slot, 12.8 Mbyte/s), doubled bytes per cycle in double wide mode.
module tb_ip_interface;
  import dspb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #15.625 clk = ~clk;   // 32 MHz

  lb_req_t     pb_req = '0;
  lb_rsp_t     pb_rsp;
  logic [3:0]  fast_sel = 4'b0000;
  logic [1:0]  dw = 2'b00;
  logic        ip_clk8;
  logic [3:0]  ip_iosel_n, ip_idsel_n, ip_intsel_n;
  logic        ip_rw_n;
  logic [6:1]  ip_addr;
  logic [15:0] ip_dout [4];
  logic        ip_dout_en;
  logic [15:0] ip_din [4];
  logic [3:0]  ip_ack_n;
  logic [7:0]  ip_intreq_n = 8'hFF;
  logic [7:0]  ip_irq;
  int checks = 0, failures = 0;

  ip_interface dut (.*);

  // card models
  logic [15:0] io [4][64];
  int          wait_ticks [4] = '{0, 0, 0, 2};
  int          wcnt [4];
  for (genvar s = 0; s < 4; s++) begin : g_card
    wire selected = !ip_iosel_n[s] || !ip_idsel_n[s] || !ip_intsel_n[s];
    always @(posedge clk) begin
      if (!selected) wcnt[s] <= 0;
      else           wcnt[s] <= wcnt[s] + 1;
      if (!ip_iosel_n[s] && !ip_rw_n && !ip_ack_n[s]) io[s][ip_addr] <= ip_dout[s];
    end
    // 8 MHz cards see 4 board clocks per IP clock
    assign ip_ack_n[s] = !(selected && wcnt[s] >= wait_ticks[s] * 4);
    assign ip_din[s] = !ip_iosel_n[s]  ? io[s][ip_addr] :
                       !ip_idsel_n[s]  ? (16'h4900 | 16'(s << 6) | 16'(ip_addr)) :
                       !ip_intsel_n[s] ? 16'(8'hA0 + s) : 16'h0;
  end

  // select start times per slot
  real starts [4][$];
  logic [3:0] sel_prev = 4'hF;
  int sel_count [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    logic [3:0] sel;
    sel = ip_iosel_n & ip_idsel_n & ip_intsel_n;
    for (int s = 0; s < 4; s++)
      if (sel_prev[s] && !sel[s]) begin starts[s].push_back($realtime); sel_count[s]++; end
    sel_prev <= sel;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit we, input logic [23:0] a, input logic [31:0] d,
                      output logic [31:0] q, output bit err);
    pb_req.req = 1; pb_req.we = we; pb_req.addr = a; pb_req.wdata = d;
    do @(negedge clk); while (!pb_rsp.ack);
    q = pb_rsp.rdata; err = pb_rsp.err;
    pb_req = '0;
  endtask

  function automatic logic [23:0] ipa(input int slot, input int space, input int a);
    return 24'((slot << 8) | (space << 6) | a);
  endfunction

  // back to back reads of one slot; returns the mean period in clocks
  task automatic burst(input int slot, input int n, output real period);
    logic [31:0] q; bit err;
    starts[slot].delete();
    for (int i = 0; i < n; i++) xfer(0, ipa(slot, 0, i), 0, q, err);
    period = (starts[slot][n-1] - starts[slot][0]) / 31.25 / (n - 1);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    bit err;
    real p;
    int c [4];
    foreach (io[s, a]) io[s][a] = 16'(s * 256 + a);
    #100 rst_n = 1;
    #100 @(negedge clk);
    // 16-bit I/O on each slot, only that slot selected
    for (int s = 0; s < 4; s++) begin
      c = sel_count;
      xfer(1, ipa(s, 0, 5), 32'(16'hB000 + s), q, err);
      check(!err && io[s][5] == 16'hB000 + s, $sformatf("I/O write slot %0d", s));
      xfer(0, ipa(s, 0, 5), 0, q, err);
      check(!err && q == 32'(16'hB000 + s), $sformatf("I/O read slot %0d", s));
      for (int o = 0; o < 4; o++)
        check(sel_count[o] == c[o] + (o == s ? 2 : 0), $sformatf("slot %0d selects %0d", s, o));
    end
    // ID and interrupt spaces
    xfer(0, ipa(2, 1, 3), 0, q, err);
    check(q == 32'h4983, "ID space");
    xfer(0, ipa(1, 2, 0), 0, q, err);
    check(q == 32'hA1, "interrupt vector");
    xfer(0, ipa(1, 3, 0), 0, q, err);
    check(err, "space 3 refused");
    // card with wait states
    xfer(0, ipa(3, 0, 7), 0, q, err);
    check(q == 32'h0307, "waiting card");
    // rates
    burst(2, 16, p);
    check(p == 12.0, $sformatf("8 MHz slot period %f", p));
    burst(0, 16, p);
    check(p == 12.0, $sformatf("fast slot not enabled period %f", p));
    fast_sel = 4'b0101;
    burst(0, 16, p);
    check(p == 5.0, $sformatf("32 MHz slot period %f", p));
    burst(2, 16, p);
    check(p == 12.0, $sformatf("slot without 32 MHz interface period %f", p));
    // double wide, pair 2/3 (8 MHz) and pair 0/1 (32 MHz)
    dw = 2'b10;
    wait_ticks[3] = 0;
    xfer(1, ipa(2, 0, 9), 32'h1357_2468, q, err);
    check(io[2][9] == 16'h2468 && io[3][9] == 16'h1357, "double wide write halves");
    xfer(0, ipa(2, 0, 9), 0, q, err);
    check(q == 32'h1357_2468, "double wide read");
    starts[3].delete();
    burst(2, 8, p);
    check(p == 12.0, $sformatf("double wide 8 MHz period %f", p));
    check(starts[3].size() == 8, "odd slot selected with even");
    xfer(0, ipa(2, 1, 0), 0, q, err);
    check(q == 32'h4980, "ID stays 16 bit in double wide");
    dw = 2'b11; fast_sel = 4'b0011;
    xfer(1, ipa(0, 0, 1), 32'hAAAA_5555, q, err);
    xfer(0, ipa(0, 0, 1), 0, q, err);
    check(q == 32'hAAAA_5555 && io[1][1] == 16'hAAAA, "double wide fast");
    burst(0, 8, p);
    check(p == 5.0, $sformatf("double wide 32 MHz period %f", p));
    // interrupt requests
    ip_intreq_n = 8'b1111_1011;
    repeat (3) @(negedge clk);
    check(ip_irq == 8'b0000_0100, "interrupt request slot 1 INT0");
    ip_intreq_n = 8'hFF;
    repeat (3) @(negedge clk);
    check(ip_irq == 8'h00, "interrupt request released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
