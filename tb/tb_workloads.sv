// tb_workloads: the board's three typical applications run through the
// whole board at its full size, one after the other:
//   ring position monitor : 4 channels at 78 kSa/s, digitizer on slot 0 (32 MHz)
//   ring loss monitor     : 8 channels at 20 kSa/s, digitizer on slot 2 (8 MHz)
//   injection line        : 24 channels at 30 Sa/s, digitizer on slot 3 (8 MHz)
// For each, a digitizer card model interrupts at the sample rate; a DSP model
// acknowledges the interrupt, reads every channel over port B and stores the
// samples as one record in static RAM over port A. After each case a VME
// master reads all records back and compares them with the card's sample
// formula. Checked: every sample, and that each conversion was served before
// the next interrupt (the rate holds). The DSP model's busy time per
// conversion is printed. The injection case runs 3 conversions at the real
// 30 Hz period (about 1.07 million clocks each).
module tb_workloads;
  import dspb_pkg::*;
  localparam logic [5:0] WIN = 6'h03;

  logic clk = 0, rst_n = 0;
  always #15.625 clk = ~clk;   // 32 MHz

  logic        vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [5:0]  vme_am = '0;
  logic [31:1] vme_addr = '0;
  logic [31:0] vme_din = '0, vme_dout;
  logic        vme_dout_en, vme_dtack_n, vme_berr_n;
  logic [7:0]  logical_addr = 8'h11;
  logic        vxi_modid_n = 1, self_test_passed = 1, board_ready = 1;
  logic        sysfail_inhibit, dsp_reset;
  lb_req_t     dsp_a_req = '0, dsp_b_req = '0;
  lb_rsp_t     dsp_a_rsp, dsp_b_rsp;
  logic [1:0]  sram_size_code [4] = '{2'b11, 2'b11, 2'b11, 2'b11};
  logic [3:0]  sram_present = 4'b1111;
  logic [3:0]  ip_fast_sel = 4'b0001;
  logic [1:0]  ip_double_wide = 2'b00;
  logic        ip_clk8;
  logic [3:0]  ip_iosel_n, ip_idsel_n, ip_intsel_n;
  logic        ip_rw_n;
  logic [6:1]  ip_addr;
  logic [15:0] ip_dout [4];
  logic        ip_dout_en;
  logic [15:0] ip_din [4];
  logic [3:0]  ip_ack_n;
  logic [7:0]  ip_intreq_n;
  logic [7:0]  ip_irq;
  logic        lbus_gnt_dsp, lbus_gnt_vme, lbus_vme_waited;
  logic [7:0]  flash_lock;
  logic [23:0] sram_words;

  dsp_board dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] sample(input int slot, input int n, input int ch);
    return 16'((slot * 7919 + n * 613 + ch * 151 + 3) & 16'hFFFF);
  endfunction

  // digitizer card models: I/O word ch = channel ch of the current conversion
  int         conv_n = 0;
  logic [3:0] irq = '0;
  assign ip_ack_n = ip_iosel_n & ip_idsel_n & ip_intsel_n;
  assign ip_intreq_n = ~{1'b0, irq[3], 1'b0, irq[2], 1'b0, irq[1], 1'b0, irq[0]};
  for (genvar s = 0; s < 4; s++) begin : g_card
    assign ip_din[s] = !ip_iosel_n[s] ? sample(s, conv_n, int'(ip_addr)) : 16'(s);
    always @(posedge clk) if (!ip_intsel_n[s]) irq[s] <= 1'b0;
  end

  task automatic pa(input bit we, input logic [23:0] a, input logic [31:0] d,
                    output logic [31:0] q);
    dsp_a_req.req = 1; dsp_a_req.we = we; dsp_a_req.addr = a; dsp_a_req.wdata = d;
    do @(negedge clk); while (!dsp_a_rsp.ack);
    q = dsp_a_rsp.rdata;
    dsp_a_req = '0;
  endtask
  task automatic pb(input logic [23:0] a, output logic [31:0] q);
    dsp_b_req.req = 1; dsp_b_req.we = 0; dsp_b_req.addr = a; dsp_b_req.wdata = 0;
    do @(negedge clk); while (!dsp_b_rsp.ack);
    q = dsp_b_rsp.rdata;
    dsp_b_req = '0;
  endtask
  task automatic vme(input logic [5:0] am, input logic [31:0] a, input bit wr, input bit d32,
                     input logic [31:0] d, output int res, output logic [31:0] q);
    int n;
    vme_am = am; vme_addr = a[31:1]; vme_write_n = !wr; vme_lword_n = !d32; vme_din = d;
    #30 vme_as_n = 0;
    #20 vme_ds_n = 2'b00;
    n = 0;
    while (vme_dtack_n && vme_berr_n && n < 400) begin #25 n++; end
    res = !vme_dtack_n ? 0 : !vme_berr_n ? 1 : 2;
    q = vme_dout;
    #20 vme_ds_n = 2'b11; vme_as_n = 1;
    while (!vme_dtack_n || !vme_berr_n) #25;
    #40;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DSP model: serve whichever digitizer interrupts
  int cur_slot = 0, cur_nch = 0, served = 0;
  logic [23:0] recbase = 24'h008000;
  int busy_max = 0;
  initial begin
    logic [31:0] q;
    real t0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (ip_irq[2 * cur_slot]) begin
        t0 = $realtime;
        pb(24'(cur_slot << 8) | 24'h080, q);                 // interrupt acknowledge
        for (int ch = 0; ch < cur_nch; ch++) begin
          pb(24'(cur_slot << 8) | 24'(ch), q);
          pa(1, recbase + 24'(served * cur_nch + ch), q, q);
        end
        served++;
        if (int'(($realtime - t0) / 31.25) > busy_max) busy_max = int'(($realtime - t0) / 31.25);
      end
    end
  end

  task automatic run_case(input string name, input int slot, input int nch,
                          input int period, input int nconv);
    int res;
    logic [31:0] q;
    bit ok;
    cur_slot = slot; cur_nch = nch; served = 0; busy_max = 0;
    recbase = 24'h008000 + 24'(slot * 24'h10000);
    for (int n = 0; n < nconv; n++) begin
      @(negedge clk);
      conv_n = n;
      irq[slot] = 1'b1;
      repeat (period - 1) @(negedge clk);
      check(served == n + 1, $sformatf("%s: conversion %0d served in its period", name, n));
    end
    $display("%s: %0d channels, period %0d clocks, DSP model busy %0d clocks per conversion",
             name, nch, period, busy_max);
    ok = 1;
    for (int n = 0; n < nconv; n++)
      for (int ch = 0; ch < nch; ch++) begin
        vme(6'h09, {WIN, recbase + 24'(n * nch + ch), 2'b00}, 0, 1, 0, res, q);
        ok &= (res == 0) && (q == 32'(sample(slot, n, ch)));
      end
    check(ok, $sformatf("%s: all samples read back over VME", name));
  endtask

  initial begin
    int res;
    logic [31:0] q;
    #200 rst_n = 1;
    #200;
    vme(6'h29, 32'h0000_C000 | (32'(logical_addr) << 6) | 32'h6, 1, 0, {16'h0, WIN, 10'h0}, res, q);
    vme(6'h29, 32'h0000_C000 | (32'(logical_addr) << 6) | 32'h4, 1, 0, 32'h8000, res, q);
    check(res == 0, "VXI configuration");
    run_case("ring position monitor", 0, 4, 410, 20);      // 32 MHz / 78 kHz
    run_case("ring loss monitor", 2, 8, 1600, 10);         // 32 MHz / 20 kHz
    run_case("injection line", 3, 24, 1066667, 3);         // 32 MHz / 30 Hz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
