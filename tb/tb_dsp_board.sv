// tb_dsp_board: end-to-end test of the board logic at its full size (four
// 1 Mbyte RAM sockets, 128 Kbyte FLASH), running the ring position monitor
// case: a 4-channel 16-bit digitizer card on IP slot 0 (32 MHz interface)
// interrupts at 78 kHz, a DSP model reads the four samples over port B,
// forms sum and difference of each channel pair and writes raw samples and
// results into a record buffer in static RAM over port A, with a record
// count at word 0. At the same time a VME master model configures the VXI
// registers, reads the count and the records and writes a setting into the
// read/write window, which the DSP model picks up on each timing interrupt
// from a timing card on slot 1 (8 MHz interface).
//
// Checked: every record read over VME against values computed here from the
// digitizer's sample formula; the setting seen by the DSP; BERR for a VME
// write to read-only RAM, for the undefined range and for a locked FLASH
// section; the FLASH lock refusing the DSP too; the RAM size read from the
// size pins; 16 back-to-back DSP RAM writes in 48 clocks; a double wide
// transfer on the slot 2/3 pair. Each mechanism is counted and one that
// never happened is a failure: VME waiting for the DSP, bus errors, FLASH
// lock refusals, 8 and 32 MHz IP cycles, double wide cycles, interrupts.
module tb_dsp_board;
  import dspb_pkg::*;
  localparam int NCONV  = 24;      // digitizer conversions
  localparam int PERIOD = 410;     // clocks between conversions: 78 kHz at 32 MHz
  localparam int TPER   = 4100;    // timing interrupt period (10 conversions)
  localparam logic [23:0] RECBUF = 24'h008000;   // record buffer, VME read only
  localparam logic [23:0] SETTING = 24'h004000;  // setting word, VME read/write
  localparam logic [5:0]  WIN = 6'h21;           // A32 window A31..A26

  logic clk = 0, rst_n = 0;
  always #15.625 clk = ~clk;

  // VME
  logic        vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [5:0]  vme_am = '0;
  logic [31:1] vme_addr = '0;
  logic [31:0] vme_din = '0, vme_dout;
  logic        vme_dout_en, vme_dtack_n, vme_berr_n;
  logic [7:0]  logical_addr = 8'h05;
  logic        vxi_modid_n = 1, self_test_passed = 1, board_ready = 1;
  logic        sysfail_inhibit, dsp_reset;
  // DSP
  lb_req_t     dsp_a_req = '0, dsp_b_req = '0;
  lb_rsp_t     dsp_a_rsp, dsp_b_rsp;
  // RAM sockets
  logic [1:0]  sram_size_code [4] = '{2'b11, 2'b11, 2'b11, 2'b11};
  logic [3:0]  sram_present = 4'b1111;
  // IP
  logic [3:0]  ip_fast_sel = 4'b0001;
  logic [1:0]  ip_double_wide = 2'b10;
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

  // ---------------- sample formula of the digitizer model
  function automatic logic [15:0] sample(input int n, input int ch);
    return 16'((n * 371 + ch * 4099 + 17) & 16'hFFFF);
  endfunction

  // ---------------- IP card models
  // slot 0: digitizer; slot 1: timing; slots 2/3: a double wide card
  int          conv_n = 0;        // conversion the digitizer is presenting
  logic        dig_irq = 0, tim_irq = 0;
  logic [15:0] dw_reg [4] = '{default: 16'h0};
  int          ip_fast_cycles = 0, ip_slow_cycles = 0, ip_dw_cycles = 0;
  logic [3:0]  sel_prev = 4'hF;
  wire  [3:0]  sel_n = ip_iosel_n & ip_idsel_n & ip_intsel_n;
  assign ip_ack_n = sel_n;        // cards answer at once
  assign ip_intreq_n = {4'hF, 3'b111, !tim_irq, 1'b1, !dig_irq} ;
  always_comb begin
    ip_din[0] = !ip_iosel_n[0] ? sample(conv_n, int'(ip_addr[2:1])) :
                !ip_intsel_n[0] ? 16'h0040 : 16'h0;
    ip_din[1] = !ip_intsel_n[1] ? 16'h0041 : 16'h0;
    ip_din[2] = dw_reg[2];
    ip_din[3] = dw_reg[3];
  end
  always @(posedge clk) begin
    for (int s = 0; s < 4; s++)
      if (sel_prev[s] && !sel_n[s]) begin
        if (s == 0) ip_fast_cycles++;
        else if (s == 1) ip_slow_cycles++;
      end
    if (sel_prev[2] && !sel_n[2] && !sel_n[3]) ip_dw_cycles++;
    sel_prev <= sel_n;
    if (!ip_iosel_n[2] && !ip_rw_n) dw_reg[2] <= ip_dout[2];
    if (!ip_iosel_n[3] && !ip_rw_n) dw_reg[3] <= ip_dout[3];
    if (!ip_intsel_n[0]) dig_irq <= 0;   // interrupt acknowledge cycle
    if (!ip_intsel_n[1]) tim_irq <= 0;
  end

  // ---------------- DSP model: port A and port B transfers
  task automatic pa(input bit we, input logic [23:0] a, input logic [31:0] d,
                    output logic [31:0] q, output bit err);
    dsp_a_req.req = 1; dsp_a_req.we = we; dsp_a_req.addr = a; dsp_a_req.wdata = d;
    do @(negedge clk); while (!dsp_a_rsp.ack);
    q = dsp_a_rsp.rdata; err = dsp_a_rsp.err;
    dsp_a_req = '0;
  endtask
  task automatic pb(input bit we, input logic [23:0] a, input logic [31:0] d,
                    output logic [31:0] q, output bit err);
    dsp_b_req.req = 1; dsp_b_req.we = we; dsp_b_req.addr = a; dsp_b_req.wdata = d;
    do @(negedge clk); while (!dsp_b_rsp.ack);
    q = dsp_b_rsp.rdata; err = dsp_b_rsp.err;
    dsp_b_req = '0;
  endtask

  // ---------------- VME master model
  int berr_count = 0, vme_wait_clocks = 0;
  always @(posedge clk) if (lbus_vme_waited) vme_wait_clocks++;
  // result: 0 DTACK, 1 BERR, 2 no answer
  task automatic vme(input logic [5:0] am, input logic [31:0] a, input bit wr, input bit d32,
                     input logic [31:0] d, output int res, output logic [31:0] q);
    int n;
    vme_am = am; vme_addr = a[31:1]; vme_write_n = !wr; vme_lword_n = !d32; vme_din = d;
    #30 vme_as_n = 0;
    #20 vme_ds_n = 2'b00;
    n = 0;
    while (vme_dtack_n && vme_berr_n && n < 400) begin #25 n++; end
    res = !vme_dtack_n ? 0 : !vme_berr_n ? 1 : 2;
    if (res == 1) berr_count++;
    q = vme_dout;
    #20 vme_ds_n = 2'b11; vme_as_n = 1;
    while (!vme_dtack_n || !vme_berr_n) #25;
    #40;
  endtask
  function automatic logic [31:0] mad(input logic [23:0] w);
    return {WIN, w, 2'b00};
  endfunction
  function automatic logic [31:0] vxi(input int idx);
    return 32'h0000_C000 | (32'(logical_addr) << 6) | 32'(idx * 2);
  endfunction

  // ---------------- watchdog
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus: interrupts from the cards
  int irqs_served = 0;
  bit acq_done = 0;
  bit dsp_init_done = 0;
  initial begin
    wait (dsp_init_done);
    #5000;
    for (int n = 0; n < NCONV; n++) begin
      @(negedge clk);
      conv_n = n;
      dig_irq = 1;
      if (n % 10 == 5) tim_irq = 1;
      repeat (PERIOD) @(negedge clk);
      check(!dig_irq, $sformatf("conversion %0d served in time", n));
    end
    acq_done = 1;
  end

  // ---------------- DSP program model
  logic [31:0] setting_seen = 0;
  int lock_refusals = 0;
  initial begin
    logic [31:0] q;
    bit err;
    real t0;
    logic [15:0] s [4];
    #200 rst_n = 1;
    #200 @(negedge clk);
    // RAM size from the size pins, RAM rate
    pa(0, REG_SRAM_SIZE, 0, q, err);
    check(q == 32'h100000, "4 Mbytes of RAM configured");
    t0 = $realtime;
    for (int i = 0; i < 16; i++) pa(1, 24'h0F0000 + 24'(i), 32'(i), q, err);
    // first answer 2 clocks after its request, then one every 3 clocks
    check(int'(($realtime - t0) / 31.25) == 2 + 15 * 3,
          $sformatf("RAM: 16 words in %0d clocks", int'(($realtime - t0) / 31.25)));
    pa(1, 24'h0FFFFF, 32'h5EED_0001, q, err);
    pa(0, 24'h0FFFFF, 0, q, err);
    check(q == 32'h5EED_0001, "top RAM word");
    pa(1, 24'h000000, 0, q, err);  // record count
    // FLASH: program a word, lock section 0, try again
    pa(1, REG_FLASH_ERASE, 0, q, err);
    pa(1, FLASH_BASE + 24'h10, 32'h600D_C0DE, q, err);
    check(!err, "FLASH program");
    pa(1, REG_FLASH_LOCK, 32'h01, q, err);
    pa(1, FLASH_BASE + 24'h11, 32'h0, q, err);
    if (err) lock_refusals++;
    check(err, "DSP refused by FLASH lock");
    // double wide card on slots 2/3
    pb(1, 24'h200 | 24'h4, 32'hBEEF_1234, q, err);
    pb(0, 24'h200 | 24'h4, 0, q, err);
    check(q == 32'hBEEF_1234, "double wide transfer");
    dsp_init_done = 1;
    // acquisition loop
    forever begin
      @(negedge clk);
      if (ip_irq[0]) begin
        pb(0, 24'h080, 0, q, err);          // interrupt acknowledge, slot 0
        for (int ch = 0; ch < 4; ch++) begin
          pb(0, 24'h000 | 24'(ch), 0, q, err);
          s[ch] = q[15:0];
        end
        for (int ch = 0; ch < 4; ch++)
          pa(1, RECBUF + 24'(irqs_served * 8 + ch), 32'(s[ch]), q, err);
        pa(1, RECBUF + 24'(irqs_served * 8 + 4), 32'(s[0]) + 32'(s[1]), q, err);
        pa(1, RECBUF + 24'(irqs_served * 8 + 5), 32'(s[0]) - 32'(s[1]), q, err);
        pa(1, RECBUF + 24'(irqs_served * 8 + 6), 32'(s[2]) + 32'(s[3]), q, err);
        pa(1, RECBUF + 24'(irqs_served * 8 + 7), 32'(s[2]) - 32'(s[3]), q, err);
        irqs_served++;
        pa(1, 24'h000000, 32'(irqs_served), q, err);
        // RAM traffic between interrupts (filtering): keeps the bus busy
        for (int i = 0; i < 40; i++) pa(0, RECBUF + 24'(i), 0, q, err);
      end else if (ip_irq[2]) begin
        pb(0, 24'h180, 0, q, err);          // interrupt acknowledge, slot 1
        pa(0, SETTING, 0, q, err);          // housekeeping: read the setting
        setting_seen = q;
      end
    end
  end

  // ---------------- VME control system model
  initial begin
    int res, nrec;
    logic [31:0] q;
    logic [15:0] e [4];
    bit rec_ok;
    wait (dsp_init_done);
    vme(6'h29, vxi(0), 0, 0, 0, res, q);
    check(res == 0 && q[15:12] == 4'hD, "VXI ID register");
    vme(6'h29, vxi(3), 1, 0, {16'h0, WIN, 10'h0}, res, q);
    vme(6'h29, vxi(2), 1, 0, 32'h8000, res, q);
    vme(6'h29, vxi(2), 0, 0, 0, res, q);
    check(res == 0 && q[15] && q[2] && q[3], "A32 enabled, passed, ready");
    vme(6'h09, mad(SETTING), 1, 1, 32'h0000_0ABC, res, q);
    check(res == 0, "setting written");
    vme(6'h09, mad(24'h000004), 1, 1, 32'h0, res, q);
    check(res == 1, "write to read only RAM: BERR");
    vme(6'h09, mad(24'h100000), 0, 1, 0, res, q);
    check(res == 1, "undefined range: BERR");
    vme(6'h09, mad(FLASH_BASE + 24'h10), 0, 1, 0, res, q);
    check(res == 0 && q == 32'h600D_C0DE, "FLASH read over VME");
    vme(6'h09, mad(FLASH_BASE + 24'h12), 1, 1, 32'h0, res, q);
    check(res == 1, "locked FLASH write: BERR");
    if (res == 1) lock_refusals++;
    // poll the record count while the acquisition runs
    while (!acq_done) begin
      vme(6'h09, mad(24'h000000), 0, 1, 0, res, q);
      #2000;
    end
    #20000;
    vme(6'h09, mad(24'h000000), 0, 1, 0, res, q);
    nrec = int'(q);
    check(nrec == NCONV, $sformatf("record count %0d", nrec));
    for (int n = 0; n < nrec; n++) begin
      logic [31:0] r [8];
      for (int k = 0; k < 8; k++) begin
        vme(6'h0D, mad(RECBUF + 24'(n * 8 + k)), 0, 1, 0, res, q);
        r[k] = q;
      end
      for (int ch = 0; ch < 4; ch++) e[ch] = sample(n, ch);
      rec_ok = r[0] == 32'(e[0]) && r[1] == 32'(e[1]) && r[2] == 32'(e[2]) && r[3] == 32'(e[3]) &&
               r[4] == 32'(e[0]) + 32'(e[1]) && r[5] == 32'(e[0]) - 32'(e[1]) &&
               r[6] == 32'(e[2]) + 32'(e[3]) && r[7] == 32'(e[2]) - 32'(e[3]);
      check(rec_ok, $sformatf("record %0d", n));
    end
    check(setting_seen == 32'h0000_0ABC, "setting seen by the DSP");
    // mechanisms
    $display("mechanisms: vme_wait_clocks=%0d berr=%0d lock_refusals=%0d ip_fast=%0d ip_slow=%0d ip_dw=%0d irqs=%0d",
             vme_wait_clocks, berr_count, lock_refusals, ip_fast_cycles, ip_slow_cycles,
             ip_dw_cycles, irqs_served);
    check(vme_wait_clocks > 0, "VME waited for the DSP");
    check(berr_count >= 3, "bus errors");
    check(lock_refusals >= 2, "FLASH lock refusals");
    check(ip_fast_cycles > 0, "32 MHz IP cycles");
    check(ip_slow_cycles > 0, "8 MHz IP cycles");
    check(ip_dw_cycles > 0, "double wide IP cycles");
    check(irqs_served == NCONV, "digitizer interrupts served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
