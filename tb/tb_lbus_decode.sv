// tb_lbus_decode: self-checking test of the local bus address decoder.
// Two slave models stand for the RAM controller and the FLASH, each answering
// two clocks after its request with a tag in the data. Checks every range
// of the word map: which target gets the request, the FLASH register
// select, the RAM size register and the error answer for undefined words.
module tb_lbus_decode;
  import dspb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lb_req_t req = '0, sram_req, flash_req;
  lb_rsp_t rsp, sram_rsp, flash_rsp;
  logic flash_regsel;
  logic [23:0] sram_words = 24'd344064;
  int checks = 0, failures = 0;

  lbus_decode dut (.*);

  int sc = 0, fc = 0;
  int s_hits = 0, f_hits = 0;
  always_ff @(posedge clk) begin
    sc <= (sram_req.req && !sram_rsp.ack) ? sc + 1 : 0;
    fc <= (flash_req.req && !flash_rsp.ack) ? fc + 1 : 0;
  end
  always_comb begin
    sram_rsp  = '{ack: sram_req.req && sc == 1, err: 1'b0,
                  rdata: {8'h5A, sram_req.addr}};
    flash_rsp = '{ack: flash_req.req && fc == 1, err: 1'b0,
                  rdata: {7'h0, flash_regsel, flash_req.addr}};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit we, input logic [23:0] a,
                      output logic [31:0] q, output bit err);
    req.req = 1; req.we = we; req.addr = a; req.wdata = 0;
    do begin
      @(posedge clk); @(negedge clk);
      if (sram_req.req)  s_hits++;   // requests seen, one per clock
      if (flash_req.req) f_hits++;
    end while (!rsp.ack);
    q = rsp.rdata; err = rsp.err;
    req = '0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    bit err;
    int s0, f0;
    logic [23:0] ram  [3] = '{24'h000000, 24'h004000, 24'h0FFFFF};
    logic [23:0] fl   [3] = '{24'hF80000, 24'hFC1234, 24'hFFFFFF};
    logic [23:0] bad  [4] = '{24'h100003, 24'h200000, 24'hF7FFFF, 24'h800000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (ram[i]) begin
      s0 = s_hits; f0 = f_hits;
      xfer(0, ram[i], q, err);
      check(q == {8'h5A, ram[i]} && !err && s_hits == s0 + 1 && f_hits == f0, $sformatf("RAM range %h %b %0d %0d %0d %0d", q, err, s_hits, s0, f_hits, f0));
    end
    foreach (fl[i]) begin
      s0 = s_hits; f0 = f_hits;
      xfer(1, fl[i], q, err);
      check(q == {8'h0, fl[i]} && !err && f_hits == f0 + 1 && s_hits == s0, "FLASH range");
    end
    xfer(1, REG_FLASH_LOCK, q, err);
    check(q == {8'h1, REG_FLASH_LOCK} && !err, "lock register to FLASH");
    xfer(1, REG_FLASH_ERASE, q, err);
    check(q == {8'h1, REG_FLASH_ERASE} && !err, "erase register to FLASH");
    s0 = s_hits; f0 = f_hits;
    xfer(0, REG_SRAM_SIZE, q, err);
    check(q == 32'd344064 && !err && s_hits == s0 && f_hits == f0, "RAM size register");
    xfer(1, REG_SRAM_SIZE, q, err);
    check(err, "RAM size register is read only");
    foreach (bad[i]) begin
      s0 = s_hits; f0 = f_hits;
      xfer(0, bad[i], q, err);
      check(err && s_hits == s0 && f_hits == f0, $sformatf("undefined %h", bad[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
