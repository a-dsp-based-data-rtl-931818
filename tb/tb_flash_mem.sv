// tb_flash_mem: self-checking test of the 128 Kbyte FLASH with eight lockable
// sections. Erases every section, programs words (bits can only be cleared),
// locks a section and checks that programming and erasing it are refused
// while its neighbours still work, and checks the read latency of
// 2 + FLASH_WAIT clocks and the 4096-clock section erase.
module tb_flash_mem;
  import dspb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lb_req_t    req = '0;
  logic       regsel = 0;
  lb_rsp_t    rsp;
  logic [7:0] lock;
  int checks = 0, failures = 0;

  flash_mem dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit rs, input bit we, input logic [23:0] a, input logic [31:0] d,
                      output logic [31:0] q, output bit err, output int cyc);
    regsel = rs; req.req = 1; req.we = we; req.addr = a; req.wdata = d;
    cyc = 0;
    do begin @(posedge clk); @(negedge clk); cyc++; end while (!rsp.ack);
    q = rsp.rdata; err = rsp.err;
    req = '0; regsel = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    bit err;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(lock == 8'h00, "unlocked after reset");
    for (int s = 0; s < 8; s++) begin
      xfer(1, 1, REG_FLASH_ERASE, 32'(s), q, err, cyc);
      check(!err, "erase unlocked section");
      check(cyc >= 4096 && cyc <= 4100, $sformatf("erase takes %0d clocks", cyc));
    end
    for (int s = 0; s < 8; s++) begin
      xfer(0, 0, FLASH_BASE + 24'(s * 4096 + $urandom_range(4095)), 0, q, err, cyc);
      check(q == 32'hFFFF_FFFF && !err, "erased word reads all ones");
      check(cyc == 4, $sformatf("read latency %0d", cyc));   // ack in the fifth clock: 2 + FLASH_WAIT
    end
    // programming clears bits only
    xfer(0, 1, FLASH_BASE + 24'h0100, 32'hA5A5_0F0F, q, err, cyc);
    check(!err, "program");
    xfer(0, 0, FLASH_BASE + 24'h0100, 0, q, err, cyc);
    check(q == 32'hA5A5_0F0F, "program result");
    xfer(0, 1, FLASH_BASE + 24'h0100, 32'hFFFF_00FF, q, err, cyc);
    xfer(0, 0, FLASH_BASE + 24'h0100, 0, q, err, cyc);
    check(q == 32'hA5A5_000F, "second program ANDs");
    // the 32K words repeat over the FLASH range
    xfer(0, 0, FLASH_BASE + 24'h8100, 0, q, err, cyc);
    check(q == 32'hA5A5_000F, "alias");
    // lock section 2 (words 8192..12287)
    xfer(0, 1, FLASH_BASE + 24'd8200, 32'h1234_5678, q, err, cyc);
    xfer(1, 1, REG_FLASH_LOCK, 32'h04, q, err, cyc);
    check(lock == 8'h04, "lock register");
    xfer(1, 0, REG_FLASH_LOCK, 0, q, err, cyc);
    check(q == 32'h04, "lock read back");
    xfer(0, 1, FLASH_BASE + 24'd8200, 32'h0, q, err, cyc);
    check(err, "program of locked section refused");
    xfer(1, 1, REG_FLASH_ERASE, 32'd2, q, err, cyc);
    check(err && cyc < 10, "erase of locked section refused");
    xfer(0, 0, FLASH_BASE + 24'd8200, 0, q, err, cyc);
    check(q == 32'h1234_5678 && !err, "locked section unchanged");
    xfer(0, 1, FLASH_BASE + 24'd12288, 32'h0000_FFFF, q, err, cyc);
    check(!err, "neighbour section programs");
    xfer(0, 0, FLASH_BASE + 24'd12288, 0, q, err, cyc);
    check(q == 32'h0000_FFFF, "neighbour value");
    // unlock and erase
    xfer(1, 1, REG_FLASH_LOCK, 32'h00, q, err, cyc);
    xfer(1, 1, REG_FLASH_ERASE, 32'd2, q, err, cyc);
    check(!err, "erase after unlock");
    xfer(0, 0, FLASH_BASE + 24'd8200, 0, q, err, cyc);
    check(q == 32'hFFFF_FFFF, "erased after unlock");
    xfer(0, 0, FLASH_BASE + 24'd12288, 0, q, err, cyc);
    check(q == 32'h0000_FFFF, "erase leaves other section");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
