// tb_sram_ctrl: self-checking test of the static RAM controller with four
// module arrays. Three modules are fitted (sockets 0, 1, 3: 256 Kbyte,
// 64 Kbyte, 1 Mbyte); the controller must place them end to end, report
// 344064 words, refuse addresses beyond, put each word in the right module
// and finish every transfer in three clocks (one wait state).
module tb_sram_ctrl;
  import dspb_pkg::*;
  localparam int unsigned DEPTH = 262144;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lb_req_t     req = '0;
  lb_rsp_t     rsp;
  logic [1:0]  size_code [4];
  logic [3:0]  present;
  logic [23:0] total_words;
  logic [3:0]  mod_cs;
  logic        mod_we;
  logic [17:0] mod_addr;
  logic [31:0] mod_wdata;
  logic [31:0] mod_rdata [4];
  int checks = 0, failures = 0;

  sram_ctrl #(.NMOD(4), .DEPTH(DEPTH)) dut (.*);
  for (genvar i = 0; i < 4; i++) begin : g_m
    sram_module #(.DEPTH(DEPTH)) m (.clk, .cs(mod_cs[i]), .we(mod_we), .addr(mod_addr),
                                    .wdata(mod_wdata), .rdata(mod_rdata[i]));
  end

  // which module was selected in the last transfer
  logic [3:0] seen_cs;
  always @(posedge clk) if (mod_cs != 0) seen_cs <= mod_cs;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit we, input logic [23:0] a, input logic [31:0] d,
                      output logic [31:0] q, output bit err, output int cyc);
    req.req = 1; req.we = we; req.addr = a; req.wdata = d;
    cyc = 0;
    do begin @(posedge clk); @(negedge clk); cyc++; end while (!rsp.ack);
    q = rsp.rdata; err = rsp.err;
    req = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    bit err;
    int cyc, t0;
    int          addrs [8] = '{0, 65535, 65536, 81919, 81920, 300000, 344063, 1000};
    int          mods  [8] = '{0, 0, 1, 1, 3, 3, 3, 0};
    logic [31:0] vals  [8];
    size_code[0] = 2'b01; size_code[1] = 2'b00; size_code[2] = 2'b11; size_code[3] = 2'b11;
    present = 4'b1011;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(total_words == 24'd344064, "total size");
    for (int i = 0; i < 8; i++) begin
      vals[i] = $urandom;
      xfer(1, 24'(addrs[i]), vals[i], q, err, cyc);
      check(!err, "write in range");
      check(cyc == (i == 0 ? 2 : 3), $sformatf("write latency %0d", cyc));  // back to back: one per three clocks
      check(seen_cs == (4'b1 << mods[i]), $sformatf("module of %0d", addrs[i]));
    end
    for (int i = 0; i < 8; i++) begin
      xfer(0, 24'(addrs[i]), 0, q, err, cyc);
      check(!err && q == vals[i], $sformatf("read back %0d", addrs[i]));
    end
    // offsets inside the modules: socket 3 starts at word 81920
    check(g_m[3].m.mem[300000 - 81920] == vals[5], "offset in module 3");
    check(g_m[1].m.mem[0] == vals[2], "offset in module 1");
    // beyond the installed size
    xfer(0, 24'd344064, 0, q, err, cyc);
    check(err, "error beyond size");
    xfer(1, 24'h0FFFFF, 0, q, err, cyc);
    check(err, "error at top of range");
    // throughput: back to back transfers every three clocks
    t0 = $time;
    for (int i = 0; i < 16; i++) xfer(1, 24'(2000 + i), i, q, err, cyc);
    check(($time - t0) / 10 == 48, $sformatf("16 transfers in %0d clocks", ($time - t0) / 10));
    // size change: a single 64 Kbyte module
    present = 4'b0001; size_code[0] = 2'b00;
    @(negedge clk);
    check(total_words == 24'd16384, "single 64K module");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
