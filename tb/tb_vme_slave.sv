// tb_vme_slave: self-checking test of the VME slave interface.
// A VME master model runs cycles with asynchronous strobes (25 ns steps
// against the 31.25 ns board clock); a local bus model answers after a
// programmable delay from its own copy of memory and refuses writes to one
// FLASH word it treats as locked. Checks: VXI register access in A16 space,
// every range of the memory map and its access rights, BERR for refused,
// undefined and non-D32 accesses, no answer to cycles for other boards, and
// DTACK held off until the local bus transfer is done.
module tb_vme_slave;
  import dspb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #15.625 clk = ~clk;

  logic        vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [5:0]  vme_am = '0;
  logic [31:1] vme_addr = '0;
  logic [31:0] vme_din = '0, vme_dout;
  logic        vme_dout_en, vme_dtack_n, vme_berr_n;
  logic [7:0]  logical_addr = 8'h2A;
  logic        a32_en = 0;
  logic [5:0]  a32_base = 6'h12;
  logic        reg_sel, reg_we;
  logic [4:0]  reg_idx;
  logic [15:0] reg_wdata, reg_rdata;
  lb_req_t     lb_req;
  lb_rsp_t     lb_rsp;
  int checks = 0, failures = 0;

  vme_slave dut (.*);

  // register model
  logic [15:0] last_reg_w;
  logic [4:0]  last_reg_idx;
  int          reg_writes = 0;
  assign reg_rdata = 16'h8000 | 16'(reg_idx);
  always @(posedge clk) if (reg_sel && reg_we) begin
    reg_writes++; last_reg_w = reg_wdata; last_reg_idx = reg_idx;
  end

  // local bus model
  logic [31:0] mem [int];
  int lb_delay = 3, lcnt = 0, lb_reqs = 0;
  real t_lb_ack;
  always @(posedge clk) begin
    if (lb_req.req && !lb_rsp.ack) lcnt <= lcnt + 1; else lcnt <= 0;
    if (lb_rsp.ack) begin
      lb_reqs++;
      t_lb_ack = $realtime;
      if (lb_req.we && !lb_rsp.err) mem[int'(lb_req.addr)] = lb_req.wdata;
    end
  end
  always_comb begin
    lb_rsp.ack   = lb_req.req && (lcnt == lb_delay);
    lb_rsp.err   = lb_req.we && (lb_req.addr == 24'hF80010);
    lb_rsp.rdata = mem.exists(int'(lb_req.addr)) ? mem[int'(lb_req.addr)] : 32'hDEAD_0000;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // result: 0 = DTACK, 1 = BERR, 2 = no answer
  task automatic cycle(input logic [5:0] am, input logic [31:0] a, input bit wr,
                       input bit d32, input logic [31:0] d,
                       output int res, output logic [31:0] q, output real t_ack);
    int n;
    vme_am = am; vme_addr = a[31:1]; vme_write_n = !wr; vme_lword_n = !d32; vme_din = d;
    #25 vme_as_n = 0;
    #25 vme_ds_n = 2'b00;
    n = 0;
    while (vme_dtack_n && vme_berr_n && n < 400) begin #25 n++; end
    t_ack = $realtime;
    res = !vme_dtack_n ? 0 : !vme_berr_n ? 1 : 2;
    q = vme_dout;
    #25 vme_ds_n = 2'b11; vme_as_n = 1;
    n = 0;
    while ((!vme_dtack_n || !vme_berr_n) && n < 100) begin #25 n++; end
    check(vme_dtack_n && vme_berr_n, "DTACK/BERR released");
    #50;
  endtask

  function automatic logic [31:0] mad(input logic [23:0] w);
    return {a32_base, w, 2'b00};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res, r0;
    logic [31:0] q;
    real t, t_start;
    #100 rst_n = 1;
    #100;
    // A16 VXI registers at C000h + 64 * 2Ah
    cycle(6'h29, 32'h0000_CA86, 0, 0, 0, res, q, t);
    check(res == 0 && q[15:0] == 16'h8003, "A16 register read");
    cycle(6'h2D, 32'h0000_CA84, 1, 0, 32'h1234, res, q, t);
    check(res == 0 && reg_writes == 1 && last_reg_w == 16'h1234 && last_reg_idx == 2, "A16 register write");
    cycle(6'h29, 32'h0000_CAC6, 0, 0, 0, res, q, t);
    check(res == 2, "other logical address ignored");
    // memory window disabled
    cycle(6'h09, mad(24'h000100), 0, 1, 0, res, q, t);
    check(res == 2, "no answer while A32 disabled");
    a32_en = 1;
    // read / write window
    r0 = lb_reqs;
    cycle(6'h09, mad(24'h004010), 1, 1, 32'hCAFE_F00D, res, q, t);
    check(res == 0 && mem[32'h004010] == 32'hCAFE_F00D && lb_reqs == r0 + 1, "write in r/w window");
    cycle(6'h0D, mad(24'h004010), 0, 1, 0, res, q, t);
    check(res == 0 && q == 32'hCAFE_F00D, "read back");
    // read only parts of the RAM
    mem[32'h000010] = 32'h1111_2222;
    cycle(6'h09, mad(24'h000010), 0, 1, 0, res, q, t);
    check(res == 0 && q == 32'h1111_2222, "read of read only RAM");
    r0 = lb_reqs;
    cycle(6'h09, mad(24'h000010), 1, 1, 32'h0, res, q, t);
    check(res == 1 && mem[32'h000010] == 32'h1111_2222 && lb_reqs == r0, "write below window refused");
    cycle(6'h09, mad(24'h008000), 1, 1, 32'h0, res, q, t);
    check(res == 1 && lb_reqs == r0, "write above window refused");
    cycle(6'h09, mad(24'h0FFFFF), 0, 1, 0, res, q, t);
    check(res == 0 && lb_reqs == r0 + 1, "read at top of RAM");
    // undefined range
    r0 = lb_reqs;
    cycle(6'h09, mad(24'h100000), 0, 1, 0, res, q, t);
    check(res == 1 && lb_reqs == r0, "undefined start");
    cycle(6'h09, mad(24'hF7FFFF), 0, 1, 0, res, q, t);
    check(res == 1 && lb_reqs == r0, "undefined end");
    // FLASH: write goes through, the locked word is refused by the target
    cycle(6'h09, mad(24'hF80020), 1, 1, 32'h0F0F_0F0F, res, q, t);
    check(res == 0 && mem[32'hF80020] == 32'h0F0F_0F0F, "FLASH write");
    cycle(6'h09, mad(24'hF80010), 1, 1, 32'h0, res, q, t);
    check(res == 1, "locked FLASH write ends in BERR");
    // not D32
    cycle(6'h09, mad(24'h004010), 0, 0, 0, res, q, t);
    check(res == 1, "D16 memory access refused");
    // other window, other modifier
    cycle(6'h09, {6'h13, 24'h004010, 2'b00}, 0, 1, 0, res, q, t);
    check(res == 2, "other A32 window ignored");
    cycle(6'h39, mad(24'h004010), 0, 1, 0, res, q, t);
    check(res == 2, "A24 modifier ignored");
    // DTACK waits for the local bus
    lb_delay = 40;
    cycle(6'h09, mad(24'h004010), 0, 1, 0, res, q, t);
    check(res == 0 && q == 32'hCAFE_F00D, "slow local bus read");
    check(t > t_lb_ack, "DTACK after the local bus answer");
    check(t - t_lb_ack < 200.0, "DTACK soon after the local bus answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
