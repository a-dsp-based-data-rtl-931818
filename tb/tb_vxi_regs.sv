// tb_vxi_regs: self-checking test of the VXI configuration registers.
// Reads the ID and device type words, writes control and offset, and checks
// the status bits, the A32 enable and the window base taken from the offset.
module tb_vxi_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sel = 0, we = 0;
  logic [4:0]  idx = '0;
  logic [15:0] wdata = '0, rdata;
  logic        modid_n = 1, passed = 0, ready = 0;
  logic        a32_en, sysfail_inh, board_reset;
  logic [5:0]  a32_base;
  int checks = 0, failures = 0;

  vxi_regs #(.MANUF_ID(12'hABC), .MODEL(12'h123)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [4:0] i, input logic [15:0] d);
    idx = i; wdata = d; we = 1; sel = 1;
    @(negedge clk);
    sel = 0; we = 0;
  endtask

  function automatic logic [15:0] rd(input logic [4:0] i);
    idx = i;
    return rdata;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    idx = 0; #1 check(rdata == 16'hDABC, "ID register");
    idx = 1; #1 check(rdata == 16'h5123, "device type, 64 Mbyte A32");
    idx = 2; #1 check(rdata == 16'h7FF0, "status after reset");
    check(!a32_en && !board_reset, "disabled after reset");
    passed = 1; ready = 1; modid_n = 0;
    #1 check(rdata == 16'h3FFC, "status with passed and ready");
    wr(3, 16'hA400);
    check(a32_base == 6'b101001, "window base from offset");
    idx = 3; #1 check(rdata == 16'hA400, "offset read back");
    wr(2, 16'h8002);
    check(a32_en && sysfail_inh && !board_reset, "control write");
    idx = 2; #1 check(rdata == 16'hBFFE, "status after control");
    wr(2, 16'h8001);
    check(board_reset && !sysfail_inh, "reset bit");
    idx = 9; #1 check(rdata == 16'hFFFF, "unused register");
    wr(9, 16'h0000);
    check(a32_en && a32_base == 6'b101001, "unused write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
