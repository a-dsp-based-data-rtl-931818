// tb_sram_module: self-checking test of one static RAM module array.
// Writes 2000 random words at random addresses of a full 1 Mbyte module,
// keeps its own copy in an associative array, then reads every written
// address back and checks the word appears the clock after the select.
module tb_sram_module;
  localparam int unsigned DEPTH = 262144;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        cs = 0, we = 0;
  logic [17:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [int];

  sram_module #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lasta;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      cs = 1; we = 1; addr = 18'(a); wdata = $urandom;
      model[a] = wdata;
      @(negedge clk);
    end
    cs = 0; we = 0;
    foreach (model[a]) begin
      lasta = a;
      cs = 1; addr = 18'(a);
      @(negedge clk);
      cs = 0;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("addr %h: got %h want %h", a, rdata, model[a]);
      end
    end
    // a read with cs low leaves rdata alone
    addr = '0; @(negedge clk);
    checks++;
    if (rdata !== model[lasta]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
