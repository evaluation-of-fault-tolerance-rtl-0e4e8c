// syncram_fi_tb: self-checking testbench for the fault-injecting syncram.
//
// Fills the RAM with the register slice clear and checks clean read-back,
// then writes words with a bit-mask and the write signal set and checks that
// exactly the masked bits come back flipped. It then checks that changing
// the register after the write does not change stored faults, that a rewrite
// with the write signal clear removes the fault, and that reads keep one
// cycle of latency. A reference model of both RAMs is kept here.
module syncram_fi_tb;
  import ft_pkg::*;
  localparam int unsigned ABITS = 6;
  localparam int unsigned DBITS = 32;

  logic                  clk = 1'b0;
  logic                  enable, write, inject;
  logic [ABITS-1:0]      address;
  logic [DBITS-1:0]      datain, dataout;
  logic [FI_SLICE_W-1:0] testin;
  int checks = 0, failures = 0, n_inject = 0;

  logic [DBITS-1:0] ref_data [2**ABITS];
  logic [DBITS-1:0] ref_err  [2**ABITS];

  syncram_fi #(.ABITS(ABITS), .DBITS(DBITS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (inject) n_inject++;

  task automatic check(input logic [DBITS-1:0] got, input logic [DBITS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr=%0d got %h expected %h", what, address, got, exp);
    end
  endtask

  task automatic wr(input logic [ABITS-1:0] a, input logic [DBITS-1:0] d);
    enable = 1; write = 1; address = a; datain = d;
    ref_data[a] = d;
    ref_err[a]  = testin[FI_WR_BIT] ? DBITS'(testin[FI_MASK_W-1:0]) : '0;
    @(posedge clk); #1;
    enable = 0; write = 0;
  endtask

  task automatic rd_check(input logic [ABITS-1:0] a, input string what);
    enable = 1; write = 0; address = a;
    @(posedge clk); #1;
    enable = 0;
    check(dataout, ref_data[a] ^ ref_err[a], what);
  endtask

  initial begin
    enable = 0; write = 0; address = '0; datain = '0; testin = '0;
    @(posedge clk); #1;
    // clean fill and read-back
    for (int i = 0; i < 2**ABITS; i++) wr(ABITS'(i), $urandom);
    for (int i = 0; i < 2**ABITS; i++) rd_check(ABITS'(i), "clean read");
    // mask without the write signal injects nothing
    testin = 16'h0003;
    for (int i = 0; i < 8; i++) wr(ABITS'(i), $urandom);
    for (int i = 0; i < 8; i++) rd_check(ABITS'(i), "mask without write");
    // mask with the write signal: bits flipped on read
    testin = 16'h0007;
    for (int i = 8; i < 16; i++) wr(ABITS'(i), $urandom);
    for (int i = 8; i < 16; i++) begin
      rd_check(ABITS'(i), "injected read");
      checks++;
      if ((dataout ^ ref_data[i]) !== 32'h3) begin
        failures++;
        $display("FAIL flipped bits at %0d: %h", i, dataout ^ ref_data[i]);
      end
    end
    // a fault stays after the register is cleared
    testin = 16'h0000;
    for (int i = 8; i < 16; i++) rd_check(ABITS'(i), "fault persists");
    // rewriting with the write signal clear removes it
    for (int i = 8; i < 12; i++) wr(ABITS'(i), $urandom);
    for (int i = 8; i < 16; i++) rd_check(ABITS'(i), "after rewrite");
    // single-bit masks and random mixed traffic
    for (int n = 0; n < 400; n++) begin
      logic [ABITS-1:0] a;
      a = ABITS'($urandom);
      testin = 16'($urandom_range(0, 7));
      if ($urandom_range(0, 1)) wr(a, $urandom);
      else rd_check(a, "random");
    end
    // read latency: data appears one cycle after the address
    testin = '0;
    wr(ABITS'(1), 32'hCAFE_0001);
    wr(ABITS'(2), 32'hCAFE_0002);
    enable = 1; write = 0; address = ABITS'(1);
    @(posedge clk); #1;
    address = ABITS'(2);
    check(dataout, 32'hCAFE_0001, "latency cycle 1");
    @(posedge clk); #1;
    enable = 0;
    check(dataout, 32'hCAFE_0002, "latency cycle 2");
    checks++;
    if (n_inject == 0) begin
      failures++;
      $display("FAIL no injection observed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
