// grgpreg_tb: self-checking testbench for the APB general-purpose register.
//
// Drives two-cycle APB transfers (setup, then access) and checks the reset
// value, write and read-back at 0xFC003000, that writes to other addresses,
// writes without psel and setup-only cycles leave the register unchanged, and
// that the register value appears on gpreg one clock after the access phase.
module grgpreg_tb;
  import ft_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  apb_req_t    apbi;
  logic [31:0] prdata, gpreg;
  int checks = 0, failures = 0;
  logic [31:0] expv, rd;

  grgpreg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apb_write(input logic [31:0] a, input logic [31:0] d, input logic sel = 1'b1);
    apbi = '{psel: sel, penable: 1'b0, paddr: a, pwrite: 1'b1, pwdata: d};
    @(posedge clk); #1;
    apbi.penable = sel;
    @(posedge clk); #1;
    apbi = '0;
  endtask

  task automatic apb_read(input logic [31:0] a, output logic [31:0] d);
    apbi = '{psel: 1'b1, penable: 1'b0, paddr: a, pwrite: 1'b0, pwdata: '0};
    @(posedge clk); #1;
    apbi.penable = 1'b1;
    #1 d = prdata;
    @(posedge clk); #1;
    apbi = '0;
  endtask

  initial begin
    apbi = '0; rst_n = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    check(gpreg, 32'h0, "reset value");
    apb_write(GRGPREG_ADDR, 32'h0000_0007);
    check(gpreg, 32'h0000_0007, "write 0x7");
    apb_read(GRGPREG_ADDR, rd);
    check(rd, 32'h0000_0007, "read back");
    apb_write(GRGPREG_ADDR + 32'h100, 32'hDEAD_BEEF);
    check(gpreg, 32'h0000_0007, "other address ignored");
    apb_write(GRGPREG_ADDR, 32'hDEAD_BEEF, 1'b0);
    check(gpreg, 32'h0000_0007, "no psel ignored");
    // setup phase only: no write
    apbi = '{psel: 1'b1, penable: 1'b0, paddr: GRGPREG_ADDR, pwrite: 1'b1, pwdata: 32'h1234_5678};
    @(posedge clk); #1;
    check(gpreg, 32'h0000_0007, "setup phase does not write");
    apbi = '0;
    apb_read(GRGPREG_ADDR + 32'h40, rd);
    check(rd, 32'h0, "read elsewhere is zero");
    for (int n = 0; n < 50; n++) begin
      expv = $urandom;
      apb_write(GRGPREG_ADDR, expv);
      check(gpreg, expv, "random write");
      apb_read(GRGPREG_ADDR, rd);
      check(rd, expv, "random read");
    end
    apb_write(GRGPREG_ADDR, 32'h0003_0000);
    check(gpreg, 32'h0003_0000, "core A slice value");
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    check(gpreg, 32'h0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
