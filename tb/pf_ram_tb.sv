// pf_ram_tb: self-checking testbench for the single-port synchronous RAM.
//
// Checks that a fresh RAM reads zero, then runs random reads and writes
// against a reference array: one cycle of read latency, read-before-write on a
// write access, and dataout holding while enable is low.
module pf_ram_tb;
  localparam int unsigned ABITS = 5;
  localparam int unsigned DBITS = 16;

  logic             clk = 1'b0;
  logic             enable, write;
  logic [ABITS-1:0] address;
  logic [DBITS-1:0] datain, dataout;
  int checks = 0, failures = 0;

  logic [DBITS-1:0] ref_mem [2**ABITS];
  logic [DBITS-1:0] exp_q;

  pf_ram #(.ABITS(ABITS), .DBITS(DBITS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DBITS-1:0] got, input logic [DBITS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic access(input logic en, input logic we, input logic [ABITS-1:0] a, input logic [DBITS-1:0] d);
    enable = en; write = we; address = a; datain = d;
    @(posedge clk);
    #1;
  endtask

  initial begin
    enable = 0; write = 0; address = '0; datain = '0;
    for (int i = 0; i < 2**ABITS; i++) ref_mem[i] = '0;
    @(posedge clk); #1;
    // every word starts at zero
    for (int i = 0; i < 2**ABITS; i++) begin
      access(1, 0, ABITS'(i), '0);
      check(dataout, '0, "initial zero");
    end
    // random traffic
    exp_q = dataout;
    for (int n = 0; n < 2000; n++) begin
      logic en, we;
      logic [ABITS-1:0] a;
      logic [DBITS-1:0] d;
      en = ($urandom_range(0, 3) != 0);
      we = $urandom_range(0, 1);
      a  = ABITS'($urandom);
      d  = DBITS'($urandom);
      if (en) begin
        exp_q = ref_mem[a];
        if (we) ref_mem[a] = d;
      end
      access(en, we, a, d);
      check(dataout, exp_q, en ? (we ? "read-before-write" : "read") : "hold");
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
