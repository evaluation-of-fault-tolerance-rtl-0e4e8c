// fi_ctrl_tb: self-checking testbench for the fault-injection controller.
//
// Sweeps the low nibble of the register slice (bit-mask and write signal)
// with the RAM enable and write, plus random upper slice bits, and compares
// the error-RAM controls with values worked out here from the rule: the error
// RAM follows every ordinary-RAM access and stores the mask only when the
// user's write signal is set.
module fi_ctrl_tb;
  import ft_pkg::*;
  localparam int unsigned DBITS = 32;

  logic [FI_SLICE_W-1:0] gp_slice;
  logic                  ram_en, ram_we;
  logic                  err_en, err_we, inject;
  logic [DBITS-1:0]      err_wdata;
  int checks = 0, failures = 0;

  fi_ctrl #(.DBITS(DBITS)) dut (.*);

  task automatic check(input logic [DBITS-1:0] got, input logic [DBITS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: slice=%h en=%b we=%b got %h expected %h", what, gp_slice, ram_en, ram_we, got, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int v = 0; v < 64; v++) begin
        logic [DBITS-1:0] exp_data;
        logic             wr;
        gp_slice = {FI_SLICE_W'($urandom) >> 4, 4'(v)};
        ram_en   = v[4];
        ram_we   = v[5];
        #1;
        wr       = v[2];
        exp_data = wr ? DBITS'(v[1:0]) : '0;
        check(DBITS'(err_en), DBITS'(v[4]), "err_en");
        check(DBITS'(err_we), DBITS'(v[4] & v[5]), "err_we");
        check(err_wdata, exp_data, "err_wdata");
        check(DBITS'(inject), DBITS'(v[4] & v[5] & wr & (v[1:0] != 0)), "inject");
      end
    // the register values used for single-core injection
    gp_slice = 16'h0007; ram_en = 1; ram_we = 1; #1;
    check(err_wdata, 32'h3, "0x7 writes mask 0x3");
    gp_slice = 16'h0003; #1;
    check(err_wdata, 32'h0, "0x3 without write signal writes zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
