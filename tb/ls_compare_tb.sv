// ls_compare_tb: self-checking testbench for the lockstep compare module.
//
// Drives random AHB master outputs for the two cores, equal most of the time
// and sometimes differing in one field, together with a random bus input.
// A reference model here keeps the last input seen while the outputs agreed
// and checks, every cycle: forwarding and input pass-through on agreement;
// idle bus output, saved input to both cores and core reset on disagreement.
module ls_compare_tb;
  import ft_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  ahb_mst_out_t ahbo_a, ahbo_b, ahbo;
  ahb_mst_in_t  ahbi, ahbi_a, ahbi_b;
  logic         core_rst, mismatch;
  int checks = 0, failures = 0, n_match = 0, n_mismatch = 0;
  ahb_mst_in_t  ref_saved;

  ls_compare dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic ahb_mst_out_t rand_out();
    ahb_mst_out_t o;
    o.hbusreq = 1'($urandom);
    o.htrans  = htrans_e'($urandom);
    o.haddr   = $urandom;
    o.hwrite  = 1'($urandom);
    o.hsize   = 3'($urandom);
    o.hburst  = 3'($urandom);
    o.hprot   = 4'($urandom);
    o.hwdata  = {$urandom, $urandom};
    return o;
  endfunction

  initial begin
    rst_n = 0;
    ahbo_a = '0; ahbo_b = '0; ahbi = '0;
    ref_saved = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      ahbo_a = rand_out();
      ahbo_b = ahbo_a;
      if ($urandom_range(0, 3) == 0) begin
        case ($urandom_range(0, 3))
          0: ahbo_b.hwdata[$urandom_range(0, AHB_DW-1)] ^= 1'b1;
          1: ahbo_b.haddr[$urandom_range(0, AHB_AW-1)]  ^= 1'b1;
          2: ahbo_b.hwrite = ~ahbo_b.hwrite;
          default: ahbo_b.hbusreq = ~ahbo_b.hbusreq;
        endcase
      end
      ahbi = '{hgrant: 1'($urandom), hready: 1'($urandom), hresp: 2'($urandom),
               hrdata: {$urandom, $urandom}};
      #1;
      if (ahbo_a == ahbo_b) begin
        n_match++;
        check(!mismatch && !core_rst, "no mismatch on equal outputs");
        check(ahbo == ahbo_a, "agreeing output forwarded");
        check(ahbi_a == ahbi && ahbi_b == ahbi, "bus input passed to cores");
      end else begin
        n_mismatch++;
        check(mismatch && core_rst, "mismatch raises core reset");
        check(ahbo == AHB_MST_IDLE, "bus blocked on mismatch");
        check(ahbi_a == ref_saved && ahbi_b == ref_saved, "saved input reloaded");
      end
      @(posedge clk);
      if (ahbo_a == ahbo_b) ref_saved = ahbi;
      #1;
    end
    check(n_match > 0 && n_mismatch > 0, "both cases exercised");
    $display("matches=%0d mismatches=%0d", n_match, n_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
