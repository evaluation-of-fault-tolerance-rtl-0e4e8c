// ls_fi_top_tb: end-to-end testbench of the lockstep pair with fault injection.
//
// Two core_model instances stand in for the processor cores. The testbench
// acts as the host monitor, writing the fault-injection register over APB,
// and as the AHB bus, returning random read data. The scenario:
//  1. clean run: both cores fill and scan their memories, outputs agree and
//     reach the bus, and the bus data is checked against the fill pattern;
//  2. inject into core A (mask and write signal in its register slice) and
//     reset the cores so the fill writes the mask into core A's error RAM:
//     the first corrupted read gives a mismatch, the bus is blocked, the
//     saved input is reloaded and the cores are reset; while the write signal
//     stays set the fault is rewritten on every refill and mismatches repeat;
//  3. clear the register: the next refill zeroes the error RAM and the pair
//     completes a full pass without a mismatch;
//  4. the same for core B through its own slice;
//  5. a mask without the write signal injects nothing;
//  6. the same mask in both cores corrupts both alike: no mismatch, and the
//     corrupted data reaches the bus (the limit of comparing two copies).
// Each mechanism is counted and a mechanism that never happened is a failure.
// The top runs with its default parameters.
module ls_fi_top_tb;
  import ft_pkg::*;
  localparam int unsigned ABITS = 8;
  localparam int unsigned DBITS = 32;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             core_rst_n;   // resets only the core models
  apb_req_t         apbi;
  logic [31:0]      prdata, gpreg;
  ahb_mst_out_t     core_ahbo [2];
  ahb_mst_in_t      core_ahbi [2];
  logic             core_rst, mismatch;
  ahb_mst_out_t     ahbo;
  ahb_mst_in_t      ahbi;
  logic             ram_en   [2];
  logic             ram_we   [2];
  logic [ABITS-1:0] ram_addr [2];
  logic [DBITS-1:0] ram_din  [2];
  logic [DBITS-1:0] ram_dout [2];
  logic [1:0]       inject;
  logic [1:0]       run_done;

  int checks = 0, failures = 0;
  int n_apb_wr = 0, n_apb_rd = 0, n_inject_a = 0, n_inject_b = 0;
  int n_mismatch = 0, n_core_rst = 0, n_reload = 0, n_blocked = 0;
  int n_forward = 0, n_passes = 0, n_refault = 0, n_common = 0;
  logic common_mode = 1'b0;
  ahb_mst_in_t ref_saved;

  ls_fi_top dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_core
    core_model #(.ABITS(ABITS), .DBITS(DBITS)) u_core (
      .clk, .rst_n(rst_n && core_rst_n), .core_rst,
      .ahbi(core_ahbi[c]), .ahbo(core_ahbo[c]),
      .ram_en(ram_en[c]), .ram_we(ram_we[c]), .ram_addr(ram_addr[c]),
      .ram_din(ram_din[c]), .ram_dout(ram_dout[c]), .run_done(run_done[c])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] pattern(input int unsigned i);
    return i * 32'h9E37_79B1 ^ 32'h5A5A_0000;
  endfunction

  // bus model and per-cycle monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (inject[0]) n_inject_a++;
      if (inject[1]) n_inject_b++;
      if (mismatch) begin
        n_mismatch++;
        if (core_rst) n_core_rst++;
        if (ahbo == AHB_MST_IDLE) n_blocked++;
        if (core_ahbi[0] == ref_saved && core_ahbi[1] == ref_saved) n_reload++;
        check(core_rst && ahbo == AHB_MST_IDLE, "mismatch blocks bus and resets cores");
        check(core_ahbi[0] == ref_saved && core_ahbi[1] == ref_saved, "saved input reloaded");
      end else begin
        check(ahbo == core_ahbo[0] && ahbo == core_ahbo[1], "agreeing output forwarded");
        if (ahbo.htrans == HTRANS_NONSEQ) begin
          n_forward++;
          if (common_mode) begin
            // same fault in both cores: undetected, corrupted data reaches the bus
            check(ahbo.hwdata[63:32] == (pattern(int'(ahbo.haddr >> 2)) ^ 32'h3), "common-mode fault passes");
            n_common++;
          end else
            check(ahbo.hwdata[63:32] == pattern(int'(ahbo.haddr >> 2)), "bus data matches memory");
        end
        ref_saved = ahbi;
      end
      if (run_done[0] && !mismatch) n_passes++;
    end
    ahbi <= '{hgrant: 1'b1, hready: 1'b1, hresp: 2'b00, hrdata: {$urandom, $urandom}};
  end

  task automatic apb_write(input logic [31:0] d);
    apbi = '{psel: 1'b1, penable: 1'b0, paddr: GRGPREG_ADDR, pwrite: 1'b1, pwdata: d};
    @(posedge clk); #1;
    apbi.penable = 1'b1;
    @(posedge clk); #1;
    apbi = '0;
    n_apb_wr++;
  endtask

  task automatic apb_read(output logic [31:0] d);
    apbi = '{psel: 1'b1, penable: 1'b0, paddr: GRGPREG_ADDR, pwrite: 1'b0, pwdata: '0};
    @(posedge clk); #1;
    apbi.penable = 1'b1;
    #1 d = prdata;
    @(posedge clk); #1;
    apbi = '0;
    n_apb_rd++;
  endtask

  task automatic reset_cores();
    core_rst_n = 0;
    @(posedge clk); #1;
    core_rst_n = 1;
  endtask

  // wait for a pass over the memory, return the mismatches seen meanwhile
  task automatic wait_pass(output int mm);
    int start = n_mismatch;
    @(posedge clk iff (run_done[0] && !mismatch));
    #1;
    mm = n_mismatch - start;
  endtask

  initial begin
    int mm, mm0, ia0, ib0;
    logic [31:0] rd;
    apbi = '0; rst_n = 0; core_rst_n = 1; ref_saved = '0;
    ahbi = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;

    // 1. clean run
    wait_pass(mm);
    check(mm == 0, "clean pass without mismatch");

    // 2. inject into core A, keep the write signal set
    ia0 = n_inject_a; ib0 = n_inject_b;
    apb_write(32'h0007_0000);
    apb_read(rd);
    check(rd == 32'h0007_0000, "register read back");
    check(gpreg == 32'h0007_0000, "register drives fault injection");
    mm0 = n_mismatch;
    // the core reset clears only the cores; the register keeps its value
    reset_cores();
    repeat (4 * (2**ABITS)) @(posedge clk);
    #1;
    check(n_mismatch - mm0 >= 2, "fault repeats while write signal held");
    if (n_mismatch - mm0 >= 2) n_refault++;
    check(n_inject_a > ia0 && n_inject_b == ib0, "bits 31:16 reach core A only");

    // 3. clear the register: refill zeroes the error RAM
    apb_write(32'h0000_0000);
    wait_pass(mm);
    wait_pass(mm);
    check(mm == 0, "pass after clearing fault");

    // 4. inject into core B
    mm0 = n_mismatch;
    ia0 = n_inject_a; ib0 = n_inject_b;
    apb_write(32'h0000_0007);
    reset_cores();
    repeat (3 * (2**ABITS)) @(posedge clk);
    #1;
    check(n_mismatch > mm0, "core B fault detected");
    check(n_inject_b > ib0 && n_inject_a == ia0, "bits 15:0 reach core B only");
    apb_write(32'h0000_0000);
    wait_pass(mm);
    wait_pass(mm);
    check(mm == 0, "pass after clearing core B fault");

    // 5. mask without the write signal
    apb_write(32'h0003_0003);
    reset_cores();
    wait_pass(mm);
    check(mm == 0, "mask without write signal injects nothing");
    check(gpreg == 32'h0003_0003, "core reset leaves the register");

    // 6. the same mask in both cores: outputs agree, the fault is not detected
    apb_write(32'h0007_0007);
    reset_cores();
    // wait out the refill, then expect corrupted but agreeing data
    @(posedge clk iff (core_ahbo[0].htrans == HTRANS_NONSEQ));
    common_mode = 1'b1;
    wait_pass(mm);
    check(mm == 0, "common-mode fault gives no mismatch");
    apb_write(32'h0000_0000);
    reset_cores();
    common_mode = 1'b0;
    wait_pass(mm);
    check(mm == 0, "clean pass after common-mode fault");

    // every mechanism happened
    check(n_apb_wr > 0,   "APB writes");
    check(n_apb_rd > 0,   "APB reads");
    check(n_inject_a > 0, "injection into core A");
    check(n_inject_b > 0, "injection into core B");
    check(n_mismatch > 0, "mismatch detected");
    check(n_core_rst > 0, "core reset");
    check(n_reload > 0,   "saved input reloaded");
    check(n_blocked > 0,  "bus blocked");
    check(n_forward > 0,  "agreeing outputs forwarded");
    check(n_passes > 0,   "complete passes");
    check(n_refault > 0,  "repeated fault while held");
    check(n_common > 0,   "common-mode fault undetected");
    $display("apb_wr=%0d apb_rd=%0d inject_a=%0d inject_b=%0d mismatch=%0d core_rst=%0d reload=%0d blocked=%0d forward=%0d passes=%0d common=%0d",
             n_apb_wr, n_apb_rd, n_inject_a, n_inject_b, n_mismatch, n_core_rst, n_reload, n_blocked, n_forward, n_passes, n_common);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * (2**ABITS)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
