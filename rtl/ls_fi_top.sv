// ls_fi_top: dual-core lockstep with run-time fault injection.
//
// Two identical processor cores (outside this module) run in lockstep on the
// same AHB input. ls_compare checks their AHB master outputs every cycle,
// forwards agreeing outputs to the bus, and on a disagreement blocks the bus,
// feeds both cores the last input that produced agreeing outputs and raises
// core_rst. Each core's memory (caches, register file) is built from syncram;
// one fault-injecting syncram per core is included here, index 0 for core A
// and index 1 for core B. A general-purpose APB register (grgpreg, at
// 0xFC003000) holds a bit-mask and a write signal for each core; while a
// core's write signal is set, every write that core makes to its syncram also
// stores the mask in the error RAM, and later reads of that word come back
// with the masked bits flipped.
//
// The cores, the AHB/APB controllers and the debug link are not part of this
// module: their signals are ports. Core A's mask and write signal sit in bits
// 31:16 of the register, core B's in bits 15:0. Timing: APB writes take
// effect at the end of the access phase; syncram reads have one cycle of
// latency; the compare path is combinational from core outputs to bus and
// core inputs. Active-low synchronous reset.
module ls_fi_top
  import ft_pkg::*;
#(
  parameter int unsigned ABITS = 8,   // syncram address bits
  parameter int unsigned DBITS = 32   // syncram data bits (32-bit processor)
) (
  input  logic             clk,
  input  logic             rst_n,
  // APB slave port for the fault-injection register
  input  apb_req_t         apbi,
  output logic [31:0]      prdata,
  // AHB master side of the two cores
  input  ahb_mst_out_t     core_ahbo [2],
  output ahb_mst_in_t      core_ahbi [2],
  output logic             core_rst,
  // AHB bus side
  output ahb_mst_out_t     ahbo,
  input  ahb_mst_in_t      ahbi,
  // syncram port of each core
  input  logic             ram_en   [2],
  input  logic             ram_we   [2],
  input  logic [ABITS-1:0] ram_addr [2],
  input  logic [DBITS-1:0] ram_din  [2],
  output logic [DBITS-1:0] ram_dout [2],
  // status
  output logic             mismatch,
  output logic [1:0]       inject,
  output logic [31:0]      gpreg
);

  grgpreg u_gpreg (
    .clk, .rst_n, .apbi, .prdata, .gpreg
  );

  localparam int unsigned SLICE_LSB [2] = '{FI_CORE_A_LSB, FI_CORE_B_LSB};

  for (genvar c = 0; c < 2; c++) begin : g_core
    syncram_fi #(.ABITS(ABITS), .DBITS(DBITS)) u_syncram (
      .clk,
      .enable  (ram_en[c]),
      .write   (ram_we[c]),
      .address (ram_addr[c]),
      .datain  (ram_din[c]),
      .dataout (ram_dout[c]),
      .testin  (gpreg[SLICE_LSB[c] +: FI_SLICE_W]),
      .inject  (inject[c])
    );
  end

  ls_compare u_cmp (
    .clk, .rst_n,
    .ahbo_a  (core_ahbo[0]),
    .ahbo_b  (core_ahbo[1]),
    .ahbi,
    .ahbo,
    .ahbi_a  (core_ahbi[0]),
    .ahbi_b  (core_ahbi[1]),
    .core_rst,
    .mismatch
  );

endmodule
