// syncram_fi: syncram with run-time fault injection.
//
// The processor's caches and register files are built from syncram. In this
// version a second RAM, the error RAM, sits beside the ordinary RAM. Both get
// the same address and enable; fi_ctrl decides what the error RAM stores. The
// data returned to the core is the XOR of the two read words, so every 1 in a
// stored bit-mask flips the corresponding bit of the word the core reads,
// emulating a single-event upset in the memory. The ordinary RAM itself is not
// changed, so a memory monitor that reads it directly still sees correct data.
//
// Timing: one clock from address to dataout, as for the plain RAM; the XOR is
// after the RAM output registers. The structure (ordinary RAM, error RAM, XOR to the I/O) follows
// the source; port names follow the usual syncram convention.
module syncram_fi
  import ft_pkg::*;
#(
  parameter int unsigned ABITS = 8,
  parameter int unsigned DBITS = 32
) (
  input  logic                  clk,
  input  logic                  enable,
  input  logic                  write,
  input  logic [ABITS-1:0]      address,
  input  logic [DBITS-1:0]      datain,
  output logic [DBITS-1:0]      dataout,
  input  logic [FI_SLICE_W-1:0] testin,    // bit-mask and write signal from GRGPREG
  output logic                  inject     // a mask is written this cycle
);

  logic [DBITS-1:0] ram_q, err_word;
  logic             err_en, err_we;
  logic [DBITS-1:0] err_wdata;

  pf_ram #(.ABITS(ABITS), .DBITS(DBITS)) u_ram (
    .clk, .enable, .write, .address, .datain, .dataout(ram_q)
  );

  fi_ctrl #(.DBITS(DBITS)) u_ctrl (
    .gp_slice(testin), .ram_en(enable), .ram_we(write),
    .err_en, .err_we, .err_wdata, .inject
  );

  pf_ram #(.ABITS(ABITS), .DBITS(DBITS)) u_err_ram (
    .clk, .enable(err_en), .write(err_we), .address, .datain(err_wdata),
    .dataout(err_word)
  );

  assign dataout = ram_q ^ err_word;

endmodule
