// fi_ctrl: fault-injection controller in front of the error RAM.
//
// The controller takes this core's 16-bit slice of the general-purpose
// register and separates the write signal from the bit-mask. The error RAM is
// written at the same address and in the same cycle as the ordinary RAM. The
// word written is the bit-mask when the user's write signal is set (the mask
// is ANDed with the write signal) and zero when it is not. A location of the
// ordinary RAM that is rewritten while the user's write signal is clear
// therefore gets a clean, all-zero companion in the error RAM, and a mask only
// lands in locations that the core writes while injection is requested.
//
// Purely combinational, no clock. The mask is zero-extended from FI_MASK_W
// bits to the RAM word; which register bits carry the mask and the write
// signal is this design's choice (see ft_pkg).
module fi_ctrl
  import ft_pkg::*;
#(
  parameter int unsigned DBITS = 32
) (
  input  logic [FI_SLICE_W-1:0] gp_slice,   // this core's slice of the GRGPREG value
  input  logic                  ram_en,     // ordinary RAM enable
  input  logic                  ram_we,     // ordinary RAM write
  output logic                  err_en,     // error RAM enable
  output logic                  err_we,     // error RAM write
  output logic [DBITS-1:0]      err_wdata,  // word written to the error RAM
  output logic                  inject      // a mask is being written this cycle
);

  logic                 user_wr;
  logic [FI_MASK_W-1:0] mask;

  always_comb begin
    user_wr   = gp_slice[FI_WR_BIT];
    mask      = gp_slice[FI_MASK_W-1:0];
    err_en    = ram_en;
    err_we    = ram_en & ram_we;
    err_wdata = '0;
    err_wdata[FI_MASK_W-1:0] = mask & {FI_MASK_W{user_wr}};
    inject    = err_we & user_wr & (|mask);
  end

endmodule
