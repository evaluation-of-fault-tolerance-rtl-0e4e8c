// grgpreg: APB general-purpose register that drives fault injection.
//
// A single 32-bit register on the APB bus. A host monitor writes it over the
// debug link; its value is routed as a plain signal vector to the fault-
// injection controllers, each core taking one 16-bit slice (see ft_pkg). The
// register is selected when psel is high and paddr matches BASE_ADDR on the
// address bits above the register offset (the bridge decodes the peripheral,
// the register compares its own offset). A write completes in the access
// phase (psel and penable high), as in AMBA 2 APB where every transfer takes
// two cycles; reads return the register value combinationally while selected
// and zero otherwise. Synchronous active-low reset to RSTVAL.
//
// The address 0xFC003000 is the one used for the register; the single
// register and the reset value are this design's choices.
module grgpreg
  import ft_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = GRGPREG_ADDR,
  parameter logic [31:0] RSTVAL    = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  apb_req_t    apbi,
  output logic [31:0] prdata,
  output logic [31:0] gpreg
);

  logic hit;

  assign hit = apbi.psel && (apbi.paddr[31:2] == BASE_ADDR[31:2]);

  always_ff @(posedge clk) begin
    if (!rst_n)
      gpreg <= RSTVAL;
    else if (hit && apbi.penable && apbi.pwrite)
      gpreg <= apbi.pwdata;
  end

  always_comb prdata = (hit && !apbi.pwrite) ? gpreg : 32'h0;

  // APB rule: the access phase (penable) only occurs while the slave is selected
  a_penable_needs_psel: assert property (@(posedge clk) disable iff (!rst_n)
    apbi.penable |-> apbi.psel);

endmodule
