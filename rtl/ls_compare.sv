// ls_compare: synchronisation and compare module of the dual-core lockstep.
//
// Both cores receive the same AHB input and should drive identical AHB master
// outputs in every cycle. This module compares the two outputs:
//  * Equal: core A's output goes to the bus, both cores receive the bus input,
//    and that input is saved as the last input that produced agreeing outputs.
//  * Different: nothing from the cores reaches the bus (an idle, non-requesting
//    master output is driven instead), both cores receive the saved input so
//    the data is re-executed, and core_rst is raised to clear the cores that
//    hold the wrong data.
// The compare and the steering are combinational; the saved input is one
// register, updated at each clock edge while the outputs agree. The source
// describes the module as combinational logic; a register is used here so the
// saved input is not a latch. Blocking the bus during a mismatch (rather than
// forwarding core A) is this design's choice. core_rst is combinational and is
// meant to drive the cores' synchronous reset. Active-low synchronous rst_n
// clears the saved input.
module ls_compare
  import ft_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_mst_out_t ahbo_a,     // core A master output
  input  ahb_mst_out_t ahbo_b,     // core B master output
  input  ahb_mst_in_t  ahbi,       // input from the AHB bus
  output ahb_mst_out_t ahbo,       // master output to the AHB bus
  output ahb_mst_in_t  ahbi_a,     // input to core A
  output ahb_mst_in_t  ahbi_b,     // input to core B
  output logic         core_rst,   // reset request to both cores
  output logic         mismatch    // outputs differ this cycle
);

  ahb_mst_in_t saved;

  always_comb begin
    mismatch = (ahbo_a != ahbo_b);
    if (!mismatch) begin
      ahbo     = ahbo_a;
      ahbi_a   = ahbi;
      ahbi_b   = ahbi;
      core_rst = 1'b0;
    end else begin
      ahbo     = AHB_MST_IDLE;
      ahbi_a   = saved;
      ahbi_b   = saved;
      core_rst = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      saved <= '0;
    else if (!mismatch)
      saved <= ahbi;
  end

  // Whatever reaches the bus is agreed on by both cores, or is idle
  a_bus_agreed: assert property (@(posedge clk) disable iff (!rst_n)
    (ahbo == ahbo_a && ahbo == ahbo_b) || (ahbo == AHB_MST_IDLE && core_rst));

endmodule
