// core_model: behavioural stand-in for one processor core of the lockstep pair.
//
// Not synthesizable intent; it only gives the lockstep and fault-injection
// logic realistic traffic. After reset the model fills its memory through its
// syncram port (NWORDS writes of pattern(i)), then loops over the memory:
// each cycle it reads one word, and one cycle later it drives an AHB write
// whose address is the word index and whose data holds the word read and a
// running sum of the words and of the bus read data it receives. Two copies
// fed the same input produce identical outputs unless a word read from one
// copy's memory differs. Synchronous reset from rst_n or from the lockstep
// module's core reset. run_done pulses when one full pass over the memory has
// completed.
module core_model
  import ft_pkg::*;
#(
  parameter int unsigned ABITS = 4,
  parameter int unsigned DBITS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             core_rst,
  input  ahb_mst_in_t      ahbi,
  output ahb_mst_out_t     ahbo,
  output logic             ram_en,
  output logic             ram_we,
  output logic [ABITS-1:0] ram_addr,
  output logic [DBITS-1:0] ram_din,
  input  logic [DBITS-1:0] ram_dout,
  output logic             run_done
);
  localparam int unsigned NWORDS = 2**ABITS;

  typedef enum logic [1:0] {S_FILL, S_RUN} state_e;
  state_e           state;
  logic [ABITS-1:0] idx, idx_d;
  logic             rd_valid;
  logic [31:0]      acc;

  function automatic logic [DBITS-1:0] pattern(input int unsigned i);
    return DBITS'(i * 32'h9E37_79B1 ^ 32'h5A5A_0000);
  endfunction

  always_comb begin
    ram_en   = 1'b1;
    ram_we   = (state == S_FILL);
    ram_addr = idx;
    ram_din  = pattern(32'(idx));
  end

  always_ff @(posedge clk) begin
    run_done <= 1'b0;
    if (!rst_n || core_rst) begin
      state    <= S_FILL;
      idx      <= '0;
      idx_d    <= '0;
      rd_valid <= 1'b0;
      acc      <= '0;
      ahbo     <= AHB_MST_IDLE;
    end else begin
      case (state)
        S_FILL: begin
          idx <= idx + 1'b1;
          if (idx == ABITS'(NWORDS - 1)) state <= S_RUN;
          ahbo <= AHB_MST_IDLE;
        end
        default: begin
          idx      <= idx + 1'b1;
          idx_d    <= idx;
          rd_valid <= 1'b1;
          if (rd_valid) begin
            acc  <= acc + 32'(ram_dout) + ahbi.hrdata[31:0];
            ahbo <= '{hbusreq: 1'b1, htrans: HTRANS_NONSEQ,
                      haddr: AHB_AW'({idx_d, 2'b00}), hwrite: 1'b1,
                      hsize: 3'b011, hburst: 3'b000, hprot: 4'b0011,
                      hwdata: {32'(ram_dout), acc}};
            if (idx_d == ABITS'(NWORDS - 1)) run_done <= 1'b1;
          end
        end
      endcase
    end
  end
endmodule
