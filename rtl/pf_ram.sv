// pf_ram: single-port synchronous RAM, the technology RAM behind a syncram.
//
// One address port serves reads and writes. When enable is high at a rising
// clock edge the word at address is registered onto dataout (read-before-
// write: a write returns the old contents) and, if write is also high, datain
// is stored. dataout holds its value while enable is low and is undefined
// until the first read. Latency is one
// clock from address to dataout.
//
// The same module is instantiated twice in a fault-injection syncram: once as
// the ordinary RAM and once as the error RAM. The contents start at zero, so
// an error RAM that has never been written flips no bits; a block RAM with an
// initial value supports this on the target FPGA family. The read-before-write
// behaviour and the sizes are this design's choices; the source names the
// RAM but does not give its port timing or its dimensions.
module pf_ram #(
  parameter int unsigned ABITS = 8,   // address bits
  parameter int unsigned DBITS = 32   // data bits
) (
  input  logic             clk,
  input  logic             enable,
  input  logic             write,
  input  logic [ABITS-1:0] address,
  input  logic [DBITS-1:0] datain,
  output logic [DBITS-1:0] dataout
);

  logic [DBITS-1:0] mem [2**ABITS];

  initial begin
    for (int i = 0; i < 2**ABITS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (enable) begin
      dataout <= mem[address];
      if (write) mem[address] <= datain;
    end
  end

endmodule
