// dram_model: behavioural model of the external 256K x 16 DRAM, for
// simulation only. One access per cycle; a read returns its data on the
// cycle after the request; a write takes effect at the clock edge.
module dram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);
  logic [15:0] mem [1 << AW];
  initial for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
  end
endmodule
