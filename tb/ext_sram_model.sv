// Behavioural model of the external image memory, for simulation only:
// a synchronous SRAM of 2^AW bytes, one access per clock, written when
// we is high, read data registered (valid one cycle after the address).
// nwrites counts write cycles.
module ext_sram_model #(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  input  logic          we,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];
  int nwrites = 0;
  initial rdata = '0;
  always @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      nwrites++;
    end
    rdata <= mem[addr];
  end
endmodule
