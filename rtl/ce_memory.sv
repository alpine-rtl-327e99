// ce_memory: dedicated code and data memory of the Computing Engine.
//
// One read/write port serves the CE for instruction fetch, loads and stores.
// A second write port loads programs and data from outside, and it wins when
// both write in the same cycle. Reads are synchronous: data appears one cycle
// after the address. A read of the address being written returns the old
// word.
//
// The document names this memory and gives it its own address and data
// buses. The size, the single port shared by code and data, and the load
// port are this design's own choices. The memory is not reset.
module ce_memory
  import alpine_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << CADDR_W
) (
  input  logic   clk,
  input  caddr_t addr_i,
  input  logic   we_i,
  input  cword_t wdata_i,
  output cword_t rdata_o,
  input  logic   ext_we_i,
  input  caddr_t ext_addr_i,
  input  cword_t ext_wdata_i
);

  cword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ext_we_i)  mem[ext_addr_i] <= ext_wdata_i;
    else if (we_i) mem[addr_i]     <= wdata_i;
    rdata_o <= mem[addr_i];
  end

endmodule
