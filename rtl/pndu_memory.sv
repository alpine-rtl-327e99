// pndu_memory: program memory of the decision unit.
//
// Holds the transition list. It has one synchronous read port for the
// control unit and one write port that loads the program. A read returns
// the word one cycle after the address is presented. The write and the read
// are independent. A read of the address being written returns the old word.
//
// The document names this memory and gives it its own address and data
// buses. The size, the single-cycle synchronous read and the separate
// program-load port are this design's own choices. The memory is not reset.
module pndu_memory
  import alpine_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << PADDR_W
) (
  input  logic   clk,
  input  paddr_t rd_addr_i,
  output pword_t rd_data_o,
  input  logic   wr_en_i,
  input  paddr_t wr_addr_i,
  input  pword_t wr_data_i
);

  pword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end

endmodule
