// alpine_top: the ALPiNe processor.
//
// ALPiNe runs control programs written as Petri nets of the finite-state
// subclass. Two engines share the work. The Petri Net Decision Unit (PNDU)
// decides when and which transition fires, driven by events on the FLAGS
// pins. The Computing Engine (CE), a small RISC core, runs the subroutine
// attached to a fired transition. Each engine has its own memory with its
// own buses, so the two can work at the same time.
//
// Interface: f_i are the FLAGS pins and s_o the SEMAPHORES pins
// (state and output bits). The pndu_prog_* and ce_prog_* write ports load the
// two memories. Hold rst_n low while loading, then release it: the PNDU then
// starts at the transition at address START_ADDR. The status outputs show
// each firing, suspension (waiting for a new event), halting (a transition
// with an empty next list fired) and a flag event lost to a full FIFO.
//
// The two-engine split, the memories and the Start/Finished/Postcondition
// interface between them follow the document's block diagram. The program
// load ports, the single clock for both engines and all widths are this
// design's own choices. The document names a single global clock for its
// first version.
module alpine_top
  import alpine_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned SYNC_STAGES = 2,
  parameter paddr_t      START_ADDR  = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  flags_t f_i,
  output sem_t   s_o,
  // program loading
  input  logic   pndu_prog_we_i,
  input  paddr_t pndu_prog_addr_i,
  input  pword_t pndu_prog_data_i,
  input  logic   ce_prog_we_i,
  input  caddr_t ce_prog_addr_i,
  input  cword_t ce_prog_data_i,
  // status
  output logic   fired_o,
  output paddr_t fired_addr_o,
  output logic   suspended_o,
  output logic   halted_o,
  output logic   new_event_o,
  output logic   fifo_overflow_o,
  output logic   ce_busy_o
);

  paddr_t     pmem_addr;
  pword_t     pmem_rdata;
  logic       ce_start, ce_finished, ce_post_we;
  caddr_t     ce_sub_addr, cmem_addr;
  pre_word_t  ce_pre;
  post_word_t ce_post, ce_post_wdata;
  logic       cmem_we;
  cword_t     cmem_wdata, cmem_rdata;

  pndu_memory u_pmem (
    .clk,
    .rd_addr_i(pmem_addr), .rd_data_o(pmem_rdata),
    .wr_en_i(pndu_prog_we_i), .wr_addr_i(pndu_prog_addr_i), .wr_data_i(pndu_prog_data_i)
  );

  pndu #(
    .FIFO_DEPTH(FIFO_DEPTH), .SYNC_STAGES(SYNC_STAGES), .START_ADDR(START_ADDR)
  ) u_pndu (
    .clk, .rst_n, .f_i, .s_o,
    .mem_addr_o(pmem_addr), .mem_rdata_i(pmem_rdata),
    .ce_start_o(ce_start), .ce_sub_addr_o(ce_sub_addr),
    .ce_pre_o(ce_pre), .ce_post_o(ce_post),
    .ce_post_we_i(ce_post_we), .ce_post_wdata_i(ce_post_wdata),
    .ce_finished_i(ce_finished),
    .fired_o, .fired_addr_o, .suspended_o, .halted_o, .new_event_o, .fifo_overflow_o
  );

  computing_engine u_ce (
    .clk, .rst_n,
    .start_i(ce_start), .sub_addr_i(ce_sub_addr),
    .pre_i(ce_pre), .post_i(ce_post),
    .post_we_o(ce_post_we), .post_wdata_o(ce_post_wdata),
    .finished_o(ce_finished), .busy_o(ce_busy_o),
    .mem_addr_o(cmem_addr), .mem_we_o(cmem_we), .mem_wdata_o(cmem_wdata),
    .mem_rdata_i(cmem_rdata)
  );

  ce_memory u_cmem (
    .clk,
    .addr_i(cmem_addr), .we_i(cmem_we), .wdata_i(cmem_wdata), .rdata_o(cmem_rdata),
    .ext_we_i(ce_prog_we_i), .ext_addr_i(ce_prog_addr_i), .ext_wdata_i(ce_prog_data_i)
  );

endmodule
