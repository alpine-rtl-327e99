// pndu: Petri Net Decision Unit.
//
// Decides when, and which, transition of the program fires. Changes on the
// FLAGS pins (f) become events in the new event detector. The events are
// queued in the flag FIFO, whose head is the FLAGS register. FLAGS and
// SEMAPHORES form the State Word. The control unit loads transitions from the
// PNDU memory into the Transition Register File, and the comparator tests
// each Precondition against the State Word. A firing transition's
// Postcondition goes to the Postcondition Word register, where the Computing
// Engine may change it, and then to SEMAPHORES, which drive the s pins.
//
// The blocks and their connections follow the document's block diagram of
// the processor. The PNDU memory sits outside this unit and is reached through
// the mem_* port. The Computing Engine is reached through the ce_* port.
//
// Timing: see pndu_control. A flag change is queued SYNC_STAGES+2 cycles
// after it appears on f_i.
module pndu
  import alpine_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned SYNC_STAGES = 2,
  parameter paddr_t      START_ADDR  = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  flags_t     f_i,            // FLAGS pins
  output sem_t       s_o,            // SEMAPHORES pins
  // PNDU memory read port
  output paddr_t     mem_addr_o,
  input  pword_t     mem_rdata_i,
  // Computing Engine interface
  output logic       ce_start_o,
  output caddr_t     ce_sub_addr_o,
  output pre_word_t  ce_pre_o,
  output post_word_t ce_post_o,
  input  logic       ce_post_we_i,
  input  post_word_t ce_post_wdata_i,
  input  logic       ce_finished_i,
  // status
  output logic       fired_o,
  output paddr_t     fired_addr_o,
  output logic       suspended_o,
  output logic       halted_o,
  output logic       new_event_o,
  output logic       fifo_overflow_o
);

  logic             ev;
  flags_t           ev_flags, flags_reg;
  logic             pending, pop;
  pre_word_t        pre_reg;
  logic             match;
  logic             trf_wr, trf_commit, trf_init;
  paddr_t           trf_ofs, act_nta;
  logic [NNT_W-1:0] trf_sel, nnt, act_nnt;
  pre_word_t        trf_pre;
  sub_word_t        trf_sub;
  post_word_t       trf_post;
  logic             pre_load, post_load, post_apply;

  assign new_event_o = ev;

  new_event_detector #(.SYNC_STAGES(SYNC_STAGES)) u_ned (
    .clk, .rst_n, .f_i, .event_o(ev), .flags_o(ev_flags)
  );

  flag_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push_i(ev), .push_flags_i(ev_flags), .pop_i(pop),
    .flags_o(flags_reg), .pending_o(pending), .full_o(),
    .overflow_o(fifo_overflow_o)
  );

  state_comparator u_cmp (
    .clk, .rst_n,
    .flags_i(flags_reg), .sem_i(s_o),
    .pre_load_i(pre_load), .pre_i(trf_pre),
    .state_o(), .pre_o(pre_reg), .match_o(match)
  );

  transition_regfile #(.START_ADDR(START_ADDR)) u_trf (
    .clk, .rst_n,
    .wr_en_i(trf_wr), .wr_ofs_i(trf_ofs), .wr_data_i(mem_rdata_i),
    .commit_i(trf_commit), .init_i(trf_init),
    .pre_o(trf_pre), .sub_o(trf_sub), .post_o(trf_post), .nnt_o(nnt),
    .sel_i(trf_sel), .act_nnt_o(act_nnt), .act_nta_o(act_nta)
  );

  postcondition_unit u_post (
    .clk, .rst_n,
    .load_i(post_load), .load_word_i(trf_post),
    .ce_we_i(ce_post_we_i), .ce_word_i(ce_post_wdata_i),
    .apply_i(post_apply), .post_o(ce_post_o), .sem_o(s_o)
  );

  pndu_control #(.START_ADDR(START_ADDR)) u_ctrl (
    .clk, .rst_n,
    .mem_addr_o, .mem_rdata_i,
    .trf_wr_o(trf_wr), .trf_ofs_o(trf_ofs),
    .trf_commit_o(trf_commit), .trf_init_o(trf_init), .trf_sel_o(trf_sel),
    .trf_nnt_i(nnt), .trf_act_nnt_i(act_nnt), .trf_act_nta_i(act_nta),
    .trf_sub_i(trf_sub),
    .pre_load_o(pre_load), .match_i(match),
    .post_load_o(post_load), .post_apply_o(post_apply),
    .event_pending_i(pending), .fifo_pop_o(pop),
    .ce_start_o, .ce_finished_i,
    .fired_o, .fired_addr_o, .suspended_o, .halted_o
  );

  assign ce_sub_addr_o = trf_sub.addr;
  assign ce_pre_o      = pre_reg;

endmodule
