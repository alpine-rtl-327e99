// pndu_control: Control Unit of the Petri Net Decision Unit.
//
// Runs the execution cycle of the processor. The state names give the step
// of the cycle each state performs:
//   S_INIT    step 0  Transition Pointer (TP) := first transition; the active
//                     Next Transition List becomes {first transition}
//   S_LOAD    step 1  read the transition at TP, word by word, into the
//                     Transition Register File, then load its Precondition
//                     into the Precondition Word register
//   S_TEST    step 2  does the Precondition equal the State Word?
//   S_FIRE    step 3  yes: the transition fires. Load its Postcondition Word,
//                     make its Next Transition List the active one and start
//                     the Computing Engine if the transition has a
//                     subroutine (S_CE waits for Finished)
//   S_APPLY   step 4  write the Postcondition Word into SEMAPHORES
//   S_UPDATE  step 5  TP := first entry of the new list
//   S_NEXT    step 6/7 no: TP := next entry of the active list, if any left
//   S_SUSPEND p6      list exhausted: wait for a new event, then pop the
//                     oldest queued flags into FLAGS
//   S_RESUME  step 8  TP := first entry of the active list, test again
//   S_HALT            a fired transition had an empty list: the net is dead
//
// The step order, the fire/no-fire branches, the walk along the list of the
// previously fired transition and the suspension until a new event follow
// the document's flowchart of the execution cycle. The word-serial load, the
// one-cycle start pulse, the consumption of one flag vector per suspension
// and the halt state for an empty list are this design's own choices.
//
// Timing: loading a transition with n next addresses takes 4+n+1 cycles
// (one extra for the read latency). The test takes 1 cycle. Firing without a
// subroutine takes 3 more cycles (fire, apply, update). A CE handshake adds
// the subroutine's run time. Memory reads have one cycle of latency.
module pndu_control
  import alpine_pkg::*;
#(
  parameter paddr_t START_ADDR = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  // PNDU memory read port
  output paddr_t     mem_addr_o,
  input  pword_t     mem_rdata_i,
  // Transition Register File
  output logic       trf_wr_o,
  output paddr_t     trf_ofs_o,
  output logic       trf_commit_o,
  output logic       trf_init_o,
  output logic [NNT_W-1:0] trf_sel_o,
  input  logic [NNT_W-1:0] trf_nnt_i,      // candidate NNT (clamped)
  input  logic [NNT_W-1:0] trf_act_nnt_i,  // active list length
  input  paddr_t     trf_act_nta_i,        // active list entry trf_sel_o
  input  sub_word_t  trf_sub_i,
  // comparator
  output logic       pre_load_o,
  input  logic       match_i,
  // postcondition unit
  output logic       post_load_o,
  output logic       post_apply_o,
  // flag FIFO
  input  logic       event_pending_i,
  output logic       fifo_pop_o,
  // Computing Engine handshake
  output logic       ce_start_o,
  input  logic       ce_finished_i,
  // status
  output logic       fired_o,       // pulse: the transition at fired_addr_o fired
  output paddr_t     fired_addr_o,
  output logic       suspended_o,   // waiting for a new event
  output logic       halted_o
);

  typedef enum logic [3:0] {
    S_INIT, S_LOAD, S_TEST, S_FIRE, S_CE, S_APPLY, S_UPDATE,
    S_NEXT, S_SUSPEND, S_RESUME, S_HALT
  } state_e;

  state_e           state_q;
  paddr_t           tp_q;          // Transition Pointer
  paddr_t           issue_ofs_q;   // offset of the word being addressed
  logic             rvalid_q;      // a read word arrives this cycle
  paddr_t           rofs_q;        // its offset
  logic [NNT_W-1:0] sel_q;         // position in the active list
  logic             load_done;
  logic [NNT_W-1:0] nnt_from_data;

  assign mem_addr_o = tp_q + issue_ofs_q;

  // The word arriving in this cycle goes into the register file, which
  // takes its data straight from the memory.
  assign trf_wr_o   = (state_q == S_LOAD) && rvalid_q;
  assign trf_ofs_o  = rofs_q;

  assign nnt_from_data = (mem_rdata_i > pword_t'(MAX_NT)) ? NNT_W'(MAX_NT)
                                                          : NNT_W'(mem_rdata_i);

  // The load ends with the NNT word when NNT is 0, otherwise with the last
  // Next Transition Address.
  always_comb begin
    load_done = 1'b0;
    if (state_q == S_LOAD && rvalid_q) begin
      if (rofs_q == paddr_t'(OFS_NNT))
        load_done = (nnt_from_data == '0);
      else if (rofs_q >= paddr_t'(OFS_NTA))
        load_done = ((rofs_q - paddr_t'(OFS_NTA) + 1'b1) >= paddr_t'(trf_nnt_i));
    end
  end

  // Entry of the active list the control unit looks at.
  always_comb begin
    case (state_q)
      S_NEXT:  trf_sel_o = sel_q + 1'b1;
      default: trf_sel_o = '0;
    endcase
  end

  assign pre_load_o   = load_done;
  assign trf_init_o   = (state_q == S_INIT);
  assign trf_commit_o = (state_q == S_FIRE);
  assign post_load_o  = (state_q == S_FIRE);
  assign post_apply_o = (state_q == S_APPLY);
  assign ce_start_o   = (state_q == S_FIRE) && trf_sub_i.valid;
  assign fired_o      = (state_q == S_FIRE);
  assign fired_addr_o = tp_q;
  assign fifo_pop_o   = (state_q == S_SUSPEND) && event_pending_i;
  assign suspended_o  = (state_q == S_SUSPEND);
  assign halted_o     = (state_q == S_HALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_INIT;
      tp_q        <= START_ADDR;
      issue_ofs_q <= '0;
      rvalid_q    <= 1'b0;
      rofs_q      <= '0;
      sel_q       <= '0;
    end else begin
      rvalid_q <= 1'b0;
      case (state_q)
        S_INIT: begin
          tp_q        <= START_ADDR;
          sel_q       <= '0;
          issue_ofs_q <= '0;
          state_q     <= S_LOAD;
        end
        S_LOAD: begin
          if (load_done) begin
            state_q <= S_TEST;
          end else begin
            rvalid_q    <= 1'b1;
            rofs_q      <= issue_ofs_q;
            issue_ofs_q <= issue_ofs_q + 1'b1;
          end
        end
        S_TEST: state_q <= match_i ? S_FIRE : S_NEXT;
        S_FIRE: state_q <= trf_sub_i.valid ? S_CE : S_APPLY;
        S_CE:   if (ce_finished_i) state_q <= S_APPLY;
        S_APPLY: state_q <= S_UPDATE;
        S_UPDATE: begin
          sel_q       <= '0;
          tp_q        <= trf_act_nta_i;
          issue_ofs_q <= '0;
          state_q     <= (trf_act_nnt_i == '0) ? S_HALT : S_LOAD;
        end
        S_NEXT: begin
          if (sel_q + 1'b1 < trf_act_nnt_i) begin
            sel_q       <= sel_q + 1'b1;
            tp_q        <= trf_act_nta_i;
            issue_ofs_q <= '0;
            state_q     <= S_LOAD;
          end else begin
            state_q <= S_SUSPEND;
          end
        end
        S_SUSPEND: if (event_pending_i) state_q <= S_RESUME;
        S_RESUME: begin
          sel_q       <= '0;
          tp_q        <= trf_act_nta_i;
          issue_ofs_q <= '0;
          state_q     <= S_LOAD;
        end
        S_HALT: state_q <= S_HALT;
        default: state_q <= S_INIT;
      endcase
    end
  end

  // The CE runs only after a start and finishes only while it is awaited.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ce_finished_i |-> state_q == S_CE);

endmodule
