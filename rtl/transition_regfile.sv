// transition_regfile: Transition Register File of the decision unit.
//
// Holds two things:
//  * the candidate: the fields of the transition being tested, written one
//    PNDU memory word at a time while it is loaded (`wr_en_i`, `wr_ofs_i` is
//    the word offset inside the transition: 0 Precondition, 1 Subroutine
//    Address, 2 Postcondition, 3 NNT, 4.. Next Transition Addresses);
//  * the active Next Transition List: the NNT and addresses of the transition
//    that fired last. The decision unit walks this list while it looks for
//    the next transition to fire.
// `commit_i` copies the candidate's list into the active list when the
// candidate fires. `init_i` sets the active list to the single entry
// START_ADDR, so the first transition of the program is tried at power-on.
// An NNT larger than MAX_NT is clamped to MAX_NT.
//
// The document names the register file and says that transition information
// is held there while the comparison is done. It also says that a failed test
// moves on to the next address "of the previously fired transition", so both
// lists must be kept. Keeping them in one file, the clamp and the
// initial one-entry list are this design's own choices.
//
// Timing: writes, commit and init take effect at the clock edge; all reads
// are combinational.
module transition_regfile
  import alpine_pkg::*;
#(
  parameter int unsigned N_NT       = MAX_NT,
  parameter paddr_t      START_ADDR = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en_i,
  input  paddr_t     wr_ofs_i,
  input  pword_t     wr_data_i,
  input  logic       commit_i,
  input  logic       init_i,
  // candidate transition
  output pre_word_t  pre_o,
  output sub_word_t  sub_o,
  output post_word_t post_o,
  output logic [NNT_W-1:0] nnt_o,   // clamped NNT of the candidate
  // active Next Transition List
  input  logic [NNT_W-1:0] sel_i,
  output logic [NNT_W-1:0] act_nnt_o,
  output paddr_t     act_nta_o      // entry sel_i of the active list
);

  pword_t             pre_q, sub_q, post_q;
  logic [NNT_W-1:0]   nnt_q, act_nnt_q;
  paddr_t             nta_q     [N_NT];
  paddr_t             act_nta_q [N_NT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q     <= '0;
      sub_q     <= '0;
      post_q    <= '0;
      nnt_q     <= '0;
      act_nnt_q <= NNT_W'(1);
      for (int i = 0; i < N_NT; i++) begin
        nta_q[i]     <= '0;
        act_nta_q[i] <= START_ADDR;
      end
    end else begin
      if (wr_en_i) begin
        case (wr_ofs_i)
          paddr_t'(OFS_PRE):  pre_q  <= wr_data_i;
          paddr_t'(OFS_SUB):  sub_q  <= wr_data_i;
          paddr_t'(OFS_POST): post_q <= wr_data_i;
          paddr_t'(OFS_NNT):  nnt_q  <= (wr_data_i > pword_t'(N_NT)) ? NNT_W'(N_NT)
                                                                      : NNT_W'(wr_data_i);
          default: begin
            for (int i = 0; i < N_NT; i++)
              if (wr_ofs_i == paddr_t'(OFS_NTA + i)) nta_q[i] <= paddr_t'(wr_data_i);
          end
        endcase
      end
      if (init_i) begin
        act_nnt_q    <= NNT_W'(1);
        act_nta_q[0] <= START_ADDR;
      end else if (commit_i) begin
        act_nnt_q <= nnt_q;
        for (int i = 0; i < N_NT; i++) act_nta_q[i] <= nta_q[i];
      end
    end
  end

  assign pre_o     = pre_word_t'(pre_q);
  assign sub_o     = sub_word_t'(sub_q);
  assign post_o    = post_word_t'(post_q[2*SEM_W-1:0]);
  assign nnt_o     = nnt_q;
  assign act_nnt_o = act_nnt_q;
  always_comb begin
    act_nta_o = '0;
    for (int i = 0; i < N_NT; i++)
      if (sel_i == NNT_W'(i)) act_nta_o = act_nta_q[i];
  end

endmodule
