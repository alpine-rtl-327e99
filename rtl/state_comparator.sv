// state_comparator: State Word, Precondition Word and the Comparator.
//
// The State Word register holds {FLAGS, SEMAPHORES}: the oldest flag vector
// and the current semaphores. It is reloaded every cycle. The Precondition
// Word register is loaded by the control unit (`pre_load_i`). The comparator
// decides whether the transition's guard holds. The guard is a Boolean AND of
// state bits, each taken plain or inverted. It is coded as a care mask plus
// the values the cared-for bits must have: `match_o` is
// ((state ^ value) & mask) == 0. An all-zero mask is the guard [true].
//
// From the document: the State Word made of semaphores and oldest flags, the
// Precondition Word register, and the equivalence test between them. The
// document says that "Guard specifies the binary AND operation performed on
// these variables". The mask/value coding of "don't care" bits is this
// design's own.
//
// Timing: match_o is combinational from the two registers. Both registers
// load at a clock edge, so a new precondition or state is compared one cycle
// after it is presented.
module state_comparator
  import alpine_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  flags_t      flags_i,
  input  sem_t        sem_i,
  input  logic        pre_load_i,
  input  pre_word_t   pre_i,
  output state_word_t state_o,   // State Word register
  output pre_word_t   pre_o,     // Precondition Word register
  output logic        match_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_o <= '0;
      pre_o   <= '0;
    end else begin
      state_o <= '{flags: flags_i, sem: sem_i};
      if (pre_load_i) pre_o <= pre_i;
    end
  end

  assign match_o = (((state_t'(state_o) ^ pre_o.value) & pre_o.mask) == '0);

endmodule
