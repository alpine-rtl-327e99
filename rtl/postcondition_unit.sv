// postcondition_unit: Postcondition Word register and SEMAPHORES register.
//
// When a transition fires, the control unit loads its Postcondition Word
// (`load_i`). While the subroutine runs, the Computing Engine may overwrite it
// (`ce_we_i`). At step 4 of the execution cycle (`apply_i`) the word is
// written into SEMAPHORES: every bit under the mask takes the word's value,
// and the other bits keep their state. SEMAPHORES drives the s pins and
// feeds the State Word.
//
// From the document: the CE may alter the Postcondition, and when it does
// not, SEMAPHORES receives the original word. In the document the
// Postcondition Word sets or clears chosen semaphore (and output) bits. The
// mask/value coding, the reset value 0 of both registers and the rule that a
// CE write in the same cycle as a load wins are this design's own choices.
//
// Timing: each of load, CE write and apply takes effect at the next clock
// edge.
module postcondition_unit
  import alpine_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_i,     // take the fired transition's word
  input  post_word_t load_word_i,
  input  logic       ce_we_i,    // CE overwrites the word
  input  post_word_t ce_word_i,
  input  logic       apply_i,    // write the word into SEMAPHORES
  output post_word_t post_o,     // Postcondition Word register
  output sem_t       sem_o       // SEMAPHORES register
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      post_o <= '0;
      sem_o  <= '0;
    end else begin
      if (ce_we_i)     post_o <= ce_word_i;
      else if (load_i) post_o <= load_word_i;
      if (apply_i) sem_o <= (sem_o & ~post_o.mask) | (post_o.value & post_o.mask);
    end
  end

endmodule
