// flag_fifo: queue of flag events whose head is the FLAGS register.
//
// Every new flag vector reported by the new event detector is pushed here.
// The FLAGS register (`flags_o`) is the oldest flag vector still in use: it is
// the flag half of the State Word. When the decision unit has tested every
// transition on its Next Transition List and none fired, it pops (`pop_i`),
// so the next queued vector moves into FLAGS. `pending_o` says that at least
// one newer vector is waiting, that is, a new event is available.
//
// The queue and its FLAGS output stage follow Figure 4 of the document,
// which draws the FLAGS register as the last stage of the FIFO. The depth,
// the reset value of FLAGS (0) and the overflow policy are this design's own
// choices. When the queue is full, a new vector is dropped and `overflow_o`
// stays high until reset.
//
// Timing: a push is visible on pending_o the next cycle. A pop loads FLAGS
// from the queue at the next edge. A push and a pop may happen in the same
// cycle.
module flag_fifo
  import alpine_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push_i,
  input  flags_t push_flags_i,
  input  logic   pop_i,        // move the oldest queued vector into FLAGS
  output flags_t flags_o,      // FLAGS register: oldest vector in use
  output logic   pending_o,    // a newer vector is queued
  output logic   full_o,
  output logic   overflow_o    // sticky: a vector was dropped
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flags_t          mem_q [DEPTH];
  logic [PW-1:0]   rd_ptr_q, wr_ptr_q;
  logic [PW:0]     count_q;
  logic            do_pop, do_push;

  assign pending_o = (count_q != '0);
  assign full_o    = (count_q == (PW+1)'(DEPTH));
  assign do_pop    = pop_i && pending_o;
  // A push into a full queue succeeds only when a pop frees a slot.
  assign do_push   = push_i && (!full_o || do_pop);

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q   <= '0;
      wr_ptr_q   <= '0;
      count_q    <= '0;
      flags_o    <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (do_pop) begin
        flags_o  <= mem_q[rd_ptr_q];
        rd_ptr_q <= inc(rd_ptr_q);
      end
      if (do_push) begin
        wr_ptr_q <= inc(wr_ptr_q);
      end
      if (push_i && !do_push) overflow_o <= 1'b1;
      case ({do_push, do_pop})
        2'b10:   count_q <= count_q + 1'b1;
        2'b01:   count_q <= count_q - 1'b1;
        default: count_q <= count_q;
      endcase
    end
  end

  // Storage without reset; a slot is read only after it was written.
  always_ff @(posedge clk) begin
    if (do_push) mem_q[wr_ptr_q] <= push_flags_i;
  end

endmodule
