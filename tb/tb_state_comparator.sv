// tb_state_comparator: random states and guards. The expected match is
// worked out bit by bit: every bit under the mask must equal the guard's
// value. Also checks the one-cycle register delay and the [true] guard.
module tb_state_comparator;
  import alpine_pkg::*;
  logic clk = 1'b0, rst_n, load, match;
  flags_t fl; sem_t sm;
  pre_word_t pre, pre_q;
  state_word_t st;
  int checks = 0, failures = 0, n_match = 0;

  state_comparator dut (.clk, .rst_n, .flags_i(fl), .sem_i(sm), .pre_load_i(load), .pre_i(pre),
    .state_o(st), .pre_o(pre_q), .match_o(match));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic ref_match(state_t s, state_t mask, state_t val);
    for (int b = 0; b < STATE_W; b++)
      if (mask[b] && (s[b] != val[b])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    state_t s;
    rst_n = 0; load = 0; fl = '0; sm = '0; pre = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      fl = flags_t'($urandom); sm = sem_t'($urandom);
      s = {fl, sm};
      pre.mask = state_t'($urandom) & state_t'($urandom);
      if (i % 10 == 0) pre.mask = '0;                       // [true]
      // half of the guards are made to hold
      pre.value = (i % 2) ? s : state_t'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      check("state word", 32'(st), 32'(s));
      check("precondition", 32'(pre_q), 32'(pre));
      check("match", 32'(match), 32'(ref_match(s, pre.mask, pre.value)));
      if (match) n_match++;
    end
    check("both outcomes seen", 32'(n_match > 100 && n_match < 2900), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
