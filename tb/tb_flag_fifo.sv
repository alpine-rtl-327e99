// tb_flag_fifo: random pushes and pops against a queue model. Checks the
// FLAGS register after every pop, the pending and full flags, the sticky
// overflow flag when a push meets a full queue, and push+pop at full.
module tb_flag_fifo;
  import alpine_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n, push, pop, pending, full, ovf;
  flags_t pf, flags;
  int checks = 0, failures = 0;
  flags_t q[$];
  flags_t exp_flags;
  logic exp_ovf;
  int n_full = 0, n_ovf = 0, n_both_full = 0;

  flag_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push_i(push), .push_flags_i(pf), .pop_i(pop),
    .flags_o(flags), .pending_o(pending), .full_o(full), .overflow_o(ovf));
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

  initial begin
    rst_n = 1'b0; push = 0; pop = 0; pf = '0; exp_flags = '0; exp_ovf = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check("pending", 32'(pending), 32'(q.size() != 0));
      check("full", 32'(full), 32'(q.size() == DEPTH));
      check("flags", 32'(flags), 32'(exp_flags));
      check("overflow", 32'(ovf), 32'(exp_ovf));
      push = ($urandom % 100) < ((i / 250) % 2 ? 70 : 35);
      pop  = ($urandom % 100) < ((i / 250) % 2 ? 30 : 60);
      pf   = flags_t'($urandom);
      if (q.size() == DEPTH) n_full++;
      if (q.size() == DEPTH && push && pop) n_both_full++;
      // model, in the order the hardware does it: pop frees a slot first
      @(posedge clk);
      #1;
      begin
        logic popped;
        popped = pop && q.size() != 0;
        if (popped) exp_flags = q.pop_front();
        if (push) begin
          if (q.size() < DEPTH) q.push_back(pf);
          else begin exp_ovf = 1; n_ovf++; end
        end
      end
    end
    @(negedge clk); push = 0; pop = 0;
    check("queue got full", 32'(n_full > 0), 1);
    check("overflow exercised", 32'(n_ovf > 0), 1);
    check("push and pop at full", 32'(n_both_full > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
