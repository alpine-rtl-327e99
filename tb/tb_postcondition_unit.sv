// tb_postcondition_unit: random loads, CE overwrites and applies against a
// model. Bits under the postcondition mask take its value, the others keep
// theirs; a CE write replaces the loaded word.
module tb_postcondition_unit;
  import alpine_pkg::*;
  logic clk = 1'b0, rst_n, load, cwe, apply;
  post_word_t lw, cw, post;
  sem_t sem;
  int checks = 0, failures = 0;
  post_word_t exp_post;
  sem_t exp_sem;

  postcondition_unit dut (.clk, .rst_n, .load_i(load), .load_word_i(lw), .ce_we_i(cwe),
    .ce_word_i(cw), .apply_i(apply), .post_o(post), .sem_o(sem));
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
    rst_n = 0; load = 0; cwe = 0; apply = 0; lw = '0; cw = '0;
    exp_post = '0; exp_sem = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check("post", 32'(post), 32'(exp_post));
      check("sem", 32'(sem), 32'(exp_sem));
      load = $urandom % 3 == 0; cwe = $urandom % 5 == 0; apply = $urandom % 3 == 0;
      lw = post_word_t'($urandom); cw = post_word_t'($urandom);
      // model of the next edge
      for (int b = 0; b < SEM_W; b++)
        if (apply && exp_post.mask[b]) exp_sem[b] = exp_post.value[b];
      if (cwe) exp_post = cw; else if (load) exp_post = lw;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
