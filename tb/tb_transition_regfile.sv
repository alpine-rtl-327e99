// tb_transition_regfile: writes random transitions field by field and
// checks the candidate outputs, the NNT clamp, the commit of the candidate's
// next list into the active list, and the one-entry list after init.
module tb_transition_regfile;
  import alpine_pkg::*;
  localparam paddr_t START = 8'd3;
  logic clk = 1'b0, rst_n, we, commit, do_init;
  paddr_t ofs, act_nta;
  pword_t wd;
  pre_word_t pre; sub_word_t sub; post_word_t post;
  logic [NNT_W-1:0] nnt, sel, act_nnt;
  int checks = 0, failures = 0;

  transition_regfile #(.START_ADDR(START)) dut (.clk, .rst_n, .wr_en_i(we), .wr_ofs_i(ofs),
    .wr_data_i(wd), .commit_i(commit), .init_i(do_init), .pre_o(pre), .sub_o(sub), .post_o(post),
    .nnt_o(nnt), .sel_i(sel), .act_nnt_o(act_nnt), .act_nta_o(act_nta));
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

  task automatic wr(int o, pword_t d);
    @(negedge clk); we = 1; ofs = paddr_t'(o); wd = d;
    @(negedge clk); we = 0;
  endtask

  pword_t p, s, q;
  int n, nc;
  paddr_t list[MAX_NT];
  paddr_t act[MAX_NT];
  int act_n;
  initial begin
    rst_n = 0; we = 0; commit = 0; do_init = 0; ofs = '0; wd = '0; sel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // after reset the active list is {START}
    check("reset act nnt", 32'(act_nnt), 1);
    check("reset act nta", 32'(act_nta), 32'(START));
    act_n = 1; act[0] = START;
    for (int t = 0; t < 100; t++) begin
      p = $urandom; s = $urandom; q = $urandom;
      n = $urandom % (MAX_NT + 4);
      nc = n > MAX_NT ? MAX_NT : n;
      wr(OFS_PRE, p); wr(OFS_SUB, s); wr(OFS_POST, q); wr(OFS_NNT, pword_t'(n));
      for (int i = 0; i < nc; i++) begin
        list[i] = paddr_t'($urandom);
        wr(OFS_NTA + i, pword_t'(list[i]));
      end
      @(negedge clk);
      check("pre", 32'(pre), p);
      check("sub", 32'(sub), s);
      check("post", 32'(post), 32'(q[2*SEM_W-1:0]));
      check("nnt clamp", 32'(nnt), 32'(nc));
      // the active list is untouched by loading a candidate
      check("act nnt kept", 32'(act_nnt), 32'(act_n));
      for (int i = 0; i < act_n; i++) begin
        sel = NNT_W'(i); #1;
        check("act kept", 32'(act_nta), 32'(act[i]));
      end
      @(negedge clk);
      if (t % 7 == 6) begin
        do_init = 1; @(negedge clk); do_init = 0;
        act_n = 1; act[0] = START;
      end else if (t % 2 == 0) begin
        commit = 1; @(negedge clk); commit = 0;
        act_n = nc;
        for (int i = 0; i < nc; i++) act[i] = list[i];
      end
      check($sformatf("act nnt t=%0d n=%0d", t, n), 32'(act_nnt), 32'(act_n));
      for (int i = 0; i < act_n; i++) begin
        sel = NNT_W'(i); #1;
        check("act nta", 32'(act_nta), 32'(act[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
