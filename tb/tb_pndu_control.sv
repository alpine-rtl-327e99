// tb_pndu_control: the control unit with a real Transition Register File, a
// memory model and a guard table in place of the comparator.
//
// Program (address: next list): 0: {10,20,30} with a subroutine;
// 10: {0}; 20: {40}; 30: {10,20}; 40: {} (dead end).
// Which transitions hold their guard changes with each new event ("epoch"):
//   epoch 0: {0}   epoch 1: {30}   epoch 2: {20}   epoch 3: {40}
// The order of tests worked out by hand from the execution cycle
// (* = fires):
//   0* | 10 20 30 (suspend) | 10 20 30* 10 20 (suspend) | 10 20* 40
//   (suspend) | 40* halt
// The testbench checks that sequence, one Computing Engine start for the one
// transition with a subroutine, that the Finished handshake is waited for,
// one postcondition load and apply per firing, one FIFO pop per resume, and
// the load time of 4+n+1 cycles for a transition with n next addresses.
module tb_pndu_control;
  import alpine_pkg::*;
  logic clk = 1'b0, rst_n;
  paddr_t maddr; pword_t mrdata;
  logic trf_wr, trf_commit, trf_init; paddr_t trf_ofs, act_nta;
  logic [NNT_W-1:0] sel, nnt, act_nnt;
  pre_word_t tpre; sub_word_t tsub; post_word_t tpost;
  logic pre_load, match, post_load, post_apply, pending, pop, ce_start, ce_fin;
  logic fired, suspended, halted;
  paddr_t fired_addr;
  int checks = 0, failures = 0;

  pndu_control dut (.clk, .rst_n, .mem_addr_o(maddr), .mem_rdata_i(mrdata),
    .trf_wr_o(trf_wr), .trf_ofs_o(trf_ofs), .trf_commit_o(trf_commit),
    .trf_init_o(trf_init), .trf_sel_o(sel), .trf_nnt_i(nnt), .trf_act_nnt_i(act_nnt),
    .trf_act_nta_i(act_nta), .trf_sub_i(tsub), .pre_load_o(pre_load), .match_i(match),
    .post_load_o(post_load), .post_apply_o(post_apply), .event_pending_i(pending),
    .fifo_pop_o(pop), .ce_start_o(ce_start), .ce_finished_i(ce_fin),
    .fired_o(fired), .fired_addr_o(fired_addr), .suspended_o(suspended), .halted_o(halted));
  transition_regfile trf (.clk, .rst_n, .wr_en_i(trf_wr), .wr_ofs_i(trf_ofs), .wr_data_i(mrdata),
    .commit_i(trf_commit), .init_i(trf_init), .pre_o(tpre), .sub_o(tsub), .post_o(tpost),
    .nnt_o(nnt), .sel_i(sel), .act_nnt_o(act_nnt), .act_nta_o(act_nta));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // memory model
  pword_t mem [256];
  always_ff @(posedge clk) mrdata <= mem[maddr];
  task automatic trans(int at, logic has_sub, int nt[$]);
    mem[at + OFS_PRE]  = pword_t'(at);
    mem[at + OFS_SUB]  = sub_w(has_sub, caddr_t'(at + 100));
    mem[at + OFS_POST] = pword_t'(at + 1);
    mem[at + OFS_NNT]  = pword_t'(nt.size());
    foreach (nt[i]) mem[at + OFS_NTA + i] = pword_t'(nt[i]);
  endtask

  // guard table per epoch
  int epoch = 0;
  int holds [4] = '{0, 30, 20, 40};
  assign match = (int'(fired_addr) == holds[epoch]);

  // events: one queued whenever the unit suspends
  int queued = 0;
  assign pending = queued > 0;

  // CE model: finishes 7 cycles after start
  int ce_cnt = -1, n_start = 0;
  assign ce_fin = (ce_cnt == 0);
  always @(posedge clk) begin
    if (ce_start) begin ce_cnt <= 7; n_start++; end
    else if (ce_cnt >= 0) ce_cnt <= ce_cnt - 1;
  end

  // observe
  int tested[$];
  int n_fire = 0, n_load = 0, n_apply = 0, n_pop = 0, load_start = -1, cyc = 0;
  int loads_ok = 0, loads_bad = 0;
  logic [3:0] prev_state = 4'(0);
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pre_load) tested.push_back(fired ? -1 : int'(fired_addr));
    if (fired) begin
      tested.push_back(-1);
      n_fire++;
      if (tsub.valid) check("start with subroutine", 32'(ce_start), 1);
      else            check("no start without subroutine", 32'(ce_start), 0);
    end
    if (post_load) n_load++;
    if (post_apply) begin
      n_apply++;
      check("CE finished before apply", 32'(ce_cnt <= 0), 1);
    end
    if (pop) begin n_pop++; queued <= queued - 1; epoch <= epoch + 1; end
    if (suspended && queued == 0 && !pop) queued <= queued + 1;
    // load duration: from the first cycle of S_LOAD to pre_load inclusive
    if (dut.state_q == dut.S_LOAD && prev_state != 4'(dut.S_LOAD)) load_start = cyc;
    if (pre_load) begin
      if (cyc - load_start + 1 == 4 + int'(mem[int'(fired_addr) + OFS_NNT]) + 1) loads_ok++;
      else begin loads_bad++; $display("load at %0d: %0d cycles nnt=%0d addr=%0d", cyc, cyc - load_start + 1, nnt, fired_addr); end
    end
    prev_state <= 4'(dut.state_q);
  end

  int expect_seq[$] = '{0, -1, 10, 20, 30, 10, 20, 30, -1, 10, 20, 10, 20, -1, 40, 40, -1};
  initial begin
    for (int i = 0; i < 256; i++) mem[i] = '0;
    trans(0, 1, '{10, 20, 30});
    trans(10, 0, '{0});
    trans(20, 0, '{40});
    trans(30, 0, '{10, 20});
    trans(40, 0, '{});
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!halted) @(negedge clk);
    repeat (5) @(negedge clk);
    check("still halted", 32'(halted), 1);
    check("sequence length", tested.size(), expect_seq.size());
    foreach (expect_seq[i])
      if (i < tested.size()) check($sformatf("step %0d", i), 32'(tested[i]), 32'(expect_seq[i]));
    check("fires", n_fire, 4);
    check("CE starts", n_start, 1);
    check("post loads", n_load, 4);
    check("post applies", n_apply, 4);
    check("pops", n_pop, 3);
    check("load time 4+n+1", loads_bad, 0);
    check("loads measured", 32'(loads_ok), 32'(expect_seq.size() - 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
