// tb_pndu: the decision unit with its program memory and a Computing Engine
// model, running the flags-only railroad-crossing net. In this net every
// guard tests only the sensors r and l, and the state is carried by the next
// lists alone:
//   T0 [true] z=0 -> T1,T2      T1 [r,!l] z=1 -> T3    T2 [!r,l] z=1 -> T4
//   T3 [!r,l] z=1 -> T5         T4 [r,!l] z=1 -> T5    T5 [!r,!l] z=0 -> T1,T2
// T0 also has a subroutine. The CE model checks the Subroutine Address and
// Precondition it is given, then overwrites the Postcondition to also set
// semaphore bit 7. All four trains are run (long/short, from the right and
// from the left). The testbench checks z after every event and the exact
// order in which transitions fire.
module tb_pndu;
  import alpine_pkg::*;
  localparam int Z = 0, MARK = 7, R = 1, L = 0;
  localparam int T0 = 0, T1 = 6, T2 = 11, T3 = 16, T4 = 21, T5 = 26;
  logic clk = 1'b0, rst_n, we;
  flags_t f; sem_t s;
  paddr_t maddr, wa; pword_t mrd, wd;
  logic ce_start, ce_we, ce_fin, fired, suspended, halted, nev, ovf;
  caddr_t ce_sa; pre_word_t ce_pre; post_word_t ce_post, ce_wd;
  paddr_t fired_addr;
  int checks = 0, failures = 0;

  pndu dut (.clk, .rst_n, .f_i(f), .s_o(s), .mem_addr_o(maddr), .mem_rdata_i(mrd),
    .ce_start_o(ce_start), .ce_sub_addr_o(ce_sa), .ce_pre_o(ce_pre), .ce_post_o(ce_post),
    .ce_post_we_i(ce_we), .ce_post_wdata_i(ce_wd), .ce_finished_i(ce_fin),
    .fired_o(fired), .fired_addr_o(fired_addr), .suspended_o(suspended), .halted_o(halted),
    .new_event_o(nev), .fifo_overflow_o(ovf));
  pndu_memory pmem (.clk, .rd_addr_i(maddr), .rd_data_o(mrd), .wr_en_i(we), .wr_addr_i(wa), .wr_data_i(wd));
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

  // CE model: 5 cycles after start, widen the postcondition and finish.
  int ce_cnt = -1;
  assign ce_we  = (ce_cnt == 1);
  assign ce_wd  = '{mask: ce_post.mask | sem_t'(1 << MARK), value: ce_post.value | sem_t'(1 << MARK)};
  assign ce_fin = (ce_cnt == 0);
  always @(posedge clk) begin
    if (ce_start) begin
      ce_cnt <= 5;
      check("CE subroutine address", 32'(ce_sa), 32'd77);
      check("precondition of T0 visible to CE", 32'(ce_pre), 0);
    end else if (ce_cnt >= 0) ce_cnt <= ce_cnt - 1;
  end

  int fired_seq[$];
  always @(posedge clk) if (rst_n && fired) fired_seq.push_back(int'(fired_addr));

  function automatic state_t fl(int b);
    return state_t'(1) << (SEM_W + b);
  endfunction
  task automatic pw(int a, pword_t w);
    @(negedge clk); we = 1; wa = paddr_t'(a); wd = w;
    @(negedge clk); we = 0;
  endtask
  task automatic trans(int at, state_t pm, state_t pv, logic sv, sem_t qv, int nt[$]);
    pw(at + OFS_PRE, pre_w(pm, pv));
    pw(at + OFS_SUB, sub_w(sv, caddr_t'(77)));
    pw(at + OFS_POST, post_w(sem_t'(1 << Z), qv));
    pw(at + OFS_NNT, pword_t'(nt.size()));
    foreach (nt[i]) pw(at + OFS_NTA + i, pword_t'(nt[i]));
  endtask

  task automatic settle();
    int n = 0;
    do begin @(negedge clk); n++; end
    while (!(suspended && !dut.u_fifo.pending_o) && n < 500);
  endtask

  task automatic train(string name, logic [1:0] ev[4]);
    sem_t zexp[4] = '{1, 1, 1, 0};
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) f = flags_t'(ev[i]);
      repeat (10) @(negedge clk);
      settle();
      check($sformatf("%s z after event %0d", name, i), 32'(s[Z]), 32'(zexp[i]));
    end
  endtask

  int expect_seq[$] = '{T0, T1, T3, T5, T1, T3, T5, T2, T4, T5, T2, T4, T5};
  initial begin
    state_t rl;
    rl = fl(R) | fl(L);
    rst_n = 0; f = '0; we = 0; wa = '0; wd = '0;
    trans(T0, '0, '0, 1, '0, '{T1, T2});
    trans(T1, rl, fl(R), 0, 1, '{T3});
    trans(T2, rl, fl(L), 0, 1, '{T4});
    trans(T3, rl, fl(L), 0, 1, '{T5});
    trans(T4, rl, fl(R), 0, 1, '{T5});
    trans(T5, rl, '0, 0, 0, '{T1, T2});
    @(negedge clk) rst_n = 1;
    settle();
    check("T0: z low", 32'(s[Z]), 0);
    check("T0: CE widened postcondition", 32'(s[MARK]), 1);
    train("long right",  '{2'b10, 2'b11, 2'b01, 2'b00});
    train("short right", '{2'b10, 2'b00, 2'b01, 2'b00});
    train("long left",   '{2'b01, 2'b11, 2'b10, 2'b00});
    train("short left",  '{2'b01, 2'b00, 2'b10, 2'b00});
    check("fire count", fired_seq.size(), expect_seq.size());
    foreach (expect_seq[i])
      if (i < fired_seq.size()) check($sformatf("fire %0d", i), 32'(fired_seq[i]), 32'(expect_seq[i]));
    check("mark kept", 32'(s[MARK]), 1);
    check("no overflow", 32'(ovf), 0);
    check("not halted", 32'(halted), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
