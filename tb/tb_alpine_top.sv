// tb_alpine_top: end-to-end test of the ALPiNe processor at its default size.
//
// Part 1 runs the railroad-crossing controller. Sensors r and l sit right and
// left of a level crossing. The output z closes the crossing from the
// moment the first sensor sees a train until the last sensor is clear. The
// program has six transitions, T0..T5, with semaphores a, b, c, d and the
// output z. T0 starts in state a. T1/T2 leave a on (r,!l)/(!r,l). T3/T4 wait
// for the train to reach the other sensor. T5 returns to a once both sensors
// are clear. The four sensor sequences are long and short trains from the
// right and from the left. After every event the semaphores are compared
// with a hand-worked table.
// Events are spaced widely in the first two runs and sent back to back in
// the other two, so the flag FIFO holds several events at once.
//
// Part 2 loads a second program that exercises the Computing Engine: a
// subroutine that rewrites the Postcondition, one that runs long while flag
// events overflow the FIFO, and a final transition with an empty next list,
// which halts the decision unit.
//
// Every mechanism (fire, walk to the next list entry, suspend, resume on an
// event, FIFO holding more than one event, FIFO overflow, CE run, CE
// postcondition write, halt) is counted, and one that never happens counts
// as a failure.
module tb_alpine_top;
  import alpine_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n;
  flags_t f;
  sem_t   s;
  logic   pwe, cwe;
  paddr_t paddr;
  pword_t pdata;
  caddr_t caddr;
  cword_t cdata;
  logic   fired, suspended, halted, new_event, overflow, ce_busy;
  paddr_t fired_addr;

  int checks = 0, failures = 0;
  int n_fire = 0, n_walk = 0, n_suspend = 0, n_resume = 0, n_queue2 = 0;
  int n_ce = 0, n_wrpost = 0, n_halt = 0, n_overflow = 0;

  alpine_top dut (
    .clk, .rst_n, .f_i(f), .s_o(s),
    .pndu_prog_we_i(pwe), .pndu_prog_addr_i(paddr), .pndu_prog_data_i(pdata),
    .ce_prog_we_i(cwe), .ce_prog_addr_i(caddr), .ce_prog_data_i(cdata),
    .fired_o(fired), .fired_addr_o(fired_addr), .suspended_o(suspended),
    .halted_o(halted), .new_event_o(new_event), .fifo_overflow_o(overflow),
    .ce_busy_o(ce_busy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  logic susp_d = 1'b0, ov_d = 1'b0, busy_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (fired) n_fire++;
    if (dut.u_pndu.u_ctrl.state_q == dut.u_pndu.u_ctrl.S_NEXT &&
        dut.u_pndu.u_ctrl.sel_q + 1 < dut.u_pndu.u_ctrl.trf_act_nnt_i) n_walk++;
    if (suspended && !susp_d) n_suspend++;
    if (!suspended && susp_d) n_resume++;
    if (dut.u_pndu.u_fifo.count_q >= 2) n_queue2++;
    if (ce_busy && !busy_d) n_ce++;
    if (dut.u_ce.post_we_o) n_wrpost++;
    if (overflow && !ov_d) n_overflow++;
    susp_d <= suspended; ov_d <= overflow; busy_d <= ce_busy;
  end

  // Semaphore and flag bit positions of the railroad program.
  localparam int A = 0, B = 1, C = 2, D = 3, Z = 4;
  localparam int R = 1, L = 0;                 // flag bits
  function automatic state_t fb(int bitpos);   // flag bit in the State Word
    return state_t'(1) << (SEM_W + bitpos);
  endfunction
  function automatic state_t sb(int bitpos);   // semaphore bit in the State Word
    return state_t'(1) << bitpos;
  endfunction
  function automatic sem_t m(int bitpos);
    return sem_t'(1) << bitpos;
  endfunction

  task automatic pw(int addr, pword_t w);
    @(negedge clk); pwe = 1'b1; paddr = paddr_t'(addr); pdata = w;
    @(negedge clk); pwe = 1'b0;
  endtask
  task automatic cw(int addr, cword_t w);
    @(negedge clk); cwe = 1'b1; caddr = caddr_t'(addr); cdata = w;
    @(negedge clk); cwe = 1'b0;
  endtask

  // One transition: pre mask/value, subroutine, post mask/value, next list.
  task automatic trans(int at, state_t pm, state_t pv, logic sv, int sa,
                       sem_t qm, sem_t qv, int nt[$]);
    pw(at + OFS_PRE,  pre_w(pm, pv));
    pw(at + OFS_SUB,  sub_w(sv, caddr_t'(sa)));
    pw(at + OFS_POST, post_w(qm, qv));
    pw(at + OFS_NNT,  pword_t'(nt.size()));
    foreach (nt[i]) pw(at + OFS_NTA + i, pword_t'(nt[i]));
  endtask

  localparam int T0 = 0, T1 = 6, T2 = 11, T3 = 16, T4 = 21, T5 = 26;

  task automatic load_railroad();
    state_t rl = fb(R) | fb(L);
    trans(T0, '0, '0, 0, 0, m(A)|m(B)|m(Z), m(A), '{T1, T2});
    trans(T1, rl|sb(A), fb(R)|sb(A), 0, 0, m(A)|m(B)|m(Z), m(B)|m(Z), '{T3});
    trans(T2, rl|sb(A), fb(L)|sb(A), 0, 0, m(A)|m(C)|m(Z), m(C)|m(Z), '{T4});
    trans(T3, rl|sb(B), fb(L)|sb(B), 0, 0, m(B)|m(D)|m(Z), m(D)|m(Z), '{T5});
    trans(T4, rl|sb(C), fb(R)|sb(C), 0, 0, m(C)|m(D)|m(Z), m(D)|m(Z), '{T5});
    trans(T5, rl|sb(D), sb(D),       0, 0, m(A)|m(D)|m(Z), m(A),      '{T1, T2});
  endtask

  task automatic reset_dut();
    rst_n = 1'b0; f = '0; pwe = 1'b0; cwe = 1'b0;
    paddr = '0; pdata = '0; caddr = '0; cdata = '0;
    repeat (3) @(posedge clk);
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wait_suspended(int limit);
    int n = 0;
    @(posedge clk);
    while (!(suspended && !dut.u_pndu.u_fifo.pending_o) && n < limit) begin
      @(posedge clk); n++;
    end
    check("settled", 32'(n < limit), 32'd1);
  endtask

  // One train: four (r,l) events and the semaphores expected after each.
  task automatic train(string name, logic [1:0] ev[4], sem_t exp[4], int gap);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      f = flags_t'({ev[i][1], ev[i][0]});   // {r,l}
      repeat (gap) @(posedge clk);
      if (gap > 40) begin
        wait_suspended(1000);
        check($sformatf("%s event %0d sem", name, i), 32'(s), 32'(exp[i]));
      end
    end
    wait_suspended(2000);
    check($sformatf("%s final sem", name), 32'(s), 32'(exp[3]));
    check($sformatf("%s z low", name), 32'(s[Z]), 32'd0);
  endtask

  sem_t sem_a;
  int   t0_cycles;
  initial begin
    // ---------------- Part 1: railroad crossing ----------------
    reset_dut();
    load_railroad();
    @(negedge clk); rst_n = 1'b1;
    // T0 fires at power-on and the net settles in state a.
    t0_cycles = 0;
    do begin @(negedge clk); t0_cycles++; end while (!fired);
    check("T0 fires first", 32'(fired_addr), T0);
    // init (1) + load of 6 words (7) + test (1) cycles before the fire state
    check("T0 fire latency", 32'(t0_cycles), 32'd9);
    wait_suspended(1000);
    sem_a = m(A);
    check("after T0", 32'(s), 32'(sem_a));

    // a) long train from the right: (r,l) = 10, 11, 01, 00
    train("long right", '{2'b10, 2'b11, 2'b01, 2'b00},
          '{m(B)|m(Z), m(B)|m(Z), m(D)|m(Z), sem_a}, 100);
    // b) short train from the right: 10, 00, 01, 00
    train("short right", '{2'b10, 2'b00, 2'b01, 2'b00},
          '{m(B)|m(Z), m(B)|m(Z), m(D)|m(Z), sem_a}, 100);
    // c) long train from the left, events back to back: 01, 11, 10, 00
    train("long left", '{2'b01, 2'b11, 2'b10, 2'b00},
          '{m(C)|m(Z), m(C)|m(Z), m(D)|m(Z), sem_a}, 4);
    // d) short train from the left, back to back: 01, 00, 10, 00
    train("short left", '{2'b01, 2'b00, 2'b10, 2'b00},
          '{m(C)|m(Z), m(C)|m(Z), m(D)|m(Z), sem_a}, 4);
    check("no overflow in part 1", 32'(overflow), 32'd0);

    // ---------------- Part 2: Computing Engine ----------------
    reset_dut();
    // P0 @0: guard [true], subroutine @16 widens the postcondition to also
    // set a; P1 @6: guard [r], subroutine @32 runs a long loop, post b=1;
    // P2 @12: guard [true], post c=1, empty next list.
    trans(0,  '0, '0, 1, 16, m(Z), m(Z), '{6});
    trans(6,  fb(R), fb(R), 1, 32, m(B), m(B), '{12});
    trans(12, '0, '0, 0, 0, m(C), m(C), '{});
    // subroutine @16: r1 = post; set value and mask bit of a; store, reload,
    // write back as the new Postcondition.
    cw(16, ce_i(OP_RDPOST, 1, 0, 0));
    cw(17, ce_i(OP_BSET,   1, 1, A));
    cw(18, ce_i(OP_BSET,   1, 1, SEM_W + A));
    cw(19, ce_i(OP_ADDI,   5, 0, 128));
    cw(20, ce_i(OP_SW,     1, 5, 0));
    cw(21, ce_i(OP_LW,     2, 5, 0));
    cw(22, ce_i(OP_WRPOST, 0, 2, 0));
    cw(23, ce_i(OP_FIN,    0, 0, 0));
    // subroutine @32: store its own address, count r4 down from 60.
    cw(32, ce_i(OP_RDSA,   3, 0, 0));
    cw(33, ce_i(OP_SW,     3, 0, 129));
    cw(34, ce_i(OP_ADDI,   4, 0, 60));
    cw(35, ce_i(OP_ADDI,   4, 4, -1));
    cw(36, ce_i(OP_BNE,    4, 0, -2));
    cw(37, ce_i(OP_FIN,    0, 0, 0));
    @(negedge clk); rst_n = 1'b1;
    wait_suspended(2000);
    check("CE rewrote postcondition", 32'(s), 32'(m(Z)|m(A)));
    check("CE memory store", dut.u_cmem.mem[128], 32'({m(Z)|m(A), m(Z)|m(A)}));
    // r rises: P1 fires and its long subroutine starts.
    @(negedge clk); f = flags_t'(1 << R);
    while (!ce_busy) @(posedge clk);
    // Toggle l twelve times while the CE runs: more than the FIFO holds.
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); f[L] = ~f[L];
      repeat (4) @(posedge clk);
    end
    begin
      int n = 0;
      while (!halted && n < 5000) begin @(posedge clk); n++; end
    end
    check("halted", 32'(halted), 32'd1);
    if (halted) n_halt++;
    check("overflow seen", 32'(overflow), 32'd1);
    check("final semaphores", 32'(s), 32'(m(Z)|m(A)|m(B)|m(C)));
    check("RDSA stored", dut.u_cmem.mem[129], 32'd32);

    // Every mechanism must have happened.
    check("fire",     32'(n_fire > 0), 1);
    check("walk",     32'(n_walk > 0), 1);
    check("suspend",  32'(n_suspend > 0), 1);
    check("resume",   32'(n_resume > 0), 1);
    check("queue>=2", 32'(n_queue2 > 0), 1);
    check("ce run",   32'(n_ce >= 2), 1);
    check("wrpost",   32'(n_wrpost > 0), 1);
    check("overflow", 32'(n_overflow > 0), 1);
    check("halt",     32'(n_halt > 0), 1);
    $display("mechanisms: fire=%0d walk=%0d suspend=%0d resume=%0d queue2=%0d ce=%0d wrpost=%0d overflow=%0d halt=%0d",
             n_fire, n_walk, n_suspend, n_resume, n_queue2, n_ce, n_wrpost, n_overflow, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
