// tb_railroad_env: the level-crossing controller driven by a timed
// environment, on the full processor at its default size.
//
// The program is the flags-only crossing net (guards test only the sensors r
// and l; output z is semaphore bit 0):
//   T0 [true] z=0 -> T1,T2      T1 [r,!l] z=1 -> T3    T2 [!r,l] z=1 -> T4
//   T3 [!r,l] z=1 -> T5         T4 [r,!l] z=1 -> T5    T5 [!r,!l] z=0 -> T1,T2
// The environment changes the sensors at times 20, 40, 70 and 90 (one time
// unit = UNIT clock cycles), for a long and a short train from each side.
// z is sampled every cycle and compared with the ideal waveform: high from
// the first sensor edge to the last. Each sensor edge that should move z
// must move it after exactly the latency the timing model predicts, and z
// must not change anywhere else. Latency from a sensor edge to z:
//   4 (synchronizer and queue) + 2 (leave suspension) + load of the firing
//   transition (4 + NNT + 1) + 1 (test) + 2 (fire, apply)
// = 15 for T1/T2 and 16 for T5 (NNT 2). A train from the left costs 8 more
// on the rise, because T1 is loaded, tested and rejected before T2
// (4+1+1 load, 1 test, 1 step to the next entry).
module tb_railroad_env;
  import alpine_pkg::*;
  localparam int UNIT = 10, MAX_LAT = 25, Z = 0, R = 1, L = 0;
  localparam int T0 = 0, T1 = 6, T2 = 11, T3 = 16, T4 = 21, T5 = 26;
  logic clk = 1'b0, rst_n, pwe, cwe;
  flags_t f; sem_t s;
  paddr_t pa; pword_t pd; caddr_t ca; cword_t cd;
  logic fired, suspended, halted, nev, ovf, busy;
  paddr_t faddr;
  int checks = 0, failures = 0;

  alpine_top dut (.clk, .rst_n, .f_i(f), .s_o(s),
    .pndu_prog_we_i(pwe), .pndu_prog_addr_i(pa), .pndu_prog_data_i(pd),
    .ce_prog_we_i(cwe), .ce_prog_addr_i(ca), .ce_prog_data_i(cd),
    .fired_o(fired), .fired_addr_o(faddr), .suspended_o(suspended), .halted_o(halted),
    .new_event_o(nev), .fifo_overflow_o(ovf), .ce_busy_o(busy));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic state_t fl(int b);
    return state_t'(1) << (SEM_W + b);
  endfunction
  task automatic pw(int a, pword_t w);
    @(negedge clk); pwe = 1; pa = paddr_t'(a); pd = w;
    @(negedge clk); pwe = 0;
  endtask
  task automatic trans(int at, state_t pm, state_t pv, sem_t zv, int nt[$]);
    pw(at + OFS_PRE, pre_w(pm, pv));
    pw(at + OFS_SUB, sub_w(1'b0, '0));
    pw(at + OFS_POST, post_w(sem_t'(1 << Z), zv));
    pw(at + OFS_NNT, pword_t'(nt.size()));
    foreach (nt[i]) pw(at + OFS_NTA + i, pword_t'(nt[i]));
  endtask

  // One train: sensor vectors at times 20, 40, 70, 90; the ideal z is high
  // from time 20 to time 90.
  task automatic train(string name, logic [1:0] ev[4], int rise_exp, int fall_exp);
    int times[4] = '{20, 40, 70, 90};
    int t = 0, rise = -1, fall = -1, changes = 0;
    logic zprev = s[Z];
    for (int c = 0; c <= 110 * UNIT; c++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (c == times[i] * UNIT) f = flags_t'(ev[i]);
      if (s[Z] != zprev) begin
        changes++;
        if (s[Z]) rise = c; else fall = c;
      end
      zprev = s[Z];
      // between edges (away from the settling windows) z must be ideal
      if (c > 20 * UNIT + MAX_LAT && c < 90 * UNIT) check({name, " z high"}, 32'(s[Z]), 1);
      if (c < 20 * UNIT || c > 90 * UNIT + MAX_LAT) check({name, " z low"}, 32'(s[Z]), 0);
    end
    check({name, " z edges"}, 32'(changes), 2);
    check({name, " rise latency"}, 32'(rise - 20 * UNIT), 32'(rise_exp));
    check({name, " fall latency"}, 32'(fall - 90 * UNIT), 32'(fall_exp));
    $display("%s: z rises %0d cycles after the first sensor edge, falls %0d cycles after the last",
             name, rise - 20 * UNIT, fall - 90 * UNIT);
  endtask

  initial begin
    state_t rl;
    rl = fl(R) | fl(L);
    rst_n = 0; f = '0; pwe = 0; cwe = 0; pa = '0; pd = '0; ca = '0; cd = '0;
    trans(T0, '0, '0, 0, '{T1, T2});
    trans(T1, rl, fl(R), 1, '{T3});
    trans(T2, rl, fl(L), 1, '{T4});
    trans(T3, rl, fl(L), 1, '{T5});
    trans(T4, rl, fl(R), 1, '{T5});
    trans(T5, rl, '0, 0, '{T1, T2});
    @(negedge clk) rst_n = 1;
    repeat (50) @(negedge clk);
    check("z low after start", 32'(s[Z]), 0);
    train("long right",  '{2'b10, 2'b11, 2'b01, 2'b00}, 15, 16);
    train("short right", '{2'b10, 2'b00, 2'b01, 2'b00}, 15, 16);
    train("long left",   '{2'b01, 2'b11, 2'b10, 2'b00}, 23, 16);
    train("short left",  '{2'b01, 2'b00, 2'b10, 2'b00}, 23, 16);
    check("no overflow", 32'(ovf), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
