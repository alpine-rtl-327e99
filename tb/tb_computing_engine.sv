// tb_computing_engine: runs subroutines on the Computing Engine with its
// memory and compares against an instruction-set model kept in this
// testbench: the final memory contents, every Postcondition write and the
// number of cycles from Start to Finished (3 per instruction, 4 per load,
// counted from the cycle Start is high to the cycle Finished is high).
// Covers every opcode, taken and untaken branches, a loop, and the PNDU
// interface reads (Precondition, Subroutine Address, Postcondition).
module tb_computing_engine;
  import alpine_pkg::*;
  logic clk = 1'b0, rst_n, start, post_we, fin, busy, mwe, xwe;
  caddr_t sa, maddr, xa;
  pre_word_t pre;
  post_word_t post, post_wd;
  cword_t mwd, mrd, xwd;
  int checks = 0, failures = 0;

  computing_engine dut (.clk, .rst_n, .start_i(start), .sub_addr_i(sa), .pre_i(pre), .post_i(post),
    .post_we_o(post_we), .post_wdata_o(post_wd), .finished_o(fin), .busy_o(busy),
    .mem_addr_o(maddr), .mem_we_o(mwe), .mem_wdata_o(mwd), .mem_rdata_i(mrd));
  ce_memory mem (.clk, .addr_i(maddr), .we_i(mwe), .wdata_i(mwd), .rdata_o(mrd),
    .ext_we_i(xwe), .ext_addr_i(xa), .ext_wdata_i(xwd));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  cword_t img [1 << CADDR_W];     // model memory
  cword_t r [16] = '{default: '0};   // registers persist across runs
  post_word_t model_posts[$];
  int model_cycles;

  task automatic put(int a, cword_t w);
    img[a] = w;
    @(negedge clk); xwe = 1; xa = caddr_t'(a); xwd = w;
    @(negedge clk); xwe = 0;
  endtask

  // Instruction-set model.
  task automatic iss(int entry);
    int pc = entry;
    cword_t ir, a, b, d, simm;
    logic [5:0] op; logic [3:0] rd, rs, rt; logic [15:0] imm;
    model_cycles = 0;
    model_posts.delete();
    for (int steps = 0; steps < 5000; steps++) begin
      ir = img[pc]; pc = (pc + 1) % (1 << CADDR_W);
      op = ir[31:26]; rd = ir[25:22]; rs = ir[21:18]; rt = ir[17:14]; imm = ir[15:0];
      a = rs == 0 ? 0 : r[rs]; b = rt == 0 ? 0 : r[rt]; d = rd == 0 ? 0 : r[rd];
      simm = cword_t'(signed'(imm));
      model_cycles += 3;
      case (op)
        1: r[rd] = a + b;
        2: r[rd] = a - b;
        3: r[rd] = a & b;
        4: r[rd] = a | b;
        5: r[rd] = a ^ b;
        6: r[rd] = a + simm;
        7: r[rd] = {imm, 16'h0};
        8: r[rd] = a << imm[4:0];
        9: r[rd] = a >> imm[4:0];
        10: r[rd] = a | (32'd1 << imm[4:0]);
        11: r[rd] = a & ~(32'd1 << imm[4:0]);
        12: r[rd] = a ^ (32'd1 << imm[4:0]);
        13: r[rd] = (a >> imm[4:0]) & 1;
        14: begin r[rd] = img[(a + simm) % (1 << CADDR_W)]; model_cycles += 1; end
        15: img[(a + simm) % (1 << CADDR_W)] = d;
        16: if (d == a) pc = (pc + int'(simm)) % (1 << CADDR_W);
        17: if (d != a) pc = (pc + int'(simm)) % (1 << CADDR_W);
        18: pc = imm % (1 << CADDR_W);
        19: r[rd] = cword_t'(pre);
        20: r[rd] = cword_t'(entry);
        21: r[rd] = cword_t'(post);
        22: model_posts.push_back(post_word_t'(a[15:0]));
        23: return;
        default: ;
      endcase
    end
  endtask

  task automatic run(int entry);
    int cyc = 0, pw = 0;
    iss(entry);
    @(negedge clk); start = 1; sa = caddr_t'(entry);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!fin && cyc < 10000) begin
      if (post_we) begin
        check("post write", 32'(post_wd), pw < model_posts.size() ? 32'(model_posts[pw]) : 32'hDEAD);
        pw++;
      end
      @(negedge clk); cyc++;
    end
    check("cycles start to finished", 32'(cyc), 32'(model_cycles));
    check("post write count", 32'(pw), 32'(model_posts.size()));
    @(negedge clk);
    check("idle after FIN", 32'(busy), 0);
    for (int i = 256; i < 320; i++) check($sformatf("mem[%0d]", i), mem.mem[i], img[i]);
  endtask

  initial begin
    int p;
    rst_n = 0; start = 0; sa = '0; xwe = 0; xa = '0; xwd = '0;
    pre = pre_word_t'(32'h0300_0201); post = post_word_t'(16'h1F05);
    for (int i = 0; i < (1 << CADDR_W); i++) img[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 256; i < 320; i++) put(i, '0);
    // subroutine 1 at 64: every ALU and bit operation, results stored at 256+
    p = 64;
    put(p++, ce_i(OP_ADDI, 1, 0, 100));
    put(p++, ce_i(OP_ADDI, 2, 0, -7));
    put(p++, ce_r(OP_ADD, 3, 1, 2));
    put(p++, ce_r(OP_SUB, 4, 1, 2));
    put(p++, ce_r(OP_AND, 5, 1, 2));
    put(p++, ce_r(OP_OR,  6, 1, 2));
    put(p++, ce_r(OP_XOR, 7, 1, 2));
    put(p++, ce_i(OP_LUI, 8, 0, 16'hABCD));
    put(p++, ce_i(OP_SLL, 9, 1, 3));
    put(p++, ce_i(OP_SRL, 10, 8, 4));
    put(p++, ce_i(OP_BSET, 11, 0, 31));
    put(p++, ce_i(OP_BCLR, 12, 8, 16));
    put(p++, ce_i(OP_BTGL, 13, 1, 0));
    put(p++, ce_i(OP_BTST, 14, 8, 16));
    put(p++, ce_i(OP_RDPRE, 15, 0, 0));
    for (int k = 1; k < 16; k++) put(p++, ce_i(OP_SW, k, 0, 255 + k));
    put(p++, ce_i(OP_NOP, 0, 0, 0));
    put(p++, ce_i(OP_FIN, 0, 0, 0));
    run(64);
    // subroutine 2 at 200: loads, a loop, branches, jump, PNDU interface
    p = 200;
    put(p++, ce_i(OP_RDSA, 1, 0, 0));
    put(p++, ce_i(OP_SW, 1, 0, 280));
    put(p++, ce_i(OP_RDPOST, 2, 0, 0));
    put(p++, ce_i(OP_SW, 2, 0, 281));
    put(p++, ce_i(OP_LW, 3, 0, 259));          // r3 = mem[259] (93 from run 1)
    put(p++, ce_i(OP_SW, 3, 0, 282));
    put(p++, ce_i(OP_ADDI, 4, 0, 5));          // loop 5 times: r5 += 3
    put(p++, ce_i(OP_ADDI, 5, 5, 3));
    put(p++, ce_i(OP_ADDI, 4, 4, -1));
    put(p++, ce_i(OP_BNE, 4, 0, -3));
    put(p++, ce_i(OP_SW, 5, 0, 283));
    put(p++, ce_i(OP_BEQ, 0, 0, 1));           // taken: skip next
    put(p++, ce_i(OP_SW, 1, 0, 284));          // skipped
    put(p++, ce_i(OP_BEQ, 5, 0, 1));           // not taken
    put(p++, ce_i(OP_SW, 5, 0, 285));
    put(p++, ce_i(OP_BCLR, 6, 2, 0));
    put(p++, ce_i(OP_WRPOST, 0, 6, 0));
    put(p++, ce_i(OP_WRPOST, 0, 1, 0));
    put(p++, ce_i(OP_JMP, 0, 0, 230));
    put(p++, ce_i(OP_SW, 1, 0, 286));          // jumped over
    p = 230;
    put(p++, ce_i(OP_LW, 7, 0, 280));
    put(p++, ce_i(OP_SW, 7, 0, 287));
    put(p++, ce_i(OP_FIN, 0, 0, 0));
    run(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
