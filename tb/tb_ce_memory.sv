// tb_ce_memory: writes through the CE port and the load port, checks reads,
// the one-cycle latency, and that the load port wins a same-cycle conflict.
module tb_ce_memory;
  import alpine_pkg::*;
  logic clk = 1'b0, we, xwe;
  caddr_t a, xa;
  cword_t wd, rd, xwd;
  int checks = 0, failures = 0;
  cword_t model [1 << CADDR_W];

  ce_memory dut (.clk, .addr_i(a), .we_i(we), .wdata_i(wd), .rdata_o(rd),
    .ext_we_i(xwe), .ext_addr_i(xa), .ext_wdata_i(xwd));
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

  initial begin
    we = 0; xwe = 0; a = '0; xa = '0; wd = '0; xwd = '0;
    for (int i = 0; i < (1 << CADDR_W); i++) begin
      @(negedge clk); xwe = 1; xa = caddr_t'(i); xwd = $urandom; model[i] = xwd;
    end
    @(negedge clk); xwe = 0;
    for (int i = 0; i < 3000; i++) begin
      cword_t expected;
      @(negedge clk);
      a = caddr_t'($urandom); we = $urandom % 2; wd = $urandom;
      xwe = $urandom % 4 == 0; xa = ($urandom % 2) ? a : caddr_t'($urandom); xwd = $urandom;
      expected = model[a];
      if (xwe) model[xa] = xwd; else if (we) model[a] = wd;
      @(negedge clk); we = 0; xwe = 0;
      check("read (old word on write)", rd, expected);
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); a = caddr_t'($urandom);
      @(negedge clk); check("read back", rd, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
