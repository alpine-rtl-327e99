// tb_pndu_memory: fills the whole memory with a pattern, reads it back in a
// different order, checks the one-cycle read latency and that a read of the
// address being written returns the old word.
module tb_pndu_memory;
  import alpine_pkg::*;
  logic clk = 1'b0, we;
  paddr_t ra, wa;
  pword_t rd, wd;
  int checks = 0, failures = 0;

  pndu_memory dut (.clk, .rd_addr_i(ra), .rd_data_o(rd), .wr_en_i(we), .wr_addr_i(wa), .wr_data_i(wd));
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

  function automatic pword_t pat(int a, int k);
    return pword_t'(a * 32'h9E3779B1 + k);
  endfunction

  initial begin
    we = 0; ra = '0; wa = '0; wd = '0;
    for (int a = 0; a < (1 << PADDR_W); a++) begin
      @(negedge clk); we = 1; wa = paddr_t'(a); wd = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < (1 << PADDR_W); a++) begin
      ra = paddr_t'(a * 37);
      @(negedge clk);
      check("read", rd, pat(a * 37 % (1 << PADDR_W), 0));
    end
    // write and read the same address in one cycle: old word first
    @(negedge clk); we = 1; wa = 8'd5; wd = pat(5, 1); ra = 8'd5;
    @(negedge clk); we = 0;
    check("read during write", rd, pat(5, 0));
    @(negedge clk);
    check("read after write", rd, pat(5, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
