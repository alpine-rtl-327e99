// tb_new_event_detector: checks that every change of the flag vector, and
// only a change, gives one event pulse carrying the new vector, SYNC_STAGES+1
// clock edges after the change.
module tb_new_event_detector;
  import alpine_pkg::*;
  localparam int SYNC = 2;
  logic clk = 1'b0, rst_n;
  flags_t f, fo;
  logic ev;
  int checks = 0, failures = 0;

  new_event_detector #(.SYNC_STAGES(SYNC)) dut (.clk, .rst_n, .f_i(f), .event_o(ev), .flags_o(fo));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  flags_t prev, nv;
  int lat, nevents;
  initial begin
    rst_n = 1'b0; f = '0; prev = '0; nevents = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) begin @(negedge clk); check("no event while stable", 32'(ev), 0); end
    for (int k = 0; k < 60; k++) begin
      nv = (k % 5 == 4) ? prev : flags_t'($urandom);
      @(negedge clk) f = nv;
      lat = 0;
      // watch SYNC+4 cycles for the event
      for (int c = 1; c <= SYNC + 4; c++) begin
        @(negedge clk);
        if (ev) begin
          check("one event per change", 32'(lat), 0);
          lat = c;
          check("event vector", 32'(fo), 32'(nv));
          nevents++;
        end
      end
      if (nv != prev) check("event latency", 32'(lat), 32'(SYNC + 1));
      else            check("no event without change", 32'(lat), 0);
      prev = nv;
    end
    check("some events", 32'(nevents > 30), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
