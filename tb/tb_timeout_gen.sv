// tb_timeout_gen: a 50 MHz source clock drives the time-out generator; the
// gated clock is the source clock passed while `run` is high (as the arbiter
// would). Checks: `run` rises exactly TIMEOUT_CYCLES source edges after the
// request ends; it stays high for exactly FLUSH_CYCLES gated edges, then
// falls and the generator disarms; a request during the wait or the flush
// clears `run` at once and restarts the count; no time-out without a request.
module tb_timeout_gen;
  timeunit 1ps; timeprecision 1ps;

  localparam int HALF = 10000, TO = 8, FL = 4;
  logic rst_n = 1'b0, req_a1 = 1'b0, src_clk = 1'b0, lclk, run, busy, gate = 1'b0;
  int checks = 0, failures = 0, src_edges = 0, l_edges = 0;

  always #(HALF) src_clk = ~src_clk;
  // gate changes only while the source clock is low
  always @(negedge src_clk) gate <= run;
  assign lclk = src_clk & gate & run;

  timeout_gen #(.TIMEOUT_CYCLES(TO), .FLUSH_CYCLES(FL)) dut (.rst_n, .req_a1, .src_clk, .lclk, .run, .busy);

  always @(posedge src_clk) src_edges++;
  always @(posedge lclk) l_edges++;

  task automatic request();
    @(negedge src_clk);
    #($urandom_range(100, 8000));
    req_a1 = 1'b1;
    #1;
    checks++;
    if (run || !busy) begin failures++; $display("FAIL: request did not clear/arm"); end
    #($urandom_range(100, 5000));
    req_a1 = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b1; #1 rst_n = 1'b0; #(3 * HALF) rst_n = 1'b1;
    #(30 * HALF);
    checks++; if (run || busy) begin failures++; $display("FAIL: active without request"); end
    repeat (30) begin
      int e0;
      request();
      e0 = src_edges;
      if ($urandom_range(0, 3) == 0) begin
        // interrupt: a new request during the wait or the flush
        repeat ($urandom_range(2, TO + FL - 1)) @(posedge src_clk);
        request();
        e0 = src_edges;
      end
      @(posedge run);
      checks++;
      if (src_edges - e0 != TO) begin failures++; $display("FAIL: time-out after %0d edges", src_edges - e0); end
      l_edges = 0;
      @(negedge run);
      checks++;
      if (l_edges != FL) begin failures++; $display("FAIL: %0d flush edges", l_edges); end
      @(posedge src_clk); #1;
      checks++;
      if (busy) begin failures++; $display("FAIL: still armed after flush"); end
      #($urandom_range(0, 10 * HALF));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
