// tb_clock_control: checks STOPI and the ring oscillator stop against their
// truth tables for every input combination, and that the clock source
// selection follows clk_select only while the wrapper is idle.
module tb_clock_control;
  timeunit 1ps; timeprecision 1ps;

  logic rst_n = 1'b0, run, busy, reqi, acki, stretch, clk_select = 1'b0;
  logic stopi, clk_sel, ro_stop;
  int checks = 0, failures = 0;

  clock_control dut (.rst_n, .run, .busy, .reqi, .acki, .stretch, .clk_select,
                     .stopi, .clk_sel, .ro_stop);

  initial begin
    {run, busy, reqi, acki, stretch} = '0;
    #10 rst_n = 1'b1; #10;
    for (int m = 0; m < 64; m++) begin
      logic idle, exp_sel;
      {run, busy, reqi, acki, stretch, clk_select} = 6'(m);
      #10;
      idle = !busy && !reqi && !stretch;
      checks++;
      if (stopi !== (!run || acki)) begin failures++; $display("FAIL: stopi for %b", 6'(m)); end
      if (idle) begin
        checks++;
        if (clk_sel !== clk_select) begin failures++; $display("FAIL: select not taken when idle"); end
      end
      checks++;
      if (ro_stop !== (!busy || !clk_sel)) begin failures++; $display("FAIL: ro_stop for %b", 6'(m)); end
    end
    // busy: the select must not change
    {run, busy, reqi, acki, stretch, clk_select} = 6'b000000; #10;
    repeat (100) begin
      logic held;
      held = clk_sel;
      {busy, reqi, stretch} = 3'($urandom_range(1, 7));
      #10 clk_select = ~clk_select; #10;
      checks++;
      if (clk_sel !== held) begin failures++; $display("FAIL: select changed while busy"); end
      {busy, reqi, stretch} = 3'b000; #10;
      checks++;
      if (clk_sel !== clk_select) begin failures++; $display("FAIL: select not taken when idle again"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
