// tb_ring_oscillator: checks that the ring oscillator model toggles with the
// half period HALF_PS while enabled, rests low while stopped, and restarts.
module tb_ring_oscillator;
  timeunit 1ps; timeprecision 1ps;

  localparam int HALF = 5750;
  logic rst_n = 1'b0, stop = 1'b1, rclk;
  int checks = 0, failures = 0, edges = 0;
  time last = 0;

  ring_oscillator #(.HALF_PS(HALF)) dut (.rst_n, .stop, .rclk);

  always @(rclk) begin
    if (edges > 0) begin
      checks++;
      if ($time - last != HALF) begin failures++; $display("FAIL: half period %0t", $time - last); end
    end
    last = $time;
    edges++;
  end

  initial begin
    #(3 * HALF) rst_n = 1'b1;
    edges = 0;
    #(10 * HALF);
    checks++; if (edges != 0 || rclk !== 1'b0) begin failures++; $display("FAIL: runs while stopped"); end
    stop = 1'b0;
    edges = 0;
    #(40 * HALF + 10);
    checks++; if (edges < 38) begin failures++; $display("FAIL: only %0d edges", edges); end
    wait (rclk == 1'b1);
    stop = 1'b1;
    #(2 * HALF);
    edges = 0;
    #(10 * HALF);
    checks++; if (rclk !== 1'b0 || edges != 0) begin failures++; $display("FAIL: did not stop low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * HALF);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
