// tb_arbiter: drives the clock arbiter with a 50 MHz external clock and
// random STOPI, stretch and REQI activity, first on the external clock, then
// on the ring oscillator (clk_select = 1). Checks on every CLK pulse: it
// starts together with a rising edge of the selected source clock, it keeps
// the full source high phase (no runt), and it does not start while STOPI,
// stretch or ACKI hold the clock. ACKI must rise only while the source clock
// is low. After each release the clock must run again within two periods.
module tb_arbiter;
  timeunit 1ps; timeprecision 1ps;

  localparam int HALF = 10000, RO_HALF = 5750;
  logic rst_n = 1'b0, ext = 1'b0, clk_select = 1'b0, ro_stop = 1'b1;
  logic reqi = 1'b0, stopi = 1'b1, stretch = 1'b0;
  logic acki, src_clk, clk;
  int checks = 0, failures = 0, pulses = 0, n_runs = 0;
  time t_src_rise = 0, t_rise = 0;

  always #(HALF) ext = ~ext;

  arbiter #(.RO_HALF_PS(RO_HALF)) dut (
    .rst_n, .external_clock(ext), .clk_select, .ro_stop, .reqi, .acki,
    .stopi, .stretch, .src_clk, .clk
  );

  always @(posedge src_clk) t_src_rise = $time;

  always @(posedge clk) if (rst_n) begin
    t_rise = $time;
    pulses++;
    checks++;
    if ($time != t_src_rise || stopi || stretch || acki) begin
      failures++;
      $display("FAIL: clock edge at %0t (src edge %0t, stopi=%b stretch=%b acki=%b)",
               $time, t_src_rise, stopi, stretch, acki);
    end
  end

  always @(negedge clk) if (rst_n && pulses > 0) begin
    checks++;
    if ($time - t_rise != (clk_select ? RO_HALF : HALF)) begin
      failures++; $display("FAIL: pulse of %0t ps at %0t", $time - t_rise, $time);
    end
  end

  always @(posedge acki) if (rst_n) begin
    checks++;
    if (src_clk) begin failures++; $display("FAIL: ACKI while clock high at %0t", $time); end
  end

  task automatic run_phase(input int n);
    repeat (n) begin
      int p0;
      // release the clock at a random moment and let it run
      #($urandom_range(1, 4 * HALF));
      stopi = 1'b0;
      p0 = pulses;
      #(5 * HALF);
      checks++;
      if (pulses - p0 < 1) begin failures++; $display("FAIL: clock did not restart at %0t", $time); end
      else n_runs++;
      // stop it again by one of the three mechanisms
      #($urandom_range(1, 4 * HALF));
      case ($urandom_range(0, 2))
        0: stopi = 1'b1;
        1: begin
             stretch = 1'b1;
             #($urandom_range(1, 6 * HALF));
             stretch = 1'b0;
             #($urandom_range(1, 3 * HALF));
             stopi = 1'b1;
           end
        default: begin
             reqi = 1'b1;
             wait (acki);
             #($urandom_range(1, 3 * HALF));
             stopi = 1'b1;          // the clock control follows ACKI with STOPI
             #($urandom_range(1, 2 * HALF));
             reqi = 1'b0;
           end
      endcase
    end
  endtask

  initial begin
    #1 rst_n = 1'b1; #1 rst_n = 1'b0;
    #(3 * HALF + 1234) rst_n = 1'b1;
    #(4 * HALF);
    checks++; if (pulses != 0) begin failures++; $display("FAIL: clock ran while stopped"); end
    run_phase(60);
    #(4 * HALF);
    clk_select = 1'b1;
    ro_stop = 1'b0;
    run_phase(60);
    checks++; if (n_runs != 120) begin failures++; $display("FAIL: %0d restarts", n_runs); end
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
