// tb_gals_wrapper: end-to-end test of one wrapped block. A source sends
// NTOK words with random gaps over the four-phase input handshake, a
// four-stage pipeline model stands in for the LSM, and a sink with random
// acknowledge delays receives the results. Checks: every word comes out,
// in order, increased by the pipeline depth (words still in the pipeline when
// the input pauses must be flushed by time-out mode); every LSM clock high
// phase is either a request pulse or a full clock half period (no runt);
// no LSM clock edge occurs while an output transfer is in progress.
// Counts the mechanisms: request-driven pulses, time-out entries, clock
// stretches during time-out mode, requests that interrupt time-out mode, and
// distinct jitter delays. The second half of the words runs in dual mode on
// the local ring oscillator (clk_select = 1); the switch must take effect.
module tb_gals_wrapper;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 16, DEPTH = 4, NTOK = 40;
  localparam int HALF = 10000;   // 20 ns external clock
  localparam int RO_HALF = 5750; // ring oscillator half period

  logic rst_n = 1'b0, ext_clk = 1'b0, clk_select = 1'b0;
  logic req_a = 1'b0, ack_a, req_b, ack_b = 1'b0;
  logic [W-1:0] data_in = '0, data_out, data_l, lsm_dout;
  logic int_clk, datav_in, datav_out;

  int checks = 0, failures = 0;
  logic started = 1'b0;
  int n_req_pulses = 0, n_timeouts = 0, n_stretch_to = 0, n_interrupt = 0;
  int n_sent = 0, n_recv = 0;
  logic [W-1:0] expq[$];

  always #(HALF) ext_clk = ~ext_clk;

  gals_wrapper #(.DATA_W(W), .TIMEOUT_CYCLES(8), .FLUSH_CYCLES(DEPTH)) dut (
    .rst_n, .external_clock(ext_clk), .clk_select,
    .req_a, .ack_a, .data_in, .req_b, .ack_b, .data_out,
    .int_clk, .data_l, .datav_in, .lsm_data_out(lsm_dout), .datav_out
  );

  lsm_model #(.DEPTH(DEPTH), .W(W)) u_lsm (
    .clk(int_clk), .rst_n, .d_in(data_l), .v_in(datav_in), .d_out(lsm_dout), .v_out(datav_out)
  );

  // source
  initial begin
    // a clean falling edge of the reset for the asynchronous resets
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #(5 * HALF) rst_n = 1'b1;
    started = 1'b1;
    #(3 * HALF);
    for (int i = 0; i < NTOK; i++) begin
      logic [W-1:0] w;
      if (i == NTOK / 2) clk_select = 1'b1;
      w = W'($urandom);
      data_in = w;
      #($urandom_range(100, 900)) req_a = 1'b1;
      expq.push_back(w + W'(DEPTH));
      @(posedge ack_a);
      n_sent++;
      #($urandom_range(300, 3000)) req_a = 1'b0;
      @(negedge ack_a);
      // random gap: short, around the time-out, or long enough to flush
      case ($urandom_range(0, 2))
        0: #($urandom_range(100, 5000));
        1: #($urandom_range(150000, 260000));
        default: #($urandom_range(300000, 500000));
      endcase
    end
  end

  // sink
  initial begin
    wait (started);
    forever begin
      @(posedge req_b);
      #($urandom_range(200, 8000));
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output %h", data_out);
      end else begin
        logic [W-1:0] e;
        e = expq.pop_front();
        if (data_out !== e) begin failures++; $display("FAIL: got %h expected %h", data_out, e); end
      end
      n_recv++;
      ack_b = 1'b1;
      @(negedge req_b);
      #($urandom_range(200, 8000)) ack_b = 1'b0;
    end
  end

  // clock integrity at the LSM
  time t_rise;
  logic by_req;
  always @(posedge int_clk) begin
    t_rise = $time;
    by_req = dut.req_int;
    if (dut.req_int) n_req_pulses++;
    checks++;
    if (dut.stretch) begin failures++; $display("FAIL: LSM clock edge during output transfer at %0t", $time); end
  end
  always @(negedge int_clk) begin
    time w;
    w = $time - t_rise;
    if (!by_req && started) begin
      // a local clock pulse must keep the full high phase
      checks++;
      if (w != (dut.clk_sel ? RO_HALF : HALF)) begin failures++; $display("FAIL: clock pulse of %0t ps at %0t", w, $time); end
    end
  end
  always @(posedge dut.run) n_timeouts++;
  int n_ring_timeouts = 0;
  always @(posedge dut.run) if (dut.clk_sel) n_ring_timeouts++;
  always @(posedge dut.stretch) if (dut.run) n_stretch_to++;
  always @(posedge dut.req_a1) if (dut.run) n_interrupt++;

  // jitter: distinct delays between arbiter clock and LSM clock
  time t_l;
  int  seen_delay[int];
  always @(posedge dut.lclk) t_l = $time;
  always @(posedge dut.lclkm) seen_delay[int'($time - t_l)] = 1;

  initial begin
    wait (rst_n);
    wait (n_sent == NTOK);
    wait (n_recv == NTOK || $time > 64'd200_000_000);
    #(100000);
    checks++; if (n_recv != NTOK) begin failures++; $display("FAIL: received %0d of %0d", n_recv, NTOK); end
    checks++; if (n_req_pulses < NTOK) begin failures++; $display("FAIL: request pulses %0d", n_req_pulses); end
    checks++; if (n_timeouts == 0) begin failures++; $display("FAIL: time-out mode never entered"); end
    checks++; if (n_stretch_to == 0) begin failures++; $display("FAIL: no clock stretch in time-out mode"); end
    checks++; if (n_interrupt == 0) begin failures++; $display("FAIL: no request during time-out mode"); end
    checks++; if (n_ring_timeouts == 0) begin failures++; $display("FAIL: no time-out on the ring oscillator"); end
    checks++; if (seen_delay.num() < 2) begin failures++; $display("FAIL: jitter produced %0d delays", seen_delay.num()); end
    $display("mechanisms: req_pulses=%0d timeouts=%0d stretch_in_timeout=%0d interrupts=%0d jitter_delays=%0d ring_timeouts=%0d",
             n_req_pulses, n_timeouts, n_stretch_to, n_interrupt, seen_delay.num(), n_ring_timeouts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(64'd300_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
