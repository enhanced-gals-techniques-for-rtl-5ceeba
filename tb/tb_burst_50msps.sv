// tb_burst_50msps: one data burst at 50 Msps through a wrapper, the power
// scenario used to compare the wrapper variants (receive, process and pass on
// one burst). The wrapper runs at its default parameters with a four-stage
// pipeline model as LSM and a 20 ns (50 MHz) external clock. A source offers
// one word every 20 ns; a sink acknowledges each output after 1 ns.
// The burst is sent twice: first on the external clock, then in dual mode on
// the local ring oscillator.
// Checks:
//  * every input handshake completes inside its 20 ns slot (the wrapper
//    keeps up with 50 Msps);
//  * every word comes out, in order, increased by the pipeline depth;
//  * in request-driven operation the outputs follow the input rate, one
//    in every 20 ns slot, at most one clock high phase late;
//  * the last DEPTH-1 words, left in the pipeline when the burst ends, come out
//    through time-out mode within the time-out plus the flush cycles.
module tb_burst_50msps;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 16, DEPTH = 4, BURST = 64;
  localparam time TSLOT = 20000, TBURST = 64;
  localparam int HALF = 10000;            // 20 ns external clock
  localparam int SLOT = 20000;            // 50 Msps
  localparam int TO = 8, FL = 4;          // wrapper defaults
  localparam int RO_HALF = 5750;

  logic rst_n = 1'b0, ext_clk = 1'b0, clk_select = 1'b0;
  logic req_a = 1'b0, ack_a, req_b, ack_b = 1'b0;
  logic [W-1:0] data_in = '0, data_out, data_l, lsm_dout;
  logic int_clk, datav_in, datav_out;

  int checks = 0, failures = 0;
  int n_recv = 0, n_timeouts = 0;
  logic [W-1:0] expq[$];
  time t_out[$];
  time t_last_in;

  always #(HALF) ext_clk = ~ext_clk;

  gals_wrapper dut (
    .rst_n, .external_clock(ext_clk), .clk_select,
    .req_a, .ack_a, .data_in, .req_b, .ack_b, .data_out,
    .int_clk, .data_l, .datav_in, .lsm_data_out(lsm_dout), .datav_out
  );

  lsm_model #(.DEPTH(DEPTH), .W(W)) u_lsm (
    .clk(int_clk), .rst_n, .d_in(data_l), .v_in(datav_in), .d_out(lsm_dout), .v_out(datav_out)
  );

  always @(posedge dut.run) n_timeouts++;

  task automatic burst(input logic ring);
    time t0, half;
    half = ring ? time'(RO_HALF) : time'(HALF);
    t_out.delete();
    clk_select = ring;
    #(10 * SLOT);                 // idle: the source switch takes effect
    t0 = $time;
    for (int i = 0; i < BURST; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      data_in = w;
      expq.push_back(w + W'(DEPTH));
      req_a = 1'b1;
      @(posedge ack_a);
      #1000 req_a = 1'b0;
      @(negedge ack_a);
      checks++;
      if ($time - t0 >= TSLOT * (time'(i) + 1)) begin
        failures++; $display("FAIL: word %0d missed its 20 ns slot (%0t)", i, $time - t0);
      end
      if ($time < t0 + TSLOT * (time'(i) + 1)) #(t0 + TSLOT * (time'(i) + 1) - $time);
    end
    t_last_in = t0 + TSLOT * (TBURST - 1);
    // the pipeline tail comes out in time-out mode
    for (int k = 0; k < 2000 && expq.size() != 0; k++) #1000;
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d words stuck in the pipeline", expq.size()); end
    // request-driven part of the burst: word i leaves on the pulse of word
    // i+DEPTH-1, so one output per 20 ns slot; an input request waits at most
    // one clock high phase for the arbiter, and the output follows the
    // request pulse after the 1 ns handshake of the source
    for (int i = 0; i <= BURST - DEPTH; i++) begin
      time slot_start;
      slot_start = t0 + TSLOT * (time'(i) + time'(DEPTH) - 1);
      checks++;
      if (t_out[i] < slot_start || t_out[i] > slot_start + half + 2000) begin
        failures++; $display("FAIL: word %0d out at %0t, its slot starts at %0t", i, t_out[i], slot_start);
      end
    end
    // flushed tail: time-out plus flush cycles, one clock of slack
    checks++;
    if (t_out[BURST-1] - t_last_in > 2 * half * (time'(TO) + time'(FL) + 2)) begin
      failures++; $display("FAIL: flush took %0t", t_out[BURST-1] - t_last_in);
    end
    $display("burst on %s clock: %0d words, flush of the last %0d words %0t ps after the last input",
             ring ? "ring" : "external", BURST, DEPTH - 1, t_out[BURST-1] - t_last_in);
  endtask

  initial begin
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #(5 * HALF) rst_n = 1'b1;
    burst(1'b0);
    burst(1'b1);
    checks++;
    if (n_timeouts < 2) begin failures++; $display("FAIL: %0d time-outs, expected one per burst", n_timeouts); end
    checks++;
    if (n_recv != 2 * BURST) begin failures++; $display("FAIL: received %0d words", n_recv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: acknowledges after 1 ns
  initial begin
    forever begin
      @(posedge req_b);
      t_out.push_back($time);
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output %h", data_out);
      end else begin
        logic [W-1:0] e;
        e = expq.pop_front();
        if (data_out !== e) begin failures++; $display("FAIL: got %h expected %h", data_out, e); end
      end
      n_recv++;
      #1000 ack_b = 1'b1;
      @(negedge req_b);
      #1000 ack_b = 1'b0;
    end
  end

  // watchdog
  initial begin
    #(64'd20_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
