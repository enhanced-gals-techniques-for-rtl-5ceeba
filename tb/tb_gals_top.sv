// tb_gals_top: end-to-end test of the GALS datapath at its default size
// (ten wrapped blocks). Each block's locally synchronous module is a
// four-stage pipeline model that adds one per stage, so a word leaves the
// chain increased by 40. A source sends NTOK words with random gaps, a sink
// acknowledges after random delays. Checks: every word arrives, in order,
// with the right value (words left in pipelines are flushed by time-out
// mode); no block's LSM clock has a pulse other than a request pulse or a
// full clock half period. Mechanisms counted (each must occur): request
// pulses, time-out entries, clock stretches during time-out mode, requests
// that interrupt time-out mode, back-pressure (a block waiting for its output
// port before firing a request pulse), the switch to the ring oscillator,
// and jitter (rising clock edges of blocks 0 and 1 during the same
// external clock cycle at different times).
module tb_gals_top;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 10, W = 16, DEPTH = 4, NTOK = 30;
  localparam int HALF = 10000, RO_HALF = 5750;

  logic rst_n = 1'b0, ext_clk = 1'b0, clk_select = 1'b0, started = 1'b0;
  logic in_req = 1'b0, in_ack, out_req, out_ack = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic         lsm_clk [N];
  logic [W-1:0] lsm_din [N];
  logic         lsm_vin [N];
  logic [W-1:0] lsm_dout[N];
  logic         lsm_vout[N];

  int checks = 0, failures = 0, n_sent = 0, n_recv = 0;
  int n_req = 0, n_to = 0, n_str = 0, n_int = 0, n_bp = 0, n_jit = 0, n_ring = 0;
  logic [W-1:0] expq[$];

  always #(HALF) ext_clk = ~ext_clk;

  gals_top dut (
    .rst_n, .external_clock(ext_clk), .clk_select,
    .in_req, .in_ack, .in_data, .out_req, .out_ack, .out_data,
    .lsm_clk, .lsm_data_in(lsm_din), .lsm_valid_in(lsm_vin),
    .lsm_data_out(lsm_dout), .lsm_valid_out(lsm_vout)
  );

  for (genvar i = 0; i < N; i++) begin : g_lsm
    lsm_model #(.DEPTH(DEPTH), .W(W)) u_lsm (
      .clk(lsm_clk[i]), .rst_n, .d_in(lsm_din[i]), .v_in(lsm_vin[i]),
      .d_out(lsm_dout[i]), .v_out(lsm_vout[i])
    );

    time t_rise;
    logic by_req;
    always @(posedge lsm_clk[i]) begin
      t_rise = $time;
      by_req = dut.g_blk[i].u_wrap.req_int;
      if (by_req && started) n_req++;
    end
    always @(negedge lsm_clk[i]) if (!by_req && started) begin
      checks++;
      if ($time - t_rise != (dut.g_blk[i].u_wrap.clk_sel ? RO_HALF : HALF)) begin
        failures++; $display("FAIL: block %0d clock pulse of %0t ps at %0t", i, $time - t_rise, $time);
      end
    end
    always @(posedge dut.g_blk[i].u_wrap.run) if (started) begin
      n_to++;
      if (dut.g_blk[i].u_wrap.clk_sel) n_ring++;
    end
    always @(posedge dut.g_blk[i].u_wrap.stretch) if (started && dut.g_blk[i].u_wrap.run) n_str++;
    always @(posedge dut.g_blk[i].u_wrap.req_a1) if (started && dut.g_blk[i].u_wrap.run) n_int++;
    always @(posedge dut.g_blk[i].u_wrap.acki)
      if (started && !dut.g_blk[i].u_wrap.ack_int) n_bp++;
  end

  // jitter between the local clocks of blocks 0 and 1
  time t0 = 0, t1 = 0;
  always @(posedge dut.g_blk[0].u_wrap.lclkm) t0 = $time;
  always @(posedge dut.g_blk[1].u_wrap.lclkm) begin
    t1 = $time;
    if (t0 != t1 && (t1 > t0 ? t1 - t0 : t0 - t1) < 2000) n_jit++;
  end

  // source
  initial begin
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #(5 * HALF) rst_n = 1'b1;
    started = 1'b1;
    #(3 * HALF);
    for (int i = 0; i < NTOK; i++) begin
      logic [W-1:0] w;
      if (i == 2 * NTOK / 3) clk_select = 1'b1;
      w = W'($urandom);
      in_data = w;
      #($urandom_range(100, 900)) in_req = 1'b1;
      expq.push_back(w + W'(N * DEPTH));
      @(posedge in_ack);
      n_sent++;
      #($urandom_range(300, 3000)) in_req = 1'b0;
      @(negedge in_ack);
      case ($urandom_range(0, 2))
        0: #($urandom_range(100, 5000));
        1: #($urandom_range(150000, 260000));
        default: #($urandom_range(300000, 500000));
      endcase
    end
  end

  // sink, slow at times so that back-pressure builds up
  initial begin
    wait (started);
    forever begin
      @(posedge out_req);
      #($urandom_range(200, 60000));
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output %h", out_data);
      end else begin
        logic [W-1:0] e;
        e = expq.pop_front();
        if (out_data !== e) begin failures++; $display("FAIL: got %h expected %h", out_data, e); end
      end
      n_recv++;
      out_ack = 1'b1;
      @(negedge out_req);
      #($urandom_range(200, 8000)) out_ack = 1'b0;
    end
  end

  initial begin
    wait (started);
    wait (n_sent == NTOK);
    wait (n_recv == NTOK || $time > 64'd400_000_000);
    #(100000);
    checks++; if (n_recv != NTOK) begin failures++; $display("FAIL: received %0d of %0d", n_recv, NTOK); end
    checks++; if (n_req == 0) begin failures++; $display("FAIL: no request pulses"); end
    checks++; if (n_to == 0)  begin failures++; $display("FAIL: no time-out"); end
    checks++; if (n_str == 0) begin failures++; $display("FAIL: no stretch in time-out mode"); end
    checks++; if (n_int == 0) begin failures++; $display("FAIL: no request during time-out mode"); end
    checks++; if (n_bp == 0)  begin failures++; $display("FAIL: no back-pressure"); end
    checks++; if (n_ring == 0) begin failures++; $display("FAIL: no time-out on the ring oscillator"); end
    checks++; if (n_jit == 0) begin failures++; $display("FAIL: no jitter between blocks"); end
    $display("mechanisms: req_pulses=%0d timeouts=%0d stretch_in_timeout=%0d interrupts=%0d backpressure=%0d ring_timeouts=%0d jittered_pairs=%0d",
             n_req, n_to, n_str, n_int, n_bp, n_ring, n_jit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd500_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
