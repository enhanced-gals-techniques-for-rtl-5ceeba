// tb_input_port: drives the input port with four-phase requests while the
// testbench plays the arbiter (ACKI follows REQI after a delay), the output
// port (ACK_INT toggles at random) and the local clock LCLKM (random
// pulses while no grant is held). Checks: REQI and DLE rise on REQ_A+; the
// clock pulse REQ_INT rises only with ACKI, ACK_INT and LCLKM low, with
// DATAV_IN already high and the latch closed; ACK_A rises with the pulse;
// everything returns low after REQ_A-; one pulse per request.
module tb_input_port;
  timeunit 1ps; timeprecision 1ps;

  logic rst_n = 1'b0, req_a = 1'b0, acki = 1'b0, ack_int = 1'b1, lclkm = 1'b0;
  logic ack_a, dle, datav_in, req_int, reqi, req_a1;
  int checks = 0, failures = 0, pulses = 0;
  logic dv_seen;

  input_port dut (.rst_n, .req_a, .ack_a, .dle, .datav_in, .req_int, .reqi,
                  .acki, .ack_int, .lclkm, .req_a1);

  // arbiter stand-in
  always @(reqi) begin
    if (reqi) begin #($urandom_range(10, 3000)); acki = reqi; end
    else acki = 1'b0;
  end
  // output port stand-in
  initial forever begin #($urandom_range(100, 4000)); ack_int = ~ack_int; end
  // local clock stand-in: only while no grant is held
  initial forever begin
    #($urandom_range(100, 3000));
    if (!acki) begin lclkm = 1'b1; #($urandom_range(100, 2000)); lclkm = 1'b0; end
  end

  always @(posedge datav_in) dv_seen = 1'b1;
  always @(posedge req_int) if (rst_n) begin
    pulses++;
    checks++;
    if (!acki || !ack_int || lclkm || !datav_in || dle || !dv_seen) begin
      failures++;
      $display("FAIL: pulse at %0t acki=%b ack_int=%b lclkm=%b datav=%b dle=%b", $time, acki, ack_int, lclkm, datav_in, dle);
    end
  end

  initial begin
    #1 rst_n = 1'b1; #1 rst_n = 1'b0; #100 rst_n = 1'b1; #100;
    repeat (300) begin
      dv_seen = 1'b0;
      req_a = 1'b1;
      #1;
      checks++;
      if (!reqi || !dle || !req_a1) begin failures++; $display("FAIL: no REQI/DLE after REQ_A+"); end
      wait (ack_a);
      checks++;
      if (!req_int) begin failures++; $display("FAIL: ACK_A without pulse"); end
      #($urandom_range(100, 2000));
      req_a = 1'b0;
      #1;
      checks++;
      if (ack_a || req_int || reqi || datav_in || dle) begin failures++; $display("FAIL: not idle after REQ_A-"); end
      #($urandom_range(100, 2000));
    end
    checks++;
    if (pulses != 300) begin failures++; $display("FAIL: %0d pulses for 300 requests", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
