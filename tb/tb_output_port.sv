// tb_output_port: applies LSM clock pulses (only while the port allows them:
// ACK_INT high for request pulses, stretch low for local clock pulses) with
// random DATAV_OUT, and answers REQ_B after random delays. Checks: exactly
// one downstream transfer per pulse that left valid data, none for the
// others; the transfer starts only after the pulse has ended; stretch is high
// from the start of the transfer until ACK_B has fallen; ACK_INT is low while
// a pulse is unconsumed or a transfer runs.
module tb_output_port;
  timeunit 1ps; timeprecision 1ps;

  logic rst_n = 1'b0, int_clk = 1'b0, datav_out = 1'b0, ack_b = 1'b0;
  logic req_b, stretch, ack_int;
  int checks = 0, failures = 0, exp_sends = 0, sends = 0;

  output_port dut (.rst_n, .int_clk, .datav_out, .req_b, .ack_b, .stretch, .ack_int);

  // downstream
  initial forever begin
    @(posedge req_b);
    sends++;
    checks++;
    if (!stretch || int_clk) begin failures++; $display("FAIL: REQ_B without stretch or during pulse"); end
    #($urandom_range(100, 3000)) ack_b = 1'b1;
    @(negedge req_b);
    checks++;
    if (!stretch) begin failures++; $display("FAIL: stretch dropped early"); end
    #($urandom_range(100, 3000)) ack_b = 1'b0;
    #1;
    checks++;
    if (stretch) begin failures++; $display("FAIL: stretch held after ACK_B-"); end
  end

  initial begin
    #1 rst_n = 1'b1; #1 rst_n = 1'b0; #100 rst_n = 1'b1; #100;
    repeat (400) begin
      logic v;
      bit request_pulse;
      request_pulse = $urandom_range(0, 1);
      if (request_pulse) wait (ack_int); else wait (!stretch && ack_int);
      #($urandom_range(10, 500));
      if (!(request_pulse ? ack_int : (!stretch && ack_int))) continue;
      v = 1'($urandom_range(0, 1));
      int_clk = 1'b1;
      #1;
      checks++;
      if (ack_int) begin failures++; $display("FAIL: ACK_INT high during a pulse"); end
      #200 datav_out = v;           // clock-to-output delay of the LSM
      if (v) exp_sends++;
      #($urandom_range(1000, 5000));
      int_clk = 1'b0;
      #1;
      checks++;
      if (v && ack_int) begin failures++; $display("FAIL: ACK_INT high with data to send"); end
    end
    wait (!stretch);
    #5000;
    checks++;
    if (sends != exp_sends) begin failures++; $display("FAIL: %0d transfers, expected %0d", sends, exp_sends); end
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
