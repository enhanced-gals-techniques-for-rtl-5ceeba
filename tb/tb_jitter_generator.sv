// tb_jitter_generator: drives a 50 MHz clock through the jitter generator.
// Every output pulse must keep the input pulse width, be delayed by a whole
// number of taps within 0 .. 7*250 ps, and the delay sequence must follow an
// independent model of the PN generator (the same LFSR recurrence, one step
// per pulse). At least six different delays must appear.
module tb_jitter_generator;
  timeunit 1ps; timeprecision 1ps;

  localparam int HALF = 10000, TP = 250;
  logic rst_n = 1'b0, clk_in = 1'b0, clk_jit;
  int checks = 0, failures = 0;
  int seen[int];
  logic [15:0] model;
  time tr_in, tr_out;

  jitter_generator #(.NTAPS(8), .TAP_PS(TP), .SEED(16'h1234)) dut (.rst_n, .clk_in, .clk_jit);

  initial begin
    #1 rst_n = 1'b1; #1 rst_n = 1'b0; #5000 rst_n = 1'b1;  // line settled first
    model = 16'h1234;
    #(HALF);
    repeat (300) begin
      int exp_d;
      exp_d = int'(model[2:0]) * TP;
      clk_in = 1'b1; tr_in = $time;
      @(posedge clk_jit); tr_out = $time;
      checks++;
      if (tr_out - tr_in != exp_d) begin failures++; $display("FAIL: delay %0t expected %0d", tr_out - tr_in, exp_d); end
      seen[int'(tr_out - tr_in)] = 1;
      #(HALF - (tr_out - tr_in));
      clk_in = 1'b0;
      @(negedge clk_jit);
      checks++;
      if ($time - tr_out != HALF) begin failures++; $display("FAIL: pulse width %0t", $time - tr_out); end
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      #(HALF - ($time - tr_in - HALF));
    end
    checks++;
    if (seen.num() < 6) begin failures++; $display("FAIL: only %0d delays", seen.num()); end
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
