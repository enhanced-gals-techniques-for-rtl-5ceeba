// tb_pn_generator: compares the LFSR output with an independent model of the
// sequence (Galois-free recurrence s[n] = s[n-16] ^ s[n-14] ^ s[n-13] ^
// s[n-11] written on a bit history), and checks that the 16-bit state
// returns to the seed after exactly 65535 steps (maximal length).
module tb_pn_generator;
  timeunit 1ps; timeprecision 1ps;

  logic rst_n = 1'b0, trigger = 1'b0;
  logic [2:0] pn;
  int checks = 0, failures = 0;
  bit hist[$];

  pn_generator #(.W(16), .TAPS(16'hB400), .SEED(16'hACE1), .OW(3)) dut (.rst_n, .trigger, .pn);

  initial begin
    #1 rst_n = 1'b1; #1 rst_n = 1'b0; #10 rst_n = 1'b1; #10;
    // history, oldest first: bit 15 of the seed down to bit 0
    for (int b = 15; b >= 0; b--) hist.push_back(16'hACE1 >> b & 1);
    for (int n = 1; n <= 65535; n++) begin
      bit nb;
      int L;
      L = hist.size();
      // new bit = s[n-16]^s[n-14]^s[n-13]^s[n-11] (bits 15,13,12,10 of the state)
      nb = hist[L-16] ^ hist[L-14] ^ hist[L-13] ^ hist[L-11];
      hist.push_back(nb);
      trigger = 1'b1; #5; trigger = 1'b0; #5;
      if (n < 3000 || n > 65530) begin
        logic [2:0] e;
        L = hist.size();
        e = {hist[L-3], hist[L-2], hist[L-1]};
        checks++;
        if (pn !== e) begin failures++; $display("FAIL: step %0d pn=%0d expected %0d", n, pn, e); end
      end
      if (n < 65535) begin
        checks++;
        if (dut.lfsr == 16'hACE1) begin failures++; $display("FAIL: period %0d", n); end
      end
      if (hist.size() > 64) void'(hist.pop_front());
    end
    checks++;
    if (dut.lfsr !== 16'hACE1) begin failures++; $display("FAIL: not back at seed after 65535 steps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
