// tb_delay_element: for every tap setting, measures the delay of rising and
// falling edges through the delay element (expected k * TAP_PS) and the
// delay of the end of the line ((NTAPS-1) * TAP_PS).
module tb_delay_element;
  timeunit 1ps; timeprecision 1ps;

  localparam int NT = 8, TP = 250;
  logic din = 1'b0, dout, last;
  logic [2:0] sel = '0;
  int checks = 0, failures = 0;
  time t0;

  delay_element #(.NTAPS(NT), .TAP_PS(TP)) dut (.din, .sel, .dout, .last);

  initial begin
    #5000;
    for (int k = 0; k < NT; k++) begin
      sel = 3'(k);
      #5000;
      for (int e = 0; e < 2; e++) begin
        logic lvl;
        lvl = (e == 0);
        din = lvl; t0 = $time;
        if (k == 0) #0; else wait (dout == lvl);
        checks++;
        if ($time - t0 != k * TP || dout !== lvl) begin
          failures++; $display("FAIL: tap %0d delay %0t", k, $time - t0);
        end
        wait (last == lvl);
        checks++;
        if ($time - t0 != (NT - 1) * TP) begin failures++; $display("FAIL: line end %0t", $time - t0); end
        #5000;
      end
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
