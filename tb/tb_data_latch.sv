// tb_data_latch: the latch must follow d while dle is high and hold the last
// value while it is low, whatever d does.
module tb_data_latch;
  timeunit 1ps; timeprecision 1ps;

  logic dle = 1'b0;
  logic [15:0] d = '0, q, held;
  int checks = 0, failures = 0;

  data_latch #(.W(16)) dut (.dle, .d, .q);

  initial begin
    repeat (200) begin
      dle = 1'b1;
      repeat (3) begin
        d = 16'($urandom); #10;
        checks++; if (q !== d) begin failures++; $display("FAIL: not transparent"); end
      end
      held = d;
      dle = 1'b0; #10;
      repeat (3) begin
        d = 16'($urandom); #10;
        checks++; if (q !== held) begin failures++; $display("FAIL: did not hold"); end
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
