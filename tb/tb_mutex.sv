// tb_mutex: checks the MUTEX model against a reference of its rules. Random
// request sequences are applied; after each change the grants must be
// mutually exclusive, a grant may only be high while its request is, a lone
// request is granted at once, a held grant is kept while the other side
// requests, and a waiting request is granted when the other is withdrawn.
module tb_mutex;
  timeunit 1ps; timeprecision 1ps;

  logic rst_n = 1'b0, r1 = 1'b0, r2 = 1'b0, g1, g2;
  logic e1, e2;   // reference grants
  int checks = 0, failures = 0;

  mutex dut (.rst_n, .r1, .r2, .g1, .g2);

  task automatic step(input logic n1, input logic n2);
    // reference: withdraw first, then grant a lone or a waiting request
    // (r1 wins a tie)
    if (!n1) e1 = 1'b0;
    if (!n2) e2 = 1'b0;
    if (n1 && !e2 && !e1) e1 = 1'b1;
    if (n2 && !e1 && !e2 && !n1) e2 = 1'b1;
    if (n2 && !e1 && !e2) e2 = 1'b1;
    r1 = n1; r2 = n2;
    #10;
    checks++;
    if (g1 !== e1 || g2 !== e2) begin
      failures++;
      $display("FAIL: r=%b%b g=%b%b expected %b%b", r1, r2, g1, g2, e1, e2);
    end
  endtask

  initial begin
    e1 = 1'b0; e2 = 1'b0;
    #1 rst_n = 1'b1; #1 rst_n = 1'b0; #10 rst_n = 1'b1; #10;
    // directed: lone grants, hold against the other, hand-over, tie
    step(1, 0); step(1, 1); step(0, 1); step(0, 0);
    step(0, 1); step(1, 1); step(1, 0); step(0, 0);
    step(1, 1); step(0, 1); step(0, 0);
    // random: change one request at a time
    repeat (400) begin
      if ($urandom_range(0, 1)) step(~r1, r2); else step(r1, ~r2);
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
