// tb_wallace_node: exhaustive test of wallace_node at W = 1, 2 and 3.
// Every combination of a, b and cin is applied and sum is compared with
// a + b + cin computed in the testbench.
module tb_wallace_node;
  timeunit 1ps;
  timeprecision 1ps;

  logic [0:0] a1, b1;  logic c1;  logic [1:0] s1;
  logic [1:0] a2, b2;  logic c2;  logic [2:0] s2;
  logic [2:0] a3, b3;  logic c3;  logic [3:0] s3;
  int checks = 0, failures = 0;

  wallace_node #(.W(1)) dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1));
  wallace_node #(.W(2)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2));
  wallace_node #(.W(3)) dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #10 check("W1", int'(s1), int'(a1) + int'(b1) + int'(c1));
    end
    for (int v = 0; v < 32; v++) begin
      {a2, b2, c2} = 5'(v);
      #10 check("W2", int'(s2), int'(a2) + int'(b2) + int'(c2));
    end
    for (int v = 0; v < 128; v++) begin
      {a3, b3, c3} = 7'(v);
      #10 check("W3", int'(s3), int'(a3) + int'(b3) + int'(c3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
