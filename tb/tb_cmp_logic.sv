// tb_cmp_logic: test of the comparator decision logic.
// A random sequence of (rst_n, o_p, o_n) is applied. A reference model in
// the testbench keeps the last resolved decision: outputs must follow o_p /
// o_n when they differ, hold when they are equal, and be 0/1 in reset;
// fb_up must be set exactly when both inputs are 0 and fb_dn exactly when
// both are 1. The testbench counts how often each situation (resolve, hold
// with raise request, hold with lower request, reset) occurred and fails if
// any never did.
module tb_cmp_logic;
  timeunit 1ps;
  timeprecision 1ps;

  logic rst_n, o_p, o_n, fv_outp, fv_outn, fb_up, fb_dn;
  logic ref_p, ref_n;
  int checks = 0, failures = 0;
  int n_resolve = 0, n_up = 0, n_dn = 0, n_rst = 0;

  cmp_logic dut (.rst_n(rst_n), .o_p(o_p), .o_n(o_n), .fv_outp(fv_outp),
                 .fv_outn(fv_outn), .fb_up(fb_up), .fb_dn(fb_dn));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; o_p = 1'b1; o_n = 1'b1;
    ref_p = 1'b0; ref_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      #10;
      rst_n = ($urandom_range(0, 19) != 0);
      if (i < 2) rst_n = 1'b0;
      o_p = 1'($urandom);
      o_n = 1'($urandom);
      if (!rst_n) begin
        ref_p = 1'b0; ref_n = 1'b1; n_rst++;
      end else if (o_p != o_n) begin
        ref_p = o_p; ref_n = o_n; n_resolve++;
      end else if (!o_p) n_up++;
      else n_dn++;
      #10;
      checks++;
      if (fv_outp !== ref_p || fv_outn !== ref_n ||
          fb_up !== (!o_p && !o_n) || fb_dn !== (o_p && o_n)) begin
        failures++;
        $display("FAIL step %0d rst_n=%b o_p=%b o_n=%b -> %b%b up=%b dn=%b, expected %b%b",
                 i, rst_n, o_p, o_n, fv_outp, fv_outn, fb_up, fb_dn, ref_p, ref_n);
      end
    end
    $display("resolve=%0d raise=%0d lower=%0d reset=%0d", n_resolve, n_up, n_dn, n_rst);
    if (n_resolve == 0 || n_up == 0 || n_dn == 0 || n_rst == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
