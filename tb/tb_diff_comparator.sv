// tb_diff_comparator: test of the differential comparator model.
//  1. Input pairs at many common-mode levels between 0.05 V and 1.75 V and
//     differences from 1 uV to 0.8 V: after settling, fv_outp must be 1
//     exactly when vinp > vinn, and fv_outn its complement. Pairs with
//     both inputs low need the feedback to raise Vf, pairs with both high
//     need it lowered; both are counted and must both occur.
//  2. Delay: once the feedback voltage already separates the inputs, an
//     input swap must reach the outputs exactly T_PD (2.96 ns) later: the
//     outputs are checked unchanged 100 ps before and changed 100 ps after.
//  3. Equal inputs cannot be resolved: the outputs must hold their value.
module tb_diff_comparator;
  import flash_adc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic   rst_n;
  uvolt_t vinp, vinn, vf;
  logic   fv_outp, fv_outn;
  int checks = 0, failures = 0;
  int n_raise = 0, n_lower = 0;

  diff_comparator dut (.rst_n(rst_n), .vinp(vinp), .vinn(vinn),
                       .fv_outp(fv_outp), .fv_outn(fv_outn), .vf(vf));

  always @(posedge dut.fb_up) n_raise++;
  always @(posedge dut.fb_dn) n_lower++;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(string tag, logic p);
    checks++;
    if (fv_outp !== p || fv_outn !== !p) begin
      failures++;
      $display("FAIL %s vinp=%0d vinn=%0d vf=%0d out=%b%b expected %b",
               tag, vinp, vinn, vf, fv_outp, fv_outn, p);
    end
  endtask

  initial begin
    uvolt_t cm, d;
    logic held;
    rst_n = 1'b0;
    vinp = 32'sd900_000;
    vinn = 32'sd900_000;
    #1000;
    expect_out("reset", 1'b0);
    rst_n = 1'b1;

    // 1. settled decisions over common mode and difference
    for (int i = 0; i < 400; i++) begin
      cm = uvolt_t'($urandom_range(50_000, 1_750_000));
      case (i % 4)
        0: d = uvolt_t'($urandom_range(1, 100));
        1: d = uvolt_t'($urandom_range(100, 10_000));
        2: d = uvolt_t'($urandom_range(10_000, 100_000));
        default: d = uvolt_t'($urandom_range(100_000, 800_000));
      endcase
      if (cm - d / 2 < 0) cm = d / 2;
      if (cm + d / 2 > VDD_UV) cm = VDD_UV - d / 2;
      if ($urandom_range(0, 1) == 1) begin
        vinp = cm + d / 2 + d % 2;
        vinn = cm - d / 2;
      end else begin
        vinp = cm - d / 2;
        vinn = cm + d / 2 + d % 2;
      end
      #10_000;
      expect_out("settle", vinp > vinn);
    end

    // 2. propagation delay of a swap that needs no feedback
    vinp = 32'sd1_000_000;
    vinn = 32'sd900_000;
    #10_000;
    expect_out("pre-swap", 1'b1);
    // Vf now lies between 0.8 V and 0.9 V: a swap is resolved at once
    vinp = 32'sd900_000;
    vinn = 32'sd1_000_000;
    #2860;
    expect_out("before T_PD", 1'b1);
    #200;
    expect_out("after T_PD", 1'b0);

    // 3. equal inputs: outputs hold
    #10_000;
    held = fv_outp;
    vinp = 32'sd1_200_000;
    vinn = 32'sd1_200_000;
    #10_000;
    expect_out("hold", held);

    $display("feedback raise events %0d, lower events %0d", n_raise, n_lower);
    checks++;
    if (n_raise == 0 || n_lower == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
