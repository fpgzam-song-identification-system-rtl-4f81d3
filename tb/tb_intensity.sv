// tb_intensity: compares re^2 + im^2 with a 64-bit reference for random and
// extreme 19-bit signed inputs.
module tb_intensity;
  int checks = 0, failures = 0;
  logic signed [18:0] re, im;
  logic [37:0] power;

  intensity dut (.re, .im, .power);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int r, input int i);
    longint exp_p;
    re = 19'(r); im = 19'(i);
    #1;
    exp_p = longint'(r) * longint'(r) + longint'(i) * longint'(i);
    checks++;
    if (longint'(power) != exp_p) begin
      failures++; $display("re=%0d im=%0d got %0d exp %0d", r, i, power, exp_p);
    end
  endtask

  initial begin
    check(0, 0);
    check(-262144, -262144);
    check(262143, -262144);
    check(-1, 1);
    check(3000, -4000);
    for (int k = 0; k < 1000; k++)
      check($urandom_range(524287) - 262144, $urandom_range(524287) - 262144);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
