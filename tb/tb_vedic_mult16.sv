// tb_vedic_mult16: self-checking test of the unsigned 16x16 Vedic multiplier.
// Applies the operand pairs of the reference waveform (8*11, 88*11, 25*31),
// corner values, and 100,000 random pairs; the 32-bit product is compared with
// 64-bit integer multiplication. A watchdog ends the run if it hangs.
module tb_vedic_mult16;
  logic [15:0] a, b;
  logic [31:0] s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  vedic_mult16 dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb_);
    longint unsigned exp;
    a = ta; b = tb_;
    #1;
    exp = longint'(ta) * longint'(tb_);
    checks++;
    if (s !== 32'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", ta, tb_, s, exp);
    end
  endtask

  initial begin
    static logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h00FF, 16'hFF00};
    // Operand pairs printed in the reference waveform.
    check(16'd8, 16'd11);
    check(16'd88, 16'd11);
    check(16'd25, 16'd31);
    if (!(a == 25 && s == 32'd775)) begin failures++; $display("FAIL waveform value 775"); end
    checks++;
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    repeat (100000) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
