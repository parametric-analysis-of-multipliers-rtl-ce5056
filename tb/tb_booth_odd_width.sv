// tb_booth_odd_width: self-checking test of the four Booth multipliers at an
// odd operand width, W = 15.
// With an odd width the top recoding group runs past the multiplier's MSB
// and must be completed by repeating the sign bit (radix 4: 8 digits cover 16
// bits; radix 8: 5 digits cover 15; radix 16: 4 digits cover 16). Corner
// operands and 30,000 random pairs are applied to all four multipliers at
// once and every product is compared with 64-bit integer multiplication. A
// watchdog ends the run if it hangs.
module tb_booth_odd_width;
  localparam int unsigned W = 15;
  logic [W-1:0] x, y;
  logic [2*W-1:0] p2, p4, p8, p16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  booth_radix2  #(.W(W)) dut2  (.x(x), .y(y), .p(p2));
  booth_radix4  #(.W(W)) dut4  (.x(x), .y(y), .p(p4));
  booth_radix8  #(.W(W)) dut8  (.x(x), .y(y), .p(p8));
  booth_radix16 #(.W(W)) dut16 (.x(x), .y(y), .p(p16));

  task automatic cmp(input string name, input logic [2*W-1:0] got, input longint exp);
    checks++;
    if (got !== (2*W)'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d * %0d -> %0d, expected %0d",
                                  name, $signed(x), $signed(y), $signed(got), exp);
    end
  endtask

  task automatic check(input logic [W-1:0] tx, input logic [W-1:0] ty);
    longint exp;
    x = tx; y = ty;
    #1;
    exp = longint'($signed(tx)) * longint'($signed(ty));
    cmp("radix2", p2, exp);
    cmp("radix4", p4, exp);
    cmp("radix8", p8, exp);
    cmp("radix16", p16, exp);
  endtask

  initial begin
    static logic [W-1:0] corners [5] = '{15'h4000, 15'h3FFF, 15'h7FFF, 15'h0000, 15'h0001};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    repeat (30000) check(W'($urandom), W'($urandom));
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
