// tb_vedic_mult4: exhaustive self-checking test of vedic_mult4.
// Every pair of unsigned 4-bit operands is applied and the 8-bit product is
// compared with integer multiplication. A watchdog ends the run if it hangs.
module tb_vedic_mult4;
  logic [3:0] a, b;
  logic [7:0] q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  vedic_mult4 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (q !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2560) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
