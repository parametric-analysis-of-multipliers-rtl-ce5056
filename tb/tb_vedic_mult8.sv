// tb_vedic_mult8: exhaustive self-checking test of vedic_mult8.
// Every pair of unsigned 8-bit operands is applied and the 16-bit product is
// compared with integer multiplication. A watchdog ends the run if it hangs.
module tb_vedic_mult8;
  logic [7:0] a, b;
  logic [15:0] q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  vedic_mult8 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (q !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (655360) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
