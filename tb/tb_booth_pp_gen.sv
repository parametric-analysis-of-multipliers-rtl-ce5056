// tb_booth_pp_gen: self-checking test of the Booth partial product generator.
// Two instances are tested: the default (radix 4, K = 2) and radix 16
// (K = 4). For random and corner multiplicands B every digit value
// -2^(K-1) .. +2^(K-1) is applied, with the multiples j*B formed here, and pp
// is compared with digit*B computed as an integer. A watchdog ends the run
// if it hangs.
module tb_booth_pp_gen;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Default instance: K = 2, multiples 0, B, 2B.
  logic [2:0][W:0]   m2;
  logic              neg2 = 1'b0;
  logic [1:0]        mag2 = 2'd0;
  logic [W+1:0]      pp2;
  booth_pp_gen dut (.multiples(m2), .neg(neg2), .mag(mag2), .pp(pp2));

  // Radix-16 instance: K = 4, multiples 0 .. 8B.
  logic [8:0][W+2:0] m4;
  logic              neg4 = 1'b0;
  logic [3:0]        mag4 = 4'd0;
  logic [W+3:0]      pp4;
  booth_pp_gen #(.W(W), .K(4)) dut4 (.multiples(m4), .neg(neg4), .mag(mag4), .pp(pp4));

  task automatic check_b(input logic signed [W-1:0] b);
    longint exp;
    for (int j = 0; j <= 2; j++) m2[j] = (W+1)'(longint'(b) * j);
    for (int j = 0; j <= 8; j++) m4[j] = (W+3)'(longint'(b) * j);
    for (int d = -2; d <= 2; d++) begin
      neg2 = (d < 0);
      mag2 = 2'((d < 0) ? -d : d);
      #1;
      exp = longint'(b) * d;
      checks++;
      if ($signed(pp2) !== (W+2)'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL K=2 B=%0d digit=%0d -> %0d", b, d, $signed(pp2));
      end
    end
    for (int d = -8; d <= 8; d++) begin
      neg4 = (d < 0);
      mag4 = 4'((d < 0) ? -d : d);
      #1;
      exp = longint'(b) * d;
      checks++;
      if ($signed(pp4) !== (W+4)'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL K=4 B=%0d digit=%0d -> %0d", b, d, $signed(pp4));
      end
    end
  endtask

  initial begin
    check_b(16'sh8000);
    check_b(16'sh7FFF);
    check_b(16'sh0000);
    check_b(-16'sd1);
    repeat (3000) check_b(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
