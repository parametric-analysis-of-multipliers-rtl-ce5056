// tb_booth_radix8: self-checking test of the signed 16x16 radix-8 Booth
// multiplier. It applies the operand pairs of the reference waveform and
// compares the products with the values printed there, then corner operands
// (most negative, most positive, -1, 0) and 100,000 random pairs, each
// compared with 64-bit integer multiplication. It also counts how often each
// of the 16 4-bit recoding groups of the multiplier occurred (worked
// out here from y, 6 groups per operand) and counts a failure for any group
// that never did. A watchdog ends the run if it hangs.
module tb_booth_radix8;
  localparam int unsigned W = 16, K = 3, ND = 6;
  logic [W-1:0] x, y;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  int grp_seen [2**(K+1)];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  booth_radix8 dut (.x(x), .y(y), .p(p));

  task automatic check(input logic signed [W-1:0] tx, input logic signed [W-1:0] ty);
    longint exp;
    logic [ND*K:0] ext;
    x = tx; y = ty;
    #1;
    exp = longint'(tx) * longint'(ty);
    checks++;
    if ($signed(p) !== (2*W)'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", tx, ty, $signed(p), exp);
    end
    ext = {(ND*K)'(ty), 1'b0};
    for (int k = 0; k < ND; k++) grp_seen[ext[K*k +: K+1]]++;
  endtask

  task automatic check_exp(input logic signed [W-1:0] tx, input logic signed [W-1:0] ty,
                           input logic signed [2*W-1:0] printed);
    check(tx, ty);
    checks++;
    if ($signed(p) !== printed) begin
      failures++;
      $display("FAIL waveform %0d * %0d -> %0d, printed %0d", tx, ty, $signed(p), printed);
    end
  endtask

  initial begin
    static logic [W-1:0] corners [5] = '{16'h8000, 16'h7FFF, 16'hFFFF, 16'h0000, 16'h0001};
    foreach (grp_seen[i]) grp_seen[i] = 0;
    // Operand pairs and products printed in the reference waveform.
    check_exp(-16'sd2, 16'sd4, -32'sd8);
    check_exp(16'sd50, 16'sd63, 32'sd3150);
    check_exp(16'sd501, 16'sd633, 32'sd317133);
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    repeat (100000) check(W'($urandom), W'($urandom));
    foreach (grp_seen[i]) begin
      checks++;
      if (grp_seen[i] == 0) begin
        failures++;
        $display("FAIL recoding group %b never occurred", (K+1)'(i));
      end
    end
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
