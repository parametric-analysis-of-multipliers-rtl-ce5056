// tb_booth_pp_adder: self-checking test of the Booth partial product adder at
// its defaults (W = 16, K = 2, ND = 8). Random and extreme partial products
// are applied; the 32-bit result is compared with the sum of
// pp[i] * 4^i computed as a 64-bit integer and taken modulo 2^32. A watchdog
// ends the run if it hangs.
module tb_booth_pp_adder;
  localparam int unsigned W = 16, K = 2, ND = 8;
  logic [ND-1:0][W+K-1:0] pp;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  booth_pp_adder dut (.pp(pp), .p(p));

  task automatic check();
    longint exp = 0;
    #1;
    for (int i = 0; i < ND; i++) exp += longint'($signed(pp[i])) <<< (K * i);
    checks++;
    if (p !== (2*W)'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h -> %h, expected %h", pp, p, (2*W)'(exp));
    end
  endtask

  initial begin
    for (int i = 0; i < ND; i++) pp[i] = {1'b1, {(W+K-1){1'b0}}};   // most negative
    check();
    for (int i = 0; i < ND; i++) pp[i] = {1'b0, {(W+K-1){1'b1}}};   // most positive
    check();
    for (int i = 0; i < ND; i++) pp[i] = '1;                        // all -1
    check();
    repeat (20000) begin
      for (int i = 0; i < ND; i++) pp[i] = (W+K)'($urandom);
      check();
    end
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
