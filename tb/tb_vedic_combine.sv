// tb_vedic_combine: self-checking test of the Vedic combine network, N = 16.
// Random 16-bit operands P and Q are split into 8-bit halves, the four half
// products are formed here with the * operator and fed to the network, and
// the 32-bit result is compared with P*Q. Corner operands make both middle
// carries (C1, C2) appear. A watchdog ends the run if it hangs.
module tb_vedic_combine;
  localparam int unsigned N = 16;
  localparam int unsigned H = N / 2;
  logic [N-1:0] hh, hl, lh, ll;
  logic [2*N-1:0] z;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  vedic_combine dut (.hh(hh), .hl(hl), .lh(lh), .ll(ll), .z(z));

  task automatic check(input logic [N-1:0] pa, input logic [N-1:0] qa);
    longint unsigned exp;
    hh = N'(longint'(pa[N-1:H]) * longint'(qa[N-1:H]));
    hl = N'(longint'(pa[N-1:H]) * longint'(qa[H-1:0]));
    lh = N'(longint'(pa[H-1:0]) * longint'(qa[N-1:H]));
    ll = N'(longint'(pa[H-1:0]) * longint'(qa[H-1:0]));
    #1;
    exp = longint'(pa) * longint'(qa);
    checks++;
    if (z !== (2*N)'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", pa, qa, z, exp);
    end
  endtask

  initial begin
    check('1, '1);
    check('0, '1);
    check(16'h80FF, 16'hFF80);
    repeat (50000) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
