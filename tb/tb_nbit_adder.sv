// tb_nbit_adder: self-checking test of nbit_adder at N = 16.
// Corner operands (0, all ones, alternating bits) with both carry-ins, then
// 20,000 random operand sets; {carry, sum} is compared with a 64-bit integer
// sum. A watchdog ends the run if it hangs.
module tb_nbit_adder;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, sum;
  logic cin, carry;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  nbit_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  task automatic check();
    longint unsigned exp;
    #1;
    exp = longint'(a) + longint'(b) + longint'(cin);
    checks++;
    if ({carry, sum} !== (N+1)'(exp)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> %h, expected %h", a, b, cin, {carry, sum}, exp);
    end
  endtask

  initial begin
    static logic [N-1:0] corners [4] = '{'0, '1, {(N/2){2'b10}}, {(N/2){2'b01}}};
    foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
      a = corners[i]; b = corners[j]; cin = 1'(c);
      check();
    end
    repeat (20000) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
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
