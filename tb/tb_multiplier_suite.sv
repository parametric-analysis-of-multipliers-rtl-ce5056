// tb_multiplier_suite: end-to-end test of the whole multiplier suite at its
// default parameters (16-bit operands).
//
// All five multipliers are driven at once: first with the operand pairs of the
// reference waveforms (each product compared with the printed value), then
// with corner values and 50,000 random pairs, each product compared with 64-bit
// integer multiplication (unsigned for the Vedic multiplier, two's complement
// for the Booth multipliers). It also counts how often each mechanism of the
// design was exercised and counts a failure for any that never was:
//   * every Booth digit value of every radix, 0 .. +-2^(K-1), read from the
//     encoders' outputs;
//   * both carries (C1, C2) of the middle additions of the top Vedic stage.
// A watchdog ends the run if it hangs.
module tb_multiplier_suite;
  logic [15:0] va, vb, r2x, r2y, r4x, r4y, r8x, r8y, r16x, r16y;
  logic [31:0] vs, r2p, r4p, r8p, r16p;
  int checks = 0, failures = 0;
  int seen2 [-1:1], seen4 [-2:2], seen8 [-4:4], seen16 [-8:8];
  int c1_seen = 0, c2_seen = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  multiplier_suite dut (
    .vedic_a(va), .vedic_b(vb), .vedic_s(vs),
    .r2_x(r2x),   .r2_y(r2y),   .r2_p(r2p),
    .r4_x(r4x),   .r4_y(r4y),   .r4_p(r4p),
    .r8_x(r8x),   .r8_y(r8y),   .r8_p(r8p),
    .r16_x(r16x), .r16_y(r16y), .r16_p(r16p)
  );

  function automatic int sd(input logic neg, input int mag);
    return neg ? -mag : mag;
  endfunction

  task automatic cmp(input string name, input logic [31:0] got, input longint exp);
    checks++;
    if (got !== 32'(exp)) begin
      failures++;
      if (failures < 20) $display("FAIL %s -> %0d, expected %0d", name, $signed(got), exp);
    end
  endtask

  // Apply one operand pair to all five multipliers and check every product.
  task automatic apply(input logic [15:0] a, input logic [15:0] b);
    {va, r2x, r4x, r8x, r16x} = {5{a}};
    {vb, r2y, r4y, r8y, r16y} = {5{b}};
    #1;
    cmp("vedic",  vs,   longint'(a) * longint'(b));
    cmp("radix2", r2p,  longint'($signed(a)) * longint'($signed(b)));
    cmp("radix4", r4p,  longint'($signed(a)) * longint'($signed(b)));
    cmp("radix8", r8p,  longint'($signed(a)) * longint'($signed(b)));
    cmp("radix16", r16p, longint'($signed(a)) * longint'($signed(b)));
    for (int k = 0; k < 16; k++) seen2[sd(dut.u_r2.dig_neg[k], int'(dut.u_r2.dig_mag[k]))]++;
    for (int k = 0; k < 8; k++)  seen4[sd(dut.u_r4.dig_neg[k], int'(dut.u_r4.dig_mag[k]))]++;
    for (int k = 0; k < 6; k++)  seen8[sd(dut.u_r8.dig_neg[k], int'(dut.u_r8.dig_mag[k]))]++;
    for (int k = 0; k < 4; k++)  seen16[sd(dut.u_r16.dig_neg[k], int'(dut.u_r16.dig_mag[k]))]++;
    if (dut.u_vedic.u_combine.c1) c1_seen++;
    if (dut.u_vedic.u_combine.c2) c2_seen++;
  endtask

  // One multiplier with a value printed in its waveform.
  task automatic printed(input string name, input logic [31:0] got, input longint value);
    cmp({name, " (waveform)"}, got, value);
  endtask

  task automatic tally(input string name, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end else begin
      $display("  %s: %0d", name, count);
    end
  endtask

  initial begin
    static logic [15:0] corners [6] = '{16'h8000, 16'h7FFF, 16'hFFFF, 16'h0000, 16'h0001, 16'h00FF};
    foreach (seen2[i]) seen2[i] = 0;
    foreach (seen4[i]) seen4[i] = 0;
    foreach (seen8[i]) seen8[i] = 0;
    foreach (seen16[i]) seen16[i] = 0;

    // Waveform operand pairs and the products printed with them.
    apply(16'd8, 16'd11);     printed("vedic", vs, 88);
    apply(16'd88, 16'd11);    printed("vedic", vs, 968);
    apply(16'd25, 16'd31);    printed("vedic", vs, 775);
    apply(16'd4, 16'd6);      printed("radix2", r2p, 24);
    apply(-16'sd4, 16'd5);    printed("radix2", r2p, -20);
    apply(16'd254, 16'd9251); printed("radix2", r2p, 2349754);
    apply(16'd3256, 16'd5555); printed("radix4", r4p, 18087080);
    apply(-16'sd36, 16'd256); printed("radix4", r4p, -9216);
    apply(16'd6, 16'd896);    printed("radix4", r4p, 5376);
    apply(-16'sd2, 16'd4);    printed("radix8", r8p, -8);
    apply(16'd50, 16'd63);    printed("radix8", r8p, 3150);
    apply(16'd501, 16'd633);  printed("radix8", r8p, 317133);
    apply(-16'sd14, 16'd6);   printed("radix16", r16p, -84);

    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    repeat (50000) apply(16'($urandom), 16'($urandom));

    $display("Mechanisms exercised (count):");
    foreach (seen2[i])  tally($sformatf("radix-2 digit %0d", i), seen2[i]);
    foreach (seen4[i])  tally($sformatf("radix-4 digit %0d", i), seen4[i]);
    foreach (seen8[i])  tally($sformatf("radix-8 digit %0d", i), seen8[i]);
    foreach (seen16[i]) tally($sformatf("radix-16 digit %0d", i), seen16[i]);
    tally("vedic carry C1", c1_seen);
    tally("vedic carry C2", c2_seen);

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
