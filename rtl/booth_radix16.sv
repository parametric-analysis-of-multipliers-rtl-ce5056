// booth_radix16: signed W x W -> 2W-bit radix-16 Booth multiplier.
//
// p = x * y for two's-complement x (multiplicand B) and y (multiplier A).
// Three stages, as in the document's Booth block diagram:
//   * Encoder: y is split into overlapping 5-bit groups, one per digit, and
//     each group is recoded into a digit S_k in sign/magnitude form by the
//     radix-16 table (Table 4 of the document).
//   * Partial product generator: booth_pp_gen forms S_k * x for each digit
//     from a shared set of multiples of x.
//   * Adder: booth_pp_adder sign-extends the partial products and adds them
//     with a shift of 4 bits per digit.
// Groups are (y[4k+3] .. y[4k-1]) with a 0 appended below the LSB; the digit set
// is {0, +-B .. +-8B}. The hard multiples 3B = B + 2B, 5B = B + 4B and
// 7B = 8B - B are formed by adders shared by all digits; 6B = 2*3B.
// With W = 16 there are 4 digits. The recoding table and the structure are the
// document's; the sign/magnitude digit form and the plain sum are this
// design's. Purely combinational: p is valid one propagation delay after x
// and y change. No clock or reset.
module booth_radix16 import mult_pkg::*; #(
  parameter int unsigned W = MULT_W
) (
  input  logic [W-1:0]   x,   // multiplicand, two's complement
  input  logic [W-1:0]   y,   // multiplier, two's complement
  output logic [2*W-1:0] p    // product, two's complement
);
  localparam int unsigned K  = 4;                        // bits retired per digit
  localparam int unsigned ND = booth_num_digits(W, K);   // number of digits
  localparam int unsigned NM = (1 << (K - 1)) + 1;       // multiples 0*B .. 2^(K-1)*B
  localparam int unsigned MW = W + K - 1;                // width of one multiple

  // Multiplier, sign-extended to ND*K bits, with a 0 appended below the LSB.
  logic signed [ND*K-1:0] y_ext;
  logic        [ND*K:0]   y_grp;

  // Sign/magnitude digits from the encoder.
  logic [ND-1:0]          dig_neg;
  logic [ND-1:0][K-1:0]   dig_mag;

  // Shared multiples of the multiplicand.
  logic signed [MW-1:0]   bx;
  logic signed [MW-1:0] b3, b5, b7;
  logic [NM-1:0][MW-1:0] mult;

  logic [ND-1:0][W+K-1:0] pp;

  // ---------------------------------------------------------------- encoder
  always_comb begin
    y_ext = (ND*K)'(signed'(y));
    y_grp = {y_ext, 1'b0};
  end

  for (genvar k = 0; k < ND; k++) begin : g_enc
    logic [K:0]   grp;
    logic         neg;
    logic [K-1:0] mag;

    always_comb begin
      grp = y_grp[K*k +: K+1];
      neg = 1'b0;
      mag = '0;
      unique case (grp)
      5'b00000, 5'b11111:            begin neg = 1'b0; mag = 4'd0; end  //  0*B
      5'b00001, 5'b00010:            begin neg = 1'b0; mag = 4'd1; end  // +1*B
      5'b11101, 5'b11110:            begin neg = 1'b1; mag = 4'd1; end  // -1*B
      5'b00011, 5'b00100:            begin neg = 1'b0; mag = 4'd2; end  // +2*B
      5'b11011, 5'b11100:            begin neg = 1'b1; mag = 4'd2; end  // -2*B
      5'b00101, 5'b00110:            begin neg = 1'b0; mag = 4'd3; end  // +3*B
      5'b11001, 5'b11010:            begin neg = 1'b1; mag = 4'd3; end  // -3*B
      5'b00111, 5'b01000:            begin neg = 1'b0; mag = 4'd4; end  // +4*B
      5'b10111, 5'b11000:            begin neg = 1'b1; mag = 4'd4; end  // -4*B
      5'b01001, 5'b01010:            begin neg = 1'b0; mag = 4'd5; end  // +5*B
      5'b10101, 5'b10110:            begin neg = 1'b1; mag = 4'd5; end  // -5*B
      5'b01011, 5'b01100:            begin neg = 1'b0; mag = 4'd6; end  // +6*B
      5'b10011, 5'b10100:            begin neg = 1'b1; mag = 4'd6; end  // -6*B
      5'b01101, 5'b01110:            begin neg = 1'b0; mag = 4'd7; end  // +7*B
      5'b10001, 5'b10010:            begin neg = 1'b1; mag = 4'd7; end  // -7*B
      5'b01111:                      begin neg = 1'b0; mag = 4'd8; end  // +8*B
      5'b10000:                      begin neg = 1'b1; mag = 4'd8; end  // -8*B
      endcase
    end

    assign dig_neg[k] = neg;
    assign dig_mag[k] = mag;
  end

  // ------------------------------------------------------------- multiples
  always_comb begin
    bx = MW'(signed'(x));
    b3 = bx + (bx <<< 1);
    b5 = bx + (bx <<< 2);
    b7 = (bx <<< 3) - bx;
    mult[0] = '0;
    mult[1] = bx;
    mult[2] = bx <<< 1;
    mult[3] = b3;
    mult[4] = bx <<< 2;
    mult[5] = b5;
    mult[6] = b3 <<< 1;
    mult[7] = b7;
    mult[8] = bx <<< 3;
  end

  // ------------------------------------------------ partial product generator
  for (genvar k = 0; k < ND; k++) begin : g_pp
    booth_pp_gen #(.W(W), .K(K)) u_pp (
      .multiples(mult), .neg(dig_neg[k]), .mag(dig_mag[k]), .pp(pp[k])
    );
  end

  // ------------------------------------------------------------------ adder
  booth_pp_adder #(.W(W), .K(K), .ND(ND)) u_add (
    .pp(pp), .p(p)
  );
endmodule
