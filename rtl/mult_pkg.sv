// mult_pkg: constants shared by the multipliers.
//
// MULT_W is the operand width of every multiplier in the suite (16 bits, as
// compared in the utilisation study the design follows). The helper
// booth_num_digits gives how many radix-2^K Booth digits cover a W-bit
// two's-complement multiplier: ceil(W/K), the top group sign-extended.
package mult_pkg;

  localparam int unsigned MULT_W = 16;

  function automatic int unsigned booth_num_digits(int unsigned w, int unsigned k);
    return (w + k - 1) / k;
  endfunction

endpackage
