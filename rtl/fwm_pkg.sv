// Shared types for the fixed-width radix-4 (modified Booth) multiplier.
//
// booth_enc_t is the bundle one Booth encoder hands to the partial-product
// row generator and to the compensation-bias logic. Its five fields are the
// control signals of the encoding table: one (select X), two (select 2X),
// neg (invert the selected multiple), zero (the digit is 0, force the row to
// zero) and cor (the +1 that completes the two's complement of a negative
// row; it sits at the LSB column of that row).
//
// supported_width() tells which operand widths the compensation circuit is
// defined for: the carry-estimation rule was derived by exhaustive
// simulation for 8, 10 and 12 bits only.
package fwm_pkg;

  typedef struct packed {
    logic one;
    logic two;
    logic neg;
    logic zero;
    logic cor;
  } booth_enc_t;

  function automatic bit supported_width(int n);
    return (n == 8) || (n == 10) || (n == 12);
  endfunction

endpackage
