// rsa_pkg - types and constants shared by the RSA processor.
//
// The radix-4 modular multiplier works on carry-save pairs that are
// N_BITS+4 bits wide (the width of the final 1028-bit adder for a 1024-bit
// modulus) and estimates signs from the bits above position N_BITS-2.
// The host side is a 32-bit word bus, as the register block is loaded
// through a 32-bit input buffer.
package rsa_pkg;

  // Width of the host data bus / parameter input buffer.
  localparam int unsigned HOST_W = 32;

  // One radix-4 Booth digit in {-2,-1,0,+1,+2}: the sign, and whether the
  // magnitude is one or two (both clear for a zero digit).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  // Which parameter register a host write goes to.
  typedef enum logic [1:0] {
    SEL_MODULUS  = 2'd0,
    SEL_EXPONENT = 2'd1,
    SEL_MESSAGE  = 2'd2,
    SEL_NONE     = 2'd3
  } reg_sel_e;

  // Number of host words needed to hold a value of the given width.
  function automatic int unsigned n_words(int unsigned width);
    return (width + HOST_W - 1) / HOST_W;
  endfunction

  // Clog2 that never returns zero, for index ports.
  function automatic int unsigned idx_bits(int unsigned count);
    return (count <= 2) ? 1 : $clog2(count);
  endfunction

endpackage
