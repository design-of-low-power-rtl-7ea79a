// Shared constants of the modified carry select adder (MCSA).
//
// The MCSA splits an N-bit addition into blocks of GROUP_W bits. The lowest
// block is a plain ripple carry adder fed by the adder's carry-in. Every other
// block holds one ripple carry adder that assumes a carry-in of 0 and a
// binary to excess-1 converter (BEC) of GROUP_W+1 bits that forms the
// carry-in-of-1 result from it; the carry out of the block below picks one.
// The block width of 4, and so a 5-bit BEC, follows the design; the same
// width is used for every block.
package mcsa_pkg;

  // Width of every carry select block.
  localparam int unsigned GROUP_W = 4;
  // Width of the BEC that replaces the carry-in-of-1 ripple carry adder.
  localparam int unsigned BEC_W = GROUP_W + 1;

  // Number of carry select blocks of an N-bit MCSA.
  function automatic int unsigned num_groups(input int unsigned n);
    return n / GROUP_W;
  endfunction

endpackage
