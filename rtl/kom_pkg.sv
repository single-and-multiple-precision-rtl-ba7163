// kom_pkg: constants and helper functions shared by the sequential
// Karatsuba-Ofman (KO) large multipliers.
//
// Carries of the multioperand adders are always 3 bits wide (each column
// sum stays below 8 * 2**n). In the multiple-precision multiplier the k
// columns ("blocks") are combined into groups of 2**sp adjacent blocks. The
// functions below tell, for a block index t and a precision code sp, whether
// the block is the right-most (least significant) or the left-most (most
// significant) block of its group and which block is the group's right-most.
// With sp = 0 every block is both.
package kom_pkg;

  localparam int unsigned CW = 3;  // carry width of every multioperand adder

  function automatic logic is_rightmost(input int unsigned t, input int unsigned sp);
    return (t % (32'd1 << sp)) == 0;
  endfunction

  function automatic logic is_leftmost(input int unsigned t, input int unsigned sp);
    return (t % (32'd1 << sp)) == ((32'd1 << sp) - 1);
  endfunction

  function automatic int unsigned group_base(input int unsigned t, input int unsigned sp);
    return t - (t % (32'd1 << sp));
  endfunction

endpackage
