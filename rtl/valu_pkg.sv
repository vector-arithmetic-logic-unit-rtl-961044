// Shared types and constants of the vector ALU.
//
// The adder unit runs three operations on the X/Y register banks and the
// multiplier-accumulator runs two. Latency helpers give the cycle counts of
// the pipelined units so that controllers and testbenches agree on them.
package valu_pkg;

  // Adder unit operations.
  //   ADD_VADD : Z(i) = X(i) + Y(i)        (element-wise, "loop1")
  //   ADD_VSUB : Z(i) = X(i) - Y(i)        (two's complement, used by row elimination)
  //   ADD_VACC : ACC  = ACC + sum_i X(i)   (integration, "loop2")
  typedef enum logic [1:0] {
    ADD_VADD = 2'd0,
    ADD_VSUB = 2'd1,
    ADD_VACC = 2'd2
  } add_op_e;

  // Multiplier-accumulator operations.
  //   MAC_VMUL : A(i) = X(i) * Y(i)
  //   MAC_VMAC : A(0) = A(0) + sum_i X(i) * Y(i)   (dot product)
  typedef enum logic {
    MAC_VMUL = 1'b0,
    MAC_VMAC = 1'b1
  } mac_op_e;

  // Latency of the staggered adder: one serial clock per digit.
  function automatic int unsigned stag_latency(int unsigned w, int unsigned digit);
    return w / digit;
  endfunction

  // Latency of the radix-2 array multiplier: W carry-save rows, then a W-bit
  // staggered merge of the upper half.
  function automatic int unsigned arr_mul_latency(int unsigned w);
    return 2 * w;
  endfunction

  // Latency of the radix-4 multiplier: one stage of multiple lookup, then a
  // registered pairwise adder tree over W/2 partial products plus the sign
  // correction term.
  function automatic int unsigned r4_mul_latency(int unsigned w);
    return 1 + $clog2(w / 2 + 1);
  endfunction

endpackage
