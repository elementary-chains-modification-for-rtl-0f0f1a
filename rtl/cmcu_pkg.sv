// cmcu_pkg: sizes shared by the blocks of the compositional microprogram
// control unit with code sharing and modified operational linear chains (OLC).
//
// The control-memory address is the concatenation {OLC code, component code}
// with R = R1 + R2 bits. A microinstruction word holds, from bit 0 upwards,
// the N microoperation bits y1..yN, then y0 (advance to the next component of
// the chain), then yE (end of the algorithm), then an R3-bit field holding the
// code of the class of pseudoequivalent chains. Only the control
// microinstruction that closes each chain uses that field.
//
// N = 50 is the number of microoperations used in the area study this design
// follows. The other defaults (4 logical conditions, 8 chains, at most 3
// operator vertices per chain, 4 classes, 7 product terms in the input
// addressing block) are those of the example algorithm stored in
// cmcu_cm_example.hex and cmcu_bia_example.hex; they are this design's choice.
package cmcu_pkg;

  localparam int unsigned N_DEF  = 50;  // microoperations y1..yN
  localparam int unsigned L_DEF  = 4;   // logical conditions x1..xL
  localparam int unsigned R1_DEF = 3;   // bits of an OLC code
  localparam int unsigned R2_DEF = 2;   // bits of a component code
  localparam int unsigned R3_DEF = 2;   // bits of a class code
  localparam int unsigned H_DEF  = 7;   // product terms of the addressing block

  // Bit positions of the fixed fields of a microinstruction word.
  function automatic int unsigned y0_bit(int unsigned n);
    return n;
  endfunction

  function automatic int unsigned ye_bit(int unsigned n);
    return n + 1;
  endfunction

  function automatic int unsigned class_lsb(int unsigned n);
    return n + 2;
  endfunction

endpackage
