// cmcu_cm: control memory of the control unit.
//
// 2^(R1+R2) words of N + 2 + R3 bits. Word layout, from bit 0: microoperations
// y1..yN, then y0, then yE, then the class-code field (see cmcu_pkg). An
// operational microinstruction sets its microoperations and y0 (or yE on the
// last vertex before the end of the algorithm) and leaves the class field at
// zero. A control microinstruction, appended to every chain that does not end
// the algorithm, has no microoperations, y0 = yE = 0 and the class code of
// its chain in the class field.
//
// In the published area model the memory is an address decoder (M3) feeding
// a disjunctive matrix (M4); here it is a read-only array initialised from
// CONTENTS, which synthesis maps to ROM or logic. An empty CONTENTS leaves
// the array to be filled by other means, such as a testbench that generates
// its own microprogram. The extra class field is the
// published method's; the file-based initialisation is this design's choice.
//
// Timing: asynchronous read; the word follows the address in the same cycle.
module cmcu_cm
  import cmcu_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned R1 = R1_DEF,
  parameter int unsigned R2 = R2_DEF,
  parameter int unsigned R3 = R3_DEF,
  parameter string CONTENTS = "rtl/cmcu_cm_example.hex"
) (
  input  logic [R1+R2-1:0]  addr,
  output logic [N-1:0]      y,     // microoperations y1..yN (y1 at bit 0)
  output logic              y0,    // advance to the next component
  output logic              ye,    // end of the algorithm
  output logic [R3-1:0]     z      // class code (control microinstruction)
);

  localparam int unsigned W     = N + 2 + R3;
  localparam int unsigned DEPTH = 1 << (R1 + R2);

  logic [W-1:0] mem [DEPTH];

  initial if (CONTENTS != "") $readmemh(CONTENTS, mem);

  logic [W-1:0] word;

  assign word = mem[addr];
  assign y    = word[N-1:0];
  assign y0   = word[y0_bit(N)];
  assign ye   = word[ye_bit(N)];
  assign z    = word[class_lsb(N) +: R3];

endmodule
