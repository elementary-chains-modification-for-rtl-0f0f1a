// cmcu_bia: block of input addressing (BIA) of the modified control unit.
//
// When a chain has run to its end, the control memory presents a control
// microinstruction whose class field carries the code of the class of
// pseudoequivalent chains the finished chain belongs to. Chains are
// pseudoequivalent when their outputs lead to the same vertex, so they share
// one transition rule. This block turns {class code, logical conditions} into
// the code of the next chain, which is loaded into the chain register.
// Because its inputs are the R3-bit class code instead of the R1-bit chain
// code, it needs fewer product terms; that saving is the point of the method.
//
// Structure: a two-level PAL-style circuit. The conjunctive matrix (M1) forms
// H product terms over the true and complemented inputs; the disjunctive
// matrix (M2) ORs terms into each of the R1 outputs. The personality is read
// from a hex file with one line per term: {output mask[R1], care mask[L+R3],
// value[L+R3]}. The input vector is {z, x}, with x1 at bit 0. A term is true
// when every cared-for input equals its value. An empty PERSONALITY leaves
// the planes to be filled by other means (a testbench with a generated
// algorithm). The two-matrix structure and
// the input/output counts follow the area model of the published method; the file
// format and the example personality (PERSONALITY) are this design's own.
//
// Timing: purely combinational.
module cmcu_bia
  import cmcu_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned R1 = R1_DEF,
  parameter int unsigned R3 = R3_DEF,
  parameter int unsigned H  = H_DEF,
  parameter string PERSONALITY = "rtl/cmcu_bia_example.hex"
) (
  input  logic [L-1:0]  x,    // logical conditions from the data-path
  input  logic [R3-1:0] z,    // class code from the control microinstruction
  output logic [R1-1:0] psi   // code of the next chain
);

  localparam int unsigned NIN = L + R3;
  localparam int unsigned TW  = R1 + 2 * NIN;

  logic [TW-1:0] plane [H];

  initial if (PERSONALITY != "") $readmemh(PERSONALITY, plane);

  logic [NIN-1:0] in_vec;
  logic [H-1:0]   term;

  assign in_vec = {z, x};

  // M1: one product term per line of the personality.
  always_comb begin
    for (int h = 0; h < H; h++) begin
      logic [NIN-1:0] care, val;
      care    = plane[h][NIN +: NIN];
      val     = plane[h][0 +: NIN];
      term[h] = &(~(in_vec ^ val) | ~care);
    end
  end

  // M2: each output is the OR of the terms that name it.
  always_comb begin
    psi = '0;
    for (int h = 0; h < H; h++)
      if (term[h]) psi = psi | plane[h][2*NIN +: R1];
  end

endmodule
