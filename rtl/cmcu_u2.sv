// cmcu_u2: compositional microprogram control unit with code sharing and
// modified elementary operational linear chains.
//
// The control algorithm is split into operational linear chains (OLC):
// sequences of operator vertices executed one after the other. Each chain
// has a code (RG) and each of its vertices a component code (CT), and the
// control-memory address is simply {RG, CT}. Inside a chain the counter
// steps; at the end of a chain the input addressing block (BIA) chooses the
// next chain from the logical conditions.
//
// The modification: every chain that does not end the algorithm gets one
// extra control microinstruction after its last vertex. It drives no
// microoperations, and its class field holds the code of the class of
// pseudoequivalent chains (chains leading to the same vertex). BIA therefore
// sees {class code, conditions} instead of {chain code, conditions}, and
// needs fewer product terms. The price is one idle data-path cycle per chain
// transition; the extra word must fit in the 2^R2 words of its chain, or the
// control memory would double.
//
// Interface: start (one-cycle pulse while idle) begins the algorithm at chain
// code 0; y carries the microoperations of the current cycle (zero when idle
// or during a control microinstruction); x are the logical conditions from
// the data-path, sampled in the cycle of the control microinstruction; busy
// is high while microinstructions are fetched; ctrl_mi marks the idle
// data-path cycle of a control microinstruction; done pulses for one cycle
// after the microinstruction carrying yE.
//
// Timing: one microinstruction per clock. A chain of F vertices takes F
// cycles, plus one for its control microinstruction.
module cmcu_u2
  import cmcu_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned L  = L_DEF,
  parameter int unsigned R1 = R1_DEF,
  parameter int unsigned R2 = R2_DEF,
  parameter int unsigned R3 = R3_DEF,
  parameter int unsigned H  = H_DEF,
  parameter string CM_CONTENTS     = "rtl/cmcu_cm_example.hex",
  parameter string BIA_PERSONALITY = "rtl/cmcu_bia_example.hex"
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [L-1:0]     x,
  output logic [N-1:0]     y,
  output logic             busy,
  output logic             ctrl_mi,
  output logic             done,
  output logic [R1+R2-1:0] addr
);

  logic          fetch;
  logic [N-1:0]  cm_y;
  logic          y0, ye;
  logic [R3-1:0] z;
  logic [R1-1:0] psi;

  cmcu_addr #(.R1(R1), .R2(R2)) u_addr (
    .clk, .rst_n, .start, .y0, .ye, .psi, .addr, .fetch
  );

  cmcu_cm #(.N(N), .R1(R1), .R2(R2), .R3(R3), .CONTENTS(CM_CONTENTS)) u_cm (
    .addr, .y(cm_y), .y0, .ye, .z
  );

  cmcu_bia #(.L(L), .R1(R1), .R3(R3), .H(H), .PERSONALITY(BIA_PERSONALITY)) u_bia (
    .x, .z, .psi
  );

  logic fetch_q;

  always_ff @(posedge clk) begin
    if (!rst_n) fetch_q <= 1'b0;
    else        fetch_q <= fetch;
  end

  assign busy    = fetch;
  assign y       = fetch ? cm_y : '0;
  assign ctrl_mi = fetch && !y0 && !ye;
  assign done    = fetch_q && !fetch;

endmodule
