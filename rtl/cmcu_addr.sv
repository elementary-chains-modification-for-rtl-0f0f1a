// cmcu_addr: address sequencer of the control unit with code sharing.
//
// The control-memory address is {RG, CT}: RG (R1 bits) holds the code of the
// current operational linear chain and CT (R2 bits) the code of the current
// component inside it. Components of a chain have consecutive codes, so
// moving along a chain is CT + 1. The microinstruction read from that address
// decides the next step:
//   yE = 1            : the algorithm ends, the fetch flip-flop is cleared;
//   y0 = 1            : CT <- CT + 1 (next component of the same chain);
//   y0 = 0 and yE = 0 : RG <- psi (next chain code from the input addressing
//                       block) and CT <- 0 (first component of that chain).
// A start pulse while idle loads RG with START_CHAIN, clears CT and sets the
// fetch flip-flop.
//
// Address concatenation, consecutive component codes and the y0/yE signals
// follow the published method. The fetch flip-flop, the start handshake, the
// first chain code and the synchronous active-low reset are this design's
// choices.
//
// Timing: one microinstruction per clock while fetch = 1; the address is
// registered, so the word read in cycle t decides the address of cycle t+1.
module cmcu_addr
  import cmcu_pkg::*;
#(
  parameter int unsigned R1 = R1_DEF,
  parameter int unsigned R2 = R2_DEF,
  parameter logic [R1-1:0] START_CHAIN = '0
) (
  input  logic             clk,
  input  logic             rst_n,   // synchronous, active low
  input  logic             start,   // begin the algorithm (ignored while running)
  input  logic             y0,      // advance to next component
  input  logic             ye,      // end of algorithm
  input  logic [R1-1:0]    psi,     // next chain code from the addressing block
  output logic [R1+R2-1:0] addr,    // control-memory address {RG, CT}
  output logic             fetch    // a microinstruction is being executed
);

  logic [R1-1:0] rg;
  logic [R2-1:0] ct;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rg    <= '0;
      ct    <= '0;
      fetch <= 1'b0;
    end else if (!fetch) begin
      if (start) begin
        rg    <= START_CHAIN;
        ct    <= '0;
        fetch <= 1'b1;
      end
    end else if (ye) begin
      fetch <= 1'b0;
    end else if (y0) begin
      ct <= ct + 1'b1;
    end else begin
      rg <= psi;
      ct <= '0;
    end
  end

  assign addr = {rg, ct};

  // A chain, control microinstruction included, must fit in 2^R2 words:
  // advancing past the last component code is a microprogram error.
  a_no_ct_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    (fetch && !ye && y0) |-> (ct != '1));

endmodule
