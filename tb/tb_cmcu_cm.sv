// tb_cmcu_cm: reads every word of the control memory holding the example
// algorithm and compares it with the word implied by the reference
// description: component i of chain g sits at address {g, i}; operator
// vertices carry their microoperations and y0 (yE on the final vertex);
// the word after the last vertex of each chain is the control
// microinstruction with the chain's class code; unused words are zero.
module tb_cmcu_cm;
  import tb_gsa_pkg::*;

  logic [4:0]  addr;
  logic [49:0] y;
  logic        y0, ye;
  logic [1:0]  z;
  int checks = 0, failures = 0;

  cmcu_cm dut (.addr, .y, .y0, .ye, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(logic [49:0] ey, logic ey0, logic eye, logic [1:0] ez);
    checks++;
    if (y !== ey || y0 !== ey0 || ye !== eye || z !== ez) begin
      failures++;
      $display("FAIL addr=%0d got y=%h y0=%b yE=%b z=%0d, expected y=%h y0=%b yE=%b z=%0d",
               addr, y, y0, ye, z, ey, ey0, eye, ez);
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) begin
      int g, i;
      g    = a / 4;
      i    = a % 4;
      addr = 5'(a);
      #1;
      if (i < chain_len(g)) begin
        logic last;
        last = (i == chain_len(g) - 1) && (chain_class(g) < 0);
        expect_word(yset(first_vertex(g) + i), !last, last, 2'b00);
      end else if (i == chain_len(g) && chain_class(g) >= 0) begin
        expect_word('0, 1'b0, 1'b0, 2'(chain_class(g)));
      end else begin
        expect_word('0, 1'b0, 1'b0, 2'b00);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
