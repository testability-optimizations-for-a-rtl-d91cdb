// enode: a row of programmable crossing points (eNodes) of the ePLD AND or
// OR plane, WIDTH nodes side by side.
//
// Two configuration bits from the context memory control each node. Cp
// (programmed) chooses between the input line and a constant; Ci (invert)
// XORs the input. A programmed node passes the input or its complement; an
// unprogrammed node drives the neutral value of the gate it feeds: 1 for an
// AND-plane node, 0 for an OR-plane node, so it drops out of the term.
// This behaviour (a 2:1 mux feeding an XOR, neutral '1'/'0') follows the
// published node diagrams; grouping a product term's nodes into one vector is
// this design's choice. Purely combinational.
//
// Ports: in (lines crossing the row), cp, ci (configuration), out.
module enode #(
  parameter int unsigned WIDTH   = 1,
  parameter bit          NEUTRAL = 1'b1   // 1: AND-plane node, 0: OR-plane node
) (
  input  logic [WIDTH-1:0] in,
  input  logic [WIDTH-1:0] cp,
  input  logic [WIDTH-1:0] ci,
  output logic [WIDTH-1:0] out
);

  always_comb out = (cp & (in ^ ci)) | (~cp & {WIDTH{NEUTRAL}});

endmodule
