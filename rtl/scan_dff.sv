// scan_dff: D flip-flop with a scan multiplexer (multiplexed-flip-flop scan
// style), the flip-flop of a structured-ASIC logic cell.
//
// With se = 0 the flop captures d; with se = 1 it captures si, so flops chained
// q -> si form a shift register for loading and unloading test vectors.
// Asynchronous active-low reset to 0 is this design's choice.
//
// Timing: q changes on the rising clk edge after d/si are presented.
module scan_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic se,
  input  logic si,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= se ? si : d;

endmodule
