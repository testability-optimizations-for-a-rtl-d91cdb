// test_ext: test extension of one macrocell, which breaks the ePLD's
// programmable combinational feedback loops in test mode.
//
// A macrocell feeds two combinational signals back into its own AND array:
// the expansion product term and the OR-gate output. A wrong configuration,
// such as one set by ATPG scan vectors, can close a loop through them. The
// extension has two multiplexers steered by the global SCANMODE signal and one
// flip-flop:
//   exp_fb  = SCANMODE ? (expansion term registered in the extension flop) : exp_in
//   comb_fb = SCANMODE ? mc_q (the macrocell register, which already holds the
//                         OR output) : or_in
// In functional mode (SCANMODE = 0) both feedbacks stay combinational and the
// ePLD behaves exactly as without the extension. The two muxes and one flop
// follow the published structure; feeding the second mux from the macrocell
// register is this design's reading of it.
//
// The extension flop is a scan flop (se/si/so) and sits in the ePLD scan chain.
// Timing: exp_fb in SCANMODE shows the expansion term of the previous clock.
module test_ext (
  input  logic clk,
  input  logic rst_n,
  input  logic scanmode,  // global test enable
  input  logic se,        // scan shift enable
  input  logic si,        // scan in
  output logic so,        // scan out (extension flop)
  input  logic exp_in,    // combinational expansion product term
  input  logic or_in,     // combinational OR-gate output of the macrocell
  input  logic mc_q,      // macrocell register output
  output logic exp_fb,    // expansion feedback column
  output logic comb_fb    // combinational feedback column
);

  logic exp_q;

  scan_dff u_ff (.clk, .rst_n, .d(exp_in), .se, .si, .q(exp_q));

  assign so = exp_q;

  always_comb begin
    exp_fb  = scanmode ? exp_q : exp_in;
    comb_fb = scanmode ? mc_q  : or_in;
  end

endmodule
