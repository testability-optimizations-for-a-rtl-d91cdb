// epld: one dynamic reconfigurable AND-OR array (ePLD) with its macrocells.
//
// The array crosses NROW product-term rows with NCOL input columns. Every
// crossing is an eNode driven by two configuration bits (Cp, Ci), so each row
// is the AND of any chosen columns, true or inverted. Each macrocell owns
// N_PT+1 rows: N_PT of them go through OR-plane eNodes into the macrocell's OR
// gate, whose output is registered in the macrocell flip-flop (the ePLD
// output); the last row is the expansion term, which is not OR-ed but fed back
// as a column so that wider products can be built.
// Columns are the ePLD inputs from the interconnect plus three feedback columns
// per macrocell: the expansion term, the combinational OR output and the
// register output. The first two are combinational, so a configuration can
// close a loop; the per-macrocell test extension (test_ext) replaces them by
// registered values when SCANMODE is high.
//
// The whole configuration arrives as one flat vector from the context memory;
// its bit layout is described in ecpld_pkg (per product-term row, a Cp vector
// and a Ci vector over all columns). A context change is therefore just
// a new cfg value.
//
// Scan: the macrocell flops and test-extension flops form one chain,
// scan_in -> mc0 register -> mc0 extension -> mc1 register -> ... -> scan_out.
//
// Timing: q is registered, one clock after its inputs/columns settle. The
// feedback columns are combinational within the clock cycle (functional mode).
//
// Following the published figures: the eNode planes, the macrocell register,
// the three feedback columns per macrocell and the test extension. This
// design's choices: N_PT, N_IN and the column/row order.
//
// Circuit warnings about combinational loops stand on purpose: the
// programmable feedback columns are the architecture. A valid configuration
// never activates them, and SCANMODE breaks them for test.
module epld
  import ecpld_pkg::*;
#(
  parameter int unsigned P_IN = 16,            // inputs from eConnect
  parameter int unsigned P_MC = 8,             // macrocells
  parameter int unsigned P_PT = 2,             // OR-ed product terms per macrocell
  localparam int unsigned NCOL = epld_ncol(P_IN, P_MC),
  localparam int unsigned NROW = epld_nrow(P_MC, P_PT),
  localparam int unsigned CFG_BITS = epld_cfg_bits(P_IN, P_MC, P_PT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                scanmode,
  input  logic                scan_en,
  input  logic                scan_in,
  output logic                scan_out,
  input  logic [P_IN-1:0]     in,
  input  logic [CFG_BITS-1:0] cfg,
  output logic [P_MC-1:0]     q
);

  localparam int unsigned OR_BASE = 2 * NROW * NCOL;

  logic [NCOL-1:0]      col;
  logic [NCOL-1:0]      node [NROW];
  logic [NROW-1:0]      row;
  logic [P_PT-1:0]      orn  [P_MC];
  logic [P_MC-1:0]      or_out;
  logic [P_MC-1:0]      exp_fb, comb_fb;
  logic [2*P_MC:0]      chain;

  assign col[P_IN-1:0] = in;
  assign chain[0]      = scan_in;
  assign scan_out      = chain[2*P_MC];

  // AND plane: one eNode row per product term
  for (genvar r = 0; r < NROW; r++) begin : g_row
    enode #(.WIDTH(NCOL), .NEUTRAL(1'b1)) u_node (
      .in (col),
      .cp (cfg[2*r*NCOL +: NCOL]),
      .ci (cfg[(2*r+1)*NCOL +: NCOL]),
      .out(node[r])
    );
    assign row[r] = &node[r];
  end

  // Macrocells: OR plane, register, test extension, feedback columns
  for (genvar m = 0; m < P_MC; m++) begin : g_mc
    localparam int unsigned R0 = m * (P_PT + 1);

    enode #(.WIDTH(P_PT), .NEUTRAL(1'b0)) u_or_node (
      .in (row[R0 +: P_PT]),
      .cp (cfg[OR_BASE+2*m*P_PT +: P_PT]),
      .ci (cfg[OR_BASE+(2*m+1)*P_PT +: P_PT]),
      .out(orn[m])
    );
    assign or_out[m] = |orn[m];

    scan_dff u_mc_ff (
      .clk, .rst_n,
      .d (or_out[m]),
      .se(scan_en),
      .si(chain[2*m]),
      .q (q[m])
    );
    assign chain[2*m+1] = q[m];

    test_ext u_te (
      .clk, .rst_n,
      .scanmode,
      .se     (scan_en),
      .si     (chain[2*m+1]),
      .so     (chain[2*m+2]),
      .exp_in (row[R0+P_PT]),
      .or_in  (or_out[m]),
      .mc_q   (q[m]),
      .exp_fb (exp_fb[m]),
      .comb_fb(comb_fb[m])
    );

    assign col[P_IN+3*m]   = exp_fb[m];
    assign col[P_IN+3*m+1] = comb_fb[m];
    assign col[P_IN+3*m+2] = q[m];
  end

endmodule
