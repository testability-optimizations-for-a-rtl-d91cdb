// econnect: byte-level dynamic interconnect matrix (eConnect).
//
// Every destination byte (the ePLD input bytes and the circuit output bytes)
// is driven by its own N_SRC:1 byte multiplexer. Its select comes from the
// context memory, so changing the context re-routes the whole matrix at once.
// Routing whole bytes instead of single bits keeps the matrix and its
// configuration small (4 select bits per destination byte for 16 sources).
// The 8-bit buses, 16:1 multiplexers and 4-bit selects follow the published
// interconnect figure; the source and destination numbering is this design's
// (see ecpld). Purely combinational.
//
// cfg holds the selects, destination d at bits [d*SEL_W +: SEL_W]. A select
// value at or above N_SRC routes zero.
module econnect #(
  parameter int unsigned N_SRC = 16,
  parameter int unsigned N_DST = 24,
  parameter int unsigned BW    = 8,
  parameter int unsigned SEL_W = 4
) (
  input  logic [N_SRC-1:0][BW-1:0]  src,
  input  logic [N_DST*SEL_W-1:0]    cfg,
  output logic [N_DST-1:0][BW-1:0]  dst
);

  for (genvar d = 0; d < N_DST; d++) begin : g_mux
    logic [SEL_W-1:0] sel;
    assign sel = cfg[d*SEL_W +: SEL_W];
    always_comb begin
      dst[d] = '0;
      for (int unsigned s = 0; s < N_SRC; s++)
        if (sel == SEL_W'(s)) dst[d] = src[s];
    end
  end

endmodule
