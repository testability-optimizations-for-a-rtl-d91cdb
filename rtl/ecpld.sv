// ecpld: time-multiplexed CPLD (eCPLD) with test extension, top level.
//
// N_EPLD AND-OR arrays (ePLDs) of N_MC macrocells are joined by a byte-level
// multiplexer interconnect (eConnect). Every ePLD and the eConnect have their
// own context memory holding N_CTX configurations; a context switch makes all
// of them change configuration in the same clock edge, so the same hardware
// computes a different circuit in each context.
//
// eConnect sources (byte s):      0..N_EPLD-1   ePLD e register outputs
//                                 N_EPLD..      circuit input bytes pin_in
// eConnect destinations (byte d): e*IN_BYTES+b  input byte b of ePLD e
//                                 N_EPLD*IN_BYTES+k  circuit output byte k
// The ePLD outputs also leave the device directly on epld_q.
//
// Programming: cfg_we writes cfg_wdata to word cfg_addr of context cfg_ctx of
// memory cfg_blk (0..N_EPLD-1: that ePLD, N_EPLD: the eConnect).
// Context switch: ctx_req with ctx_sel; ctx_busy while it runs; ctx_cur is
// the active context. With MEM_MODE = MEM_BRAM (default, the block RAM
// version) the new configuration takes effect WORDS+2 rising edges after the
// edge that takes the request (WORDS = 61 configuration words per ePLD
// context, so 63 edges); the old context keeps running until then and
// ctx_busy is high in between. With MEM_DISTRIBUTED the edge that takes the
// request already switches the logic and ctx_busy is high for one cycle.
// Test: scanmode is the global test enable that switches every macrocell's
// test extension in; scan_en shifts the chain scan_in -> ePLD 0 .. ePLD
// N_EPLD-1 -> scan_out through all macrocell and extension flops.
//
// From the published design: 8 ePLDs x 8 macrocells, 16 contexts, byte-wide
// eConnect with 16:1 muxes, the two memory versions, SCANMODE test extension.
// This design's choices: ePLD input count, product terms per macrocell, pin
// counts, source/destination numbering, the programming port and reset.
// The combinational-loop warnings tools report come from the ePLD feedback
// columns and stand on purpose (see epld).
module ecpld
  import ecpld_pkg::*;
#(
  parameter mem_mode_e   MEM_MODE = MEM_BRAM,
  parameter int unsigned P_EPLD   = N_EPLD,
  parameter int unsigned P_MC     = N_MC,
  parameter int unsigned P_PT     = N_PT,
  parameter int unsigned P_INB    = IN_BYTES,
  parameter int unsigned P_PIN_I  = N_PIN_IN,
  parameter int unsigned P_PIN_O  = N_PIN_OUT,
  localparam int unsigned BW      = BYTE_W,
  localparam int unsigned EP_IN   = P_INB * BW,
  localparam int unsigned EP_BITS = epld_cfg_bits(EP_IN, P_MC, P_PT),
  localparam int unsigned N_SRC   = P_EPLD + P_PIN_I,
  localparam int unsigned N_DST   = P_EPLD * P_INB + P_PIN_O,
  localparam int unsigned EC_BITS = N_DST * ECN_SEL_W,
  localparam int unsigned EP_AW   = $clog2(words_for(EP_BITS, CFG_W)),
  localparam int unsigned EC_WDS  = words_for(EC_BITS, CFG_W),
  localparam int unsigned EC_AW   = (EC_WDS > 1) ? $clog2(EC_WDS) : 1,
  localparam int unsigned ADDR_W  = (EP_AW > EC_AW) ? EP_AW : EC_AW,
  localparam int unsigned BLK_W   = $clog2(P_EPLD + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // circuit pins
  input  logic [P_PIN_I-1:0][BW-1:0]     pin_in,
  output logic [P_PIN_O-1:0][BW-1:0]     pin_out,
  output logic [P_EPLD-1:0][P_MC-1:0]    epld_q,
  // configuration programming
  input  logic                           cfg_we,
  input  logic [BLK_W-1:0]               cfg_blk,
  input  logic [CTX_W-1:0]               cfg_ctx,
  input  logic [ADDR_W-1:0]              cfg_addr,
  input  logic [CFG_W-1:0]               cfg_wdata,
  // context switch
  input  logic                           ctx_req,
  input  logic [CTX_W-1:0]               ctx_sel,
  output logic                           ctx_busy,
  output logic [CTX_W-1:0]               ctx_cur,
  // test
  input  logic                           scanmode,
  input  logic                           scan_en,
  input  logic                           scan_in,
  output logic                           scan_out
);

  // eConnect sources/destinations must fit a 16:1 byte multiplexer
  if (N_SRC > (1 << ECN_SEL_W)) begin : g_bad_src
    $error("ecpld: more eConnect sources than a %0d-bit select can address", ECN_SEL_W);
  end

  logic [N_SRC-1:0][BW-1:0] ec_src;
  logic [N_DST-1:0][BW-1:0] ec_dst;
  logic [EC_BITS-1:0]       ec_cfg;
  logic [P_EPLD:0]          rdy;
  logic [P_EPLD:0]          chain;
  logic                     sw_start, sw_commit;

  ctx_ctrl #(.CW(CTX_W)) u_ctrl (
    .clk, .rst_n,
    .req      (ctx_req),
    .req_ctx  (ctx_sel),
    .all_ready(&rdy),
    .start    (sw_start),
    .commit   (sw_commit),
    .busy     (ctx_busy),
    .cur_ctx  (ctx_cur)
  );

  assign chain[0] = scan_in;
  assign scan_out = chain[P_EPLD];

  for (genvar e = 0; e < P_EPLD; e++) begin : g_epld
    logic [EP_BITS-1:0] cfg;
    logic [CTX_W-1:0]   unused_ctx;

    ctx_mem #(.MODE(MEM_MODE), .BITS(EP_BITS), .P_CTX(N_CTX), .W(CFG_W)) u_mem (
      .clk, .rst_n,
      .wr_en   (cfg_we && (int'(cfg_blk) == e)),
      .wr_ctx  (cfg_ctx),
      .wr_addr (cfg_addr[EP_AW-1:0]),
      .wr_data (cfg_wdata),
      .sw_start(sw_start),
      .sw_ctx  (ctx_sel),
      .ready   (rdy[e]),
      .commit  (sw_commit),
      .act_ctx (unused_ctx),
      .cfg_out (cfg)
    );

    epld #(.P_IN(EP_IN), .P_MC(P_MC), .P_PT(P_PT)) u_epld (
      .clk, .rst_n,
      .scanmode,
      .scan_en,
      .scan_in (chain[e]),
      .scan_out(chain[e+1]),
      .in      (ec_dst[e*P_INB +: P_INB]),
      .cfg     (cfg),
      .q       (epld_q[e])
    );

    assign ec_src[e] = BW'(epld_q[e]);
  end

  for (genvar k = 0; k < P_PIN_I; k++) begin : g_pin_src
    assign ec_src[P_EPLD+k] = pin_in[k];
  end

  logic [CTX_W-1:0] unused_ec_ctx;

  ctx_mem #(.MODE(MEM_MODE), .BITS(EC_BITS), .P_CTX(N_CTX), .W(CFG_W)) u_ec_mem (
    .clk, .rst_n,
    .wr_en   (cfg_we && (int'(cfg_blk) == P_EPLD)),
    .wr_ctx  (cfg_ctx),
    .wr_addr (cfg_addr[EC_AW-1:0]),
    .wr_data (cfg_wdata),
    .sw_start(sw_start),
    .sw_ctx  (ctx_sel),
    .ready   (rdy[P_EPLD]),
    .commit  (sw_commit),
    .act_ctx (unused_ec_ctx),
    .cfg_out (ec_cfg)
  );

  econnect #(.N_SRC(N_SRC), .N_DST(N_DST), .BW(BW), .SEL_W(ECN_SEL_W)) u_ec (
    .src(ec_src),
    .cfg(ec_cfg),
    .dst(ec_dst)
  );

  assign pin_out = ec_dst[N_DST-1 -: P_PIN_O];

endmodule
