// ctx_mem: multi-context configuration memory of one ePLD or of the eConnect.
//
// Holds P_CTX configurations of BITS bits, written through a W-bit port as
// WORDS = ceil(BITS/W) words per context (word w holds bits [w*W +: W]). Any
// context can be written at any time, the active one included. cfg_out is the
// configuration that drives the logic. A context that was never written reads
// as all zeros (every eNode unprogrammed), so no loop can be active after
// reset; a per-context valid bit, cleared by reset, does this.
//
// Two implementations, chosen by MODE, as in the two published versions:
//  MEM_DISTRIBUTED (v1): the memory is read in full, combinationally, at the
//    active context index. sw_start loads the index at the next clock edge:
//    a single-edge context change. ready is always 1; commit is ignored.
//  MEM_BRAM (v2): the memory is a one-word-per-cycle synchronous RAM. sw_start
//    starts copying the target context word by word into a shadow register
//    (ready falls); ready rises WORDS+1 edges later. commit then copies the
//    shadow into the active register in one edge, so all memories of the
//    device can switch together. The old context keeps running during the
//    load. The shadow/active pair is this design's choice.
//
// Timing (v2): sw_start at edge 0, ready high after edge WORDS+1, commit at a
// later edge changes cfg_out after that edge.
module ctx_mem
  import ecpld_pkg::*;
#(
  parameter mem_mode_e   MODE  = MEM_BRAM,
  parameter int unsigned BITS  = 96,
  parameter int unsigned P_CTX = 16,
  parameter int unsigned W     = 32,
  localparam int unsigned WORDS = words_for(BITS, W),
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CW    = (P_CTX > 1) ? $clog2(P_CTX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // programming port
  input  logic            wr_en,
  input  logic [CW-1:0]   wr_ctx,
  input  logic [AW-1:0]   wr_addr,
  input  logic [W-1:0]    wr_data,
  // context switch
  input  logic            sw_start,
  input  logic [CW-1:0]   sw_ctx,
  output logic            ready,
  input  logic            commit,
  output logic [CW-1:0]   act_ctx,
  output logic [BITS-1:0] cfg_out
);

  localparam int unsigned DEPTH = P_CTX * WORDS;

  logic [W-1:0]     mem [DEPTH];
  logic [P_CTX-1:0] ctx_valid;

  always_ff @(posedge clk)
    if (wr_en) mem[int'(wr_ctx) * WORDS + int'(wr_addr)] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     ctx_valid <= '0;
    else if (wr_en) ctx_valid[wr_ctx] <= 1'b1;

  if (MODE == MEM_DISTRIBUTED) begin : g_dist

    logic [WORDS*W-1:0] flat;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)        act_ctx <= '0;
      else if (sw_start) act_ctx <= sw_ctx;

    always_comb
      for (int unsigned w = 0; w < WORDS; w++)
        flat[w*W +: W] = mem[int'(act_ctx) * WORDS + w];

    assign cfg_out = ctx_valid[act_ctx] ? flat[BITS-1:0] : '0;
    assign ready   = 1'b1;

  end else begin : g_bram

    logic [CW-1:0]      tgt;
    logic               loading, rd_vld, tgt_valid;
    logic [AW-1:0]      rd_cnt, wr_cnt;
    logic [W-1:0]       rdata;
    logic [WORDS*W-1:0] shadow;
    logic [BITS-1:0]    active;

    // synchronous RAM read port
    always_ff @(posedge clk)
      rdata <= mem[int'(tgt) * WORDS + int'(rd_cnt)];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        tgt       <= '0;
        tgt_valid <= 1'b0;
        loading   <= 1'b0;
        rd_vld    <= 1'b0;
        rd_cnt    <= '0;
        wr_cnt    <= '0;
        ready     <= 1'b1;
      end else if (sw_start) begin
        tgt       <= sw_ctx;
        tgt_valid <= ctx_valid[sw_ctx];
        loading   <= 1'b1;
        rd_vld    <= 1'b0;
        rd_cnt    <= '0;
        wr_cnt    <= '0;
        ready     <= 1'b0;
      end else begin
        rd_vld <= loading;
        if (loading) begin
          if (int'(rd_cnt) == WORDS - 1) loading <= 1'b0;
          else                           rd_cnt  <= rd_cnt + 1'b1;
        end
        if (rd_vld) begin
          if (int'(wr_cnt) == WORDS - 1) ready  <= 1'b1;
          else                           wr_cnt <= wr_cnt + 1'b1;
        end
      end

    always_ff @(posedge clk)
      if (rd_vld) shadow[int'(wr_cnt)*W +: W] <= rdata;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        active  <= '0;
        act_ctx <= '0;
      end else if (commit && ready) begin
        active  <= tgt_valid ? shadow[BITS-1:0] : '0;
        act_ctx <= tgt;
      end

    assign cfg_out = active;

  end

  // A programming write must address a word of the context.
  a_wr_addr : assert property (@(posedge clk) disable iff (!rst_n)
                               wr_en |-> int'(wr_addr) < WORDS);

endmodule
