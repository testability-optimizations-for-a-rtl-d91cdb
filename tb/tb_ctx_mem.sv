// tb_ctx_mem: both context memory versions side by side, 16 contexts of 100
// bits (4 words of 32, the last one partly used). Checks: a never-written
// context reads zero; the distributed version changes configuration at the
// first edge after sw_start; the block RAM version keeps the old configuration
// while loading, raises ready exactly WORDS+1 edges after sw_start and changes
// only at commit; writes into the active context of the distributed version
// show at once.
module tb_ctx_mem;
  import ecpld_pkg::*;
  localparam int BITS = 100, W = 32, WORDS = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [3:0] wr_ctx = 0;
  logic [1:0] wr_addr = 0;
  logic [W-1:0] wr_data = 0;
  logic d_start = 0, b_start = 0, b_commit = 0, d_ready, b_ready;
  logic [3:0] sw_ctx = 0, d_act, b_act;
  logic [BITS-1:0] d_cfg, b_cfg;
  logic [WORDS*W-1:0] refm [16];
  bit written [16];
  int checks = 0, failures = 0, cyc = 0;

  ctx_mem #(.MODE(MEM_DISTRIBUTED), .BITS(BITS), .P_CTX(16), .W(W)) u_d (
    .clk, .rst_n, .wr_en, .wr_ctx, .wr_addr, .wr_data,
    .sw_start(d_start), .sw_ctx, .ready(d_ready), .commit(1'b0), .act_ctx(d_act), .cfg_out(d_cfg));
  ctx_mem #(.MODE(MEM_BRAM), .BITS(BITS), .P_CTX(16), .W(W)) u_b (
    .clk, .rst_n, .wr_en, .wr_ctx, .wr_addr, .wr_data,
    .sw_start(b_start), .sw_ctx, .ready(b_ready), .commit(b_commit), .act_ctx(b_act), .cfg_out(b_cfg));

  always #5 clk = ~clk;

  function automatic logic [BITS-1:0] expect_cfg(int c);
    return written[c] ? refm[c][BITS-1:0] : '0;
  endfunction

  task automatic write_word(int c, int a, logic [W-1:0] v);
    @(negedge clk);
    wr_en = 1; wr_ctx = 4'(c); wr_addr = 2'(a); wr_data = v;
    refm[c][a*W +: W] = v; written[c] = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic check(string what, logic [BITS-1:0] got, logic [BITS-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    foreach (written[i]) written[i] = 0;
    #12 rst_n = 1;
    check("dist after reset", d_cfg, '0);
    check("bram after reset", b_cfg, '0);
    for (int c = 0; c < 16; c++)
      if (c != 5)
        for (int a = 0; a < WORDS; a++) write_word(c, a, $urandom);
    for (int t = 0; t < 60; t++) begin
      int c, n;
      logic [BITS-1:0] old_b;
      c = (t % 7 == 3) ? 5 : $urandom % 16;
      old_b = b_cfg;
      @(negedge clk);
      sw_ctx = 4'(c); d_start = 1; b_start = 1;
      @(negedge clk);
      d_start = 0; b_start = 0;
      check("dist one-edge switch", d_cfg, expect_cfg(c));
      checks++;
      if (d_act !== 4'(c) || !d_ready) begin failures++; $display("dist act_ctx %0d", d_act); end
      n = 1;  // edges since (and including) the sw_start edge
      while (!b_ready && n < 50) begin
        check("bram old config kept during load", b_cfg, old_b);
        @(negedge clk); n++;
      end
      checks++;
      if (n != WORDS + 2) begin failures++; $display("bram ready %0d edges after start, exp %0d", n - 1, WORDS + 1); end
      check("bram before commit", b_cfg, old_b);
      b_commit = 1;
      @(negedge clk);
      b_commit = 0;
      check("bram after commit", b_cfg, expect_cfg(c));
      checks++;
      if (b_act !== 4'(c)) begin failures++; $display("bram act_ctx %0d", b_act); end
      if (t % 10 == 9 && c != 5) begin
        // rewrite a word of the active context
        write_word(c, t % WORDS, $urandom);
        check("dist live write", d_cfg, expect_cfg(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
