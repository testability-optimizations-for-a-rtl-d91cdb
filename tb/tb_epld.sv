// tb_epld: one ePLD at the default size (16 inputs, 8 macrocells, 2 product
// terms + expansion term each) against the reference model in ecpld_ref_pkg.
//  1. functional mode, random loop-free configurations that use the
//     expansion and combinational feedback columns, random inputs;
//  2. SCANMODE with random configurations that would close combinational
//     loops in functional mode: the test extension must make them behave
//     as registered feedback, exactly as the model predicts;
//  3. scan shifting through the 16-flop chain.
// Mechanism counters: feedback-column uses, loop configurations run in
// SCANMODE, scan shift cycles; each must be non-zero.
module tb_epld;
  import ecpld_ref_pkg::*;
  localparam int NI = 16, NM = 8, NP = 2;
  localparam int CB = 2 * (NM * (NP + 1)) * (NI + 3 * NM) + 2 * NM * NP;

  logic clk = 0, rst_n = 0, scanmode = 0, scan_en = 0, scan_in = 0, scan_out;
  logic [NI-1:0] in = '0;
  logic [CB-1:0] cfg = '0;
  logic [NM-1:0] q;
  bit [63:0] mq, mte, nq, nte;
  bit ok;
  int checks = 0, failures = 0, cyc = 0;
  int n_fb = 0, n_loop_cfg = 0, n_shift = 0, n_func = 0;

  epld #(.P_IN(NI), .P_MC(NM), .P_PT(NP)) dut (
    .clk, .rst_n, .scanmode, .scan_en, .scan_in, .scan_out, .in, .cfg, .q);

  always #5 clk = ~clk;

  // Called between a rising edge and the next one; checks that edge.
  task automatic step_check(string what);
    in = NI'($urandom);
    #1;
    epld_step(NI, NM, NP, cfgv_t'(cfg), 64'(in), mq, mte, scanmode, nq, nte, ok);
    checks++;
    if (!ok) begin failures++; $display("%s: model found an active loop", what); end
    @(posedge clk); #1;
    mq = nq; mte = nte;
    checks++;
    if (q !== NM'(mq)) begin failures++; $display("%s: q=%h exp %h", what, q, NM'(mq)); end
  endtask

  initial begin
    cfgv_t c;
    mq = '0; mte = '0;
    #12 rst_n = 1;
    // 1. functional mode
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      c = gen_cfg(NI, NM, NP, 0);
      cfg = CB'(c);
      n_fb += feedback_uses(NI, NM, NP, c);
      for (int t = 0; t < 12; t++) begin step_check("functional"); n_func++; end
    end
    // 2. SCANMODE with loop configurations
    @(negedge clk);
    scanmode = 1;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      c = gen_cfg(NI, NM, NP, 1);
      cfg = CB'(c);
      epld_step(NI, NM, NP, c, 64'(in), mq, mte, 1'b0, nq, nte, ok);
      if (!ok) n_loop_cfg++;
      for (int t = 0; t < 8; t++) step_check("scanmode");
    end
    // 3. scan shift (SCANMODE stays on)
    @(negedge clk);
    scan_en = 1;
    for (int t = 0; t < 64; t++) begin
      bit [2*NM-1:0] s;
      for (int m = 0; m < NM; m++) begin s[2*m] = mq[m]; s[2*m+1] = mte[m]; end
      checks++;
      if (scan_out !== s[2*NM-1]) begin failures++; $display("shift %0d scan_out %b exp %b", t, scan_out, s[2*NM-1]); end
      scan_in = 1'($urandom);
      s = {s[2*NM-2:0], scan_in};
      for (int m = 0; m < NM; m++) begin mq[m] = s[2*m]; mte[m] = s[2*m+1]; end
      @(posedge clk); #1;
      n_shift++;
      checks++;
      if (q !== NM'(mq)) begin failures++; $display("shift %0d q=%h exp %h", t, q, NM'(mq)); end
    end
    scan_en = 0;
    // back to a loop-free configuration before leaving SCANMODE
    @(negedge clk);
    c = gen_cfg(NI, NM, NP, 0);
    cfg = CB'(c);
    step_check("scanmode, loop-free");
    @(negedge clk);
    scanmode = 0;
    for (int t = 0; t < 10; t++) step_check("functional after test");

    checks += 3;
    if (n_fb == 0)       begin failures++; $display("feedback columns never used"); end
    if (n_loop_cfg == 0) begin failures++; $display("no loop configuration exercised"); end
    if (n_shift == 0)    begin failures++; $display("no scan shift"); end
    $display("functional cycles %0d, feedback uses %0d, loop configs in SCANMODE %0d, shifts %0d",
             n_func, n_fb, n_loop_cfg, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
