// ecpld_e2e: end-to-end test harness for the whole eCPLD at its default size
// (8 ePLDs x 8 macrocells, 16 contexts). V1 = 0 uses the default block RAM
// context memories (ecpld instantiated with no parameter override), V1 = 1
// the distributed memories.
//
// A sequencer programs several contexts through the configuration port with
// random loop-free ePLD configurations and random eConnect routings, switches
// contexts, enters SCANMODE with a context whose configurations contain
// combinational loops, shifts the 128-flop scan chain, and returns to
// functional mode through a loop-free context. All stimulus changes at falling
// edges. A checker process drives random pin inputs and, every cycle, compares
// the ePLD outputs, circuit output bytes, scan_out, ctx_busy and ctx_cur with
// a cycle-accurate reference model (ecpld_ref_pkg plus a model of the byte
// interconnect and of the scan chain). The model changes configuration exactly
// LAT edges after the edge that takes the request: 1 for distributed
// memories, WORDS+2 = 63 for block RAM (61 words per ePLD context); the old
// context keeps running meanwhile.
// Mechanisms counted (each must happen): context switches, cycles run on the
// old context during a block RAM load (V1 = 0 only), ePLD-to-ePLD routes,
// feedback-column uses, loop configurations run in SCANMODE, scan shifts.
module ecpld_e2e #(
  parameter bit V1 = 1'b0
);
  import ecpld_pkg::*;
  import ecpld_ref_pkg::*;

  localparam int NE = 8, NM = 8, NP = 2, NI = 16, NPI = 8, NPO = 8;
  localparam int NSRC = NE + NPI, NDST = NE * 2 + NPO;
  localparam int EPB = 2 * (NM * (NP + 1)) * (NI + 3 * NM) + 2 * NM * NP;  // 1952
  localparam int EPW = (EPB + 31) / 32;                                    // 61
  localparam int ECB = NDST * 4;                                           // 96
  localparam int ECW = (ECB + 31) / 32;                                    // 3
  localparam int LAT  = V1 ? 1 : EPW + 2;   // edges until the new configuration
  localparam int BLAT = V1 ? 1 : EPW + 2;   // edges until ctx_busy falls
  localparam int NSH  = 2 * NE * NM;        // scan chain length

  logic clk = 0, rst_n = 0;
  logic [NPI-1:0][7:0] pin_in = '0;
  logic [NPO-1:0][7:0] pin_out;
  logic [NE-1:0][NM-1:0] epld_q;
  logic cfg_we = 0;
  logic [3:0] cfg_blk = 0, cfg_ctx = 0, ctx_sel = 0, ctx_cur;
  logic [5:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic ctx_req = 0, ctx_busy;
  logic scanmode = 0, scan_en = 0, scan_in = 0, scan_out;

  if (V1) begin : g_v1
    ecpld #(.MEM_MODE(MEM_DISTRIBUTED)) dut (.*);
  end else begin : g_v2
    ecpld dut (.*);
  end

  always #5 clk = ~clk;

  // configurations (sequencer) and model state (checker)
  cfgv_t        epcfg [16][NE];
  bit [ECB-1:0] eccfg [16];
  bit           prog  [16];
  bit [63:0]    mq [NE], mte [NE];
  int           mctx = 0, mcur = 0, pend_ctx = 0, pend_edges = 0;
  bit           pend = 0, busy = 0, checking = 0;

  // loop bounds held in variables so that the simulator keeps the loops
  int ne_rt = NE, nm_rt = NM, npo_rt = NPO, ndst_rt = NDST;

  int checks = 0, failures = 0, cyc = 0;
  int n_switch = 0, n_old_during_load = 0, n_inter = 0, n_fb = 0;
  int n_loop_cfg = 0, n_shift = 0;

  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
  endfunction

  function automatic bit [7:0] src_byte(int s);
    return (s < NE) ? 8'(mq[s]) : pin_in[s-NE];
  endfunction

  // eConnect destination d in the model's active context (unwritten: source 0)
  function automatic bit [7:0] route(int d);
    return prog[mctx] ? src_byte(int'(eccfg[mctx][d*4 +: 4])) : src_byte(0);
  endfunction

  // ---------------------------------------------------------------- checker
  always begin
    @(negedge clk);
    pin_in = {$urandom, $urandom};
    #1;
    if (checking) begin
      bit [63:0] nq [NE], nte [NE];
      bit [NSH-1:0] s;
      bit ok;
      // outputs of the current cycle
      for (int e = 0; e < ne_rt; e++) begin
        checks++;
        if (epld_q[e] !== NM'(mq[e])) fail($sformatf("epld %0d q=%h exp %h (ctx %0d)", e, epld_q[e], NM'(mq[e]), mctx));
      end
      for (int k = 0; k < npo_rt; k++) begin
        checks++;
        if (pin_out[k] !== route(NE*2+k)) fail($sformatf("pin_out[%0d]=%h exp %h", k, pin_out[k], route(NE*2+k)));
      end
      for (int e = 0; e < ne_rt; e++)
        for (int m = 0; m < nm_rt; m++) begin s[e*2*NM+2*m] = mq[e][m]; s[e*2*NM+2*m+1] = mte[e][m]; end
      checks += 3;
      if (scan_out !== s[NSH-1]) fail($sformatf("scan_out %b exp %b", scan_out, s[NSH-1]));
      if (ctx_busy !== busy) fail($sformatf("ctx_busy %b exp %b", ctx_busy, busy));
      if (ctx_cur !== 4'(mcur)) fail($sformatf("ctx_cur %0d exp %0d", ctx_cur, mcur));
      if (pend && !V1) n_old_during_load++;
      // the next rising edge
      if (scan_en) begin
        s = {s[NSH-2:0], scan_in};
        for (int e = 0; e < ne_rt; e++)
          for (int m = 0; m < nm_rt; m++) begin nq[e][m] = s[e*2*NM+2*m]; nte[e][m] = s[e*2*NM+2*m+1]; end
        n_shift++;
      end else begin
        for (int e = 0; e < ne_rt; e++) begin
          bit [15:0] ein;
          ein = {route(e*2+1), route(e*2)};
          epld_step(NI, NM, NP, prog[mctx] ? epcfg[mctx][e] : cfgv_t'(0), 64'(ein), mq[e], mte[e],
                    scanmode, nq[e], nte[e], ok);
          if (!ok) fail("model: active loop in functional mode");
        end
      end
      for (int e = 0; e < ne_rt; e++) begin mq[e] = nq[e]; mte[e] = nte[e]; end
      if (busy) begin
        pend_edges++;
        if (pend_edges == LAT)  begin mctx = pend_ctx; pend = 0; end
        if (pend_edges == BLAT) begin mcur = pend_ctx; busy = 0; end
      end else if (ctx_req) begin
        pend = 1; busy = 1; pend_ctx = int'(ctx_sel); pend_edges = 0;
        if (V1) begin mctx = pend_ctx; pend = 0; end
        n_switch++;
      end
    end
  end

  // -------------------------------------------------------------- sequencer
  task automatic write_word(int blk, int c, int a, logic [31:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_blk = 4'(blk); cfg_ctx = 4'(c); cfg_addr = 6'(a); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Make random configurations for context c and write them (c must not be
  // the active context). The model sees the context only once it is complete.
  task automatic program_ctx(int c, bit loops);
    prog[c] = 0;
    for (int e = 0; e < ne_rt; e++) begin
      epcfg[c][e] = gen_cfg(NI, NM, NP, loops);
      n_fb += feedback_uses(NI, NM, NP, epcfg[c][e]);
      if (loops) begin
        bit [63:0] a, b;
        bit ok;
        epld_step(NI, NM, NP, epcfg[c][e], 64'h0, 64'h0, 64'h0, 1'b0, a, b, ok);
        if (!ok) n_loop_cfg++;
      end
    end
    for (int d = 0; d < ndst_rt; d++) begin
      eccfg[c][d*4 +: 4] = 4'($urandom % NSRC);
      if (d < NE * 2 && int'(eccfg[c][d*4 +: 4]) < NE) n_inter++;
    end
    for (int blk = 0; blk <= ne_rt; blk++)
      for (int w = 0; w < ((blk < NE) ? EPW : ECW); w++)
        write_word(blk, c, w, (blk < NE) ? epcfg[c][blk][w*32 +: 32] : 32'(eccfg[c] >> (w * 32)));
    prog[c] = 1;
  endtask

  // Request a switch at a falling edge and wait until it has completed.
  task automatic switch_to(int c);
    @(negedge clk);
    ctx_req = 1; ctx_sel = 4'(c);
    @(negedge clk);
    ctx_req = 0;
    while (ctx_busy) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  // Test script: program contexts, switch, then SCANMODE with a context that
  // holds loop configurations, a full scan shift, and back through a
  // loop-free context.
  typedef enum {OP_PROG, OP_PROGL, OP_SWITCH, OP_SCAN, OP_SHIFT} op_e;
  typedef struct { op_e op; int arg; } step_t;
  step_t script [14] = '{
    '{OP_PROG, 3}, '{OP_PROG, 9}, '{OP_SWITCH, 3}, '{OP_PROG, 0},
    '{OP_SWITCH, 9}, '{OP_SWITCH, 0}, '{OP_PROG, 15}, '{OP_SWITCH, 15},
    '{OP_SWITCH, 3}, '{OP_PROGL, 5}, '{OP_SCAN, 1}, '{OP_SWITCH, 5},
    '{OP_SHIFT, NSH + 16}, '{OP_SWITCH, 9}
  };

  initial begin
    foreach (prog[i]) prog[i] = 0;
    for (int e = 0; e < ne_rt; e++) begin mq[e] = 0; mte[e] = 0; end
    #10;                 // falling edge: release reset and start the model
    rst_n = 1;
    checking = 1;
    repeat (4) @(negedge clk);      // unprogrammed device: all zero
    foreach (script[i]) begin
      case (script[i].op)
        OP_PROG, OP_PROGL: program_ctx(script[i].arg, script[i].op == OP_PROGL);
        OP_SWITCH: switch_to(script[i].arg);
        OP_SCAN:   begin @(negedge clk); scanmode = script[i].arg[0]; end
        OP_SHIFT:  begin
          for (int t = 0; t < script[i].arg; t++) begin
            @(negedge clk);
            scan_en = 1; scan_in = 1'($urandom);
          end
          @(negedge clk);
          scan_en = 0;
        end
        default: ;
      endcase
    end
    @(negedge clk);
    scanmode = 0;
    repeat (20) @(negedge clk);
    #2;
    checking = 0;

    checks += 6;
    if (n_switch < 7)                  fail("too few context switches");
    if (!V1 && n_old_during_load == 0) fail("old context never ran during a load");
    if (n_inter == 0)                  fail("no ePLD-to-ePLD route");
    if (n_fb == 0)                     fail("no feedback column used");
    if (n_loop_cfg == 0)               fail("no loop configuration in SCANMODE");
    if (n_shift == 0)                  fail("no scan shift");
    $display("switches %0d, cycles on old context during load %0d, ePLD-to-ePLD routes %0d, feedback uses %0d, loop ePLDs in SCANMODE %0d, shifts %0d",
             n_switch, n_old_during_load, n_inter, n_fb, n_loop_cfg, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
