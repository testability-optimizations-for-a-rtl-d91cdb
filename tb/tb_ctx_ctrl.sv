// tb_ctx_ctrl: requests with memories that become ready after a random delay;
// start must pulse once per accepted request, commit exactly in the first
// cycle with all_ready, cur_ctx must follow, and requests while busy are
// ignored.
module tb_ctx_ctrl;
  logic clk = 0, rst_n = 0, req = 0, all_ready = 1;
  logic [3:0] req_ctx = 0, cur_ctx;
  logic start, commit, busy;
  int checks = 0, failures = 0, cyc = 0;

  ctx_ctrl #(.CW(4)) dut (.clk, .rst_n, .req, .req_ctx, .all_ready, .start,
                          .commit, .busy, .cur_ctx);

  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int delay;
      logic [3:0] c;
      delay = $urandom % 6;
      c = 4'($urandom);
      @(negedge clk);
      req = 1; req_ctx = c; #1;
      checks++;
      if (!start || busy || commit) begin failures++; $display("t=%0d start missing", t); end
      @(posedge clk); #1;
      all_ready = (delay == 0);
      // a second request while busy must not start
      req_ctx = ~c;
      #1;
      checks++;
      if (start) begin failures++; $display("t=%0d start while busy", t); end
      for (int k = 0; k < delay; k++) begin
        @(negedge clk);
        checks++;
        if (commit || !busy) begin failures++; $display("t=%0d early commit", t); end
      end
      all_ready = 1;
      #1;
      checks += 2;
      if (!commit) begin failures++; $display("t=%0d commit missing", t); end
      req = 0;
      @(posedge clk); #1;
      if (cur_ctx !== c || busy) begin failures++; $display("t=%0d cur_ctx %0d exp %0d", t, cur_ctx, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
