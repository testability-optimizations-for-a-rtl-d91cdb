// tb_scan_dff: random d/se/si against a reference flop, plus reset.
module tb_scan_dff;
  logic clk = 0, rst_n = 0, d = 0, se = 0, si = 0, q;
  logic exp_q;
  int checks = 0, failures = 0, cyc = 0;

  scan_dff dut (.clk, .rst_n, .d, .se, .si, .q);

  always #5 clk = ~clk;

  initial begin
    #12;
    checks++;
    if (q !== 1'b0) begin failures++; $display("reset value %b", q); end
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 1'($urandom); se = 1'($urandom); si = 1'($urandom);
      exp_q = se ? si : d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("cycle %0d: se=%b d=%b si=%b q=%b", i, se, d, si, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 1000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
