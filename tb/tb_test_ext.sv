// tb_test_ext: checks both SCANMODE settings of the test extension: in
// functional mode the feedbacks are the combinational inputs, in SCANMODE the
// expansion feedback is the term of the previous clock and the combinational
// feedback is the macrocell register. Also checks the scan shift path.
module tb_test_ext;
  logic clk = 0, rst_n = 0;
  logic scanmode = 0, se = 0, si = 0, so;
  logic exp_in = 0, or_in = 0, mc_q = 0, exp_fb, comb_fb;
  logic ref_q;
  int checks = 0, failures = 0, cyc = 0;

  test_ext dut (.clk, .rst_n, .scanmode, .se, .si, .so, .exp_in, .or_in, .mc_q,
                .exp_fb, .comb_fb);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ref_q <= 1'b0;
    else        ref_q <= se ? si : exp_in;

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      scanmode = 1'($urandom); se = ($urandom % 4) == 0; si = 1'($urandom);
      exp_in = 1'($urandom); or_in = 1'($urandom); mc_q = 1'($urandom);
      #1;
      checks += 3;
      if (exp_fb !== (scanmode ? ref_q : exp_in)) begin
        failures++; $display("cycle %0d scanmode=%b exp_fb=%b", i, scanmode, exp_fb);
      end
      if (comb_fb !== (scanmode ? mc_q : or_in)) begin
        failures++; $display("cycle %0d scanmode=%b comb_fb=%b", i, scanmode, comb_fb);
      end
      if (so !== ref_q) begin failures++; $display("cycle %0d so=%b", i, so); end
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
