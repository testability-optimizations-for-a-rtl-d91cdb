// tb_enode: exhaustive check of the AND-plane (neutral 1) and OR-plane
// (neutral 0) eNode: unprogrammed -> neutral, programmed -> input or inverse.
module tb_enode;
  logic in, cp, ci, out_and, out_or;
  int checks = 0, failures = 0;

  enode #(.NEUTRAL(1'b1)) u_and (.in, .cp, .ci, .out(out_and));
  enode #(.NEUTRAL(1'b0)) u_or  (.in, .cp, .ci, .out(out_or));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp_and, exp_or;
      {cp, ci, in} = 3'(i);
      #1;
      exp_and = !cp ? 1'b1 : (ci ? !in : in);
      exp_or  = !cp ? 1'b0 : (ci ? !in : in);
      checks += 2;
      if (out_and !== exp_and) begin failures++; $display("AND node cp=%b ci=%b in=%b got %b", cp, ci, in, out_and); end
      if (out_or  !== exp_or)  begin failures++; $display("OR node cp=%b ci=%b in=%b got %b", cp, ci, in, out_or); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
