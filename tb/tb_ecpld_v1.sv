// tb_ecpld_v1: end-to-end test of the eCPLD built with distributed context
// memories (single-edge context change); see ecpld_e2e.
module tb_ecpld_v1;
  ecpld_e2e #(.V1(1'b1)) u_e2e ();
  // outer watchdog, behind the harness's own cycle watchdog
  initial begin
    #5ms;
    $display("outer watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
