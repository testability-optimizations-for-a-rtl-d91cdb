// tb_ecpld: end-to-end test of the eCPLD at its default parameters (block RAM
// context memories, 8 ePLDs x 8 macrocells, 16 contexts); see ecpld_e2e.
module tb_ecpld;
  ecpld_e2e u_e2e ();
  // outer watchdog, behind the harness's own cycle watchdog
  initial begin
    #5ms;
    $display("outer watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
