// tb_econnect: random sources and selects at the default 16-source,
// 24-destination size; each destination byte must equal the selected source.
module tb_econnect;
  localparam int NS = 16, ND = 24;
  logic [NS-1:0][7:0] src;
  logic [ND*4-1:0]    cfg;
  logic [ND-1:0][7:0] dst;
  int checks = 0, failures = 0;

  econnect dut (.src, .cfg, .dst);

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int s = 0; s < NS; s++) src[s] = 8'($urandom);
      for (int d = 0; d < ND; d++) cfg[d*4 +: 4] = 4'($urandom);
      #1;
      for (int d = 0; d < ND; d++) begin
        checks++;
        if (dst[d] !== src[cfg[d*4 +: 4]]) begin
          failures++;
          $display("t=%0d dst %0d sel %0d got %h", t, d, cfg[d*4 +: 4], dst[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
