// tb_cardcounter_top_full: end-to-end test of cardcounter_top with every
// parameter at its default: 1280-pixel lines, 1024-line camera frames, the
// 640x480 VGA mode, the full power-on and staged-reset delays. Four camera
// frames are sent (one with capture stopped). The bench is cardcounter_bench.
module tb_cardcounter_top_full;
  cardcounter_bench #(.FULL(1'b1), .L(1280), .H(1024), .N_FRAMES(4), .SKIP(2)) bench ();

  initial begin
    #1s;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
