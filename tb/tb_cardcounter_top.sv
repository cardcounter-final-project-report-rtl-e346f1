// tb_cardcounter_top: end-to-end test of the whole design at reduced size
// (16-pixel lines, 6-line frames, 8x4 VGA picture, short resets). The bench
// itself is in cardcounter_bench.
module tb_cardcounter_top;
  cardcounter_bench #(.FULL(1'b0)) bench ();

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
