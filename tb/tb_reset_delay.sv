// tb_reset_delay: self-checking test of the staged reset release.
//
// Uses short delays (5, 12, 20). Counts clocks from the release of rst_n and
// checks on every clock that rst_out_n[k] is high exactly from clock
// DELAY_k+1 on, that all stages stay released afterwards, and that a second
// press (rst_n low) drops all three at once and restarts the sequence.
module tb_reset_delay;
  localparam int D0 = 5, D1 = 12, D2 = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] rst_out_n;

  int checks = 0, failures = 0;

  reset_delay #(.CNT_W(8), .DELAY_0(D0), .DELAY_1(D1), .DELAY_2(D2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_sequence(int cycles);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= cycles; n++) begin
      @(negedge clk);
      check($sformatf("stage0 @%0d", n), rst_out_n[0], n >= D0 + 1);
      check($sformatf("stage1 @%0d", n), rst_out_n[1], n >= D1 + 1);
      check($sformatf("stage2 @%0d", n), rst_out_n[2], n >= D2 + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check("held in reset", rst_out_n, 0);
    run_sequence(60);
    rst_n = 1'b0;
    #1;
    check("asynchronous drop", rst_out_n, 0);
    repeat (2) @(negedge clk);
    run_sequence(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
