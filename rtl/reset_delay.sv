// reset_delay: staged release of three active-low resets.
//
// While rst_n is low a counter is held at zero and all three outputs are low.
// Once rst_n is high the counter runs, and rst_out_n[k] goes high when it
// reaches DELAY_k; the counter stops at DELAY_2. The stages let slower
// subsystems start after the ones they depend on: in the system, stage 0
// starts the frame-buffer FIFOs, stage 1 the camera capture and demosaic,
// stage 2 the VGA output.
//
// Timing: rst_out_n[k] rises DELAY_k+1 clocks after rst_n rises, or after
// power-up when rst_n is high from the start. rst_n is sampled directly
// (asynchronous assert).
//
// The three outputs and where they go follow the original; the delays are this
// design's choice (about 21, 42 and 63 ms at 50 MHz).
module reset_delay #(
  parameter int unsigned CNT_W   = 22,
  parameter int unsigned DELAY_0 = 32'h0F_FFFF,
  parameter int unsigned DELAY_1 = 32'h1F_FFFF,
  parameter int unsigned DELAY_2 = 32'h2F_FFFF
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] rst_out_n = '0
);

  // Power-up values (FPGA configuration) so that the sequence also runs when
  // rst_n is never pressed.
  logic [CNT_W-1:0] cnt = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      rst_out_n <= '0;
    end else begin
      if (cnt != CNT_W'(DELAY_2)) cnt <= cnt + 1'b1;
      rst_out_n[0] <= (cnt >= CNT_W'(DELAY_0));
      rst_out_n[1] <= (cnt >= CNT_W'(DELAY_1));
      rst_out_n[2] <= (cnt >= CNT_W'(DELAY_2));
    end
  end

  initial begin
    assert (DELAY_0 <= DELAY_1 && DELAY_1 <= DELAY_2 && DELAY_2 < (1 << CNT_W))
      else $error("reset_delay: delays must be ordered and fit in CNT_W bits");
  end

endmodule
