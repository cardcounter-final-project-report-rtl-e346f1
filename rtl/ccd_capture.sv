// ccd_capture: frames the raw pixel stream of the CCD camera.
//
// The camera drives a 10-bit sample with a frame-valid (fval) and a line-valid
// (lval) strobe, one sample per pixel clock. A frame is accepted only if it
// starts (rising fval) while capture is enabled: `start` enables capture and
// `stop` disables it (stop wins when both are high). Inside an accepted frame
// every cycle with lval high is a pixel: `dval` marks it, `x`/`y` give its
// column and row, x wrapping to 0 and y incrementing after column
// LINE_PIXELS-1. Outside an accepted frame x and y are held at 0. frame_cnt
// counts accepted frames and new_frame pulses for one cycle when one begins.
//
// Timing: data, dval, x and y are registered together, one clock after the
// inputs; new_frame and frame_cnt update on the cycle after the fval rise.
// All registers reset asynchronously on rst_n low.
//
// The framing, counters, line length (1280) and new-frame pulse follow the
// original design; the reset of the new-frame flag is this design's addition.
module ccd_capture
  import cardcounter_pkg::*;
#(
  parameter int unsigned LINE_PIXELS = 1280,
  parameter int unsigned XY_W        = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pix_t               data_in,
  input  logic               fval,
  input  logic               lval,
  input  logic               start,
  input  logic               stop,
  output pix_t               data,
  output logic               dval,
  output logic [XY_W-1:0]    x,
  output logic [XY_W-1:0]    y,
  output logic [WORD_W-1:0]  frame_cnt,
  output logic               new_frame
);

  logic enabled;
  logic fval_q;
  logic frame_on;
  logic line_on;
  logic frame_begin;

  assign frame_begin = !fval_q && fval && enabled;
  assign dval        = frame_on && line_on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       enabled <= 1'b0;
    else if (stop)    enabled <= 1'b0;
    else if (start)   enabled <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fval_q   <= 1'b0;
      frame_on <= 1'b0;
      line_on  <= 1'b0;
      data     <= '0;
      x        <= '0;
      y        <= '0;
    end else begin
      fval_q  <= fval;
      line_on <= lval;
      data    <= data_in;
      if (frame_begin)            frame_on <= 1'b1;
      else if (fval_q && !fval)   frame_on <= 1'b0;

      if (frame_on) begin
        if (line_on) begin
          if (x < XY_W'(LINE_PIXELS - 1)) begin
            x <= x + 1'b1;
          end else begin
            x <= '0;
            y <= y + 1'b1;
          end
        end
      end else begin
        x <= '0;
        y <= '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_cnt <= '0;
      new_frame <= 1'b0;
    end else begin
      new_frame <= frame_begin;
      if (frame_begin) frame_cnt <= frame_cnt + 1'b1;
    end
  end

endmodule
