// raw2rgb: Bayer-pattern demosaic of the CCD stream.
//
// Each sensor site sees only one colour. For every valid pixel (x,y) this block
// looks at the 2x2 window formed by the pixel, its left neighbour and the two
// pixels above them. Any such window of a Bayer mosaic holds one red, one blue
// and two green sites: red and blue are taken directly and green is the mean of
// the two greens. The row above comes from a one-line buffer (LINE_PIXELS
// words) that is read and rewritten at column x on every valid pixel; the left
// neighbours are the previous valid samples of both rows.
//
// Mosaic layout (an assumption, the sensor's is not specified): even rows
// G R G R ..., odd rows B G B G ... . At column 0 the "left" samples are the
// last ones of the previous line and on row 0 the "above" samples are the
// previous frame's last line, so the first column and row carry neighbours
// from elsewhere; they are not special-cased.
//
// Interface: data/dval/x/y as produced by ccd_capture. Timing: one RGB output
// per valid input pixel, registered, one clock after it (rgb_valid mirrors
// dval one clock later).
module raw2rgb
  import cardcounter_pkg::*;
#(
  parameter int unsigned LINE_PIXELS = 1280,
  parameter int unsigned XY_W        = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            data,
  input  logic            dval,
  input  logic [XY_W-1:0] x,
  input  logic [XY_W-1:0] y,
  output rgb_t            rgb,
  output logic            rgb_valid
);

  pix_t line_buf [LINE_PIXELS];
  pix_t above;      // (x,   y-1)
  pix_t above_q;    // (x-1, y-1)
  pix_t left_q;     // (x-1, y)
  logic [$clog2(LINE_PIXELS)-1:0] col;

  assign col   = x[$clog2(LINE_PIXELS)-1:0];
  assign above = line_buf[col];

  function automatic pix_t mean2(pix_t a, pix_t b);
    logic [PIX_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[PIX_W:1];
  endfunction

  always_ff @(posedge clk) begin
    if (dval) line_buf[col] <= data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      above_q   <= '0;
      left_q    <= '0;
      rgb       <= '0;
      rgb_valid <= 1'b0;
    end else begin
      rgb_valid <= dval;
      if (dval) begin
        above_q <= above;
        left_q  <= data;
        unique case ({y[0], x[0]})
          2'b00: rgb <= '{r: left_q,  g: mean2(above_q, data),  b: above};
          2'b01: rgb <= '{r: data,    g: mean2(left_q, above),  b: above_q};
          2'b10: rgb <= '{r: above_q, g: mean2(left_q, above),  b: data};
          2'b11: rgb <= '{r: above,   g: mean2(above_q, data),  b: left_q};
        endcase
      end
    end
  end

endmodule
