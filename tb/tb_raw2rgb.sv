// tb_raw2rgb: self-checking test of the Bayer demosaic.
//
// Sends two frames of random raw samples (8 x 6 pixels, valid with random
// gaps) with their x/y coordinates. For every pixel with y >= 1 the expected
// output is worked out from the stored image: the 2x2 window of the pixel, its
// stream predecessor (the previous line's last pixel when x = 0) and the two
// pixels above those; each window pixel is classified by the mosaic layout
// (even rows G R, odd rows B G), red and blue are taken from their sites and
// green is the floor of the mean of the two green sites. Row 0 of the second
// frame is checked against the last row of the first. Also checks that one
// output follows each valid input by exactly one clock.
module tb_raw2rgb;
  import cardcounter_pkg::*;

  localparam int L = 8;
  localparam int H = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  pix_t data;
  logic dval, rgb_valid;
  logic [10:0] x, y;
  rgb_t rgb;

  int checks = 0, failures = 0;
  pix_t img [2][H][L];
  rgb_t exp_q[$];
  bit   chk_q[$];
  int   outs = 0, ins = 0;
  logic dval_d = 1'b0;

  raw2rgb #(.LINE_PIXELS(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 0 = red, 1 = green, 2 = blue
  function automatic int colour(int px, int py);
    if (py % 2 == 0) return (px % 2 == 0) ? 1 : 0;
    else             return (px % 2 == 0) ? 2 : 1;
  endfunction

  function automatic pix_t sample(int f, int px, int py);
    // row -k of frame f is row H-k of frame f-1
    if (py < 0) return img[f - 1][H + py][px];
    return img[f][py][px];
  endfunction

  function automatic rgb_t expected(int f, int px, int py);
    int xs[4], ys[4];
    int gsum = 0;
    rgb_t e;
    int lx = (px == 0) ? L - 1 : px - 1;
    int ly = (px == 0) ? py - 1 : py;
    xs = '{px, lx, px, lx};
    ys = '{py, ly, py - 1, ly - 1};
    e = '0;
    for (int k = 0; k < 4; k++) begin
      // the left pixel's colour is that of column x-1 in the row of pixel x
      int c = colour((k % 2 == 1) ? px + 1 : px, (k < 2) ? py : py + 1);
      pix_t s = sample(f, xs[k], ys[k]);
      if (c == 0) e.r = s;
      else if (c == 2) e.b = s;
      else gsum += s;
    end
    e.g = pix_t'(gsum / 2);
    return e;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    check("valid one clock after input", rgb_valid, dval_d);
    if (rgb_valid) begin
      rgb_t e;
      bit   c;
      outs++;
      e = exp_q.pop_front();
      c = chk_q.pop_front();
      if (c) begin
        check("red", rgb.r, e.r);
        check($sformatf("green (output %0d)", outs), rgb.g, e.g);
        check("blue", rgb.b, e.b);
      end
    end
  end
  always @(posedge clk) dval_d <= dval;

  initial begin
    data = '0; dval = 0; x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int py = 0; py < H; py++)
        for (int px = 0; px < L; px++) begin
          img[f][py][px] = pix_t'($urandom);
          while ($urandom_range(0, 3) == 0) begin
            dval = 1'b0;
            @(negedge clk);
          end
          dval = 1'b1;
          data = img[f][py][px];
          x = 11'(px); y = 11'(py);
          ins++;
          // row 0 of the first frame has no defined rows above or left
          if (f == 0 && (py == 0 || (py == 1 && px == 0))) begin
            exp_q.push_back('0); chk_q.push_back(0);
          end else begin
            exp_q.push_back(expected(f, px, py)); chk_q.push_back(1);
          end
          @(negedge clk);
        end
      dval = 1'b0;
      repeat (5) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check("outputs == inputs", outs, ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
