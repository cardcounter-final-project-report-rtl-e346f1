// tb_histo: self-checking test of one colour-class counter.
//
// Streams random pixels (valid about 60% of cycles) through a histo unit with
// a random colour box, pulses new_frame between frames of random length, and
// checks that the latched count equals the number of in-box valid pixels of
// the previous frame, computed here from the box limits. Also checks that the
// count holds between frames, that a box enclosing everything counts every
// valid pixel, and that the pixel on the cycle right after new_frame starts
// the next frame's total.
module tb_histo;
  import cardcounter_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  pix_t r, g, b;
  logic new_pixel, new_frame;
  rgb_word_t min_w, max_w;
  logic [31:0] count;

  int checks = 0, failures = 0;

  histo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_box(pix_t pr, pix_t pg, pix_t pb, rgb_word_t lo, rgb_word_t hi);
    return pr >= lo.r && pr <= hi.r && pg >= lo.g && pg <= hi.g && pb >= lo.b && pb <= hi.b;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse_frame();
    @(negedge clk);
    new_pixel = 1'b0;
    new_frame = 1'b1;
    @(negedge clk);
    new_frame = 1'b0;
  endtask

  // Runs one frame of n cycles; returns the in-box valid count.
  task automatic run_frame(int n, output int unsigned hits);
    hits = 0;
    for (int i = 0; i < n; i++) begin
      // on the falling edge the new_frame of the previous call is already low
      r = pix_t'($urandom_range(0, 1023));
      g = pix_t'($urandom_range(0, 1023));
      b = pix_t'($urandom_range(0, 1023));
      new_pixel = ($urandom_range(0, 9) < 6);
      if (new_pixel && in_box(r, g, b, min_w, max_w)) hits++;
      @(negedge clk);
    end
    new_pixel = 1'b0;
  endtask

  initial begin
    int unsigned hits, prev_hits;
    logic [9:0] a, c;
    r = '0; g = '0; b = '0; new_pixel = 1'b0; new_frame = 1'b0;
    min_w = '0; max_w = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("count after reset", count, 0);

    // Box enclosing everything: every valid pixel counts.
    pulse_frame();
    run_frame(500, hits);
    pulse_frame();
    @(negedge clk);
    check("full box", count, hits);

    for (int f = 0; f < 40; f++) begin
      a = 10'($urandom_range(0, 1023)); c = 10'($urandom_range(0, 1023));
      min_w.r = (a < c) ? a : c; max_w.r = (a < c) ? c : a;
      a = 10'($urandom_range(0, 1023)); c = 10'($urandom_range(0, 1023));
      min_w.g = (a < c) ? a : c; max_w.g = (a < c) ? c : a;
      a = 10'($urandom_range(0, 1023)); c = 10'($urandom_range(0, 1023));
      min_w.b = (a < c) ? a : c; max_w.b = (a < c) ? c : a;
      min_w.unused = 2'($urandom); max_w.unused = 2'($urandom);
      // the window is changed only at a frame boundary
      pulse_frame();
      run_frame($urandom_range(200, 2000), hits);
      prev_hits = hits;
      // count must still show the frame before until the next pulse
      pulse_frame();
      @(negedge clk);
      check("frame total", count, prev_hits);
    end

    // Edge test: the 'red' box of the software (R 700..1023, G,B 0..300).
    min_w = '{unused: 2'b0, r: 10'd700, g: 10'd0,   b: 10'd0};
    max_w = '{unused: 2'b0, r: 10'd1023, g: 10'd300, b: 10'd300};
    pulse_frame();
    // Pixel on the first cycle after new_frame counts for the new frame.
    r = 10'd700; g = 10'd300; b = 10'd0; new_pixel = 1'b1;   // on the box corner
    @(negedge clk);
    r = 10'd699; @(negedge clk);                           // just outside in R
    r = 10'd1023; g = 10'd301; @(negedge clk);             // just outside in G
    r = 10'd800; g = 10'd5; b = 10'd300; @(negedge clk);   // inside
    new_pixel = 1'b0; r = 10'd800; @(negedge clk);         // not valid
    repeat (3) @(negedge clk);
    // the frame before this one had no valid pixels
    check("count holds between frames", count, 0);
    pulse_frame();
    @(negedge clk);
    check("boundary pixels", count, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
