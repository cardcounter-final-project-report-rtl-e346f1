// tb_ccd_capture: self-checking test of the camera stream framing.
//
// A small camera model (line length reduced to 16 pixels) sends frames of
// lines separated by blanking. Every sample sent inside an accepted frame is
// queued with the column and row it should get (pixel index modulo / divided
// by the line length); each dval cycle is compared with the queue head. Checks
// that lines of twice the line length wrap x and advance y, that new_frame
// pulses once per accepted frame and frame_cnt follows, that a frame begun
// while stop is high, or already running when capture is enabled, is ignored,
// and that x and y return to 0 between frames.
module tb_ccd_capture;
  import cardcounter_pkg::*;

  localparam int L = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  pix_t data_in, data;
  logic fval, lval, start, stop, dval, new_frame;
  logic [10:0] x, y;
  logic [31:0] frame_cnt;

  int checks = 0, failures = 0;
  int pulses = 0, pixels_seen = 0;

  typedef struct { pix_t d; int x; int y; } pix_rec_t;
  pix_rec_t q[$];

  ccd_capture #(.LINE_PIXELS(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Output monitor
  always @(negedge clk) if (rst_n) begin
    if (new_frame) pulses++;
    if (dval) begin
      pixels_seen++;
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected pixel at x=%0d y=%0d", x, y);
      end else begin
        pix_rec_t e;
        e = q.pop_front();
        check("data", data, e.d);
        check("x", x, e.x);
        check("y", y, e.y);
      end
    end
  end

  // One frame: `lines` lines, line k of len[k] pixels; accepted frames queue
  // their pixels for the monitor.
  task automatic send_frame(int lines, int mult, bit accepted);
    int idx = 0;
    @(negedge clk);
    fval = 1'b1;
    repeat (3) @(negedge clk);
    for (int ln = 0; ln < lines; ln++) begin
      for (int p = 0; p < L * mult; p++) begin
        lval = 1'b1;
        data_in = pix_t'($urandom);
        if (accepted) q.push_back('{d: data_in, x: idx % L, y: idx / L});
        idx++;
        @(negedge clk);
      end
      lval = 1'b0;
      repeat (5) @(negedge clk);
    end
    fval = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    fval = 0; lval = 0; data_in = '0; start = 0; stop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // capture disabled after reset: frame ignored
    send_frame(2, 1, 0);
    check("no pulse while disabled", pulses, 0);

    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    send_frame(4, 1, 1);
    check("pulses after frame 1", pulses, 1);
    check("frame_cnt after frame 1", frame_cnt, 1);
    check("x reset between frames", x, 0);
    check("y reset between frames", y, 0);

    send_frame(3, 2, 1);      // double-length lines: x wraps mid line
    check("pulses after frame 2", pulses, 2);
    check("frame_cnt after frame 2", frame_cnt, 2);

    // stop held: frame ignored even with start also high (stop wins)
    stop = 1'b1; start = 1'b1;
    @(negedge clk);
    send_frame(2, 1, 0);
    check("frame_cnt while stopped", frame_cnt, 2);
    start = 1'b0; stop = 1'b0;

    // enable in the middle of a frame: that frame is not captured
    @(negedge clk);
    fval = 1'b1;
    repeat (4) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    lval = 1'b1; repeat (L) @(negedge clk); lval = 1'b0;
    fval = 1'b0;
    repeat (4) @(negedge clk);
    check("frame_cnt after mid-frame enable", frame_cnt, 2);
    send_frame(2, 1, 1);
    check("frame_cnt after frame 3", frame_cnt, 3);
    check("pulses after frame 3", pulses, 3);
    check("all pixels delivered", q.size(), 0);
    check("pixel count", pixels_seen, 4 * L + 3 * 2 * L + 2 * L);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
