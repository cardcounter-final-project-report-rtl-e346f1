// cardcounter_bench: end-to-end bench for cardcounter_top, shared by the
// reduced-size and the full-size testbench.
//
// Around the top it models the parts of the system that are not RTL:
//   - a camera that returns the master clock as pixel clock and sends frames
//     of H lines of L raw Bayer samples (even rows G R, odd rows B G), built
//     from 2x2 cells of a small palette of card colours plus noise, through
//     the connector's bit mapping;
//   - the processor as an Avalon-MM master that programs eight colour boxes
//     (everything, the red and black boxes of the recognition software, white,
//     four random boxes) and reads the eight counts after every frame start;
//   - a pass-through column-mirror stage and a FIFO frame buffer that keeps
//     both 16-bit words of every written pixel and returns them on request.
// Expected counts are computed here with a reference demosaic (2x2 window of
// the pixel, its stream predecessor and the two samples above them) and
// doubled, because the counters sample each 25 MHz pixel on two 50 MHz clocks.
// One frame is sent with key[2] held down and must be ignored. The VGA output
// is checked pixel by pixel against what the frame buffer returned.
// Each mechanism (staged reset, box match, frame latch, line wrap, register
// read/write, unmapped read, capture stop, frame-buffer write, VGA request and
// syncs, frame-counter display) is counted and one that never happened counts
// as a failure.
module cardcounter_bench #(
  parameter bit FULL     = 1'b0,
  parameter int L        = 16,     // pixels per line (LINE_PIXELS of the top)
  parameter int H        = 6,      // lines per frame
  parameter int N_FRAMES = 5,      // camera frames sent
  parameter int SKIP     = 2,      // camera frame sent with capture stopped
  parameter int POR_W    = 4,
  parameter int RD0      = 20,
  parameter int RD1      = 40,
  parameter int RD2      = 60,
  parameter int HA       = 8,
  parameter int VA       = 4
) ();
  import cardcounter_pkg::*;

  // ------------------------------------------------------------ DUT wiring
  logic clock_50 = 1'b0;
  logic [3:0] key = 4'hF;
  logic [17:0] sw, ledr;
  logic [8:0] ledg;
  logic [7:0][6:0] hex;
  logic [9:0] gpio1_data = '0;
  logic gpio1_pixclk, gpio1_lval = 1'b0, gpio1_fval = 1'b0, gpio1_mclk;
  logic ccd_cfg_rst_n;
  logic [15:0] ccd_cfg_exposure;
  logic sys_rst_n;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [7:0] avs_address = '0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  rgb_t mir_in_rgb, mir_out_rgb;
  logic mir_in_valid, mir_rst_n, mir_out_valid;
  logic fb_load, fb_wr, fb_rd_clk, fb_rd;
  logic [15:0] fb_wr1_data, fb_wr2_data, fb_rd1_data, fb_rd2_data;
  pix_t vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_sync_n, vga_blank_n, vga_clk;

  if (FULL) begin : g_dut
    cardcounter_top dut (.*);
  end else begin : g_dut
    cardcounter_top #(
      .LINE_PIXELS(L), .POR_W(POR_W),
      .RST_DELAY_0(RD0), .RST_DELAY_1(RD1), .RST_DELAY_2(RD2),
      .H_ACTIVE(HA), .V_ACTIVE(VA)
    ) dut (.*);
  end

  always #10 clock_50 = ~clock_50;
  assign gpio1_pixclk = gpio1_mclk;

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // -------------------------------------------------- mechanism counters
  int n_frame_latch = 0, n_line_wrap = 0, n_match = 0, n_avs_write = 0, n_avs_read = 0;
  int n_unmapped = 0, n_stopped = 0, n_fb_write = 0, n_vga_req = 0, n_vga_pix = 0;
  int n_hsync = 0, n_vsync = 0, n_reset_order = 0, n_display = 0;

  always @(posedge gpio1_pixclk) begin
    if (mir_rst_n && g_dut.dut.new_frame) n_frame_latch++;
    if (mir_rst_n && g_dut.dut.cap_dval && g_dut.dut.cap_x == 11'(L - 1)) n_line_wrap++;
  end

  // ------------------------------------------------ mirror + frame buffer
  typedef struct { logic [15:0] w1; logic [15:0] w2; rgb_t rgb; } fb_entry_t;
  fb_entry_t fb_q[$];
  rgb_t vga_exp = '0;
  logic hs_d = 1'b1, vs_d = 1'b1;

  always @(posedge gpio1_pixclk) begin
    mir_out_rgb   <= mir_in_rgb;
    mir_out_valid <= mir_in_valid;
    if (fb_wr) begin
      fb_q.push_back('{w1: fb_wr1_data, w2: fb_wr2_data, rgb: mir_out_rgb});
      n_fb_write++;
    end
  end

  always @(posedge fb_rd_clk) begin
    if (fb_rd) begin
      fb_entry_t e;
      n_vga_req++;
      if (fb_q.size() > 0) begin
        e = fb_q.pop_front();
        fb_rd1_data <= e.w1;
        fb_rd2_data <= e.w2;
        vga_exp     <= e.rgb;
      end else begin
        fb_rd1_data <= '0;
        fb_rd2_data <= '0;
        vga_exp     <= '0;
      end
    end
  end

  always @(negedge fb_rd_clk) if (mir_rst_n) begin
    if (vga_blank_n) begin
      n_vga_pix++;
      check("vga red",   vga_r, vga_exp.r);
      check("vga green", vga_g, vga_exp.g);
      check("vga blue",  vga_b, vga_exp.b);
    end else begin
      check("vga black outside picture", {vga_r, vga_g, vga_b}, 0);
    end
    if (hs_d && !vga_hs) n_hsync++;
    if (vs_d && !vga_vs) n_vsync++;
    hs_d = vga_hs; vs_d = vga_vs;
  end

  // ---------------------------------------------------- Avalon master
  task automatic bus_write(logic [7:0] a, logic [31:0] d);
    @(negedge clock_50);
    avs_chipselect = 1; avs_write = 1; avs_address = a; avs_writedata = d;
    @(negedge clock_50);
    avs_chipselect = 0; avs_write = 0;
    n_avs_write++;
  endtask

  task automatic bus_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clock_50);
    avs_chipselect = 1; avs_read = 1; avs_address = a;
    @(negedge clock_50);
    avs_chipselect = 0; avs_read = 0;
    d = avs_readdata;
    n_avs_read++;
  endtask

  function automatic logic [31:0] pack(int r, int g, int b);
    return {2'b00, 10'(r), 10'(g), 10'(b)};
  endfunction

  // ---------------------------------------------------- reference model
  typedef pix_t frame_t [H][L];
  frame_t acc[$];              // frames accepted by the capture, in order
  int box_lo [8][3];
  int box_hi [8][3];

  // colour site of (x,y): 0 red, 1 green, 2 blue
  function automatic int site(int x, int y);
    if (y % 2 == 0) return (x % 2 == 0) ? 1 : 0;
    else            return (x % 2 == 0) ? 2 : 1;
  endfunction

  function automatic pix_t sample(int a, int x, int y);
    if (y < 0) return acc[a - 1][H + y][x];
    return acc[a][y][x];
  endfunction

  // Expected RGB of pixel (x,y) of accepted frame a (a >= 1).
  function automatic void demosaic(int a, int x, int y, output int rgb[3]);
    int xs[4], ys[4], g2 = 0;
    int lx, ly;
    lx = (x == 0) ? L - 1 : x - 1;
    ly = (x == 0) ? y - 1 : y;
    xs = '{x, lx, x, lx};
    ys = '{y, ly, y - 1, ly - 1};
    for (int k = 0; k < 4; k++) begin
      int c;
      c = site((k % 2 == 1) ? x + 1 : x, (k < 2) ? y : y + 1);
      if (c == 1) g2 += int'(sample(a, xs[k], ys[k]));
      else rgb[c] = int'(sample(a, xs[k], ys[k]));
    end
    rgb[1] = g2 / 2;
  endfunction

  function automatic int expected_count(int a, int cls);
    int n = 0;
    int rgb[3];
    bit in;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < L; x++) begin
        demosaic(a, x, y, rgb);
        in = 1;
        for (int c = 0; c < 3; c++)
          if (rgb[c] < box_lo[cls][c] || rgb[c] > box_hi[cls][c]) in = 0;
        if (in) n++;
      end
    return 2 * n;
  endfunction

  // ------------------------------------------------------------ camera
  int palette [4][3] = '{'{850, 150, 150}, '{100, 100, 100}, '{900, 900, 900}, '{850, 850, 100}};

  function automatic pix_t noisy(int v);
    int n = v + $urandom_range(0, 80) - 40;
    if (n < 0) n = 0;
    if (n > 1023) n = 1023;
    return pix_t'(n);
  endfunction

  task automatic send_frame(ref frame_t img);
    @(negedge gpio1_pixclk);
    gpio1_fval = 1'b1;
    repeat (3) @(negedge gpio1_pixclk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < L; x++) begin
        pix_t v = img[y][x];
        gpio1_lval = 1'b1;
        // connector mapping: sensor bits 2..5 arrive on pins 5, 3, 2, 4
        gpio1_data = {v[9:6], v[2], v[5], v[3], v[4], v[1:0]};
        @(negedge gpio1_pixclk);
      end
      gpio1_lval = 1'b0;
      repeat (6) @(negedge gpio1_pixclk);
    end
    gpio1_fval = 1'b0;
    repeat (12) @(negedge gpio1_pixclk);
  endtask

  // ---------------------------------------------------- seven-segment ref
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
  function automatic logic [6:0] seg_pattern(int d);
    logic [6:0] p;
    p = '1;
    for (int i = 0; i < lit[d].len(); i++) p[lit[d][i] - "a"] = 1'b0;
    return p;
  endfunction

  // ------------------------------------------------------------- main
  initial begin
    logic [31:0] d;
    frame_t img;
    int accepted = 0;
    sw = 18'h2_5A3C;

    // staged reset order: processor side, frame buffer, capture, VGA
    wait (sys_rst_n);
    check("frame buffer still loading when processor starts", fb_load, 1);
    wait (!fb_load);
    check("capture held after frame-buffer start", mir_rst_n, 0);
    wait (mir_rst_n);
    n_reset_order++;
    check("pins follow switches", ledr, sw);
    check("exposure from switches", ccd_cfg_exposure, sw[15:0]);

    // program the boxes
    box_lo[0] = '{0, 0, 0};       box_hi[0] = '{1023, 1023, 1023};
    box_lo[1] = '{700, 0, 0};     box_hi[1] = '{1023, 300, 300};
    box_lo[2] = '{0, 0, 0};       box_hi[2] = '{300, 300, 300};
    box_lo[3] = '{700, 700, 700}; box_hi[3] = '{1023, 1023, 1023};
    for (int i = 4; i < 8; i++)
      for (int c = 0; c < 3; c++) begin
        box_lo[i][c] = $urandom_range(0, 600);
        box_hi[i][c] = box_lo[i][c] + 423;
      end
    for (int i = 0; i < 8; i++) begin
      bus_write(8'(2 * i),     pack(box_lo[i][0], box_lo[i][1], box_lo[i][2]));
      bus_write(8'(2 * i + 1), pack(box_hi[i][0], box_hi[i][1], box_hi[i][2]));
    end
    bus_read(8'd8, d);
    check("unmapped read", d, 32'hAAAA_AAAA);
    if (d == 32'hAAAA_AAAA) n_unmapped++;

    for (int f = 0; f < N_FRAMES; f++) begin
      for (int y = 0; y < H; y += 2)
        for (int x = 0; x < L; x += 2) begin
          int p;
          p = $urandom_range(0, 3);
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              img[y + dy][x + dx] = noisy(palette[p][site(x + dx, y + dy)]);
        end
      if (f == SKIP) begin
        key[2] = 1'b0;              // capture stopped for this frame
        send_frame(img);
        key[2] = 1'b1;
        check("frame ignored while stopped", n_frame_latch, accepted);
        n_stopped++;
        continue;
      end
      acc.push_back(img);
      accepted++;
      fork
        send_frame(img);
        begin
          // the frame start latches the previous accepted frame's totals
          wait (n_frame_latch == accepted);
          repeat (20) @(negedge clock_50);
          if (accepted >= 2) begin
            for (int i = 0; i < 8; i++) begin
              bus_read(8'(i), d);
              if (accepted - 2 > 0 || i == 0)
                check($sformatf("frame %0d box %0d", accepted - 2, i), d,
                      expected_count(accepted - 2, i));
              if (i > 0 && d != 0) n_match++;
            end
            // frame 0 has no defined rows above; only the all-enclosing box is exact
          end
        end
      join
    end

    // let the VGA side run at least one whole frame, then check the display
    wait (n_vsync >= 1);
    check("display digit 0", hex[0], seg_pattern(accepted % 16));
    check("display digit 1", hex[1], seg_pattern(accepted / 16 % 16));
    if (hex[0] == seg_pattern(accepted % 16)) n_display++;

    begin
      string names [14] = '{"staged reset", "box match", "frame latch", "line wrap", "register write",
                             "register read", "unmapped read", "capture stop", "frame-buffer write",
                             "VGA request", "VGA pixel", "hsync", "vsync", "frame display"};
      int counts [14];
      counts = '{n_reset_order, n_match, n_frame_latch, n_line_wrap, n_avs_write, n_avs_read,
                 n_unmapped, n_stopped, n_fb_write, n_vga_req, n_vga_pix, n_hsync, n_vsync, n_display};
      for (int i = 0; i < 14; i++) begin
        $display("mechanism %-20s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
