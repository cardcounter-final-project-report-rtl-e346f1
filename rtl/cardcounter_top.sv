// cardcounter_top: camera-to-histogram front end of a playing-card recogniser.
//
// A CCD camera streams raw Bayer samples into the FPGA. The stream is framed
// (ccd_capture), demosaiced to RGB (raw2rgb) and fed to eight colour-class
// counters (histo). Each counter counts the pixels of a frame that fall inside
// a box in RGB space programmed by software, and holds the total of the last
// complete frame. A processor reads the eight totals and writes the sixteen
// box corners through an Avalon-MM register block (communication); card
// identity is decided in software from, e.g., the number of red and of black
// pixels. In parallel the RGB stream goes through an external frame buffer to a
// VGA monitor, and the frame counter is shown on eight seven-segment digits.
//
// Clocks: clock_50 (50 MHz) runs the counters, the register block, the reset
// logic and a divide-by-two that makes the 25 MHz camera master clock, which
// also clocks the VGA side. The camera returns its own pixel clock
// (gpio1_pixclk), which clocks capture and demosaic. As in the original, the
// counters sample the pixel-clock-domain valid and new-frame strobes directly
// on clock_50, so each pixel is counted once per 50 MHz cycle its valid lasts
// (twice at a 25 MHz pixel clock); software only compares counts, so this
// constant factor does not matter.
//
// Resets: a 16-bit power-on counter holds sys_rst_n low for 65535 cycles
// (processor and register block). key[0] (low = pressed) restarts the staged
// reset_delay: stage 0 loads the frame-buffer FIFOs, stage 1 releases capture
// and demosaic, stage 2 the VGA output.
//
// Parts that are not in this RTL connect through ports: the processor (Avalon
// master, avs_*), the frame buffer with its SDRAM controller (fb_*), a
// column-mirroring stage between demosaic and frame buffer (mir_*), and the
// camera's I2C configuration unit (ccd_cfg_*; exposure from sw[15:0], reset
// from key[1]). key[2] held down stops capture at the next frame.
//
// The pin mapping of the camera connector, the frame-buffer word packing, the
// LED assignments and all connections follow the original top level.
module cardcounter_top
  import cardcounter_pkg::*;
#(
  parameter int unsigned LINE_PIXELS = 1280,
  parameter int unsigned POR_W       = 16,
  parameter int unsigned RST_DELAY_0 = 32'h0F_FFFF,
  parameter int unsigned RST_DELAY_1 = 32'h1F_FFFF,
  parameter int unsigned RST_DELAY_2 = 32'h2F_FFFF,
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned V_ACTIVE    = 480
) (
  input  logic                   clock_50,
  input  logic [3:0]             key,
  input  logic [17:0]            sw,
  output logic [17:0]            ledr,
  output logic [8:0]             ledg,
  output logic [7:0][6:0]        hex,

  // camera connector
  input  logic [9:0]             gpio1_data,
  input  logic                   gpio1_pixclk,
  input  logic                   gpio1_lval,
  input  logic                   gpio1_fval,
  output logic                   gpio1_mclk,

  // camera I2C configuration unit
  output logic                   ccd_cfg_rst_n,
  output logic [15:0]            ccd_cfg_exposure,

  // processor side: reset and Avalon-MM slave port
  output logic                   sys_rst_n,
  input  logic                   avs_chipselect,
  input  logic                   avs_read,
  input  logic                   avs_write,
  input  logic [7:0]             avs_address,
  input  logic [WORD_W-1:0]      avs_writedata,
  output logic [WORD_W-1:0]      avs_readdata,

  // column-mirror stage (pixel-clock domain)
  output rgb_t                   mir_in_rgb,
  output logic                   mir_in_valid,
  output logic                   mir_rst_n,
  input  rgb_t                   mir_out_rgb,
  input  logic                   mir_out_valid,

  // frame buffer: two 16-bit write ports (pixel clock), two read ports (fb_rd_clk)
  output logic                   fb_load,
  output logic                   fb_wr,
  output logic [15:0]            fb_wr1_data,
  output logic [15:0]            fb_wr2_data,
  output logic                   fb_rd_clk,
  output logic                   fb_rd,
  input  logic [15:0]            fb_rd1_data,
  input  logic [15:0]            fb_rd2_data,

  // VGA DAC
  output pix_t                   vga_r,
  output pix_t                   vga_g,
  output pix_t                   vga_b,
  output logic                   vga_hs,
  output logic                   vga_vs,
  output logic                   vga_sync_n,
  output logic                   vga_blank_n,
  output logic                   vga_clk
);

  localparam int unsigned XY_W = 11;

  // ---------------------------------------------------------------- resets
  logic [POR_W-1:0] por_cnt = '0;
  logic             por_done = 1'b0;

  always_ff @(posedge clock_50) begin
    if (por_cnt == '1) begin
      por_done <= 1'b1;
    end else begin
      por_done <= 1'b0;
      por_cnt  <= por_cnt + 1'b1;
    end
  end
  assign sys_rst_n = por_done;

  logic [2:0] dly_rst_n;
  reset_delay #(
    .DELAY_0 (RST_DELAY_0),
    .DELAY_1 (RST_DELAY_1),
    .DELAY_2 (RST_DELAY_2)
  ) u_reset_delay (
    .clk       (clock_50),
    .rst_n     (key[0]),
    .rst_out_n (dly_rst_n)
  );

  // ---------------------------------------------------------------- clocks
  logic mclk = 1'b0;
  always_ff @(posedge clock_50) mclk <= ~mclk;
  assign gpio1_mclk = mclk;

  // ------------------------------------------------------- camera input
  pix_t ccd_data;
  assign ccd_data = {gpio1_data[9:6], gpio1_data[4], gpio1_data[2],
                     gpio1_data[3], gpio1_data[5], gpio1_data[1:0]};

  pix_t ccd_data_q;
  logic ccd_lval_q, ccd_fval_q;
  always_ff @(posedge gpio1_pixclk) begin
    ccd_data_q <= ccd_data;
    ccd_lval_q <= gpio1_lval;
    ccd_fval_q <= gpio1_fval;
  end

  pix_t              cap_data;
  logic              cap_dval;
  logic [XY_W-1:0]   cap_x, cap_y;
  logic [WORD_W-1:0] frame_cnt;
  logic              new_frame;

  ccd_capture #(.LINE_PIXELS(LINE_PIXELS), .XY_W(XY_W)) u_capture (
    .clk       (gpio1_pixclk),
    .rst_n     (dly_rst_n[1]),
    .data_in   (ccd_data_q),
    .fval      (ccd_fval_q),
    .lval      (ccd_lval_q),
    .start     (1'b1),
    .stop      (!key[2]),
    .data      (cap_data),
    .dval      (cap_dval),
    .x         (cap_x),
    .y         (cap_y),
    .frame_cnt (frame_cnt),
    .new_frame (new_frame)
  );

  rgb_t pix_rgb;
  logic pix_valid;

  raw2rgb #(.LINE_PIXELS(LINE_PIXELS), .XY_W(XY_W)) u_raw2rgb (
    .clk       (gpio1_pixclk),
    .rst_n     (dly_rst_n[1]),
    .data      (cap_data),
    .dval      (cap_dval),
    .x         (cap_x),
    .y         (cap_y),
    .rgb       (pix_rgb),
    .rgb_valid (pix_valid)
  );

  // ----------------------------------------------- histograms + registers
  logic [N_HISTO-1:0][WORD_W-1:0] counts;
  rgb_word_t [N_HISTO-1:0]        box_min, box_max;

  for (genvar i = 0; i < N_HISTO; i++) begin : g_histo
    histo u_histo (
      .clk       (clock_50),
      .rst_n     (sys_rst_n),
      .r         (pix_rgb.r),
      .g         (pix_rgb.g),
      .b         (pix_rgb.b),
      .new_pixel (pix_valid),
      .new_frame (new_frame),
      .min_w     (box_min[i]),
      .max_w     (box_max[i]),
      .count     (counts[i])
    );
  end

  communication #(.N(N_HISTO), .ADDR_W(8)) u_comm (
    .clk        (clock_50),
    .reset_n    (sys_rst_n),
    .read       (avs_read),
    .write      (avs_write),
    .chipselect (avs_chipselect),
    .address    (avs_address),
    .readdata   (avs_readdata),
    .writedata  (avs_writedata),
    .count      (counts),
    .min_w      (box_min),
    .max_w      (box_max)
  );

  // ------------------------------------------ display path (frame buffer)
  assign mir_in_rgb   = pix_rgb;
  assign mir_in_valid = pix_valid;
  assign mir_rst_n    = dly_rst_n[1];

  // Each 30-bit pixel is split over two 16-bit frame-buffer words:
  // word 1 = {0, G[9:5], B}, word 2 = {0, G[4:0], R}.
  assign fb_load     = !dly_rst_n[0];
  assign fb_wr       = mir_out_valid;
  assign fb_wr1_data = {1'b0, mir_out_rgb.g[9:5], mir_out_rgb.b};
  assign fb_wr2_data = {1'b0, mir_out_rgb.g[4:0], mir_out_rgb.r};
  assign fb_rd_clk   = mclk;

  vga_controller #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_vga (
    .clk         (mclk),
    .rst_n       (dly_rst_n[2]),
    .red         (fb_rd2_data[9:0]),
    .green       ({fb_rd1_data[14:10], fb_rd2_data[14:10]}),
    .blue        (fb_rd1_data[9:0]),
    .request     (fb_rd),
    .vga_r       (vga_r),
    .vga_g       (vga_g),
    .vga_b       (vga_b),
    .vga_hs      (vga_hs),
    .vga_vs      (vga_vs),
    .vga_sync_n  (vga_sync_n),
    .vga_blank_n (vga_blank_n),
    .vga_clk     (vga_clk)
  );

  // ------------------------------------------------- board indicators
  seg7_lut_8 u_seg7 (
    .value (frame_cnt),
    .seg   (hex)
  );

  assign ledr             = sw;
  assign ledg             = cap_y[8:0];
  assign ccd_cfg_rst_n    = key[1];
  assign ccd_cfg_exposure = sw[15:0];

endmodule
