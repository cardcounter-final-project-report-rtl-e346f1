// vga_controller: VGA timing generator and pixel output stage.
//
// Horizontal and vertical counters run over the whole line/frame: the visible
// area comes first (counter values 0..ACTIVE-1), then front porch, sync pulse
// and back porch. During the visible area `request` asks the frame buffer for
// the next pixel; the buffer answers on the following clock, so all VGA
// outputs (sync, blank, colour) are registered one clock after the counters to
// line up with the returned pixel. Colour outputs are forced to zero outside
// the visible area. Syncs are active low, blank_n is low outside the visible
// area, vga_sync_n (composite sync on the DAC) is held low because separate
// syncs are used, and vga_clk is the inverted pixel clock so the DAC samples
// in the middle of each pixel.
//
// Default timing is the standard 640x480 at 60 Hz mode for a 25 MHz pixel clock
// (800 clocks per line, 525 lines per frame). The original only says that this
// block turns camera data into a VGA signal for a monitor; the mode, polarities
// and one-clock request latency are this design's choices.
module vga_controller
  import cardcounter_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t red,
  input  pix_t green,
  input  pix_t blue,
  output logic request,
  output pix_t vga_r,
  output pix_t vga_g,
  output pix_t vga_b,
  output logic vga_hs,
  output logic vga_vs,
  output logic vga_sync_n,
  output logic vga_blank_n,
  output logic vga_clk
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned H_W     = $clog2(H_TOTAL);
  localparam int unsigned V_W     = $clog2(V_TOTAL);

  logic [H_W-1:0] h;
  logic [V_W-1:0] v;
  logic           h_sync_on, v_sync_on;

  assign request   = (h < H_W'(H_ACTIVE)) && (v < V_W'(V_ACTIVE));
  assign h_sync_on = (h >= H_W'(H_ACTIVE + H_FP)) && (h < H_W'(H_ACTIVE + H_FP + H_SYNC));
  assign v_sync_on = (v >= V_W'(V_ACTIVE + V_FP)) && (v < V_W'(V_ACTIVE + V_FP + V_SYNC));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0;
      v <= '0;
    end else if (h == H_W'(H_TOTAL - 1)) begin
      h <= '0;
      v <= (v == V_W'(V_TOTAL - 1)) ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else begin
      vga_hs      <= !h_sync_on;
      vga_vs      <= !v_sync_on;
      vga_blank_n <= request;
    end
  end

  assign vga_r      = vga_blank_n ? red   : '0;
  assign vga_g      = vga_blank_n ? green : '0;
  assign vga_b      = vga_blank_n ? blue  : '0;
  assign vga_sync_n = 1'b0;
  assign vga_clk    = ~clk;

endmodule
