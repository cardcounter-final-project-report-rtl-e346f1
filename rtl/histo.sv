// histo: one colour-class pixel counter ("histogram bin").
//
// Every clock cycle in which new_pixel is high, the pixel (R,G,B) is tested
// against a box in colour space: min.r <= R <= max.r, and likewise for G and B.
// A pixel inside the box increments a 32-bit running counter. While new_frame
// is high the running count is copied into the output register `count`, so
// software always reads the total of the last complete frame. On the first
// cycle after new_frame falls the running counter restarts (at 1 if that
// cycle's pixel matches, at 0 otherwise).
//
// Interface: min_w/max_w use the {2'b0, R, G, B} packing of cardcounter_pkg.
// Timing: count changes one cycle after each new_frame cycle; the running
// counter has no latency beyond one register.
//
// The window compare, the latch-on-new-frame and the clear-after-new-frame
// behaviour follow the original design. The original's counter is sampled on
// the 50 MHz system clock while new_pixel comes from the pixel-clock domain, so
// a pixel whose valid spans k system cycles is counted k times; this module
// counts per cycle exactly as the original and leaves that to the integrator.
// Resetting both registers is an addition of this design.
module histo
  import cardcounter_pkg::*;
#(
  parameter int unsigned CNT_W = WORD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pix_t             r,
  input  pix_t             g,
  input  pix_t             b,
  input  logic             new_pixel,
  input  logic             new_frame,
  input  rgb_word_t        min_w,
  input  rgb_word_t        max_w,
  output logic [CNT_W-1:0] count
);

  logic [CNT_W-1:0] running;
  logic             clear_pending;
  logic             match;

  always_comb begin
    match = (r >= min_w.r) && (r <= max_w.r) &&
            (g >= min_w.g) && (g <= max_w.g) &&
            (b >= min_w.b) && (b <= max_w.b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running       <= '0;
      count         <= '0;
      clear_pending <= 1'b0;
    end else begin
      if (new_frame) begin
        count         <= running;
        clear_pending <= 1'b1;
      end else if (clear_pending) begin
        clear_pending <= 1'b0;
      end

      if (!new_frame && clear_pending)
        running <= (new_pixel && match) ? CNT_W'(1) : '0;
      else if (new_pixel && match)
        running <= running + 1'b1;
    end
  end

endmodule
