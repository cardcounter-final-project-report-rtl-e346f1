// tb_vga_controller: self-checking test of the VGA timing generator.
//
// Runs a reduced mode (8x4 visible, short porches) for three frames. A
// frame-buffer model answers each request on the next clock with a pixel
// derived from the position the tb expects; between requests it drives junk.
// The tb keeps its own line/column count and checks every cycle: request only
// in the visible area, sync pulses at the right counter values one clock later,
// blank_n, colour equal to the answered pixel when visible and zero otherwise,
// and the number of requests, hsync and vsync pulses per frame.
module tb_vga_controller;
  import cardcounter_pkg::*;

  localparam int HA = 8, HF = 2, HS = 3, HB = 2;
  localparam int VA = 4, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB;
  localparam int VT = VA + VF + VS + VB;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  pix_t red, green, blue;
  logic request;
  pix_t vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_sync_n, vga_blank_n, vga_clk;

  int checks = 0, failures = 0;
  int edges = 0, requests = 0, hs_falls = 0, vs_falls = 0;
  logic hs_d = 1'b1, vs_d = 1'b1;

  vga_controller #(
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)
  ) dut (.*);

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
      $display("FAIL %s at edge %0d: got %0d expected %0d", what, edges, got, exp);
    end
  endtask

  function automatic pix_t pix_of(int pos, int salt);
    return pix_t'((pos % HT) * 37 + (pos / HT % VT) * 101 + salt);
  endfunction

  // frame-buffer model
  always @(posedge clk) begin
    if (rst_n) edges <= edges + 1;
    if (request) begin
      red <= pix_of(edges, 0); green <= pix_of(edges, 5); blue <= pix_of(edges, 9);
    end else begin
      red <= pix_t'($urandom); green <= pix_t'($urandom); blue <= pix_t'($urandom);
    end
  end

  always @(negedge clk) if (rst_n && edges > 0) begin
    int h, v, ph, pv;
    bit vis;
    h  = edges % HT;        v  = edges / HT % VT;
    ph = (edges - 1) % HT;  pv = (edges - 1) / HT % VT;
    vis = (ph < HA) && (pv < VA);
    check("request", request, (h < HA) && (v < VA));
    check("hsync", vga_hs, !(ph >= HA + HF && ph < HA + HF + HS));
    check("vsync", vga_vs, !(pv >= VA + VF && pv < VA + VF + VS));
    check("blank_n", vga_blank_n, vis);
    check("red",   vga_r, vis ? pix_of(edges - 1, 0) : 0);
    check("green", vga_g, vis ? pix_of(edges - 1, 5) : 0);
    check("blue",  vga_b, vis ? pix_of(edges - 1, 9) : 0);
    check("vga_clk low in second half", vga_clk, 1);
    if (request) requests++;
    if (hs_d && !vga_hs) hs_falls++;
    if (vs_d && !vga_vs) vs_falls++;
    hs_d = vga_hs; vs_d = vga_vs;
  end

  initial begin
    repeat (3) @(negedge clk);
    check("syncs idle in reset", vga_hs & vga_vs, 1);
    check("blank in reset", vga_blank_n, 0);
    rst_n = 1'b1;
    repeat (3 * HT * VT) @(posedge clk);
    @(negedge clk);
    #1;
    check("requests in 3 frames", requests, 3 * HA * VA);
    check("hsync pulses in 3 frames", hs_falls, 3 * VT);
    check("vsync pulses in 3 frames", vs_falls, 3);
    check("composite sync unused", vga_sync_n, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
