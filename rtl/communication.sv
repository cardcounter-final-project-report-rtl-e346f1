// communication: Avalon-MM slave that connects the processor to the counters.
//
// Reads (32 bit) at word address n = 0..N-1 return count[n], the last complete
// frame's total of histogram n; any other address returns 32'hAAAA_AAAA.
// Writes at word address 2n set the lower corner (min) of colour class n and at
// 2n+1 its upper corner (max); other addresses are ignored. Both require
// chipselect; a read takes priority over a simultaneous write.
//
// Timing: readdata is registered, so it is valid on the cycle after the read
// (fixed read latency 1, no waitrequest). Writes take effect at the clock edge.
//
// The address map, the read-back pattern and the registered read follow the
// original. Clearing the threshold registers and readdata on reset_n is this
// design's choice (the original ignored its reset input).
module communication
  import cardcounter_pkg::*;
#(
  parameter int unsigned N      = N_HISTO,
  parameter int unsigned ADDR_W = 8
) (
  input  logic                    clk,
  input  logic                    reset_n,
  input  logic                    read,
  input  logic                    write,
  input  logic                    chipselect,
  input  logic [ADDR_W-1:0]       address,
  output logic [WORD_W-1:0]       readdata,
  input  logic [WORD_W-1:0]       writedata,
  input  logic [N-1:0][WORD_W-1:0] count,
  output rgb_word_t [N-1:0]       min_w,
  output rgb_word_t [N-1:0]       max_w
);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      readdata <= '0;
      min_w    <= '0;
      max_w    <= '0;
    end else if (chipselect) begin
      if (read) begin
        if (address < ADDR_W'(N))
          readdata <= count[address];
        else
          readdata <= UNMAPPED_READ;
      end else if (write) begin
        for (int unsigned i = 0; i < N; i++) begin
          if (address == ADDR_W'(2*i))   min_w[i] <= writedata;
          if (address == ADDR_W'(2*i+1)) max_w[i] <= writedata;
        end
      end
    end
  end

endmodule
