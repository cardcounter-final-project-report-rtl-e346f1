// cardcounter_pkg: types and constants shared by the CardCounter pixel-counting
// system.
//
// A colour sample is 10 bits per channel. The processor programs a colour class
// as two 32-bit words, a lower and an upper corner of an RGB box, packed as
// {2'b00, R[9:0], G[9:0], B[9:0]}; the same packing is used for both words.
// Eight such classes are counted in parallel.
package cardcounter_pkg;

  localparam int unsigned PIX_W     = 10;  // bits per colour channel
  localparam int unsigned N_HISTO   = 8;   // histogram counters
  localparam int unsigned WORD_W    = 32;  // bus / counter width

  // Value returned by a register read at an unused address.
  localparam logic [WORD_W-1:0] UNMAPPED_READ = 32'hAAAA_AAAA;

  typedef logic [PIX_W-1:0] pix_t;

  // One threshold word as written by software: bits 29:20 red, 19:10 green,
  // 9:0 blue, 31:30 ignored.
  typedef struct packed {
    logic [1:0] unused;
    pix_t       r;
    pix_t       g;
    pix_t       b;
  } rgb_word_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

endpackage
