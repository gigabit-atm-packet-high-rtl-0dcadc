// pm_pkg: constants and types shared by the pipelined shared-buffer memory.
//
// The memory is an N x N array of small SRAM banks. Each bank stores 64 words
// of 65 bits (64 bits of ATM cell data plus one bit of the next-cell address),
// i.e. 4160 bits, selected by one of 64 word lines. The row address that picks
// the word line is 7 bits wide; its top bit is reserved and ignored because a
// bank only has 64 word lines. These sizes are those of the published 4 x 4
// prototype. The R/W encoding (high = read) follows the prototype's output
// buffer, which drives the bus when R/W is high.
package pm_pkg;

  localparam int unsigned DATA_W = 65;              // bits per word line
  localparam int unsigned WORDS  = 64;              // word lines per bank
  localparam int unsigned WL_AW  = $clog2(WORDS);   // used row-address bits
  localparam int unsigned RA_W   = 7;               // row address width (MSB reserved)
  localparam int unsigned PA_W   = 2;               // port address width
  localparam int unsigned LOW_W  = 3;               // ADDR bits below the bank indices

  typedef enum logic {
    RW_WRITE = 1'b0,
    RW_READ  = 1'b1
  } rw_e;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [WORDS-1:0]  wl_t;
  typedef logic [RA_W-1:0]   ra_t;
  typedef logic [PA_W-1:0]   pa_t;

  // Binary index of a one-hot word-line vector (OR of the set bit positions).
  function automatic logic [WL_AW-1:0] wl_index(wl_t wl);
    logic [WL_AW-1:0] idx;
    idx = '0;
    for (int k = 0; k < WORDS; k++) begin
      if (wl[k]) idx |= WL_AW'(k);
    end
    return idx;
  endfunction

endpackage
