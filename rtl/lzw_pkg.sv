// Shared constants and types of the LZW decompressor.
//
// The code alphabet is the one used for 8-bit grayscale images: codes
// 0..255 are literal characters, 256 is ClearCode, 257 is EndOfInformation
// and dictionary entries are built from 258 up to 4095 (12-bit codes). Only
// entries 258..4095 are stored, so each dictionary table has 4096-258 = 3838
// words and code c lives at physical address c-258. The output buffer holds
// two maximal strings (2*3838 characters, 13-bit address) and table t
// holds 1280 {length, address} pairs; these sizes follow the original
// design. The helper functions keep the circular output-buffer arithmetic
// in one place.
package lzw_pkg;

  localparam int unsigned CODE_W      = 12;    // fixed code width
  localparam int unsigned CHAR_W      = 8;     // 8-bit pixels
  localparam int unsigned CLEAR_CODE  = 256;
  localparam int unsigned EOI_CODE    = 257;
  localparam int unsigned FIRST_CODE  = 258;   // first dictionary entry
  localparam int unsigned DICT_SIZE   = 4096;
  localparam int unsigned TABLE_DEPTH = DICT_SIZE - FIRST_CODE;  // 3838
  localparam int unsigned TABLE_AW    = 12;
  localparam int unsigned OBUF_DEPTH  = 2 * TABLE_DEPTH;         // 7676
  localparam int unsigned OBUF_AW     = 13;
  localparam int unsigned LEN_W       = 12;    // string length field of t
  localparam int unsigned T_DEPTH     = 1280;

  typedef logic [CODE_W-1:0]  code_t;
  typedef logic [CHAR_W-1:0]  char_t;
  typedef logic [OBUF_AW-1:0] obuf_addr_t;
  typedef logic [LEN_W-1:0]   len_t;

  // One word of table t: the length of a decoded string and the output
  // buffer address of its first character (the last one written).
  typedef struct packed {
    len_t       len;
    obuf_addr_t addr;
  } t_entry_t;

  localparam int unsigned T_W = $bits(t_entry_t);  // 25

  // Next / previous address in a circular buffer of 'depth' words.
  function automatic obuf_addr_t obuf_inc(obuf_addr_t a, int unsigned depth);
    return (32'(a) == depth - 1) ? '0 : obuf_addr_t'(a + 1'b1);
  endfunction

  function automatic obuf_addr_t obuf_dec(obuf_addr_t a, int unsigned depth);
    return (a == '0) ? obuf_addr_t'(depth - 1) : obuf_addr_t'(a - 1'b1);
  endfunction

endpackage
