// lzw_pkg: types and constants shared by the LZW code-decompression engine.
//
// A phrase is a string of 1..8 code bytes held in one coding-table entry.
// Byte i of a phrase (i = 0 is the first byte in program order) sits in
// data[8*i +: 8]; len gives the number of valid bytes. The 8-byte phrase
// width follows the 8-byte decoding-table width chosen for the design; the
// 12-bit maximum codeword and the 256 single-byte initial entries also
// follow it. The 3-bit method encoding and the token format passed from the
// dispatching logic to the core are this implementation's own choices.
package lzw_pkg;

  localparam int unsigned PHRASE_BYTES = 8;   // decoding bandwidth, bytes per iteration
  localparam int unsigned LEN_W        = 4;   // holds 0..PHRASE_BYTES
  localparam int unsigned CW_MIN       = 9;   // shortest codeword
  localparam int unsigned CW_MAX       = 12;  // longest codeword
  localparam int unsigned N_LITERALS   = 256; // initial entries: one per byte value
  localparam int unsigned HDR_BITS     = 3;   // per-block method field
  localparam int unsigned RAW_BYTES    = 4;   // bypass granularity: one instruction

  typedef logic [CW_MAX-1:0] code_t;

  typedef struct packed {
    logic [LEN_W-1:0]          len;
    logic [8*PHRASE_BYTES-1:0] data;
  } phrase_t;

  // Per-block method field, read from the 3 bits that open every block.
  typedef enum logic [HDR_BITS-1:0] {
    M_LZW9  = 3'd0,
    M_LZW10 = 3'd1,
    M_LZW11 = 3'd2,
    M_LZW12 = 3'd3,
    M_RAW32 = 3'd4,   // uncompressed block of 32 bytes
    M_RAW64 = 3'd5,   // uncompressed block of 64 bytes
    M_RAW96 = 3'd6,   // uncompressed block of 96 bytes
    M_BAD   = 3'd7    // unused encoding
  } method_e;

  // Work items handed from the dispatching logic to the decompression core.
  typedef enum logic [1:0] {
    TK_RESET = 2'd0,  // start of an LZW block: clear the table, set its size
    TK_CODE  = 2'd1,  // one codeword, zero-padded to CW_MAX bits
    TK_RAW   = 2'd2   // RAW_BYTES uncompressed bytes to pass through
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e             kind;
    logic [1:0]            wsel;  // TK_RESET: table size, codeword width CW_MIN + wsel
    code_t                 code;  // TK_CODE
    logic [8*RAW_BYTES-1:0] raw;  // TK_RAW: byte 0 in raw[7:0]
  } token_t;

  // Codeword width for the k-th codeword of a block (k counts from 0).
  // Dynamic LZW starts at 9 bits and widens once the codes that can occur
  // no longer fit: 9 bits for k < 256, 10 for k < 768, 11 for k < 1792.
  // Fixed-width blocks use the block's own width throughout.
  function automatic logic [3:0] cw_width(input logic [1:0] wsel, input logic dyn,
                                          input logic [11:0] k);
    logic [3:0] wmax, wdyn;
    wmax = 4'(CW_MIN) + 4'(wsel);
    if (!dyn) return wmax;
    // each codeword adds at most one entry: after k codewords the largest
    // possible code is below 256 + k, hence the boundaries 256, 768, 1792
    if (k < 12'(N_LITERALS))        wdyn = 4'd9;
    else if (k < 12'(3*N_LITERALS)) wdyn = 4'd10;
    else if (k < 12'(7*N_LITERALS)) wdyn = 4'd11;
    else                   wdyn = 4'd12;
    return (wdyn < wmax) ? wdyn : wmax;
  endfunction

endpackage
