// lzw_dispatch: dispatching logic in front of the 12-bit decompression core.
//
// Walks the compressed stream block by block. Every branch block begins at
// a byte boundary with a 3-bit method field (lzw_pkg::method_e): LZW with a
// 9, 10, 11 or 12-bit table, or an uncompressed block of 32, 64 or 96 bytes.
//  * LZW block: a TK_RESET token tells the core to clear its table and how
//    large the table is; then each codeword is cut from the stream, padded
//    with zeros in front to 12 bits and sent as a TK_CODE token. The width is
//    the block's width, or with dynamic LZW (dyn_en) 9 bits for the first
//    256 codewords, 10 for the next 512, 11 for the next 1024, never more
//    than the block's width. An all-ones codeword of the current width is the
//    branch indicator: the block ends, the padding up to the next byte
//    boundary is dropped and the next block's method field is read.
//  * Uncompressed block: the instructions are bypassed 4 bytes at a time as
//    TK_RAW tokens, then the stream is re-aligned to a byte boundary.
// The method value 7 is not used; reading it raises `err` until `restart`.
//
// Interface: bit window from lzw_bit_buffer (peek/avail/bitpos, consume/
// consume_n); tokens to the core with a valid/ready handshake (a token is
// taken in the cycle tok_valid && tok_ready). `restart` returns to reading a
// method field (used when a branch redirects the stream). `hdr_pulse` marks
// each method field read, with its value on `hdr_method`.
// Timing: one token per cycle when bits and the core allow; an indicator,
// a method field of an uncompressed block and its padding cost a cycle each.
// Reset is synchronous.
//
// From the design: method bits before each block, 9-12 bit and dynamic
// codewords, zero-padding to 12 bits, all-ones indicator, byte-aligned
// restart, bypass of 32/64/96-byte uncompressed blocks by instruction.
// Own choices: the exact 3-bit encoding, the field order, the token format.
module lzw_dispatch
  import lzw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        dyn_en,
  // bit window
  input  logic [31:0] peek,
  input  logic [6:0]  avail,
  input  logic [2:0]  bitpos,
  output logic        consume,
  output logic [5:0]  consume_n,
  // tokens to the core
  output logic        tok_valid,
  output token_t      tok,
  input  logic        tok_ready,
  // status
  output logic        hdr_pulse,
  output method_e     hdr_method,
  output logic        err
);

  typedef enum logic [2:0] {D_HDR, D_LZW, D_RAW, D_PAD, D_ERR} dstate_e;

  dstate_e     state_q;
  logic [1:0]  wsel_q;
  logic [11:0] k_q;       // codewords read in this block (saturates)
  logic [4:0]  raw_q;     // 4-byte words left in an uncompressed block

  method_e     m_c;
  logic [3:0]  w_c;
  code_t       code_c;
  logic        ind_c;
  logic [2:0]  pad_c;

  always_comb begin
    m_c    = method_e'(peek[31:29]);
    w_c    = cw_width(wsel_q, dyn_en, k_q);
    code_c = code_t'(peek >> (6'd32 - 6'(w_c)));
    ind_c  = (code_c == code_t'((13'd1 << w_c) - 13'd1));
    pad_c  = (state_q == D_LZW) ? 3'(4'd8 - 4'((bitpos + 3'(w_c)) & 3'd7))
                                : 3'(4'd8 - 4'(bitpos));
  end

  always_comb begin
    consume   = 1'b0;
    consume_n = '0;
    tok_valid = 1'b0;
    tok       = '0;
    hdr_pulse = 1'b0;
    unique case (state_q)
      D_HDR: if (avail >= 7'(HDR_BITS)) begin
        if (m_c <= M_LZW12) begin
          tok_valid = 1'b1;
          tok.kind  = TK_RESET;
          tok.wsel  = m_c[1:0];
          consume   = tok_ready;
          hdr_pulse = tok_ready;
        end else begin
          consume   = 1'b1;
          hdr_pulse = 1'b1;
        end
        consume_n = 6'(HDR_BITS);
      end
      D_LZW: begin
        if (ind_c) begin
          if (avail >= 7'(w_c) + 7'(pad_c)) begin
            consume   = 1'b1;
            consume_n = 6'(w_c) + 6'(pad_c);
          end
        end else if (avail >= 7'(w_c)) begin
          tok_valid = 1'b1;
          tok.kind  = TK_CODE;
          tok.code  = code_c;
          consume   = tok_ready;
          consume_n = 6'(w_c);
        end
      end
      D_RAW: if (avail >= 7'd32) begin
        tok_valid = 1'b1;
        tok.kind  = TK_RAW;
        tok.raw   = {peek[7:0], peek[15:8], peek[23:16], peek[31:24]};
        consume   = tok_ready;
        consume_n = 6'd32;
      end
      D_PAD: if (avail >= 7'(pad_c)) begin
        consume   = 1'b1;
        consume_n = 6'(pad_c);
      end
      default: ;
    endcase
    if (restart) begin
      consume   = 1'b0;
      tok_valid = 1'b0;
      hdr_pulse = 1'b0;
    end
  end

  assign hdr_method = m_c;
  assign err        = (state_q == D_ERR);

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      state_q <= D_HDR;
      wsel_q  <= '0;
      k_q     <= '0;
      raw_q   <= '0;
    end else begin
      unique case (state_q)
        D_HDR: if (consume) begin
          k_q <= '0;
          unique case (m_c)
            M_LZW9, M_LZW10, M_LZW11, M_LZW12: begin
              wsel_q  <= m_c[1:0];
              state_q <= D_LZW;
            end
            M_RAW32: begin raw_q <= 5'd8;  state_q <= D_RAW; end
            M_RAW64: begin raw_q <= 5'd16; state_q <= D_RAW; end
            M_RAW96: begin raw_q <= 5'd24; state_q <= D_RAW; end
            default: state_q <= D_ERR;
          endcase
        end else if (avail >= 7'(HDR_BITS) && m_c == M_BAD) begin
          state_q <= D_ERR;
        end
        D_LZW: if (consume) begin
          if (ind_c) state_q <= D_HDR;
          else if (k_q != 12'hFFF) k_q <= k_q + 12'd1;
        end
        D_RAW: if (consume) begin
          raw_q <= raw_q - 5'd1;
          if (raw_q == 5'd1) state_q <= D_PAD;
        end
        D_PAD: if (consume) state_q <= D_HDR;
        default: ;
      endcase
    end
  end

  // a token is held steady until the core takes it
  assert property (@(posedge clk) disable iff (!rst_n || restart)
                   (tok_valid && !tok_ready) |=> tok_valid);

endmodule
