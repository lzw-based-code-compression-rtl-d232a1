// lzw_bit_buffer: compressed-stream fetch and bit extraction.
//
// Reads the compressed program from memory one 32-bit word at a time and
// keeps up to 64 not-yet-used bits in a shift register, the oldest bit at
// bit 63. The next 32 bits of the stream are always visible on `peek`
// (MSB = next bit) and `avail` says how many of them are valid. The user
// removes n bits (0..32) by raising `consume` with `consume_n`, allowed only
// when avail >= consume_n. Bits are packed MSB-first within each byte and
// bytes in increasing address order, so a byte-aligned block start is the
// MSB of its byte.
//
// `restart` (one cycle, with `start_byte`) empties the buffer and begins
// reading at any byte address: the word holding that byte is fetched and the
// bytes before it are dropped. `bitpos` is the number of bits consumed since
// the restart, modulo 8; the dispatching logic uses it to shift out the
// padding that follows a block so the next block starts at a byte boundary.
//
// Memory port: mem_req/mem_addr (word address) is a request, accepted in
// the cycle it is high; mem_rvalid/mem_rdata return the word any number of
// cycles later. At most one request is outstanding; a response to a request
// issued before a restart is dropped. No request leaves while rst_n is
// low. Byte a of the program is
// mem_rdata[31-8*(a%4) -: 8] of word a/4.
//
// From the design: byte-aligned block starts and padding shifted out of the
// buffer. Own choices: 32-bit memory words, 64-bit buffer, bit order.
module lzw_bit_buffer #(
  parameter int unsigned ADDR_W = 32     // byte-address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              restart,
  input  logic [ADDR_W-1:0] start_byte,
  // bit window
  output logic [31:0]       peek,
  output logic [6:0]        avail,
  output logic [2:0]        bitpos,
  input  logic              consume,
  input  logic [5:0]        consume_n,
  // memory read port
  output logic              mem_req,
  output logic [ADDR_W-3:0] mem_addr,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata
);

  logic [63:0]       buf_q;
  logic [6:0]        level_q;      // valid bits in buf_q
  logic [ADDR_W-3:0] next_word_q;  // next word address to request
  logic              pending_q;    // a request is outstanding
  logic              stale_q;      // outstanding request predates a restart
  logic [4:0]        skip_q;       // bits to drop from the next word (start offset)
  logic [2:0]        bitpos_q;

  assign peek   = buf_q[63:32];
  assign avail  = level_q;
  assign bitpos = bitpos_q;

  // request a word when it will fit after any consumption
  assign mem_req  = rst_n && !restart && (!pending_q || mem_rvalid) && (level_q <= 7'd32)
                    && !(mem_rvalid && !stale_q && level_q > 7'd0);
  assign mem_addr = next_word_q;

  logic [6:0]  lvl_c;
  logic [63:0] buf_c, word_c;
  logic [5:0]  take;
  logic        fill;

  always_comb begin
    take  = consume ? consume_n : 6'd0;
    buf_c = buf_q << take;
    lvl_c = level_q - 7'(take);
    fill  = mem_rvalid && pending_q && !stale_q;
    // the new word, minus the bytes before the start address, goes right
    // behind the bits already held
    word_c = {mem_rdata, 32'b0} << skip_q;
    if (fill) begin
      buf_c = buf_c | (word_c >> lvl_c);
      lvl_c = lvl_c + 7'd32 - 7'(skip_q);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q       <= '0;
      level_q     <= '0;
      next_word_q <= '0;
      pending_q   <= 1'b0;
      stale_q     <= 1'b0;
      skip_q      <= '0;
      bitpos_q    <= '0;
    end else if (restart) begin
      buf_q       <= '0;
      level_q     <= '0;
      next_word_q <= start_byte[ADDR_W-1:2];
      stale_q     <= pending_q && !mem_rvalid;
      pending_q   <= pending_q && !mem_rvalid;
      skip_q      <= {start_byte[1:0], 3'b000};
      bitpos_q    <= '0;
    end else begin
      buf_q    <= buf_c;
      level_q  <= lvl_c;
      bitpos_q <= bitpos_q + take[2:0];
      if (fill) skip_q <= '0;
      if (mem_rvalid) begin
        pending_q <= 1'b0;
        stale_q   <= 1'b0;
      end
      if (mem_req) begin
        pending_q   <= 1'b1;
        stale_q     <= 1'b0;
        next_word_q <= next_word_q + 1'b1;
      end
    end
  end

  // one outstanding request at a time
  assert property (@(posedge clk) disable iff (!rst_n) mem_req |-> (!pending_q || mem_rvalid));
  // the user never takes more bits than are held
  assert property (@(posedge clk) disable iff (!rst_n) (consume && !restart) |-> (7'(consume_n) <= level_q));

endmodule
