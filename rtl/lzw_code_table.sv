// lzw_code_table: the LZW coding table of the decompression core.
//
// Holds one phrase (1..8 bytes plus its length) per codeword. Codewords
// 0..255 are the single-byte initial entries; they are not stored but
// produced by logic from the address, which saves 256 of the 4096 entries.
// Codewords 256..4095 live in a RAM of 3840 entries (the all-ones code is
// reserved as the branch indicator and never written, but keeping it makes
// the address arithmetic a plain subtraction).
//
// Interface and timing: one synchronous read port (rd_en/rd_addr, data in
// rd_phrase on the next clock edge, held until the next read) and one
// synchronous write port (wr_en/wr_addr/wr_phrase). A read and a write to the
// same entry in one cycle return the old contents; the core never does this.
// The table is never cleared: a new block restarts the allocation pointer in
// the core, and entries past the pointer are never read.
//
// From the design: 8-byte wide entries, 12-bit maximum codeword, initial
// entries computed instead of stored. Own choices: separate read and write
// ports, the length field stored with each entry.
module lzw_code_table
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_BITS = CW_MAX
) (
  input  logic                 clk,
  input  logic                 rd_en,
  input  logic [CODE_BITS-1:0] rd_addr,
  output phrase_t              rd_phrase,
  input  logic                 wr_en,
  input  logic [CODE_BITS-1:0] wr_addr,
  input  phrase_t              wr_phrase
);

  localparam int unsigned DEPTH = (1 << CODE_BITS) - N_LITERALS;

  phrase_t mem [DEPTH];

  logic [CODE_BITS-1:0] wr_idx, rd_idx;
  assign wr_idx = wr_addr - CODE_BITS'(N_LITERALS);
  assign rd_idx = rd_addr - CODE_BITS'(N_LITERALS);

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr >= CODE_BITS'(N_LITERALS))
      mem[wr_idx] <= wr_phrase;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (rd_addr < CODE_BITS'(N_LITERALS)) begin
        rd_phrase.len  <= LEN_W'(1);
        rd_phrase.data <= {{(8*PHRASE_BYTES-8){1'b0}}, rd_addr[7:0]};
      end else begin
        rd_phrase <= mem[rd_idx];
      end
    end
  end

endmodule
