// lzw_decompressor: branch-block LZW code-decompression engine (top level).
//
// The program is stored compressed, one branch block at a time: a branch
// block is the code between two consecutive possible branch targets, and
// each is compressed on its own (LZW with a 9..12-bit table, optionally with
// dynamic codeword width, or left uncompressed), so decompression can start
// afresh at any branch target with an empty table. This engine sits between
// the compressed code memory and the instruction cache or fetch unit and
// turns the compressed stream back into code bytes.
//
// Datapath: lzw_lat -> lzw_bit_buffer -> lzw_dispatch -> lzw_decomp_core
// (or, with LANES > 1, lzw_par_core, which decodes up to LANES codewords per
// iteration by look-ahead).
//  * A branch (br_valid, br_addr = original byte address of a branch target)
//    flushes the engine and looks the target up in the LAT. On a hit the bit
//    buffer restarts at the block's compressed byte address; on a miss
//    `lat_miss` is raised and the engine stays idle.
//  * From there the blocks are decoded one after the other: falling through
//    into the next block needs no LAT access because the previous block ends
//    with the branch indicator codeword (or is an uncompressed block of known
//    size).
//  * Output: phrases of 1..8 bytes (1..8*LANES with the parallel core;
//    out_data byte 0 in bits 7:0, out_len bytes) with the original address of their first byte, under a
//    valid/ready handshake.
//
// Other ports: blk_pulse/blk_method mark each block entered and its method;
// dyn_en selects dynamic LZW for the whole program (it must
// match how the program was compressed); the LAT load port installs the
// branch-target map; the memory port reads 32-bit words (see lzw_bit_buffer)
// with any latency; `err` reports an invalid method field or codeword.
// Timing: 2 cycles after br_valid the first memory request leaves. The
// engine is a three-stage pipeline - dispatch, table read, phrase output and
// table update - that decodes one LZW codeword (up to 8 bytes) per cycle as
// long as the memory delivers; the bit buffer supplies at most 16 bits per
// cycle, so uncompressed blocks run at 4 bytes per 2 cycles. Reset is
// synchronous.
//
// From the design: branch blocks as compression units, LAT of branch targets,
// all-ones branch indicator with byte-aligned block starts, per-block method
// bits, dispatching logic in front of one 12-bit core, 8-byte decoding width.
// Own choices: the memory and output interfaces, the error reporting.
module lzw_decompressor
  import lzw_pkg::*;
#(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned LAT_ENTRIES = 512,
  parameter int unsigned LANES       = 1     // 1: single core; >1: look-ahead parallel core
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           dyn_en,
  // LAT load port
  input  logic                           lat_clear,
  input  logic                           lat_wr_en,
  input  logic [$clog2(LAT_ENTRIES)-1:0] lat_wr_idx,
  input  logic [ADDR_W-1:0]              lat_wr_orig,
  input  logic [ADDR_W-1:0]              lat_wr_comp,
  // branch requests from the processor / cache
  input  logic                           br_valid,
  input  logic [ADDR_W-1:0]              br_addr,
  output logic                           lat_miss,
  // compressed code memory
  output logic                           mem_req,
  output logic [ADDR_W-3:0]              mem_addr,
  input  logic                           mem_rvalid,
  input  logic [31:0]                    mem_rdata,
  // decompressed code
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [8*PHRASE_BYTES*LANES-1:0] out_data,
  output logic [$clog2(PHRASE_BYTES*LANES+1)-1:0] out_len,
  output logic [ADDR_W-1:0]              out_addr,
  output logic                           blk_pulse,   // a block's method field was read
  output logic [HDR_BITS-1:0]            blk_method,
  output logic                           err
);

  logic              active_q, miss_q;
  logic [ADDR_W-1:0] addr_q, target_q;

  // LAT
  logic              rsp_valid, rsp_hit;
  logic [ADDR_W-1:0] rsp_comp;

  lzw_lat #(.ENTRIES(LAT_ENTRIES), .ADDR_W(ADDR_W)) u_lat (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (lat_clear),
    .wr_en    (lat_wr_en),
    .wr_idx   (lat_wr_idx),
    .wr_orig  (lat_wr_orig),
    .wr_comp  (lat_wr_comp),
    .lk_valid (br_valid),
    .lk_addr  (br_addr),
    .rsp_valid(rsp_valid),
    .rsp_hit  (rsp_hit),
    .rsp_comp (rsp_comp)
  );

  // the engine is held empty until a branch target has been found
  logic restart;
  assign restart = !active_q || br_valid;

  // bit buffer
  logic [31:0] peek;
  logic [6:0]  avail;
  logic [2:0]  bitpos;
  logic        consume;
  logic [5:0]  consume_n;

  lzw_bit_buffer #(.ADDR_W(ADDR_W)) u_bits (
    .clk       (clk),
    .rst_n     (rst_n),
    .restart   (restart),
    .start_byte(rsp_comp),
    .peek      (peek),
    .avail     (avail),
    .bitpos    (bitpos),
    .consume   (consume),
    .consume_n (consume_n),
    .mem_req   (mem_req),
    .mem_addr  (mem_addr),
    .mem_rvalid(mem_rvalid),
    .mem_rdata (mem_rdata)
  );

  // dispatching logic
  logic    tok_valid, tok_ready;
  token_t  tok;
  logic    hdr_pulse, disp_err;
  method_e hdr_method;

  lzw_dispatch u_disp (
    .clk       (clk),
    .rst_n     (rst_n),
    .restart   (restart),
    .dyn_en    (dyn_en),
    .peek      (peek),
    .avail     (avail),
    .bitpos    (bitpos),
    .consume   (consume),
    .consume_n (consume_n),
    .tok_valid (tok_valid),
    .tok       (tok),
    .tok_ready (tok_ready),
    .hdr_pulse (hdr_pulse),
    .hdr_method(hdr_method),
    .err       (disp_err)
  );

  // decompression core: one codeword per iteration, or LANES look-ahead lanes
  logic core_err;

  if (LANES == 1) begin : g_single
    phrase_t core_phrase;
    lzw_decomp_core u_core (
      .clk       (clk),
      .rst_n     (rst_n),
      .flush     (restart),
      .tok_valid (tok_valid),
      .tok       (tok),
      .tok_ready (tok_ready),
      .out_valid (out_valid),
      .out_phrase(core_phrase),
      .out_ready (out_ready),
      .err       (core_err)
    );
    assign out_data = core_phrase.data;
    assign out_len  = core_phrase.len;
  end else begin : g_parallel
    lzw_par_core #(.LANES(LANES)) u_core (
      .clk      (clk),
      .rst_n    (rst_n),
      .flush    (restart),
      .tok_valid(tok_valid),
      .tok      (tok),
      .tok_ready(tok_ready),
      .out_valid(out_valid),
      .out_data (out_data),
      .out_len  (out_len),
      .out_ready(out_ready),
      .err      (core_err)
    );
  end

  assign out_addr = addr_q;
  assign err      = disp_err || core_err;
  assign lat_miss = miss_q;
  assign blk_pulse  = hdr_pulse;
  assign blk_method = hdr_method;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      miss_q   <= 1'b0;
      addr_q   <= '0;
      target_q <= '0;
    end else begin
      if (br_valid) begin
        active_q <= 1'b0;
        miss_q   <= 1'b0;
        target_q <= br_addr;
      end else if (rsp_valid) begin
        active_q <= rsp_hit;
        miss_q   <= !rsp_hit;
        addr_q   <= target_q;
      end else if (out_valid && out_ready) begin
        addr_q   <= addr_q + ADDR_W'(out_len);
      end
    end
  end

endmodule
