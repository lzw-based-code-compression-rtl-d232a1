// lzw_decomp_core: the 12-bit LZW decompression core, pipelined.
//
// Takes tokens from the dispatching logic and produces the original code as
// phrases of 1..8 bytes (lzw_pkg::phrase_t, byte 0 first in data[7:0]).
//  * TK_RESET starts a branch block: the table allocation pointer returns to
//    256 and there is no previous phrase. The token's width selects the
//    table size, 2^w - 1 usable codes (the all-ones code is the indicator).
//    Once the table is full the existing entries are used unchanged.
//  * TK_CODE: the codeword is looked up and its phrase is output; the
//    previous phrase plus the first byte of this one becomes the next table
//    entry. A codeword equal to the entry about to be created (the decoder
//    does not have it yet) is decoded as the previous phrase plus its own
//    first byte. No entry is made when the previous phrase already fills the
//    8-byte table width, which the compressor mirrors.
//  * TK_RAW: the 4 bytes of an uncompressed instruction go straight out.
// A codeword the table cannot hold raises `err` until `flush`.
//
// Pipeline: stage A accepts a codeword and starts the synchronous table
// read; stage B, one cycle later, forms the phrase, writes the new entry and
// loads the output register. Both stages work every cycle, so one codeword
// per cycle (up to 8 bytes) is decoded. Two hazards are resolved without
// stalls: a codeword that names the entry stage B is writing in the same
// cycle takes that entry from a forwarding register, and a codeword that
// names the entry its own iteration creates is built from the phrase in
// stage B. TK_RESET and TK_RAW wait until stage B is empty. The output is a
// valid/ready register; both stages hold while it is full. `flush` (a
// branch) empties the core in one cycle. Reset is synchronous.
//
// From the design: the lookup-and-update iteration, table reset per block,
// the undefined-codeword rule, the frozen full table, 12-bit core serving
// 9-12 bit blocks through zero-padded codewords, 8-byte decoding width, a
// pipelined engine. Own choices: the two-stage split with forwarding, the
// skipped entry at 8 bytes, the error check.
module lzw_decomp_core
  import lzw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  // tokens from the dispatching logic
  input  logic    tok_valid,
  input  token_t  tok,
  output logic    tok_ready,
  // decompressed phrases
  output logic    out_valid,
  output phrase_t out_phrase,
  input  logic    out_ready,
  output logic    err
);

  logic        err_q;
  logic        b_vld_q;      // stage B holds a codeword
  logic        kwk_q;        // its code is the entry its own iteration creates
  logic        fwd_q;        // its code is the entry written one cycle earlier
  phrase_t     fwd_phrase_q; // that entry
  logic [12:0] next_q;       // next entry to allocate (13 bits: may reach 4096)
  logic [12:0] limit_q;      // last allocatable code, 2^w - 2
  phrase_t     prev_q;       // phrase of the codeword before the one in stage B
  logic        prev_vld_q;
  phrase_t     out_q;
  logic        out_vld_q;

  // table
  logic    rd_en, wr_en;
  code_t   rd_addr, wr_addr;
  phrase_t rd_phrase, wr_phrase;

  lzw_code_table #(.CODE_BITS(CW_MAX)) u_table (
    .clk      (clk),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_phrase(rd_phrase),
    .wr_en    (wr_en),
    .wr_addr  (wr_addr),
    .wr_phrase(wr_phrase)
  );

  function automatic phrase_t append(input phrase_t p, input logic [7:0] b);
    phrase_t r;
    r = p;
    r.data[8*p.len[2:0] +: 8] = b;
    r.len = p.len + 1'b1;
    return r;
  endfunction

  logic        out_free, b_room, b_adv, a_free, take_code, take_ctl;
  logic [12:0] n_eff;
  phrase_t     cur;
  logic [LEN_W-1:0] p_eff_len;
  logic        p_eff_vld, room_eff, code_ok;

  assign out_free   = !out_vld_q || out_ready;
  assign out_valid  = out_vld_q;
  assign out_phrase = out_q;
  assign err        = err_q;

  always_comb begin
    // stage B: phrase of its codeword and the entry it creates
    cur    = kwk_q ? append(prev_q, prev_q.data[7:0]) : (fwd_q ? fwd_phrase_q : rd_phrase);
    b_room = prev_vld_q && (prev_q.len < LEN_W'(PHRASE_BYTES)) && (next_q <= limit_q);
    b_adv  = b_vld_q && out_free && !flush && !err_q;
    wr_en     = b_adv && b_room;
    wr_addr   = next_q[CW_MAX-1:0];
    wr_phrase = append(prev_q, cur.data[7:0]);

    // stage A sees the table as it will be once stage B has finished
    a_free    = !b_vld_q || b_adv;
    n_eff     = next_q + 13'(b_vld_q && b_room);
    p_eff_len = b_vld_q ? cur.len : prev_q.len;
    p_eff_vld = b_vld_q || prev_vld_q;
    room_eff  = p_eff_vld && (p_eff_len < LEN_W'(PHRASE_BYTES)) && (n_eff <= limit_q);
    code_ok   = (tok.code < code_t'(N_LITERALS)) || (13'(tok.code) < n_eff)
                || (13'(tok.code) == n_eff && room_eff);

    take_code = tok_valid && tok.kind == TK_CODE && a_free && !flush && !err_q;
    take_ctl  = tok_valid && tok.kind != TK_CODE && !b_vld_q && !flush && !err_q
                && (tok.kind != TK_RAW || out_free);
    tok_ready = (tok.kind == TK_CODE) ? (a_free && !flush && !err_q)
                                      : (!b_vld_q && !flush && !err_q && (tok.kind != TK_RAW || out_free));
    rd_en     = take_code;
    rd_addr   = tok.code;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      err_q        <= 1'b0;
      b_vld_q      <= 1'b0;
      kwk_q        <= 1'b0;
      fwd_q        <= 1'b0;
      fwd_phrase_q <= '0;
      next_q       <= 13'(N_LITERALS);
      limit_q      <= 13'((1 << CW_MIN) - 2);
      prev_q       <= '0;
      prev_vld_q   <= 1'b0;
      out_q        <= '0;
      out_vld_q    <= 1'b0;
    end else begin
      if (out_ready) out_vld_q <= 1'b0;
      // stage B completes
      if (b_adv) begin
        out_q      <= cur;
        out_vld_q  <= 1'b1;
        prev_q     <= cur;
        prev_vld_q <= 1'b1;
        if (b_room) next_q <= next_q + 13'd1;
        b_vld_q    <= 1'b0;
      end
      if (wr_en) fwd_phrase_q <= wr_phrase;
      // stage A accepts
      if (take_code) begin
        if (code_ok) begin
          b_vld_q <= 1'b1;
          kwk_q   <= (13'(tok.code) == n_eff);
          fwd_q   <= b_vld_q && b_room && (13'(tok.code) == next_q);
        end else begin
          err_q   <= 1'b1;
        end
      end
      if (take_ctl) begin
        if (tok.kind == TK_RESET) begin
          next_q     <= 13'(N_LITERALS);
          limit_q    <= (13'd1 << (CW_MIN + 32'(tok.wsel))) - 13'd2;
          prev_vld_q <= 1'b0;
        end else begin
          out_q.data <= {{(8*(PHRASE_BYTES-RAW_BYTES)){1'b0}}, tok.raw};
          out_q.len  <= LEN_W'(RAW_BYTES);
          out_vld_q  <= 1'b1;
          prev_vld_q <= 1'b0;
        end
      end
    end
  end

  // the output register holds its phrase until it is taken
  assert property (@(posedge clk) disable iff (!rst_n || flush)
                   (out_valid && !out_ready) |=> (out_valid && $stable(out_phrase)));
  // phrases are 1..8 bytes long
  assert property (@(posedge clk) disable iff (!rst_n || flush)
                   out_valid |-> (out_phrase.len != '0 && out_phrase.len <= LEN_W'(PHRASE_BYTES)));

endmodule
