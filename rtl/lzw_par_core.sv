// lzw_par_core: LZW decompression core with look-ahead parallel decoding.
//
// LZW codewords have a fixed length, so several of them can be decoded at
// once as long as none of them refers to a table entry that is created in
// the same iteration. This core keeps up to LANES codewords in a small
// queue. Each iteration starts with the oldest one (lane 0, decoded exactly
// as in lzw_decomp_core, including the not-yet-defined codeword case) and
// adds each following codeword while it is below the first entry that this
// iteration creates. All the chosen codewords are looked up in a LANES-port
// table (lzw_code_table_mp) in the same cycle; in the next cycle their
// phrases are concatenated to the output and one new entry per lane is
// written (previous phrase + first byte of the lane's phrase, skipped as in
// the single core when the previous phrase has 8 bytes or the table is
// full). Codewords that were not chosen stay queued for the next iteration.
//
// Interface: the token stream of lzw_dispatch (valid/ready); TK_RESET and
// TK_RAW are taken only when the queue is empty. Output: up to 8*LANES
// bytes per iteration, byte 0 in out_data[7:0], out_len bytes valid,
// under valid/ready. `flush` empties everything; `err` flags a codeword the
// table cannot hold. Timing: an iteration takes 2 cycles (queue/launch and
// look-up, then output and table write); codeword tokens are accepted every
// cycle while the queue has room. Reset is synchronous.
//
// From the design: look-ahead parallel decompression of several codewords
// when the newly generated entry is not used. Own choices: the queue, the
// lane-per-port table, the 2-cycle iteration, LANES = 2 as default. Fed by
// lzw_dispatch, which cuts one codeword per cycle, this core is slower than
// the pipelined lzw_decomp_core; it pays off only behind a front end that
// delivers several codewords per cycle, which is not part of this design.
module lzw_par_core
  import lzw_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            flush,
  input  logic                            tok_valid,
  input  token_t                          tok,
  output logic                            tok_ready,
  output logic                            out_valid,
  output logic [8*PHRASE_BYTES*LANES-1:0] out_data,
  output logic [$clog2(PHRASE_BYTES*LANES+1)-1:0] out_len,
  input  logic                            out_ready,
  output logic                            err
);

  localparam int unsigned OL_W = $clog2(PHRASE_BYTES*LANES+1);
  localparam int unsigned QC_W = $clog2(LANES+1);

  typedef enum logic [1:0] {P_WAIT, P_LOOK, P_ERR} pstate_e;

  pstate_e     state_q;
  code_t       q_code [LANES];
  logic [QC_W-1:0] q_cnt;
  logic [QC_W-1:0] g_q;        // lanes in flight
  logic        kwk_q;
  logic [12:0] next_q, limit_q;
  phrase_t     prev_q;
  logic        prev_vld_q;
  logic [8*PHRASE_BYTES*LANES-1:0] out_data_q;
  logic [OL_W-1:0] out_len_q;
  logic        out_vld_q;

  // table
  logic [LANES-1:0] rd_en, wr_en;
  code_t            rd_addr [LANES];
  code_t            wr_addr [LANES];
  phrase_t          rd_phrase [LANES];
  phrase_t          wr_phrase [LANES];

  lzw_code_table_mp #(.PORTS(LANES), .CODE_BITS(CW_MAX)) u_table (
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

  logic            out_free, take_code, take_ctl, launch, lane0_ok, room0, finish;
  code_t           vq [LANES];
  logic [QC_W-1:0] vcnt, g_c;
  phrase_t         cur [LANES];
  logic [12:0]     idx;
  phrase_t         ph, last_c;
  logic [8*PHRASE_BYTES*LANES-1:0] cat;
  logic [OL_W-1:0] off;

  assign out_free  = !out_vld_q || out_ready;
  assign out_valid = out_vld_q;
  assign out_data  = out_data_q;
  assign out_len   = out_len_q;
  assign err       = (state_q == P_ERR);

  always_comb begin
    // token acceptance
    take_code = !flush && state_q != P_ERR && tok_valid && tok.kind == TK_CODE
                && q_cnt < QC_W'(LANES);
    take_ctl  = !flush && state_q == P_WAIT && q_cnt == '0 && tok_valid
                && tok.kind != TK_CODE && (tok.kind != TK_RAW || out_free);
    tok_ready = (tok.kind == TK_CODE) ? take_code : take_ctl;

    // queue as seen this cycle, with an accepted codeword appended
    vq = q_code;
    for (int j = 0; j < int'(LANES); j++)
      if (take_code && int'(q_cnt) == j) vq[j] = tok.code;
    vcnt = q_cnt + QC_W'(take_code);

    // launch a group: the queue is full or no more codewords are coming now
    room0    = prev_vld_q && (prev_q.len < LEN_W'(PHRASE_BYTES)) && (next_q <= limit_q);
    lane0_ok = (vq[0] < code_t'(N_LITERALS)) || (13'(vq[0]) < next_q)
               || (13'(vq[0]) == next_q && room0);
    launch   = (state_q == P_WAIT) && !flush && vcnt != '0
               && (vcnt == QC_W'(LANES) || !take_code);
    g_c = QC_W'(1);
    for (int j = 1; j < int'(LANES); j++)
      if (int'(g_c) == j && j < int'(vcnt) && 13'(vq[j]) < next_q) g_c = g_c + 1'b1;
    for (int j = 0; j < int'(LANES); j++) begin
      rd_en[j]   = launch && lane0_ok && (j < int'(g_c));
      rd_addr[j] = vq[j];
    end

    // finish an iteration: phrases, new entries, output
    finish = (state_q == P_LOOK) && out_free && !flush;
    for (int j = 0; j < int'(LANES); j++)
      cur[j] = (j == 0 && kwk_q) ? append(prev_q, prev_q.data[7:0]) : rd_phrase[j];
    last_c = cur[0];
    for (int j = 1; j < int'(LANES); j++)
      if (j < int'(g_q)) last_c = cur[j];
    idx = next_q;
    cat = '0;
    off = '0;
    for (int j = 0; j < int'(LANES); j++) begin
      ph           = (j == 0) ? prev_q : cur[(j == 0) ? 0 : j - 1];
      wr_en[j]     = 1'b0;
      wr_addr[j]   = idx[CW_MAX-1:0];
      wr_phrase[j] = append(ph, cur[j].data[7:0]);
      if (j < int'(g_q)) begin
        if ((j != 0 || prev_vld_q) && ph.len < LEN_W'(PHRASE_BYTES) && idx <= limit_q) begin
          wr_en[j] = finish;
          idx      = idx + 13'd1;
        end
        cat = cat | ((8*PHRASE_BYTES*LANES)'(cur[j].data) << (8 * off));
        off = off + OL_W'(cur[j].len);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      state_q    <= P_WAIT;
      q_cnt      <= '0;
      g_q        <= '0;
      kwk_q      <= 1'b0;
      next_q     <= 13'(N_LITERALS);
      limit_q    <= 13'((1 << CW_MIN) - 2);
      prev_q     <= '0;
      prev_vld_q <= 1'b0;
      out_data_q <= '0;
      out_len_q  <= '0;
      out_vld_q  <= 1'b0;
      for (int j = 0; j < int'(LANES); j++) q_code[j] <= '0;
    end else begin
      if (out_ready) out_vld_q <= 1'b0;
      // queue update: append, and drop the lanes of a finished iteration
      if (finish) begin
        for (int j = 0; j < int'(LANES); j++)
          q_code[j] <= (j + int'(g_q) < int'(LANES)) ? vq[j + int'(g_q)] : '0;
        q_cnt <= vcnt - g_q;
      end else begin
        q_code <= vq;
        q_cnt  <= vcnt;
      end
      unique case (state_q)
        P_WAIT: begin
          if (launch) begin
            g_q     <= g_c;
            kwk_q   <= (13'(vq[0]) == next_q);
            state_q <= lane0_ok ? P_LOOK : P_ERR;
          end else if (take_ctl) begin
            if (tok.kind == TK_RESET) begin
              next_q     <= 13'(N_LITERALS);
              limit_q    <= (13'd1 << (CW_MIN + 32'(tok.wsel))) - 13'd2;
              prev_vld_q <= 1'b0;
            end else begin
              out_data_q <= (8*PHRASE_BYTES*LANES)'(tok.raw);
              out_len_q  <= OL_W'(RAW_BYTES);
              out_vld_q  <= 1'b1;
              prev_vld_q <= 1'b0;
            end
          end
        end
        P_LOOK: if (finish) begin
          out_data_q <= cat;
          out_len_q  <= off;
          out_vld_q  <= 1'b1;
          prev_q     <= last_c;
          prev_vld_q <= 1'b1;
          next_q     <= idx;
          state_q    <= P_WAIT;
        end
        default: ;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || flush)
                   (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
