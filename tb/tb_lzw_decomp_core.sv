// tb_lzw_decomp_core: checks the decompression core on token streams made
// by the reference compressor. For blocks of every kind and width the core
// must rebuild the original bytes, one phrase per codeword, each phrase as
// long as the reference phrase; uncompressed words must pass through. The
// output is throttled at random and tokens arrive with gaps. It also checks
// the rate (one codeword per cycle with a free output), that a codeword the
// table cannot hold raises `err`, and that `flush` clears it.
module tb_lzw_decomp_core;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n, flush, tok_valid, tok_ready, out_valid, out_ready, err;
  token_t  tok;
  phrase_t out_phrase;

  lzw_decomp_core dut (.*);

  int checks = 0, failures = 0;
  int ready_pct = 70, gap_pct = 20;

  // expected output: bytes and phrase lengths
  bq_t exp_bytes;
  iq_t exp_lens;
  int  bpos = 0, n_out = 0;
  always @(negedge clk) out_ready <= ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n && !flush && out_valid && out_ready) begin
    checks++;
    n_out <= n_out + 1;
    if (exp_lens.size() == 0 || int'(out_phrase.len) != exp_lens[0]) begin
      failures++;
      if (failures < 10) $display("FAIL phrase length %0d", out_phrase.len);
    end
    for (int i = 0; i < int'(out_phrase.len); i++)
      if (bpos + i >= exp_bytes.size() || out_phrase.data[8*i +: 8] != exp_bytes[bpos + i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d", bpos + i);
      end
    if (exp_lens.size() > 0) void'(exp_lens.pop_front());
    bpos <= bpos + int'(out_phrase.len);
  end

  token_t tq[$];

  // tokens and expected phrases of one block
  task automatic add_block(bq_t data, int m);
    iq_t codes;
    int nf, nc, p;
    token_t t;
    exp_bytes = {exp_bytes, data};
    if (m >= 4) begin
      for (int j = 0; j < data.size(); j += 4) begin
        t = '0; t.kind = TK_RAW;
        t.raw = {data[j+3], data[j+2], data[j+1], data[j]};
        tq.push_back(t);
        exp_lens.push_back(4);
      end
      return;
    end
    t = '0; t.kind = TK_RESET; t.wsel = 2'(m);
    tq.push_back(t);
    lzw_encode(data, m, codes, nf, nc);
    // phrase lengths follow from the encoder's greedy parse: recompute by
    // re-encoding prefixes is costly, so decode the lengths from the codes
    begin
      bq_t ph[int];
      bq_t prev, cur;
      int nxt = 256, lim = (1 << (9 + m)) - 2;
      foreach (codes[j]) begin
        if (codes[j] < 256) cur = '{8'(codes[j])};
        else if (ph.exists(codes[j])) cur = ph[codes[j]];
        else cur = {prev, prev[0]};
        if (j > 0 && prev.size() < 8 && nxt <= lim) begin
          ph[nxt] = {prev, cur[0]};
          nxt++;
        end
        exp_lens.push_back(cur.size());
        prev = cur;
        t = '0; t.kind = TK_CODE; t.code = code_t'(codes[j]);
        tq.push_back(t);
      end
    end
  endtask

  // drive all queued tokens
  task automatic drive();
    while (tq.size() > 0) begin
      tok_valid = ($urandom_range(99) >= gap_pct);
      tok = tq[0];
      @(posedge clk);
      if (tok_valid && tok_ready) void'(tq.pop_front());
      @(negedge clk);
    end
    tok_valid = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    int spec[][3] = '{
      '{200, 0, 0}, '{32, 1, 4}, '{1500, 1, 0}, '{400, 3, 1}, '{600, 2, 2},
      '{2400, 0, 3}, '{96, 1, 6}, '{64, 0, 0}, '{1200, 1, 1}
    };
    int t0, c0;
    token_t t;
    rst_n = 1'b0; flush = 1'b0; tok_valid = 1'b0; tok = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (spec[i]) add_block(make_block(spec[i][0], spec[i][1]), spec[i][2]);
    drive();
    checks++;
    if (bpos != exp_bytes.size() || exp_lens.size() != 0) begin
      failures++;
      $display("FAIL %0d of %0d bytes", bpos, exp_bytes.size());
    end
    // rate: free output, no gaps
    ready_pct = 100; gap_pct = 0;
    exp_bytes = {}; bpos = 0;
    @(negedge clk);
    add_block(make_block(800, 0), 3);
    c0 = n_out;
    t0 = $time;
    drive();
    $display("%0d codewords, %0d cycles", n_out - c0, ($time - t0) / 10 - 8);
    checks++;
    if (($time - t0) / 10 - 8 > (n_out - c0) + 2) begin
      failures++;
      $display("FAIL rate");
    end
    // a codeword beyond the table raises err; flush clears it
    t = '0; t.kind = TK_RESET; tq.push_back(t);
    t = '0; t.kind = TK_CODE; t.code = 12'd65; tq.push_back(t);
    t = '0; t.kind = TK_CODE; t.code = 12'd300; tq.push_back(t);
    exp_bytes = {exp_bytes, 8'd65}; exp_lens.push_back(1);
    drive();
    checks++;
    if (!err) begin failures++; $display("FAIL bad codeword not flagged"); end
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    checks++;
    if (err || out_valid) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
