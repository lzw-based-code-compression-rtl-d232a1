// tb_lzw_dispatch: checks the dispatching logic on reference-compressed
// streams. A bit-source model plays the bit buffer (a random number of
// bits visible each cycle); the reference model gives the token sequence
// the stream must produce: TK_RESET with the block's width, one TK_CODE per
// codeword zero-padded to 12 bits, TK_RAW words for uncompressed blocks.
// Run with dynamic width on and off. The core side accepts at random.
// Finally an unused method value must raise `err`, and `restart` must
// clear it.
module tb_lzw_dispatch;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, restart, dyn_en, consume, tok_valid, tok_ready, hdr_pulse, err;
  logic [31:0] peek;
  logic [6:0]  avail;
  logic [2:0]  bitpos;
  logic [5:0]  consume_n;
  token_t      tok;
  method_e     hdr_method;

  lzw_dispatch dut (.*);

  int checks = 0, failures = 0;

  // bit source
  bq_t img;
  int  pos = 0;
  int  lim;
  function automatic bit sbit(int a);
    return (a / 8 < img.size()) ? img[a / 8][7 - a % 8] : 1'b0;
  endfunction
  always_comb begin
    for (int i = 0; i < 32; i++) peek[31-i] = sbit(pos + i);
    bitpos = 3'(pos % 8);
  end
  // like the bit buffer, bits arrive at random and leave only when consumed
  int have = 0;
  always @(negedge clk) begin
    lim = have + (($urandom_range(2) == 0) ? 32 : 0);
    have = (lim > 64) ? 64 : lim;
    if (restart) have = 0;
    avail = 7'(have);
    tok_ready = ($urandom_range(3) != 0);
  end

  token_t exp_q[$];
  int     n_hdr = 0;
  always @(posedge clk) if (rst_n && !restart) begin
    if (consume) begin
      checks++;
      if (consume_n > avail) begin
        failures++;
        $display("FAIL consumed %0d bits with %0d available", consume_n, avail);
      end
      pos <= pos + int'(consume_n);
      have = have - int'(consume_n);
    end
    if (hdr_pulse) n_hdr <= n_hdr + 1;
    if (tok_valid && tok_ready && exp_q.size() > 0) begin
      checks++;
      if (tok !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL token %p expected %p", tok, exp_q[0]);
      end
      void'(exp_q.pop_front());
    end
  end

  bq_t blocks[$];
  iq_t force_m, comp, methods;

  task automatic build(bit dyn);
    iq_t codes;
    int nf, nc;
    token_t t;
    build_image(blocks, dyn, force_m, img, comp, methods);
    exp_q = {};
    foreach (blocks[i]) begin
      if (methods[i] < 4) begin
        t = '0; t.kind = TK_RESET; t.wsel = 2'(methods[i]);
        exp_q.push_back(t);
        lzw_encode(blocks[i], methods[i], codes, nf, nc);
        foreach (codes[j]) begin
          t = '0; t.kind = TK_CODE; t.code = code_t'(codes[j]);
          exp_q.push_back(t);
        end
      end else begin
        for (int j = 0; j < blocks[i].size(); j += 4) begin
          t = '0; t.kind = TK_RAW;
          t.raw = {blocks[i][j+3], blocks[i][j+2], blocks[i][j+1], blocks[i][j]};
          exp_q.push_back(t);
        end
      end
    end
  endtask

  initial begin
    int spec[][3] = '{
      '{100, 0, -1}, '{32, 1, -1}, '{900, 0, 1}, '{64, 1, -1}, '{300, 3, 2},
      '{96, 1, -1}, '{2400, 1, 3}, '{40, 0, 0}, '{64, 0, 5}
    };
    int t0, hdr0;
    foreach (spec[i]) begin
      blocks.push_back(make_block(spec[i][0], spec[i][1]));
      force_m.push_back(spec[i][2]);
    end
    rst_n = 1'b0; restart = 1'b0; dyn_en = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 1; d >= 0; d--) begin
      dyn_en = d[0];
      build(d[0]);
      $display("dyn=%0d methods %p, %0d tokens", d, methods, exp_q.size());
      restart = 1'b1;
      pos = 0;
      hdr0 = n_hdr;
      @(negedge clk);
      restart = 1'b0;
      t0 = 0;
      while (exp_q.size() > 0 && t0 < 100000) begin @(negedge clk); t0++; end
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL %0d tokens missing", exp_q.size()); end
      // the stream must end exactly after the last block's padding
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      checks++;
      if (n_hdr - hdr0 < blocks.size()) begin
        failures++;
        $display("FAIL %0d method fields read for %0d blocks", n_hdr - hdr0, blocks.size());
      end
    end
    // unused method value
    img = '{8'hE0, 8'h00, 8'h00, 8'h00};
    pos = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (!err) begin failures++; $display("FAIL method 7 not flagged"); end
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    checks++;
    if (err) begin failures++; $display("FAIL err not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
