// tb_lzw_par_core: checks the look-ahead parallel core (4 lanes here) on
// token streams from the reference compressor, for every block kind and
// width and for uncompressed words. The concatenated output must equal the
// original bytes. It counts iterations that decoded more than one codeword
// and iterations held back by a codeword created in the same iteration
// (both must happen), checks that with a free output and one token per
// cycle the core decodes codewords faster than one per 2 cycles, and that a
// codeword the table cannot hold raises `err` until `flush`.
module tb_lzw_par_core;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  localparam int LANES = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                          rst_n, flush, tok_valid, tok_ready, out_valid, out_ready, err;
  token_t                        tok;
  logic [64*LANES-1:0]           out_data;
  logic [$clog2(8*LANES+1)-1:0]  out_len;

  lzw_par_core #(.LANES(LANES)) dut (.*);

  int checks = 0, failures = 0;
  int ready_pct = 70, gap_pct = 20;
  int n_multi = 0, n_held = 0, n_iter = 0;

  bq_t exp_bytes;
  int  bpos = 0;
  always @(negedge clk) out_ready <= ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n && !flush) begin
    if (out_valid && out_ready) begin
      checks++;
      for (int i = 0; i < int'(out_len); i++)
        if (bpos + i >= exp_bytes.size() || out_data[8*i +: 8] != exp_bytes[bpos + i]) begin
          failures++;
          if (failures < 10) $display("FAIL byte %0d", bpos + i);
        end
      bpos <= bpos + int'(out_len);
    end
    if (dut.launch) begin
      n_iter++;
      if (dut.g_c > 1) n_multi++;
      if (dut.g_c < dut.vcnt) n_held++;
    end
  end

  token_t tq[$];
  int     n_codes = 0;

  task automatic add_block(bq_t data, int m);
    iq_t codes;
    int nf, nc;
    token_t t;
    exp_bytes = {exp_bytes, data};
    if (m >= 4) begin
      for (int j = 0; j < data.size(); j += 4) begin
        t = '0; t.kind = TK_RAW;
        t.raw = {data[j+3], data[j+2], data[j+1], data[j]};
        tq.push_back(t);
      end
      return;
    end
    t = '0; t.kind = TK_RESET; t.wsel = 2'(m);
    tq.push_back(t);
    lzw_encode(data, m, codes, nf, nc);
    foreach (codes[j]) begin
      t = '0; t.kind = TK_CODE; t.code = code_t'(codes[j]);
      tq.push_back(t);
      n_codes++;
    end
  endtask

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
    if (bpos != exp_bytes.size()) begin
      failures++;
      $display("FAIL %0d of %0d bytes", bpos, exp_bytes.size());
    end
    // rate: free output, one token per cycle
    ready_pct = 100; gap_pct = 0;
    exp_bytes = {}; bpos = 0;
    @(negedge clk);
    c0 = n_codes;
    add_block(make_block(2000, 0), 3);
    t0 = $time;
    drive();
    $display("%0d codewords in %0d cycles", n_codes - c0, ($time - t0) / 10 - 8);
    checks++;
    if (2 * (($time - t0) / 10 - 8) > 3 * (n_codes - c0) || bpos != exp_bytes.size()) begin
      failures++;
      $display("FAIL rate");
    end
    $display("iterations=%0d multi=%0d held=%0d", n_iter, n_multi, n_held);
    checks++; if (n_multi == 0) begin failures++; $display("FAIL never parallel"); end
    checks++; if (n_held == 0)  begin failures++; $display("FAIL never held back"); end
    // a codeword beyond the table
    exp_bytes = {exp_bytes, 8'd65};
    t = '0; t.kind = TK_RESET; tq.push_back(t);
    t = '0; t.kind = TK_CODE; t.code = 12'd65; tq.push_back(t);
    drive();
    t = '0; t.kind = TK_CODE; t.code = 12'd300; tq.push_back(t);
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
