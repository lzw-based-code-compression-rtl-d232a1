// lzw_ref_pkg: reference model used by the testbenches.
//
// Builds a synthetic program, cuts it into branch blocks and compresses it
// exactly as the off-line compressor would: each block on its own with LZW
// (bytes as elements, 256 initial entries, one new entry per codeword, no
// entry longer than 8 bytes, the all-ones codeword of each width reserved as
// the branch indicator, table frozen when full), optionally with dynamic
// codeword width, and per block the smallest of 9/10/11/12-bit LZW and, for
// 32/64/96-byte blocks, the uncompressed block (minimum code-size selection).
// The stream of a block is: 3-bit method, codewords, all-ones indicator,
// zero padding to a byte boundary (uncompressed: method, bytes, padding).
// Bits are packed MSB-first. The model is written independently of the RTL
// and is what the testbenches compare against.
package lzw_ref_pkg;

  typedef byte unsigned bq_t[$];
  typedef int           iq_t[$];
  typedef bit           bitq_t[$];

  // codeword width of the k-th codeword (same rule as the dynamic scheme)
  function automatic int width_of(int wsel, bit dyn, int k);
    int wmax = 9 + wsel;
    int w;
    if (!dyn) return wmax;
    w = (k < 256) ? 9 : (k < 768) ? 10 : (k < 1792) ? 11 : 12;
    return (w < wmax) ? w : wmax;
  endfunction

  // Plain LZW encoding of one block; also reports events seen.
  // n_full: entries refused because the table was full
  // n_cap : entries refused because the phrase would exceed 8 bytes
  function automatic void lzw_encode(input bq_t data, input int wsel,
                                     output iq_t codes, output int n_full,
                                     output int n_cap);
    int dict[int];
    int limit = (1 << (9 + wsel)) - 2;
    int nxt = 256;
    int cur, curlen, key;
    codes  = {};
    n_full = 0;
    n_cap  = 0;
    if (data.size() == 0) return;
    cur = int'(data[0]);
    curlen = 1;
    for (int i = 1; i < data.size(); i++) begin
      key = cur * 256 + int'(data[i]);
      if (curlen < 8 && dict.exists(key)) begin
        cur = dict[key];
        curlen++;
      end else begin
        codes.push_back(cur);
        if (curlen >= 8)        n_cap++;
        else if (nxt > limit)   n_full++;
        else begin
          dict[key] = nxt;
          nxt++;
        end
        cur = int'(data[i]);
        curlen = 1;
      end
    end
    codes.push_back(cur);
  endfunction

  function automatic void put_bits(ref bitq_t q, input int v, input int w);
    for (int i = w - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  function automatic void pad_byte(ref bitq_t q);
    while (q.size() % 8 != 0) q.push_back(1'b0);
  endfunction

  // bit stream of one block in a given method (0..3 LZW, 4..6 raw)
  function automatic bitq_t block_bits(input bq_t data, input int method, input bit dyn);
    bitq_t q;
    iq_t   codes;
    int    nf, nc, k;
    put_bits(q, method, 3);
    if (method >= 4) begin
      foreach (data[i]) put_bits(q, int'(data[i]), 8);
    end else begin
      lzw_encode(data, method, codes, nf, nc);
      k = 0;
      foreach (codes[i]) begin
        put_bits(q, codes[i], width_of(method, dyn, k));
        k++;
      end
      put_bits(q, (1 << width_of(method, dyn, k)) - 1, width_of(method, dyn, k));
    end
    pad_byte(q);
    return q;
  endfunction

  // minimum code-size selection; `force_m` >= 0 overrides it
  function automatic int choose_method(input bq_t data, input bit dyn, input int force_m);
    int best = 0, best_len = -1, len;
    bitq_t q;
    if (force_m >= 0) return force_m;
    for (int m = 0; m < 7; m++) begin
      if (m == 4 && data.size() != 32) continue;
      if (m == 5 && data.size() != 64) continue;
      if (m == 6 && data.size() != 96) continue;
      q = block_bits(data, m, dyn);
      len = q.size();
      if (best_len < 0 || len < best_len) begin
        best = m;
        best_len = len;
      end
    end
    return best;
  endfunction

  // ---------------------------------------------------------------------
  // Synthetic program. A block of `kind` 0 repeats a few instruction
  // words with small changes (compresses well), kind 1 is random bytes
  // (good candidate to stay uncompressed), kind 2 is long runs of one word
  // (phrases reach the 8-byte limit), kind 3 one repeated byte (the
  // undefined-codeword case occurs).
  // ---------------------------------------------------------------------
  function automatic bq_t make_block(input int nbytes, input int kind);
    bq_t d;
    int unsigned pool[8];
    int unsigned w;
    foreach (pool[i]) pool[i] = $urandom();
    for (int i = 0; i < nbytes / 4; i++) begin
      case (kind)
        1:       w = $urandom();
        2:       w = pool[0];
        3:       w = {4{pool[0][7:0]}};
        default: begin
          w = pool[$urandom_range(7)];
          if ($urandom_range(9) == 0) w[7:0] = 8'($urandom());
        end
      endcase
      d.push_back(w[31:24]);
      d.push_back(w[23:16]);
      d.push_back(w[15:8]);
      d.push_back(w[7:0]);
    end
    return d;
  endfunction

  // Compressed image of a program made of blocks. blk_comp[i] is the byte
  // address of block i in the image, methods[i] its method.
  function automatic void build_image(input bq_t blocks[$], input bit dyn,
                                      input int force_m[$], output bq_t image,
                                      output iq_t blk_comp, output iq_t methods);
    bitq_t q;
    int    m;
    byte unsigned b;
    image    = {};
    blk_comp = {};
    methods  = {};
    foreach (blocks[i]) begin
      m = choose_method(blocks[i], dyn, (i < force_m.size()) ? force_m[i] : -1);
      methods.push_back(m);
      blk_comp.push_back(image.size());
      q = block_bits(blocks[i], m, dyn);
      for (int j = 0; j < q.size(); j += 8) begin
        b = 0;
        for (int t = 0; t < 8; t++) b = {b[6:0], q[j + t]};
        image.push_back(b);
      end
    end
  endfunction

  // program shared by the workload harnesses
  bq_t wl_blocks[$];

endpackage
