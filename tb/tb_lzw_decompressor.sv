// tb_lzw_decompressor: end-to-end test of the whole decompression engine at
// its default parameters.
//
// A synthetic program of branch blocks is compressed by the reference model
// (lzw_ref_pkg), placed in a memory model with random read latency, and its
// branch targets are loaded into the LAT. The test then branches to the
// first block and checks every decompressed byte and its address through all
// blocks, branches again in the middle of a block to another target, tries a
// target that is not in the LAT, and repeats everything with dynamic LZW off.
// The output is throttled at random. It counts how often each mechanism
// happened (indicator fall-through, uncompressed bypass, table full,
// undefined codeword, forwarded table entry, 8-byte phrase limit, dynamic
// width change, every
// method, output stall, mid-block branch, LAT miss) and fails if one never
// did. It also checks that each codeword yields exactly one phrase and that
// with an ideal memory and output 200 codewords take at most 250 cycles.
module tb_lzw_decompressor;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  localparam int ADDR_W = 32;
  localparam int BASE   = 32'h0000_4000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                   dyn_en;
  logic                   lat_clear, lat_wr_en;
  logic [8:0]             lat_wr_idx;
  logic [ADDR_W-1:0]      lat_wr_orig, lat_wr_comp;
  logic                   br_valid;
  logic [ADDR_W-1:0]      br_addr;
  logic                   lat_miss;
  logic                   mem_req;
  logic [ADDR_W-3:0]      mem_addr;
  logic                   mem_rvalid;
  logic [31:0]            mem_rdata;
  logic                   out_valid, out_ready;
  logic [63:0]            out_data;
  logic [3:0]             out_len;
  logic [ADDR_W-1:0]      out_addr;
  logic                   blk_pulse;
  logic [2:0]             blk_method;
  logic                   err;

  lzw_decompressor dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ memory model
  bq_t  img;
  logic pend = 1'b0;
  int   lat_cnt;
  logic [ADDR_W-3:0] paddr;

  function automatic logic [31:0] word_at(logic [ADDR_W-3:0] a);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin
      int idx = int'(a) * 4 + i;
      w[31-8*i -: 8] = (idx < img.size()) ? img[idx] : 8'h00;
    end
    return w;
  endfunction

  int mem_slow = 1;   // 1: random latency, 0: single-cycle memory
  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (pend) begin
      if (lat_cnt == 0) begin
        mem_rvalid <= 1'b1;
        mem_rdata  <= word_at(paddr);
        pend       <= 1'b0;
      end else lat_cnt <= lat_cnt - 1;
    end
    if (mem_req) begin
      pend    <= 1'b1;
      paddr   <= mem_addr;
      lat_cnt <= mem_slow ? $urandom_range(2) : 0;
    end
  end

  // ----------------------------------------------------------- output side
  int ready_pct = 75;
  always @(negedge clk) out_ready <= ($urandom_range(99) < ready_pct);

  bq_t exp_bytes;
  int  exp_base;
  int  pos;
  int  phrases;
  bit  armed = 1'b0;   // checking the stream of the last branch
  always @(posedge clk) begin
    if (rst_n && armed && out_valid && out_ready && pos < exp_bytes.size()) begin
      phrases <= phrases + 1;
      checks++;
      if (out_addr != ADDR_W'(exp_base + pos)) begin
        failures++;
        $display("FAIL addr %h expected %h", out_addr, exp_base + pos);
      end
      for (int i = 0; i < int'(out_len); i++) begin
        checks++;
        if (pos + i >= exp_bytes.size() || out_data[8*i +: 8] != exp_bytes[pos + i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL byte %0d got %h", pos + i, out_data[8*i +: 8]);
        end
      end
      pos <= pos + int'(out_len);
    end
  end

  // ---------------------------------------------------- mechanism counters
  int n_indicator = 0, n_raw = 0, n_full = 0, n_kwk = 0, n_cap = 0, n_widen = 0;
  int n_fwd = 0, n_stall = 0, n_midbranch = 0, n_miss = 0, n_mem_wait = 0;
  int n_method[7] = '{default: 0};
  always @(posedge clk) if (rst_n) begin
    if (dut.u_disp.state_q == dut.u_disp.D_LZW && dut.u_disp.consume && dut.u_disp.ind_c
        && !dut.restart)
      n_indicator++;
    if (blk_pulse) begin
      if (blk_method <= 3'd6) n_method[blk_method]++;
      if (blk_method >= 3'd4 && blk_method <= 3'd6) n_raw++;
    end
    if (dut.g_single.u_core.b_adv) begin
      if (dut.g_single.u_core.kwk_q) n_kwk++;
      if (dut.g_single.u_core.fwd_q) n_fwd++;
      if (dut.g_single.u_core.prev_vld_q && dut.g_single.u_core.next_q > dut.g_single.u_core.limit_q) n_full++;
      if (dut.g_single.u_core.prev_vld_q && dut.g_single.u_core.prev_q.len == 4'd8) n_cap++;
    end
    if (dut.u_disp.state_q == dut.u_disp.D_LZW && dut.u_disp.consume && dyn_en
        && dut.u_disp.k_q == 12'd256 && dut.u_disp.wsel_q != 2'd0)
      n_widen++;
    if (out_valid && !out_ready) n_stall++;
    if (lat_miss) n_miss++;
    if (err) begin
      failures++;
      $display("FAIL engine error at cycle %0d", cyc);
    end
  end

  // ------------------------------------------------------------- program
  bq_t blocks[$];
  iq_t force_m;
  iq_t blk_comp, methods;

  task automatic make_program();
    // size, kind, forced method (-1: smallest)
    int spec[][3] = '{
      '{200, 0, -1}, '{32, 1, -1}, '{1400, 0, 3}, '{64, 3, -1}, '{96, 1, -1},
      '{64, 1, -1}, '{1500, 1, 0}, '{400, 2, -1}, '{300, 0, 1}, '{900, 0, 2},
      '{4, 0, -1}, '{128, 0, -1}, '{96, 0, -1}, '{32, 1, 4}, '{2000, 0, -1}
    };
    blocks  = {};
    force_m = {};
    foreach (spec[i]) begin
      blocks.push_back(make_block(spec[i][0], spec[i][1]));
      force_m.push_back(spec[i][2]);
    end
  endtask

  function automatic int orig_of(int b);
    int a = BASE;
    for (int i = 0; i < b; i++) a += blocks[i].size();
    return a;
  endfunction

  function automatic int expected_phrases(int from, bit dyn);
    int n = 0, nf, nc;
    iq_t codes;
    for (int i = from; i < blocks.size(); i++) begin
      if (methods[i] >= 4) n += blocks[i].size() / 4;
      else begin
        lzw_encode(blocks[i], methods[i], codes, nf, nc);
        n += codes.size();
      end
    end
    return n;
  endfunction

  task automatic load(bit dyn);
    build_image(blocks, dyn, force_m, img, blk_comp, methods);
    @(negedge clk);
    lat_clear = 1'b1;
    @(negedge clk);
    lat_clear = 1'b0;
    foreach (blocks[i]) begin
      lat_wr_en   = 1'b1;
      lat_wr_idx  = 9'(i);
      lat_wr_orig = orig_of(i);
      lat_wr_comp = blk_comp[i];
      @(negedge clk);
    end
    lat_wr_en = 1'b0;
  endtask

  // Branch to `addr`, expecting the program from block `from` (or nothing
  // when from < 0). The output is held for the branch cycle, so every
  // phrase taken afterwards belongs to the new stream.
  task automatic branch(int addr, int from);
    int keep = ready_pct;
    armed = 1'b0;
    ready_pct = 0;
    @(negedge clk);
    br_valid = 1'b1;
    br_addr  = addr;
    exp_bytes = {};
    if (from >= 0) begin
      for (int i = from; i < blocks.size(); i++) exp_bytes = {exp_bytes, blocks[i]};
      exp_base = orig_of(from);
    end
    pos = 0;
    phrases = 0;
    @(negedge clk);
    br_valid = 1'b0;
    armed = 1'b1;
    ready_pct = keep;
  endtask

  // run from block `from` to the end of the program and check everything
  task automatic run_from(int from, bit dyn);
    int t0, nexp;
    branch(orig_of(from), from);
    t0 = cyc;
    while (pos < exp_bytes.size() && cyc - t0 < 400000) @(negedge clk);
    checks++;
    if (pos != exp_bytes.size()) begin
      failures++;
      $display("FAIL run from block %0d: %0d of %0d bytes", from, pos, exp_bytes.size());
    end
    nexp = expected_phrases(from, dyn);
    checks++;
    if (phrases != nexp) begin
      failures++;
      $display("FAIL %0d phrases, expected %0d", phrases, nexp);
    end
    $display("run dyn=%0d from block %0d: %0d bytes, %0d phrases, %0d cycles, %0d compressed bytes",
             dyn, from, pos, phrases, cyc - t0, img.size() - blk_comp[from]);
  endtask

  // branch to block `to` while block `from` is being decoded
  task automatic mid_branch(int from, int to);
    int t0;
    branch(orig_of(from), from);
    t0 = cyc;
    while (pos < blocks[from].size() / 2 && cyc - t0 < 100000) @(negedge clk);
    branch(orig_of(to), to);
    n_midbranch++;
    t0 = cyc;
    while (pos < exp_bytes.size() && cyc - t0 < 400000) @(negedge clk);
    checks++;
    if (pos != exp_bytes.size()) begin
      failures++;
      $display("FAIL mid-block branch: %0d of %0d bytes", pos, exp_bytes.size());
    end
  endtask

  // with an ideal memory and output the engine decodes close to one
  // codeword per cycle (the bit buffer supplies 16 bits per cycle)
  task automatic rate_check();
    int t_first, n_out, t0;
    ready_pct = 100;
    mem_slow  = 0;
    branch(orig_of(14), 14);
    while (phrases == 0) @(negedge clk);
    t_first = cyc;
    n_out = phrases;
    t0 = cyc;
    while (phrases < 201 && cyc - t0 < 10000) @(negedge clk);
    checks++;
    if (4 * (cyc - t_first) > 5 * (phrases - n_out)) begin
      failures++;
      $display("FAIL rate: %0d phrases in %0d cycles", phrases - n_out, cyc - t_first);
    end else
      $display("rate: %0d codewords in %0d cycles", phrases - n_out, cyc - t_first);
    while (pos < exp_bytes.size() && cyc - t0 < 100000) @(negedge clk);
    ready_pct = 75;
    mem_slow  = 1;
  endtask

  initial begin
    rst_n = 1'b0;
    dyn_en = 1'b1;
    lat_clear = 1'b0; lat_wr_en = 1'b0; lat_wr_idx = '0; lat_wr_orig = '0; lat_wr_comp = '0;
    br_valid = 1'b0; br_addr = '0;
    mem_rdata = '0;
    pos = 0;
    phrases = 0;
    make_program();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 1; d >= 0; d--) begin
      dyn_en = d[0];
      load(d[0]);
      $display("dyn=%0d methods: %p", d, methods);
      run_from(0, d[0]);
      run_from(7, d[0]);
      mid_branch(2, 5);
      mid_branch(9, 1);
      rate_check();
      // a target that is not in the LAT
      branch(BASE + 2, -1);
      repeat (3) @(negedge clk);
      checks++;
      if (!lat_miss || out_valid) begin
        failures++;
        $display("FAIL LAT miss not reported");
      end
    end
    $display("forwarded=%0d", n_fwd);
    $display("events: indicator=%0d raw=%0d full=%0d kwk=%0d cap=%0d widen=%0d stall=%0d midbranch=%0d miss=%0d",
             n_indicator, n_raw, n_full, n_kwk, n_cap, n_widen, n_stall, n_midbranch, n_miss);
    $display("methods: %p", n_method);
    foreach (n_method[i]) begin
      checks++;
      if (n_method[i] == 0) begin failures++; $display("FAIL method %0d never used", i); end
    end
    checks++; if (n_indicator == 0) begin failures++; $display("FAIL no indicator"); end
    checks++; if (n_raw == 0)       begin failures++; $display("FAIL no bypass"); end
    checks++; if (n_full == 0)      begin failures++; $display("FAIL table never full"); end
    checks++; if (n_kwk == 0)       begin failures++; $display("FAIL no undefined codeword"); end
    checks++; if (n_cap == 0)       begin failures++; $display("FAIL no 8-byte phrase"); end
    checks++; if (n_widen == 0)     begin failures++; $display("FAIL no width change"); end
    checks++; if (n_fwd == 0)       begin failures++; $display("FAIL no forwarded entry"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_midbranch == 0) begin failures++; $display("FAIL no mid-block branch"); end
    checks++; if (n_miss == 0)      begin failures++; $display("FAIL no LAT miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
