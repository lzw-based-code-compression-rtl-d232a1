// tb_lzw_workloads: decompresses programs of the two sizes for which cycle
// counts are reported for this kind of engine - an ADPCM decoder of 9344
// bytes and an MPEG2 encoder of about 182 kB - made of synthetic branch
// blocks averaging about 454 bytes. Each runs on the default engine and on
// engines with 2, 4 and 8 look-ahead lanes. Every byte and address is checked;
// the compression ratio and cycles are printed. The program content is
// synthetic, so ratios and cycle counts indicate, not reproduce, the
// reference figures (5508 cycles for the ADPCM decoder with a pipelined
// engine). It checks that the default engine delivers more than one byte
// per cycle. The look-ahead engines are only checked for correctness: fed
// one codeword per cycle by the dispatching logic they do not beat the
// pipelined single core.
module tb_lzw_workloads;
  import lzw_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic done [4];
  int   hc [4], hf [4], cyc [4], cb [4];

  lzw_wl_harness #(.LANES(1)) h1 (.clk, .start, .done(done[0]), .checks(hc[0]), .failures(hf[0]), .cycles(cyc[0]), .comp_bytes(cb[0]));
  lzw_wl_harness #(.LANES(2)) h2 (.clk, .start, .done(done[1]), .checks(hc[1]), .failures(hf[1]), .cycles(cyc[1]), .comp_bytes(cb[1]));
  lzw_wl_harness #(.LANES(4)) h4 (.clk, .start, .done(done[2]), .checks(hc[2]), .failures(hf[2]), .cycles(cyc[2]), .comp_bytes(cb[2]));
  lzw_wl_harness #(.LANES(8)) h8 (.clk, .start, .done(done[3]), .checks(hc[3]), .failures(hf[3]), .cycles(cyc[3]), .comp_bytes(cb[3]));

  int checks = 0, failures = 0;

  task automatic run(string name, int size);
    int left = size, n, total = 0;
    wl_blocks = {};
    while (left > 0) begin
      n = 4 * $urandom_range(8, 219);
      if ($urandom_range(9) == 0) n = 32 * $urandom_range(1, 3);
      if (n > left) n = left;
      wl_blocks.push_back(make_block(n, ($urandom_range(9) == 0) ? 1 : 0));
      left -= n;
    end
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    repeat (5) @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    foreach (hc[i]) begin
      checks += hc[i];
      failures += hf[i];
    end
    $display("%s: %0d bytes in %0d blocks, compressed %0d bytes (%0d%%)", name, size,
             wl_blocks.size(), cb[0], 100 * cb[0] / size);
    $display("  cycles: 1 lane %0d (%0d.%02d bytes/cycle), 2 lanes %0d, 4 lanes %0d, 8 lanes %0d",
             cyc[0], size / cyc[0], (100 * size / cyc[0]) % 100, cyc[1], cyc[2], cyc[3]);
    // the pipelined single core decodes one codeword per cycle; with
    // compressible code that is more than one byte per cycle
    checks++;
    if (!(cyc[0] < size)) begin
      failures++;
      $display("FAIL single core below one byte per cycle");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run("ADPCM-decoder size", 9344);
    run("MPEG2-encoder size", 182 * 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
