// tb_lzw_bit_buffer: checks the bit window against the memory contents.
// A random memory image is read through a model with random latency
// (0..4 extra cycles). After a restart at a random byte address the test
// consumes random amounts of 0..32 bits; every cycle the valid bits of
// `peek` must equal the stream bits at the current position and `bitpos`
// the number of consumed bits mod 8. Restarts also land while a read is in
// flight, whose stale data must be dropped. It also checks that the first
// request leaves one cycle after the restart and that the buffer keeps up
// with a 32-bit-per-cycle consumer once filled from a single-cycle memory
// (at least one word per two cycles).
module tb_lzw_bit_buffer;
  localparam int MEM_BYTES = 4096;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, restart, consume, mem_req, mem_rvalid;
  logic [31:0] start_byte, peek, mem_rdata;
  logic [6:0]  avail;
  logic [2:0]  bitpos;
  logic [5:0]  consume_n;
  logic [29:0] mem_addr;

  lzw_bit_buffer #(.ADDR_W(32)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned mem[MEM_BYTES];

  // memory model
  logic pend = 1'b0;
  int   cnt;
  logic [29:0] paddr;
  int   max_lat = 4;
  int   n_req = 0;
  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (pend) begin
      if (cnt == 0) begin
        mem_rvalid <= 1'b1;
        for (int i = 0; i < 4; i++) mem_rdata[31-8*i -: 8] <= mem[(int'(paddr) * 4 + i) % MEM_BYTES];
        pend <= 1'b0;
      end else cnt <= cnt - 1;
    end
    if (mem_req) begin
      n_req <= n_req + 1;
      pend  <= 1'b1;
      paddr <= mem_addr;
      cnt   <= $urandom_range(max_lat);
    end
  end

  function automatic bit stream_bit(int bitaddr);
    return mem[(bitaddr / 8) % MEM_BYTES][7 - bitaddr % 8];
  endfunction

  int pos;  // absolute bit address of the next bit

  task automatic do_restart(int byte_addr);
    restart = 1'b1; start_byte = byte_addr;
    @(negedge clk);
    restart = 1'b0;
    pos = byte_addr * 8;
  endtask

  task automatic check_window(int start);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < 32 && i < int'(avail); i++)
      if (peek[31-i] != stream_bit(pos + i)) ok = 1'b0;
    checks++;
    if (!ok || bitpos != 3'((pos - start * 8) % 8)) begin
      failures++;
      if (failures < 10) $display("FAIL window at bit %0d (avail %0d bitpos %0d)", pos, avail, bitpos);
    end
  endtask

  initial begin
    int start, n, t0, r0;
    foreach (mem[i]) mem[i] = 8'($urandom());
    rst_n = 1'b0; restart = 1'b0; start_byte = '0; consume = 1'b0; consume_n = '0;
    mem_rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      start = $urandom_range(MEM_BYTES - 600);
      do_restart(start);
      for (int s = 0; s < 300; s++) begin
        check_window(start);
        consume = 1'b0;
        if ($urandom_range(9) < 7 && avail > 0) begin
          n = $urandom_range((avail > 32) ? 32 : int'(avail));
          consume = 1'b1; consume_n = 6'(n);
          pos += n;
        end
        @(negedge clk);
        consume = 1'b0;
      end
    end
    // restart while a request is outstanding
    for (int r = 0; r < 20; r++) begin
      start = $urandom_range(MEM_BYTES - 600);
      do_restart(start);
      @(negedge clk);
      start = $urandom_range(MEM_BYTES - 600);
      do_restart(start);
      for (int s = 0; s < 40; s++) begin
        check_window(start);
        @(negedge clk);
      end
    end
    // timing with a single-cycle memory
    max_lat = 0;
    repeat (6) @(negedge clk);
    r0 = n_req;
    do_restart(64);
    #1;
    checks++;
    if (!mem_req) begin failures++; $display("FAIL no request after restart %0d %0d %0d", dut.pending_q, dut.stale_q, dut.level_q); end
    while (avail < 32) @(negedge clk);
    t0 = 0;
    for (int s = 0; s < 100; s++) begin
      check_window(64);
      if (avail >= 32) begin
        consume = 1'b1; consume_n = 6'd32; pos += 32; t0++;
      end
      @(negedge clk);
      consume = 1'b0;
    end
    checks++;
    if (t0 < 50) begin failures++; $display("FAIL only %0d words in 100 cycles", t0); end
    $display("words consumed in 100 cycles: %0d", t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
