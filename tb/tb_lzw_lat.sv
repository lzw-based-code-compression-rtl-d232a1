// tb_lzw_lat: loads the line address table with random branch targets,
// then looks up every target (must hit with its compressed address one
// cycle later), addresses that are not targets (must miss), an entry
// overwritten with a new mapping, and the table after `clear` (all miss).
module tb_lzw_lat;
  localparam int N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, clear, wr_en, lk_valid;
  logic [$clog2(N)-1:0] wr_idx;
  logic [31:0]          wr_orig, wr_comp, lk_addr;
  logic                 rsp_valid, rsp_hit;
  logic [31:0]          rsp_comp;

  lzw_lat #(.ENTRIES(N), .ADDR_W(32)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned orig[N], comp[N];

  task automatic lookup(input logic [31:0] a, input bit hit, input logic [31:0] c);
    lk_valid = 1'b1; lk_addr = a;
    @(negedge clk);
    lk_valid = 1'b0;
    checks++;
    if (!rsp_valid || rsp_hit !== hit || (hit && rsp_comp !== c)) begin
      failures++;
      $display("FAIL lookup %h: hit=%0d comp=%h expected %0d/%h", a, rsp_hit, rsp_comp, hit, c);
    end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; wr_en = 1'b0; lk_valid = 1'b0;
    wr_idx = '0; wr_orig = '0; wr_comp = '0; lk_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      orig[i] = 32'h1000 + 16 * i + 4 * $urandom_range(3);
      comp[i] = $urandom_range(1 << 20);
      wr_en = 1'b1; wr_idx = i[5:0]; wr_orig = orig[i]; wr_comp = comp[i];
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int i = N - 1; i >= 0; i--) lookup(orig[i], 1'b1, comp[i]);
    lookup(32'h0, 1'b0, 0);
    lookup(32'h1000 + 16 * N + 4, 1'b0, 0);
    lookup(orig[5] + 1, 1'b0, 0);
    // remap one entry
    wr_en = 1'b1; wr_idx = 6'd7; wr_orig = orig[7]; wr_comp = 32'hABCD;
    @(negedge clk);
    wr_en = 1'b0;
    lookup(orig[7], 1'b1, 32'hABCD);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int i = 0; i < N; i += 9) lookup(orig[i], 1'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
