// lzw_code_table_mp: multi-port LZW coding table for parallel decompression.
//
// Same contents and timing as lzw_code_table (codes 0..255 produced by
// logic, 256..4095 stored, 8-byte phrases, one-cycle synchronous reads that
// hold their data), but with PORTS read ports and PORTS write ports so that
// PORTS codewords can be looked up and PORTS new entries written in one
// cycle. Writes in one cycle always go to different entries. A read and a
// write of the same entry in one cycle return the old contents.
//
// From the design: the table contents and width. Own choice: one read and
// one write port per lane.
module lzw_code_table_mp
  import lzw_pkg::*;
#(
  parameter int unsigned PORTS     = 2,
  parameter int unsigned CODE_BITS = CW_MAX
) (
  input  logic                 clk,
  input  logic [PORTS-1:0]     rd_en,
  input  logic [CODE_BITS-1:0] rd_addr   [PORTS],
  output phrase_t              rd_phrase [PORTS],
  input  logic [PORTS-1:0]     wr_en,
  input  logic [CODE_BITS-1:0] wr_addr   [PORTS],
  input  phrase_t              wr_phrase [PORTS]
);

  localparam int unsigned DEPTH = (1 << CODE_BITS) - N_LITERALS;

  phrase_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(PORTS); p++) begin
      if (wr_en[p] && wr_addr[p] >= CODE_BITS'(N_LITERALS))
        mem[wr_addr[p] - CODE_BITS'(N_LITERALS)] <= wr_phrase[p];
    end
  end

  for (genvar p = 0; p < int'(PORTS); p++) begin : g_rd
    always_ff @(posedge clk) begin
      if (rd_en[p]) begin
        if (rd_addr[p] < CODE_BITS'(N_LITERALS)) begin
          rd_phrase[p].len  <= LEN_W'(1);
          rd_phrase[p].data <= {{(8*PHRASE_BYTES-8){1'b0}}, rd_addr[p][7:0]};
        end else begin
          rd_phrase[p] <= mem[rd_addr[p] - CODE_BITS'(N_LITERALS)];
        end
      end
    end
  end

endmodule
