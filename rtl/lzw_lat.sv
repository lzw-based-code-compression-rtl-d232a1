// lzw_lat: line address table (LAT) for branch targets.
//
// Compressed branch blocks do not sit at their original addresses, so a
// branch needs the compressed address of its target block. Only branch
// targets are listed (not every cache line), which keeps the table small.
// Each entry pairs the original byte address of a branch target with the
// byte address where its compressed block starts.
//
// Interface and timing: entries are loaded through a write port (wr_en,
// wr_idx, wr_orig, wr_comp) when the program is installed; `clear` drops all
// of them. A lookup (lk_valid, lk_addr) compares the address with every
// entry in parallel; one cycle later rsp_valid returns with rsp_hit and the
// compressed address rsp_comp. Reset and clear are synchronous.
//
// From the design: a LAT mapping branch targets only. Own choices: the
// fully associative search, the entry count (512) and address widths.
module lzw_lat #(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned ADDR_W  = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  // load port
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [ADDR_W-1:0]          wr_orig,
  input  logic [ADDR_W-1:0]          wr_comp,
  // lookup
  input  logic                       lk_valid,
  input  logic [ADDR_W-1:0]          lk_addr,
  output logic                       rsp_valid,
  output logic                       rsp_hit,
  output logic [ADDR_W-1:0]          rsp_comp
);

  logic [ENTRIES-1:0] vld_q;
  logic [ADDR_W-1:0]  orig_q [ENTRIES];
  logic [ADDR_W-1:0]  comp_q [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      vld_q <= '0;
    end else if (wr_en) begin
      vld_q[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      orig_q[wr_idx] <= wr_orig;
      comp_q[wr_idx] <= wr_comp;
    end
  end

  logic              hit_c;
  logic [ADDR_W-1:0] comp_c;

  always_comb begin
    hit_c  = 1'b0;
    comp_c = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (vld_q[i] && orig_q[i] == lk_addr) begin
        hit_c  = 1'b1;
        comp_c = comp_c | comp_q[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_hit   <= 1'b0;
      rsp_comp  <= '0;
    end else begin
      rsp_valid <= lk_valid;
      rsp_hit   <= hit_c;
      rsp_comp  <= comp_c;
    end
  end

endmodule
