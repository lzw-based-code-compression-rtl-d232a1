// lzw_wl_harness: runs the program in lzw_ref_pkg::wl_blocks through one
// lzw_decompressor with LANES lanes, with a single-cycle memory and an
// always-ready consumer, and checks every byte and address. On `start` it
// compresses the program (dynamic LZW, smallest method per block), loads
// the LAT, branches to the first block and measures the cycles until the
// last byte is out; then it raises `done` with the results.
module lzw_wl_harness
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
#(
  parameter int LANES = 1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   comp_bytes
);
  localparam int ADDR_W = 32;
  localparam int BASE   = 32'h0001_0000;
  localparam int OL_W   = $clog2(8*LANES+1);

  logic                  rst_n, dyn_en, lat_clear, lat_wr_en, br_valid, lat_miss;
  logic [8:0]            lat_wr_idx;
  logic [ADDR_W-1:0]     lat_wr_orig, lat_wr_comp, br_addr, out_addr;
  logic                  mem_req, mem_rvalid, out_valid, out_ready, blk_pulse, err;
  logic [ADDR_W-3:0]     mem_addr;
  logic [31:0]           mem_rdata;
  logic [64*LANES-1:0]   out_data;
  logic [OL_W-1:0]       out_len;
  logic [2:0]            blk_method;

  lzw_decompressor #(.LANES(LANES)) dut (.*);

  bq_t img;
  bq_t exp_bytes;
  iq_t comp, methods, force_m;
  int  pos = 0;
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] word_at(logic [ADDR_W-3:0] a);
    logic [31:0] w;
    int idx;
    for (int i = 0; i < 4; i++) begin
      idx = int'(a) * 4 + i;
      w[31-8*i -: 8] = (idx < img.size()) ? img[idx] : 8'h00;
    end
    return w;
  endfunction

  always @(posedge clk) begin
    mem_rvalid <= mem_req;
    mem_rdata  <= word_at(mem_addr);
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready && pos < exp_bytes.size()) begin
    checks++;
    if (out_addr != ADDR_W'(BASE + pos)) begin failures++; if (failures < 4) $display("L%0d addr %h pos %0d", LANES, out_addr, pos); end
    for (int i = 0; i < int'(out_len); i++) begin
      checks++;
      if (pos + i >= exp_bytes.size() || out_data[8*i +: 8] != exp_bytes[pos + i]) begin
        failures++;
        if (failures < 4) $display("L%0d byte %0d got %h exp %h", LANES, pos + i, out_data[8*i +: 8], exp_bytes[pos + i]);
      end
    end
    pos <= pos + int'(out_len);
    if (err) failures++;
  end

  initial begin
    int a, t0;
    done = 1'b0; checks = 0; failures = 0; cycles = 0; comp_bytes = 0;
    rst_n = 1'b0; dyn_en = 1'b1; lat_clear = 1'b0; lat_wr_en = 1'b0; lat_wr_idx = '0;
    lat_wr_orig = '0; lat_wr_comp = '0; br_valid = 1'b0; br_addr = '0; out_ready = 1'b1;
    forever begin
      @(posedge start);
      @(negedge clk);
      done = 1'b0;
      rst_n = 1'b0;
      build_image(wl_blocks, 1'b1, force_m, img, comp, methods);
      comp_bytes = img.size();
      exp_bytes = {};
      foreach (wl_blocks[i]) exp_bytes = {exp_bytes, wl_blocks[i]};
      @(negedge clk);
      rst_n = 1'b1;
      a = BASE;
      foreach (wl_blocks[i]) begin
        lat_wr_en = 1'b1; lat_wr_idx = 9'(i); lat_wr_orig = a; lat_wr_comp = comp[i];
        a += wl_blocks[i].size();
        @(negedge clk);
      end
      lat_wr_en = 1'b0;
      pos = 0;
      br_valid = 1'b1; br_addr = BASE;
      @(negedge clk);
      br_valid = 1'b0;
      t0 = cyc;
      while (pos < exp_bytes.size() && cyc - t0 < 2000000) @(negedge clk);
      cycles = cyc - t0;
      checks++;
      if (pos != exp_bytes.size()) failures++;
      done = 1'b1;
    end
  end
endmodule
