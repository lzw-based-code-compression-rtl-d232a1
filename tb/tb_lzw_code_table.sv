// tb_lzw_code_table: checks the coding table against an array model.
// Random phrases are written to random stored codes (256..4094) and read
// back with the one-cycle read latency; codes 0..255 must read as the
// single byte equal to the code; the read data must hold while rd_en is
// low; a write and a read in one cycle must not disturb another entry.
module tb_lzw_code_table;
  import lzw_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rd_en, wr_en;
  code_t   rd_addr, wr_addr;
  phrase_t rd_phrase, wr_phrase;

  lzw_code_table dut (.*);

  int checks = 0, failures = 0;
  phrase_t model [int];

  function automatic phrase_t rand_phrase();
    phrase_t p;
    p.len  = LEN_W'($urandom_range(8, 1));
    p.data = {$urandom(), $urandom()};
    return p;
  endfunction

  task automatic check(input phrase_t exp, input string what);
    checks++;
    if (rd_phrase !== exp) begin
      failures++;
      $display("FAIL %s: got %h/%0d expected %h/%0d", what, rd_phrase.data, rd_phrase.len,
               exp.data, exp.len);
    end
  endtask

  task automatic read(input code_t a);
    rd_en = 1'b1; rd_addr = a;
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  initial begin
    code_t a;
    phrase_t e;
    rd_en = 1'b0; wr_en = 1'b0; rd_addr = '0; wr_addr = '0; wr_phrase = '0;
    @(negedge clk);
    // fill random entries
    for (int i = 0; i < 600; i++) begin
      a = code_t'($urandom_range(4094, 256));
      wr_en = 1'b1; wr_addr = a; wr_phrase = rand_phrase();
      model[int'(a)] = wr_phrase;
      @(negedge clk);
    end
    wr_en = 1'b0;
    // literal entries
    for (int c = 0; c < 256; c += 7) begin
      read(code_t'(c));
      e = '0; e.len = 1; e.data[7:0] = 8'(c);
      check(e, "literal");
    end
    // stored entries, and the read data holds afterwards
    foreach (model[k]) begin
      read(code_t'(k));
      check(model[k], "stored");
      @(negedge clk);
      check(model[k], "hold");
    end
    // read one entry while writing another
    a = code_t'(300);
    model[300] = rand_phrase();
    wr_en = 1'b1; wr_addr = a; wr_phrase = model[300];
    @(negedge clk);
    model[301] = rand_phrase();
    wr_en = 1'b1; wr_addr = 301; wr_phrase = model[301];
    rd_en = 1'b1; rd_addr = 300;
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
    check(model[300], "read during write");
    read(301);
    check(model[301], "written during read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
