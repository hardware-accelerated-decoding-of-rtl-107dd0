// tb_book_memory: books never written read back empty; written books read
// back one cycle after rd_en; random writes and reads against a reference
// array of the same size. Halfway through, a reset must make every book read
// back empty again.
module tb_book_memory;
  import fixfast_pkg::*;

  localparam int W = 64;
  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en;
  logic [$clog2(W)-1:0] rd_addr, wr_addr;
  book_t rd_book, wr_book;
  book_t refm [W];
  bit    refw [W];
  int checks = 0, failures = 0;

  book_memory #(.WORDS(W)) dut (.clk, .rst_n, .rd_en, .rd_addr, .rd_book, .wr_en, .wr_addr, .wr_book);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic book_t rnd_book();
    book_t b;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < BOOK_DEPTH; i++)
        b[s][i] = '{valid: 1'($urandom), price: $urandom, qty: $urandom, count: 16'($urandom)};
    return b;
  endfunction

  initial begin
    book_t exp_b;
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_book = '0;
    for (int i = 0; i < W; i++) refw[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 1000) begin
        wr_en = 0; rd_en = 0;
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        for (int i = 0; i < W; i++) refw[i] = 0;
      end
      wr_en   = $urandom_range(0, 2) == 0;
      wr_addr = $urandom_range(0, W - 1);
      wr_book = rnd_book();
      rd_en   = 1;
      rd_addr = $urandom_range(0, W - 1);
      if (rd_addr == wr_addr) wr_en = 0;
      exp_b = refw[rd_addr] ? refm[rd_addr] : '0;
      if (wr_en) begin refm[wr_addr] = wr_book; refw[wr_addr] = 1; end
      @(posedge clk); #1;
      checks++;
      if (rd_book !== exp_b) begin
        failures++;
        if (failures < 5) $display("FAIL read %0d at %0d", n, rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
