// tb_book_cache: checks the book cache on the worked example (a five-level
// CLH3 book: delete bid level 4, insert a bid at 89.50 for 60, set ask level 1
// to 100 at 90.00) against hand-written expected tables, then on 3000 random
// commands against the queue-based reference book. Prices are in cents.
module tb_book_cache;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] op;
  book_t load_book, book, ref_b;
  book_cmd_t cmd;
  logic cmd_err;
  int checks = 0, failures = 0;

  book_cache dut (.clk, .rst_n, .op, .load_book, .cmd, .book, .cmd_err);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(book_cmd_t c, bit exp_err);
    cmd = c; op = 2'd2;
    @(posedge clk); #1;
    op = 2'd0;
    checks++;
    if (cmd_err !== exp_err) begin
      failures++;
      $display("FAIL cmd_err=%0d expected %0d for %p", cmd_err, exp_err, c);
    end
  endtask

  // compare one side with expected (price, qty) rows; 0 rows marks the end
  task automatic expect_side(int side, int prices[], int qtys[]);
    for (int i = 0; i < BOOK_DEPTH; i++) begin
      checks++;
      if (i < prices.size()) begin
        if (!book[side][i].valid || book[side][i].price != prices[i] ||
            book[side][i].qty != qtys[i]) begin
          failures++;
          $display("FAIL side %0d level %0d: %p, expected %0d @ %0d", side, i+1,
                   book[side][i], qtys[i], prices[i]);
        end
      end else if (book[side][i].valid) begin
        failures++;
        $display("FAIL side %0d level %0d should be empty", side, i+1);
      end
    end
  endtask

  initial begin
    bit e;
    book_cmd_t c;
    op = 0; load_book = '0; cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // build the example book by inserts, in mixed order
    exec(mk_cmd(CMD_INSERT, 7, 0, 0, 8800, 90, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 0, 0, 8900, 100, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 0, 0, 8720, 120, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 0, 0, 8850, 160, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 0, 0, 8760, 150, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 1, 0, 9150, 100, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 1, 0, 9000, 200, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 1, 0, 9200, 120, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 1, 0, 9050, 150, 1), 0);
    exec(mk_cmd(CMD_INSERT, 7, 1, 0, 9100, 170, 1), 0);
    expect_side(0, '{8900, 8850, 8800, 8760, 8720}, '{100, 160, 90, 150, 120});
    expect_side(1, '{9000, 9050, 9100, 9150, 9200}, '{200, 150, 170, 100, 120});
    // delete level 4 of bid
    exec(mk_cmd(CMD_DELETE, 7, 0, 4, 0, 0, 0), 0);
    expect_side(0, '{8900, 8850, 8800, 8720}, '{100, 160, 90, 120});
    // insert bid at 89.50 for 60
    exec(mk_cmd(CMD_INSERT, 7, 0, 0, 8950, 60, 1), 0);
    expect_side(0, '{8950, 8900, 8850, 8800, 8720}, '{60, 100, 160, 90, 120});
    // ask level 1 at 90.00 now 100
    exec(mk_cmd(CMD_UPDATE, 7, 1, 1, 9000, 100, 1), 0);
    expect_side(1, '{9000, 9050, 9100, 9150, 9200}, '{100, 150, 170, 100, 120});
    // bad levels
    exec(mk_cmd(CMD_DELETE, 7, 0, 0, 0, 0, 0), 1);
    exec(mk_cmd(CMD_UPDATE, 7, 1, 6, 9000, 1, 1), 1);
    // load a book, then random commands against the reference
    load_book = book;
    load_book[0][0].qty = 12345;
    op = 2'd1;
    @(posedge clk); #1;
    op = 2'd0;
    ref_b = load_book;
    checks++;
    if (book !== ref_b) begin failures++; $display("FAIL load"); end
    for (int n = 0; n < 3000; n++) begin
      c = mk_cmd(cmd_action_e'($urandom_range(0, 2)), 7, $urandom_range(0, 1),
                 $urandom_range(0, BOOK_DEPTH + 1), 9000 + $urandom_range(0, 40) * 5 - 100,
                 $urandom_range(1, 999), $urandom_range(1, 50));
      if (c.action == CMD_INSERT && $urandom_range(0, 3) == 0) c.price = ref_b[c.side][0].price;
      e = ref_apply(ref_b, c);
      exec(c, e);
      checks++;
      if (book !== ref_b) begin
        failures++;
        if (failures < 3) begin
          $display("FAIL random command %0d act=%0d side=%0d lvl=%0d price=%0d", n, c.action, c.side, c.level, c.price);
          for (int i = 0; i < BOOK_DEPTH; i++)
            $display("  %0d: dut %0d %0d %0d  ref %0d %0d %0d", i, book[c.side][i].valid, book[c.side][i].price, book[c.side][i].qty,
                     ref_b[c.side][i].valid, ref_b[c.side][i].price, ref_b[c.side][i].qty);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
