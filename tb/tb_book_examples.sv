// tb_book_examples: runs the book examples of the original design description
// through the whole pipeline (fixfast_top at its default sizes), as
// FAST-encoded UDP frames on both ports.
//
// Book 3 (symbol CLH3): five bid and five ask levels are built by inserts in
// scrambled order. Then come the three example operations: delete bid level
// 4; insert a bid at 89.50 for 60; update ask level 1 (90.00) to 100. After
// each one, the snapshot must equal the expected table.
// Book 1: the five-deep best bid/ask table with order counts (bid 9427.50 ...
// 9425.50, ask 9428.00 ... 9430.00) is built the same way and compared.
// Prices are in cents. The tables below are copied from the examples, not
// computed.
module tb_book_examples;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] d_pkt_rdy, d_vld, d_end, ack;
  logic [1:0][7:0] d_flit;
  logic snap_vld, cksum_err, seq_err, tid_err, dec_err, fb_overflow, cmd_err, busy;
  logic [BOOK_AW-1:0] snap_idx;
  book_t snap_book;
  int checks = 0, failures = 0, n_snap = 0;
  int seq [2] = '{100, 7000};
  int dprice_ins = 0, dprice_upd = 0;
  int nsent = 0;

  eth_driver_model d0 (.clk, .ack(ack[0]), .pkt_rdy(d_pkt_rdy[0]), .flit(d_flit[0]), .vld(d_vld[0]), .last(d_end[0]));
  eth_driver_model d1 (.clk, .ack(ack[1]), .pkt_rdy(d_pkt_rdy[1]), .flit(d_flit[1]), .vld(d_vld[1]), .last(d_end[1]));

  fixfast_top dut (.clk, .rst_n, .d_pkt_rdy, .d_flit, .d_vld, .d_end, .ack, .snap_vld, .snap_idx,
                   .snap_book, .cksum_err, .seq_err, .tid_err, .dec_err, .fb_overflow, .cmd_err, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (snap_vld) n_snap++;
    if (cksum_err || seq_err || tid_err || dec_err || fb_overflow || cmd_err) begin
      failures++;
      $display("FAIL unexpected error pulse");
    end
  end

  // send one message in a frame, alternating ports, and wait for its snapshot
  task automatic send(bytes_t m);
    int ch, n0;
    ch = nsent % 2;
    n0 = n_snap;
    if (ch == 0) d0.push(frame(seq[ch], m)); else d1.push(frame(seq[ch], m));
    seq[ch]++;
    nsent++;
    wait (n_snap == n0 + 1);
    @(negedge clk);
  endtask

  task automatic insert(int book, int side, int price, int qty, int cnt);
    send(msg_insert(1, book, side, longint'(price) - dprice_ins, qty, 1, cnt));
    dprice_ins = price;
  endtask

  // rows: price, qty, count (count < 0: not checked)
  task automatic expect_side(int book, int side, int rows[][3]);
    checks++;
    if (snap_idx != book) begin failures++; $display("FAIL snapshot of book %0d", snap_idx); end
    for (int i = 0; i < BOOK_DEPTH; i++) begin
      checks++;
      if (i < rows.size()) begin
        if (!snap_book[side][i].valid || snap_book[side][i].price != rows[i][0] ||
            snap_book[side][i].qty != rows[i][1] ||
            (rows[i][2] >= 0 && snap_book[side][i].count != rows[i][2])) begin
          failures++;
          $display("FAIL book %0d side %0d level %0d: %0d @ %0d (%0d), expected %0d @ %0d (%0d)",
                   book, side, i + 1, snap_book[side][i].qty, snap_book[side][i].price,
                   snap_book[side][i].count, rows[i][1], rows[i][0], rows[i][2]);
        end
      end else if (snap_book[side][i].valid) begin
        failures++;
        $display("FAIL book %0d side %0d level %0d should be empty", book, side, i + 1);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // ---- CLH3 (book 3)
    insert(3, 0, 8800,  90, 1);
    insert(3, 1, 9100, 170, 1);
    insert(3, 0, 8900, 100, 1);
    insert(3, 1, 9200, 120, 1);
    insert(3, 0, 8720, 120, 1);
    insert(3, 1, 9000, 200, 1);
    insert(3, 0, 8850, 160, 1);
    insert(3, 1, 9150, 100, 1);
    insert(3, 0, 8760, 150, 1);
    insert(3, 1, 9050, 150, 1);
    expect_side(3, 0, '{'{8900, 100, -1}, '{8850, 160, -1}, '{8800, 90, -1}, '{8760, 150, -1}, '{8720, 120, -1}});
    expect_side(3, 1, '{'{9000, 200, -1}, '{9050, 150, -1}, '{9100, 170, -1}, '{9150, 100, -1}, '{9200, 120, -1}});
    // delete level 4 of bid
    send(msg_delete(1, 3, 0, 4));
    expect_side(3, 0, '{'{8900, 100, -1}, '{8850, 160, -1}, '{8800, 90, -1}, '{8720, 120, -1}});
    expect_side(3, 1, '{'{9000, 200, -1}, '{9050, 150, -1}, '{9100, 170, -1}, '{9150, 100, -1}, '{9200, 120, -1}});
    // insert bid at 89.50, 60
    insert(3, 0, 8950, 60, 1);
    expect_side(3, 0, '{'{8950, 60, -1}, '{8900, 100, -1}, '{8850, 160, -1}, '{8800, 90, -1}, '{8720, 120, -1}});
    // level 1 of ask, price 90.00, now 100 (order count left out: default 1)
    send(msg_update(1, 3, 1, 1, 1, longint'(9000) - dprice_upd, 100, 0, 0));
    dprice_upd = 9000;
    expect_side(3, 0, '{'{8950, 60, -1}, '{8900, 100, -1}, '{8850, 160, -1}, '{8800, 90, -1}, '{8720, 120, -1}});
    expect_side(3, 1, '{'{9000, 100, -1}, '{9050, 150, -1}, '{9100, 170, -1}, '{9150, 100, -1}, '{9200, 120, -1}});
    // ---- five-deep best bid/ask with order counts (book 1)
    insert(1, 1, 942900, 850, 55);
    insert(1, 0, 942600, 400, 25);
    insert(1, 0, 942750,  100,  1);
    insert(1, 1, 943000, 150, 12);
    insert(1, 0, 942550, 300, 14);
    insert(1, 1, 942800,  40,  2);
    insert(1, 0, 942700, 500, 19);
    insert(1, 1, 942950, 350, 21);
    insert(1, 0, 942650, 750, 34);
    insert(1, 1, 942850, 600, 35);
    expect_side(1, 0, '{'{942750, 100, 1}, '{942700, 500, 19}, '{942650, 750, 34}, '{942600, 400, 25}, '{942550, 300, 14}});
    expect_side(1, 1, '{'{942800, 40, 2}, '{942850, 600, 35}, '{942900, 850, 55}, '{942950, 350, 21}, '{943000, 150, 12}});
    // CLH3 untouched: a delete of ask level 5 shows the rest of it
    send(msg_delete(1, 3, 1, 5));
    expect_side(3, 0, '{'{8950, 60, -1}, '{8900, 100, -1}, '{8850, 160, -1}, '{8800, 90, -1}, '{8720, 120, -1}});
    expect_side(3, 1, '{'{9000, 100, -1}, '{9050, 150, -1}, '{9100, 170, -1}, '{9150, 100, -1}});
    $display("frames %0d, snapshots %0d", nsent, n_snap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
