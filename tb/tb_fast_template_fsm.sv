// tb_fast_template_fsm: the update template (copy, default, none and delta
// operators). Random messages with random presence bits, multi-byte and
// negative values; the expected command is worked out here from the
// template's rules with its own dictionary. Also: truncated messages must
// give dec_err and no command, trailing flits after the last field are
// ignored, and cmd_vld comes two cycles after the last field's final flit.
module tb_fast_template_fsm;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] in_flit;
  logic in_vld, in_eop, start, cmd_vld, dec_err, busy;
  flit_role_e in_role;
  book_cmd_t cmd;
  int cyc = 0, checks = 0, failures = 0, n_cmd = 0, n_err = 0;
  int copies = 0, defaults = 0;

  fast_template_fsm #(.TEMPLATE(TMPL_UPDATE), .ACTION(CMD_UPDATE)) dut (
    .clk, .rst_n, .in_flit, .in_vld, .in_eop, .in_role, .start, .cmd_vld, .cmd, .dec_err, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (cmd_vld) n_cmd++;
    if (dec_err) n_err++;
  end

  initial begin
    bytes_t m;
    bit hb, hs, hc, trunc;
    int book, side, level, qty, cnt, prev_book, prev_price, price, cut, extra, last_cyc;
    longint dp;
    book_cmd_t exp_c;
    in_vld = 0; in_eop = 0; in_flit = 0; in_role = ROLE_PMAP; start = 0;
    prev_book = 0; prev_price = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      hb = $urandom_range(0, 1); hs = $urandom_range(0, 1); hc = $urandom_range(0, 1);
      book  = $urandom_range(0, NUM_BOOKS - 1);
      side  = $urandom_range(0, 1);
      level = $urandom_range(1, BOOK_DEPTH);
      dp    = longint'($urandom_range(0, 4000)) - 2000;
      if (n % 97 == 5) dp = -longint'(prev_price) - 1 - $urandom_range(0, 100000);  // large negative
      qty   = (n % 5 == 0) ? $urandom : $urandom_range(1, 20000);
      cnt   = $urandom_range(0, 300);
      m = msg_update(hb, book, hs, side, level, dp, qty, hc, cnt);
      trunc = $urandom_range(0, 9) == 0;
      cut   = trunc ? $urandom_range(2, m.size() - 1) : m.size();
      extra = trunc ? 0 : $urandom_range(0, 3);
      for (int i = 0; i < cut + extra; i++) begin
        @(negedge clk);
        in_vld  = 1;
        in_flit = (i < cut) ? m[i] : 8'($urandom);
        in_role = (i == 0) ? ROLE_PMAP : (i == 1) ? ROLE_TID : ROLE_DATA;
        start   = (i == 1);
        in_eop  = (i == cut + extra - 1);
        if (i == cut - 1) last_cyc = cyc;
      end
      @(negedge clk);
      in_vld = 0; in_eop = 0; start = 0;
      repeat (3) @(negedge clk);
      if (!trunc) begin
        exp_c = '0;
        exp_c.action = CMD_UPDATE;
        exp_c.book   = BOOK_AW'(hb ? book : prev_book);
        exp_c.side   = side_e'(hs ? side[0] : 1'b0);
        exp_c.level  = LEVEL_W'(level);
        price        = prev_price + int'(dp);
        exp_c.price  = PRICE_W'(price);
        exp_c.qty    = QTY_W'(qty);
        exp_c.count  = CNT_W'(hc ? cnt : 1);
        prev_book  = hb ? book : prev_book;
        prev_price = price;
        if (!hb) copies++;
        if (!hs || !hc) defaults++;
      end
      checks++;
      if (trunc ? (n_cmd != 0 || n_err != 1) : (n_cmd != 1 || n_err != 0 || cmd != exp_c)) begin
        failures++;
        if (failures < 6) $display("FAIL message %0d (trunc %0d): cmds %0d errs %0d got %p expected %p",
                                   n, trunc, n_cmd, n_err, cmd, exp_c);
      end
      n_cmd = 0; n_err = 0;
    end
    // latency: last flit at cycle L, EMIT in L+1, cmd_vld seen in cycle L+2
    m = msg_update(1, 3, 1, 1, 2, 5, 7, 1, 9);
    foreach (m[i]) begin
      @(negedge clk);
      in_vld = 1; in_flit = m[i]; start = (i == 1);
      in_role = (i == 0) ? ROLE_PMAP : (i == 1) ? ROLE_TID : ROLE_DATA;
      in_eop = (i == m.size() - 1);
      last_cyc = cyc;
    end
    @(negedge clk);
    in_vld = 0; in_eop = 0; start = 0;
    checks++;
    if (cmd_vld) begin failures++; $display("FAIL command one cycle early"); end
    @(negedge clk);
    checks++;
    if (!cmd_vld || cyc != last_cyc + 2) begin failures++; $display("FAIL command latency"); end
    checks++;
    if (copies == 0 || defaults == 0) begin failures++; $display("FAIL operators not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
