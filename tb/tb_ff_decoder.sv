// tb_ff_decoder: random messages of all three templates (update, insert,
// delete) and some with an unknown template ID, as tagged flit streams. Each
// template keeps its own dictionary, modelled here. Commands must come out of
// the field buffer in order and equal to the expected ones; unknown IDs give
// tid_err and no command; while the consumer is held off, a second command
// is dropped with fb_overflow.
module tb_ff_decoder;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] in_flit;
  logic in_vld, in_eop, cmd_vld, cmd_rdy, tid_err, dec_err, fb_overflow;
  flit_role_e in_role;
  book_cmd_t cmd;
  book_cmd_t expq[$];
  int checks = 0, failures = 0, n_tid = 0, n_ovf = 0, n_dec = 0, got = 0;
  int per_t [3] = '{0, 0, 0};

  ff_decoder dut (.clk, .rst_n, .in_flit, .in_vld, .in_eop, .in_role, .cmd_vld, .cmd, .cmd_rdy,
                  .tid_err, .dec_err, .fb_overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tid_err) n_tid++;
    if (fb_overflow) n_ovf++;
    if (dec_err) n_dec++;
    if (cmd_vld && cmd_rdy) begin
      book_cmd_t e;
      checks++;
      got++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected command"); end
      else begin
        e = expq.pop_front();
        if (cmd != e) begin
          failures++;
          if (failures < 6) $display("FAIL command %0d: %p expected %p", got, cmd, e);
        end
      end
    end
  end

  task automatic send(bytes_t m);
    foreach (m[i]) begin
      @(negedge clk);
      in_vld  = 1;
      in_flit = m[i];
      in_role = (i == 0) ? ROLE_PMAP : (i == 1) ? ROLE_TID : ROLE_DATA;
      in_eop  = (i == m.size() - 1);
    end
    @(negedge clk);
    in_vld = 0; in_eop = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    bytes_t m;
    book_cmd_t e;
    int t, hb, hc, book, side, level, qty, cnt, exp_tid, exp_ovf;
    longint dp;
    int pbook [3] = '{0, 0, 0};
    int pprice [3] = '{0, 0, 0};
    in_vld = 0; in_eop = 0; in_flit = 0; in_role = ROLE_PMAP; cmd_rdy = 1;
    exp_tid = 0; exp_ovf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      t = $urandom_range(0, 3);
      hb = $urandom_range(0, 1); hc = $urandom_range(0, 1);
      book = $urandom_range(0, NUM_BOOKS - 1); side = $urandom_range(0, 1);
      level = $urandom_range(1, BOOK_DEPTH); qty = $urandom_range(1, 100000);
      cnt = $urandom_range(1, 200); dp = longint'($urandom_range(0, 200)) - 100;
      e = '0;
      e.book = BOOK_AW'(hb ? book : pbook[t < 3 ? t : 0]);
      case (t)
        0: begin
          m = msg_update(hb, book, 1, side, level, dp, qty, hc, cnt);
          e.action = CMD_UPDATE; e.side = side_e'(side[0]); e.level = LEVEL_W'(level);
          pprice[0] += int'(dp); e.price = PRICE_W'(pprice[0]); e.qty = qty;
          e.count = CNT_W'(hc ? cnt : 1);
        end
        1: begin
          m = msg_insert(hb, book, side, dp, qty, hc, cnt);
          e.action = CMD_INSERT; e.side = side_e'(side[0]);
          pprice[1] += int'(dp); e.price = PRICE_W'(pprice[1]); e.qty = qty;
          e.count = CNT_W'(hc ? cnt : 1);
        end
        2: begin
          m = msg_delete(hb, book, side, level);
          e.action = CMD_DELETE; e.side = side_e'(side[0]); e.level = LEVEL_W'(level);
        end
        default: begin
          m = msg_delete(1, book, side, level);
          m[1] = 8'h80 | 8'($urandom_range(4, 127));
          exp_tid++;
        end
      endcase
      if (t < 3) begin
        pbook[t] = int'(e.book);
        per_t[t]++;
      end
      // every 50th message: consumer held off for two messages
      if (n % 50 == 10 && t < 3) begin
        cmd_rdy = 0;
        expq.push_back(e);
        send(m);
        // second message while full: dropped (still updates its dictionary)
        m = msg_delete(1, 5, 0, 1);
        pbook[2] = 5;
        exp_ovf++;
        send(m);
        cmd_rdy = 1;
        continue;
      end
      if (t < 3) expq.push_back(e);
      send(m);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d commands missing", expq.size()); end
    checks++;
    if (n_tid != exp_tid || exp_tid == 0) begin failures++; $display("FAIL tid_err %0d expected %0d", n_tid, exp_tid); end
    checks++;
    if (n_ovf != exp_ovf || exp_ovf == 0) begin failures++; $display("FAIL overflow %0d expected %0d", n_ovf, exp_ovf); end
    checks++;
    if (n_dec != 0) begin failures++; $display("FAIL unexpected dec_err"); end
    $display("commands %0d (update %0d insert %0d delete %0d), unknown IDs %0d, overflows %0d",
             got, per_t[0], per_t[1], per_t[2], n_tid, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
