// tb_fixfast_top: end-to-end test of the whole pipeline at its default sizes
// (10 levels per side, 512 books).
//
// Two driver models carry Ethernet/IPv4/UDP frames whose payload is one FAST
// message (update, insert or delete). The testbench decides the order in
// which frames reach the pipeline: one frame at a time, or a pair pushed to
// both ports at once, whose order follows from the round-robin rule. It
// keeps its own model of everything that decides a frame's fate: the serial
// number per channel, the decoder dictionaries per template and a reference
// book per symbol. Every book snapshot must match the reference book after
// the command, in order; cmd_err must match the reference's rejections.
//
// Injected events, each counted and required at least once: both ports
// waiting at once (the second frame must then follow the first with no idle
// cycle), bad IP checksum, serial-number gap, unknown template ID,
// message cut short, Ethernet padding after a short payload, a field left
// out (copy and default operators), each command type, an insert that pushes
// the deepest level out of a full side, a rejected command. The latency from
// the last payload flit leaving a driver to the book snapshot must be 10
// cycles.
module tb_fixfast_top;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  localparam int NB = 6;          // symbols in play
  localparam int LAT = 10;        // last payload flit -> snapshot

  logic clk = 0, rst_n = 0;
  logic [1:0] d_pkt_rdy, d_vld, d_end, ack;
  logic [1:0][7:0] d_flit;
  logic snap_vld, cksum_err, seq_err, tid_err, dec_err, fb_overflow, cmd_err, busy;
  logic [BOOK_AW-1:0] snap_idx;
  book_t snap_book;

  eth_driver_model d0 (.clk, .ack(ack[0]), .pkt_rdy(d_pkt_rdy[0]), .flit(d_flit[0]), .vld(d_vld[0]), .last(d_end[0]));
  eth_driver_model d1 (.clk, .ack(ack[1]), .pkt_rdy(d_pkt_rdy[1]), .flit(d_flit[1]), .vld(d_vld[1]), .last(d_end[1]));

  fixfast_top dut (.clk, .rst_n, .d_pkt_rdy, .d_flit, .d_vld, .d_end, .ack, .snap_vld, .snap_idx,
                   .snap_book, .cksum_err, .seq_err, .tid_err, .dec_err, .fb_overflow, .cmd_err, .busy);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_pair = 0, m_cksum = 0, m_seq = 0, m_tid = 0, m_trunc = 0, m_pad = 0, m_copy = 0,
      m_dflt = 0, m_upd = 0, m_ins = 0, m_del = 0, m_falloff = 0, m_rej = 0;
  // observed pulses
  int o_cksum = 0, o_seq = 0, o_tid = 0, o_dec = 0, o_ovf = 0, o_snap = 0;

  typedef struct { book_cmd_t c; bit lat_check; } exp_t;
  exp_t expq[$];
  book_t refb [NUM_BOOKS];

  // frame bookkeeping for the latency check: per channel, the index of the
  // last payload flit of each queued frame
  int lastpay [2][$];
  int flit_idx [2] = '{0, 0};
  int t_last[$];
  bit prev_end = 0;
  int m_b2b = 0;     // a frame starting in the cycle right after another ended

  always @(posedge clk) begin
    if (prev_end && (d_vld != 0)) m_b2b++;
    prev_end = (d_vld & d_end) != 0;
    for (int ch = 0; ch < 2; ch++) if (d_vld[ch]) begin
      if (flit_idx[ch] == lastpay[ch][0]) t_last.push_back(cyc);
      flit_idx[ch]++;
      if (d_end[ch]) begin
        flit_idx[ch] = 0;
        void'(lastpay[ch].pop_front());
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (cksum_err) o_cksum++;
    if (seq_err) o_seq++;
    if (tid_err) o_tid++;
    if (dec_err) o_dec++;
    if (fb_overflow) o_ovf++;
    if (snap_vld) begin
      exp_t e;
      bit rej;
      int tl;
      o_snap++;
      checks++;
      tl = (t_last.size() > 0) ? t_last.pop_front() : -1;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected snapshot"); end
      else begin
        e = expq.pop_front();
        rej = ref_apply(refb[e.c.book], e.c);
        if (rej) m_rej++;
        if (snap_idx != e.c.book || snap_book !== refb[e.c.book] || cmd_err !== rej) begin
          failures++;
          if (failures < 6) $display("FAIL snapshot %0d: book %0d (exp %0d) err %0d (exp %0d)",
                                     o_snap, snap_idx, e.c.book, cmd_err, rej);
        end
        checks++;
        if (e.lat_check && cyc - tl != LAT) begin
          failures++;
          $display("FAIL latency %0d cycles, expected %0d", cyc - tl, LAT);
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------- stimulus
  int last_seq [2] = '{0, 0};
  bit seen_seq [2] = '{0, 0};
  int last_served = 1;
  int dict_book [3] = '{0, 0, 0};
  int dict_price [3] = '{0, 0, 0};
  book_t shadow [NUM_BOOKS];   // books as they will be once all queued commands ran

  // Builds one frame for channel ch. Returns it; queues the expectations.
  function automatic bytes_t make_frame(int ch);
    bytes_t m, f;
    book_cmd_t c;
    int kind, t, book, side, lvl, depth, price, qty, cnt, seq, cut;
    bit hb, hs, hc, bad_ck, bad_seq, bad_tid, trunc, decoded;
    kind = $urandom_range(0, 99);
    bad_ck  = kind < 4;
    bad_seq = kind >= 4 && kind < 8;
    bad_tid = kind >= 8 && kind < 11;
    trunc   = kind >= 11 && kind < 14;
    // serial number
    if (bad_seq && seen_seq[ch]) seq = (last_seq[ch] + 2) % 65536;
    else seq = (last_seq[ch] + 1) % 65536;
    if (!bad_ck) begin
      if (seen_seq[ch] && seq != (last_seq[ch] + 1) % 65536) m_seq++;
      else bad_seq = 0;
      last_seq[ch] = seq;
      seen_seq[ch] = 1;
    end else bad_seq = 0;
    // message
    book = (kind % 7 == 0) ? $urandom_range(0, NUM_BOOKS - 1) : $urandom_range(0, NB - 1);
    side = $urandom_range(0, 1);
    t = $urandom_range(0, 9);
    t = (t < 5) ? 1 : (t < 8) ? 0 : 2;
    depth = 0;
    for (int i = 0; i < BOOK_DEPTH; i++) if (shadow[book][side][i].valid) depth++;
    lvl = (kind % 13 == 0) ? depth + 1 : $urandom_range(1, depth > 0 ? depth : 1);
    price = (side == 0 ? 9000 - 5 * $urandom_range(0, 30) : 9005 + 5 * $urandom_range(0, 30));
    qty = $urandom_range(1, 5000);
    cnt = $urandom_range(1, 60);
    hb = (book != dict_book[t]) || $urandom_range(0, 1);
    hs = side == 1 || $urandom_range(0, 1);
    hc = cnt != 1 || $urandom_range(0, 1);
    case (t)
      0: m = msg_update(hb, book, hs, side, lvl, longint'(price) - dict_price[0], qty, hc, cnt);
      1: m = msg_insert(hb, book, side, longint'(price) - dict_price[1], qty, hc, cnt);
      default: m = msg_delete(hb, book, side, lvl);
    endcase
    if (bad_tid) m[1] = 8'h80 | 8'($urandom_range(4, 127));
    cut = m.size();
    if (trunc) cut = $urandom_range(3, m.size() - 1);
    while (m.size() > cut) void'(m.pop_back());
    f = frame(seq, m, bad_ck);
    if (m.size() < 18) m_pad++;
    lastpay[ch].push_back(42 + m.size() - 1);
    decoded = !bad_ck && !bad_seq && !bad_tid && !trunc;
    if (bad_ck) m_cksum++;
    if (bad_tid && !bad_ck && !bad_seq) m_tid++;
    if (trunc && !bad_ck && !bad_seq) m_trunc++;
    if (decoded) begin
      c = mk_cmd(t == 0 ? CMD_UPDATE : t == 1 ? CMD_INSERT : CMD_DELETE, book, side, lvl,
                 price, qty, cnt);
      if (t == 2) begin c.price = '0; c.qty = '0; c.count = '0; end
      if (t == 1) c.level = '0;
      dict_book[t] = book;
      if (t < 2) dict_price[t] = price;
      if (!hb) m_copy++;
      if (t != 2 && (!hc || (t == 0 && !hs))) m_dflt++;
      if (t == 0) m_upd++;
      if (t == 1) begin
        m_ins++;
        if (depth == BOOK_DEPTH && (side == 0 ? price > shadow[book][0][BOOK_DEPTH-1].price
                                              : price < shadow[book][1][BOOK_DEPTH-1].price))
          m_falloff++;
      end
      if (t == 2) m_del++;
      void'(ref_apply(shadow[book], c));
      expq.push_back('{c: c, lat_check: 1'b1});
    end else begin
      // a frame that gives no snapshot has no latency to check
      void'(lastpay[ch].pop_back());
      lastpay[ch].push_back(-1);
    end
    return f;
  endfunction

  task automatic push_to(int ch, bytes_t f);
    if (ch == 0) d0.push(f); else d1.push(f);
  endtask

  initial begin
    bytes_t fa, fb;
    int ch;
    for (int i = 0; i < NUM_BOOKS; i++) begin refb[i] = '0; shadow[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      wait (!d_pkt_rdy[0] && !d_pkt_rdy[1] && ack == 0);
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        // both ports at once: round robin serves the one not served last
        ch = 1 - last_served;
        fa = make_frame(ch);
        fb = make_frame(1 - ch);
        push_to(ch, fa);
        push_to(1 - ch, fb);
        last_served = 1 - ch;
        m_pair++;
      end else begin
        ch = $urandom_range(0, 1);
        fa = make_frame(ch);
        push_to(ch, fa);
        last_served = ch;
      end
      @(negedge clk);
    end
    wait (!d_pkt_rdy[0] && !d_pkt_rdy[1]);
    repeat (20) @(posedge clk);
    wait (!busy);
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d snapshots missing", expq.size()); end
    checks++;
    if (o_cksum != m_cksum || o_seq != m_seq || o_tid != m_tid || o_dec != m_trunc || o_ovf != 0) begin
      failures++;
      $display("FAIL error pulses: cksum %0d/%0d seq %0d/%0d tid %0d/%0d dec %0d/%0d ovf %0d",
               o_cksum, m_cksum, o_seq, m_seq, o_tid, m_tid, o_dec, m_trunc, o_ovf);
    end
    $display("back-to-back %0d", m_b2b);
    $display("both-ports %0d, bad checksum %0d, serial gap %0d, unknown template %0d, cut short %0d,",
             m_pair, m_cksum, m_seq, m_tid, m_trunc);
    $display("padded %0d, copy %0d, default %0d, update %0d, insert %0d, delete %0d, fall-off %0d, rejected %0d, snapshots %0d",
             m_pad, m_copy, m_dflt, m_upd, m_ins, m_del, m_falloff, m_rej, o_snap);
    if (m_pair == 0)    begin failures++; $display("FAIL never both ports"); end
    if (m_b2b == 0)     begin failures++; $display("FAIL no back-to-back frames"); end
    if (m_cksum == 0)   begin failures++; $display("FAIL no bad checksum"); end
    if (m_seq == 0)     begin failures++; $display("FAIL no serial gap"); end
    if (m_tid == 0)     begin failures++; $display("FAIL no unknown template"); end
    if (m_trunc == 0)   begin failures++; $display("FAIL no short message"); end
    if (m_pad == 0)     begin failures++; $display("FAIL no padded frame"); end
    if (m_copy == 0)    begin failures++; $display("FAIL copy operator unused"); end
    if (m_dflt == 0)    begin failures++; $display("FAIL default operator unused"); end
    if (m_upd == 0 || m_ins == 0 || m_del == 0) begin failures++; $display("FAIL a command type unused"); end
    if (m_falloff == 0) begin failures++; $display("FAIL no level pushed out"); end
    if (m_rej == 0)     begin failures++; $display("FAIL no rejected command"); end
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
