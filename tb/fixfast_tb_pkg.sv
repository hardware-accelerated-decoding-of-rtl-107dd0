// fixfast_tb_pkg: stimulus and reference helpers shared by the testbenches.
//
// * frame(): an Ethernet/IPv4/UDP frame around a payload, with a correct (or
//   deliberately wrong) IP header checksum and the IP identification field
//   set to the given serial number; short frames are padded to 60 bytes.
// * fast_u() / fast_s(): FAST stop-bit encoding of an unsigned / signed
//   integer (7 bits per byte, most significant group first, bit 7 set on the
//   last byte).
// * msg_*(): FAST messages for the three templates.
// * ref_apply(): a reference order book, written with queues, that applies a
//   command the way the design description's examples do.
package fixfast_tb_pkg;
  import fixfast_pkg::*;

  typedef byte unsigned bytes_t[$];

  function automatic bytes_t fast_u(longint unsigned v);
    bytes_t g;
    do begin
      g.push_front(byte'(v & 64'h7f));
      v = v >> 7;
    end while (v != 0);
    g[g.size()-1] |= 8'h80;
    return g;
  endfunction

  function automatic bytes_t fast_s(longint v);
    bytes_t g;
    forever begin
      g.push_front(byte'(v & 64'h7f));
      if (v >= -64 && v <= 63) break;
      v = v >>> 7;
    end
    g[g.size()-1] |= 8'h80;
    return g;
  endfunction

  function automatic bytes_t frame(int unsigned seq, bytes_t payload,
                                   bit bad_cksum = 0, bit pad = 1);
    bytes_t f;
    int unsigned sum, ulen, tlen;
    ulen = 8 + payload.size();
    tlen = 20 + ulen;
    // Ethernet: dst, src, ethertype IPv4
    f = '{8'h01, 8'h00, 8'h5e, 8'h00, 8'h00, 8'h01,
          8'h00, 8'h0f, 8'h53, 8'h12, 8'h34, 8'h56, 8'h08, 8'h00};
    // IPv4 header, checksum bytes (25,26) filled in below
    f = {f, 8'h45, 8'h00, byte'(tlen >> 8), byte'(tlen), byte'(seq >> 8), byte'(seq),
         8'h40, 8'h00, 8'h40, 8'h11, 8'h00, 8'h00,
         8'd10, 8'd0, 8'd0, 8'd1, 8'd224, 8'd0, 8'd1, 8'd1};
    sum = 0;
    for (int i = 14; i < 34; i += 2) sum += {f[i], f[i+1]};
    while (sum >> 16 != 0) sum = (sum & 16'hffff) + (sum >> 16);
    sum = ~sum & 16'hffff;
    if (bad_cksum) sum ^= 16'h0100;
    f[24] = byte'(sum >> 8);
    f[25] = byte'(sum);
    // UDP header, no checksum
    f = {f, 8'h27, 8'h10, 8'h27, 8'h11, byte'(ulen >> 8), byte'(ulen), 8'h00, 8'h00};
    f = {f, payload};
    if (pad) while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  // Template 1 (update): book COPY, side DEFAULT 0, level, price DELTA,
  // qty, count DEFAULT 1. Present flags for the PMAP fields as arguments.
  function automatic bytes_t msg_update(bit has_book, int book, bit has_side, int side,
                                        int level, longint dprice, int qty,
                                        bit has_cnt, int cnt);
    bytes_t m;
    byte unsigned pmap;
    pmap = 8'h80 | (has_book << 6) | (has_side << 5) | (has_cnt << 4);
    m = '{pmap, 8'h80 | TID_UPDATE};
    if (has_book) m = {m, fast_u(book)};
    if (has_side) m = {m, fast_u(side)};
    m = {m, fast_u(level), fast_s(dprice), fast_u(qty)};
    if (has_cnt) m = {m, fast_u(cnt)};
    return m;
  endfunction

  // Template 2 (insert): book COPY, side, price DELTA, qty, count DEFAULT 1.
  function automatic bytes_t msg_insert(bit has_book, int book, int side, longint dprice,
                                        int qty, bit has_cnt, int cnt);
    bytes_t m;
    byte unsigned pmap;
    pmap = 8'h80 | (has_book << 6) | (has_cnt << 5);
    m = '{pmap, 8'h80 | TID_INSERT};
    if (has_book) m = {m, fast_u(book)};
    m = {m, fast_u(side), fast_s(dprice), fast_u(qty)};
    if (has_cnt) m = {m, fast_u(cnt)};
    return m;
  endfunction

  // Template 3 (delete): book COPY, side, level.
  function automatic bytes_t msg_delete(bit has_book, int book, int side, int level);
    bytes_t m;
    m = '{8'h80 | (has_book << 6), 8'h80 | TID_DELETE};
    if (has_book) m = {m, fast_u(book)};
    m = {m, fast_u(side), fast_u(level)};
    return m;
  endfunction

  // --------------------------------------------------------- reference book
  typedef book_level_t lvlq_t[$];

  function automatic lvlq_t side_q(book_side_t s);
    lvlq_t q;
    for (int i = 0; i < BOOK_DEPTH; i++) if (s[i].valid) q.push_back(s[i]);
    return q;
  endfunction

  function automatic book_side_t side_pack(lvlq_t q);
    book_side_t s;
    s = '0;
    for (int i = 0; i < q.size() && i < BOOK_DEPTH; i++) s[i] = q[i];
    return s;
  endfunction

  // Returns 1 when the command is rejected (book unchanged).
  function automatic bit ref_apply(ref book_t b, input book_cmd_t c);
    lvlq_t q;
    book_level_t n;
    int p;
    q = side_q(b[c.side]);
    n = '{valid: 1'b1, price: c.price, qty: c.qty, count: c.count};
    case (c.action)
      CMD_UPDATE: begin
        if (c.level < 1 || c.level > q.size()) return 1;
        q.delete(c.level-1);
        q.insert(c.level-1, n);
      end
      CMD_DELETE: begin
        if (c.level < 1 || c.level > q.size()) return 1;
        q.delete(c.level-1);
      end
      CMD_INSERT: begin
        p = q.size();
        for (int i = q.size() - 1; i >= 0; i--)
          if (c.side == SIDE_BID ? (q[i].price < c.price) : (q[i].price > c.price)) p = i;
        if (p >= BOOK_DEPTH) return 0;
        q.insert(p, n);
        while (q.size() > BOOK_DEPTH) void'(q.pop_back());
      end
      default: return 1;
    endcase
    b[c.side] = side_pack(q);
    return 0;
  endfunction

  function automatic book_cmd_t mk_cmd(cmd_action_e a, int book, int side, int level,
                                       int price, int qty, int cnt);
    book_cmd_t c;
    c.action = a;
    c.side   = side_e'(side[0]);
    c.book   = BOOK_AW'(book);
    c.level  = LEVEL_W'(level);
    c.price  = PRICE_W'(price);
    c.qty    = QTY_W'(qty);
    c.count  = CNT_W'(cnt);
    return c;
  endfunction

endpackage
