// book_cache: holds the order book of one symbol and executes book commands
// on it.
//
// A book has BOOK_DEPTH price levels on each side; level 1 (index 0) is the
// best price. Bids are kept in descending price order, asks in ascending
// order. Each level holds a price, a quantity, an order count and a valid bit.
//
// op selects what happens on the next clock edge:
//   OP_LOAD   book <= load_book (the book just fetched from memory);
//   OP_EXEC   book <= the result of cmd on book:
//     UPDATE  level cmd.level of side cmd.side gets cmd's price, quantity and
//             count;
//     DELETE  level cmd.level is removed; the deeper levels move up by one
//             and the deepest becomes empty;
//     INSERT  a new level (price, quantity, count) goes in front of the first
//             level that is empty or has a worse price (lower for a bid,
//             higher for an ask); the levels behind it move down by one and
//             the deepest falls off. An equal price goes behind the existing
//             level. A price worse than all of a full side is not inserted.
//   A level number outside 1..BOOK_DEPTH, or an update or delete of an empty
//   level, leaves the book unchanged and raises cmd_err for one cycle.
// Every operation takes one cycle; the book is visible on book at all times.
//
// Following the design description: the book layout (bid/ask, levels, price,
// quantity, order count), the price ordering and the effect of delete,
// insert-by-price and update in the worked examples. Own choices: update
// overwrites the level (the example decreases 200 to 100 with a value of
// 100, which overwrite and subtract both fit), equal-price inserts and the
// error cases.
module book_cache
  import fixfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  op,        // 0 none, 1 load, 2 execute
  input  book_t       load_book,
  input  book_cmd_t   cmd,
  output book_t       book,
  output logic        cmd_err
);

  localparam logic [1:0] OP_LOAD = 2'd1;
  localparam logic [1:0] OP_EXEC = 2'd2;

  book_t        book_q, exec_d;
  logic         err_d;
  book_level_t  new_lvl;
  book_side_t   s_in, s_out;
  logic [LEVEL_W-1:0] pos;
  logic         pos_found;
  int unsigned  li;

  assign new_lvl = '{valid: 1'b1, price: cmd.price, qty: cmd.qty, count: cmd.count};
  assign s_in    = book_q[cmd.side];
  assign li      = 32'(cmd.level) - 1;

  // insertion point for an insert
  always_comb begin
    pos       = '0;
    pos_found = 1'b0;
    for (int i = BOOK_DEPTH - 1; i >= 0; i--) begin
      if (!s_in[i].valid ||
          (cmd.side == SIDE_BID ? cmd.price > s_in[i].price
                                : cmd.price < s_in[i].price)) begin
        pos       = LEVEL_W'(i);
        pos_found = 1'b1;
      end
    end
  end

  always_comb begin
    s_out = s_in;
    err_d = 1'b0;
    unique case (cmd.action)
      CMD_UPDATE: begin
        if (cmd.level == 0 || cmd.level > LEVEL_W'(BOOK_DEPTH) || !s_in[li].valid)
          err_d = 1'b1;
        else
          s_out[li] = new_lvl;
      end
      CMD_DELETE: begin
        if (cmd.level == 0 || cmd.level > LEVEL_W'(BOOK_DEPTH) || !s_in[li].valid)
          err_d = 1'b1;
        else
          for (int i = 0; i < BOOK_DEPTH; i++)
            if (i >= int'(li)) s_out[i] = (i + 1 < BOOK_DEPTH) ? s_in[i+1] : '0;
      end
      CMD_INSERT: begin
        if (pos_found)
          for (int i = 0; i < BOOK_DEPTH; i++) begin
            if (i == int'(pos))     s_out[i] = new_lvl;
            else if (i > int'(pos)) s_out[i] = s_in[i-1];
          end
      end
      default: err_d = 1'b1;
    endcase
    exec_d           = book_q;
    exec_d[cmd.side] = s_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      book_q  <= '0;
      cmd_err <= 1'b0;
    end else begin
      cmd_err <= 1'b0;
      if (op == OP_LOAD) book_q <= load_book;
      else if (op == OP_EXEC) begin
        if (!err_d) book_q <= exec_d;
        cmd_err <= err_d;
      end
    end
  end

  assign book = book_q;

endmodule
