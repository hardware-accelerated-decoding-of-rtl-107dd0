// book_builder: the book building unit. It keeps an order book per symbol
// and applies the decoded update, insert and delete commands to it.
//
// Commands enter the command buffer (valid/ready). The control FSM takes them
// one at a time, fetches the symbol's book from book memory into the book
// cache, has the cache execute the command and writes the book back. Each
// written-back book is also presented on snap_vld / snap_idx / snap_book, the
// book snapshot to be sent on to the host. cmd_err pulses for a command that
// could not be applied (bad level, empty level).
//
// Throughput: one command per four cycles. Latency from the command being
// accepted into an empty buffer to snap_vld: four cycles.
//
// Following the design description: command buffer, control FSM, book cache
// and memory with fetch, address and write-back. Own choices: sizes and
// timing of each part (see the parts).
module book_builder
  import fixfast_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_vld,
  input  book_cmd_t          cmd,
  output logic               cmd_rdy,
  output logic               snap_vld,
  output logic [BOOK_AW-1:0] snap_idx,
  output book_t              snap_book,
  output logic               cmd_err,
  output logic               busy
);

  logic               q_vld, q_pop;
  book_cmd_t          q_cmd, c_cmd;
  logic               rd_en, wr_en;
  logic [BOOK_AW-1:0] rd_addr, wr_addr;
  logic [1:0]         c_op;
  book_t              rd_book, c_book;
  logic               f_busy;

  command_buffer #(.DEPTH(CMD_DEPTH)) u_cmdbuf (
    .clk, .rst_n, .wr_vld(cmd_vld), .wr_cmd(cmd), .wr_rdy(cmd_rdy),
    .rd_vld(q_vld), .rd_cmd(q_cmd), .rd_pop(q_pop), .level());

  book_control_fsm u_ctrl (
    .clk, .rst_n, .cmd_vld(q_vld), .cmd_head(q_cmd), .cmd_pop(q_pop),
    .mem_rd_en(rd_en), .mem_rd_addr(rd_addr), .mem_wr_en(wr_en), .mem_wr_addr(wr_addr),
    .cache_op(c_op), .cache_cmd(c_cmd), .snap_vld, .snap_idx, .busy(f_busy));

  book_cache u_cache (
    .clk, .rst_n, .op(c_op), .load_book(rd_book), .cmd(c_cmd), .book(c_book), .cmd_err);

  book_memory #(.WORDS(NUM_BOOKS)) u_mem (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_book, .wr_en, .wr_addr, .wr_book(c_book));

  assign snap_book = c_book;
  assign busy      = f_busy || q_vld;

endmodule
