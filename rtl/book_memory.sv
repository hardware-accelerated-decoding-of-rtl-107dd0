// book_memory: holds the order books of all symbols, one whole book per word.
//
// The control FSM fetches a book by raising rd_en with the book's address;
// rd_book holds it from the next cycle on (synchronous read, one cycle of
// latency). A write (wr_en, wr_addr, wr_book) stores a whole book in one
// cycle. A book that was never written reads back empty: a one-bit
// written flag per address, cleared by reset, stands in for clearing the
// array, so no start-up sweep is needed.
//
// Following the design description: a memory that the book cache fetches
// books from and writes them back to, by address. Own choices: a book per
// word, NUM_BOOKS = 512 words (at least the 500 symbols the host software is
// meant to track), and the written flags.
module book_memory
  import fixfast_pkg::*;
#(
  parameter int unsigned WORDS = NUM_BOOKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output book_t                    rd_book,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  book_t                    wr_book
);

  book_t             mem [WORDS];
  logic [WORDS-1:0]  written_q;
  book_t             rd_q;
  logic              rd_written_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_book;
    if (rd_en) rd_q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written_q    <= '0;
      rd_written_q <= 1'b0;
    end else begin
      if (wr_en) written_q[wr_addr] <= 1'b1;
      if (rd_en) rd_written_q <= written_q[rd_addr];
    end
  end

  assign rd_book = rd_written_q ? rd_q : '0;

endmodule
