// book_control_fsm: runs the book building unit, one command at a time.
//
// For each command in the command buffer it
//   IDLE   pops the command, latches it, and starts the fetch of that
//          symbol's book (memory read, address = book index);
//   LOAD   has the book cache take the fetched book;
//   EXEC   has the book cache execute the command;
//   WB     writes the book back to memory at the same address and presents it
//          on snap_vld / snap_book as the updated book for the host.
// A command thus takes four cycles; the next one is popped in the cycle
// after WB, and a back-to-back command for the same book reads the written
// book. Memory and cache ports are driven combinationally from the state.
//
// Following the design description: the control FSM looks at the command
// buffer, tells the book cache to fetch, update/insert/delete and write back,
// and supplies the memory address. Own choices: the state sequence and one
// command in flight.
module book_control_fsm
  import fixfast_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // command buffer
  input  logic               cmd_vld,
  input  book_cmd_t          cmd_head,
  output logic               cmd_pop,
  // book memory
  output logic               mem_rd_en,
  output logic [BOOK_AW-1:0] mem_rd_addr,
  output logic               mem_wr_en,
  output logic [BOOK_AW-1:0] mem_wr_addr,
  // book cache
  output logic [1:0]         cache_op,
  output book_cmd_t          cache_cmd,
  // updated-book notification
  output logic               snap_vld,
  output logic [BOOK_AW-1:0] snap_idx,
  output logic               busy
);

  typedef enum logic [1:0] { S_IDLE, S_LOAD, S_EXEC, S_WB } state_e;

  state_e    state_q;
  book_cmd_t cmd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cmd_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (cmd_vld) begin
                  cmd_q   <= cmd_head;
                  state_q <= S_LOAD;
                end
        S_LOAD: state_q <= S_EXEC;
        S_EXEC: state_q <= S_WB;
        S_WB:   state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cmd_pop     = state_q == S_IDLE && cmd_vld;
    mem_rd_en   = cmd_pop;
    mem_rd_addr = cmd_head.book;
    mem_wr_en   = state_q == S_WB;
    mem_wr_addr = cmd_q.book;
    cache_op    = state_q == S_LOAD ? 2'd1 : state_q == S_EXEC ? 2'd2 : 2'd0;
    cache_cmd   = cmd_q;
    snap_vld    = state_q == S_WB;
    snap_idx    = cmd_q.book;
    busy        = state_q != S_IDLE;
  end

endmodule
