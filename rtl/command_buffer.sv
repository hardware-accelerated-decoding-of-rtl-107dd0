// command_buffer: FIFO of decoded book commands waiting for the control FSM.
//
// A command is written when wr_vld and wr_rdy (not full) are both high, and
// the oldest command is shown on rd_cmd whenever rd_vld (not empty) is high;
// rd_pop removes it. Write and pop may happen in the same cycle. Storage is a
// circular array of DEPTH entries with read and write pointers one bit wider
// than the index, so full and empty are told apart. The head entry is read
// combinationally from the array (show-ahead).
//
// Following the design description: a FIFO between the decoder and the
// control FSM. Own choices: its depth (16) and the handshake.
module command_buffer
  import fixfast_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_vld,
  input  book_cmd_t  wr_cmd,
  output logic       wr_rdy,
  output logic       rd_vld,
  output book_cmd_t  rd_cmd,
  input  logic       rd_pop,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  book_cmd_t      mem [DEPTH];
  logic [AW:0]    wp_q, rp_q;
  logic           push, pop;

  assign level  = wp_q - rp_q;
  assign wr_rdy = level != (AW+1)'(DEPTH);
  assign rd_vld = wp_q != rp_q;
  assign rd_cmd = mem[rp_q[AW-1:0]];
  assign push   = wr_vld && wr_rdy;
  assign pop    = rd_pop && rd_vld;

  always_ff @(posedge clk) begin
    if (push) mem[wp_q[AW-1:0]] <= wr_cmd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (push) wp_q <= wp_q + 1'b1;
      if (pop)  rp_q <= rp_q + 1'b1;
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_vld);

endmodule
