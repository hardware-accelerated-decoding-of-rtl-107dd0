// field_buffer: one-entry holding register for a decoded command between the
// template multiplexer and the command buffer.
//
// A command arriving on in_vld is stored and offered on out_vld until the
// command buffer takes it (out_rdy). The entry can be refilled in the same
// cycle it drains, so back-to-back commands pass at one per clock. A command
// that arrives while the entry is full and not draining is dropped and
// overflow pulses; the decoder cannot be stalled, because flits arrive from
// the network at a fixed rate.
//
// Following the design description: a field buffer between the template
// multiplexer and the command buffer. Own choices: its depth (one) and the
// valid/ready handshake.
module field_buffer
  import fixfast_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_vld,
  input  book_cmd_t  in_cmd,
  output logic       out_vld,
  output book_cmd_t  out_cmd,
  input  logic       out_rdy,
  output logic       overflow
);

  logic drain;
  assign drain = out_vld && out_rdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld  <= 1'b0;
      out_cmd  <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (in_vld && (!out_vld || drain)) begin
        out_vld <= 1'b1;
        out_cmd <= in_cmd;
      end else begin
        if (drain) out_vld <= 1'b0;
        if (in_vld) overflow <= 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_vld && !out_rdy |=> out_vld && $stable(out_cmd));

endmodule
