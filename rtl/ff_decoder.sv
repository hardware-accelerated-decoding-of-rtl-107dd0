// ff_decoder: the FIX/FAST decoding unit. It turns the tagged payload flits
// of a packet into one book command.
//
// Parts:
//   * template ID register: captures the template-ID flit (7-bit value with
//     the stop bit set) and selects the template FSM that decodes the message.
//     An ID that names no template pulses tid_err and the message is ignored;
//   * three fast_template_fsm instances: update (ID 1), insert (ID 2) and
//     delete (ID 3). All see every flit; only the selected one is started;
//   * the output multiplexer, steered by the template ID register;
//   * the field buffer, which hands the command to the book builder's
//     command buffer with a valid/ready handshake.
//
// Timing: one flit per clock, no stalls. A command leaves the field buffer
// three cycles after the flit that completes its last field.
//
// Following the design description: template ID, three template FSMs, mux and
// field buffer as in the architecture figure. Own choices: the template IDs
// and contents (fixfast_pkg), the error pulses.
module ff_decoder
  import fixfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  in_flit,
  input  logic        in_vld,
  input  logic        in_eop,
  input  flit_role_e  in_role,
  output logic        cmd_vld,
  output book_cmd_t   cmd,
  input  logic        cmd_rdy,
  output logic        tid_err,
  output logic        dec_err,
  output logic        fb_overflow
);

  localparam int unsigned NT = 3;
  localparam logic [NT-1:0][6:0] TIDS = {TID_DELETE, TID_INSERT, TID_UPDATE};

  logic [6:0]           tid_q;
  logic                 tid_flit;
  logic [NT-1:0]        start, t_vld, t_err, t_busy;
  book_cmd_t [NT-1:0]   t_cmd;
  logic                 mux_vld;
  book_cmd_t            mux_cmd;

  assign tid_flit = in_vld && in_role == ROLE_TID;

  always_comb
    for (int t = 0; t < NT; t++)
      start[t] = tid_flit && in_flit[7] && in_flit[6:0] == TIDS[t];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tid_q   <= '0;
      tid_err <= 1'b0;
    end else begin
      tid_err <= tid_flit && (start == '0);
      if (tid_flit) tid_q <= in_flit[6:0];
    end
  end

  fast_template_fsm #(.TEMPLATE(TMPL_UPDATE), .ACTION(CMD_UPDATE)) u_t1 (
    .clk, .rst_n, .in_flit, .in_vld, .in_eop, .in_role, .start(start[0]),
    .cmd_vld(t_vld[0]), .cmd(t_cmd[0]), .dec_err(t_err[0]), .busy(t_busy[0]));
  fast_template_fsm #(.TEMPLATE(TMPL_INSERT), .ACTION(CMD_INSERT)) u_t2 (
    .clk, .rst_n, .in_flit, .in_vld, .in_eop, .in_role, .start(start[1]),
    .cmd_vld(t_vld[1]), .cmd(t_cmd[1]), .dec_err(t_err[1]), .busy(t_busy[1]));
  fast_template_fsm #(.TEMPLATE(TMPL_DELETE), .ACTION(CMD_DELETE)) u_t3 (
    .clk, .rst_n, .in_flit, .in_vld, .in_eop, .in_role, .start(start[2]),
    .cmd_vld(t_vld[2]), .cmd(t_cmd[2]), .dec_err(t_err[2]), .busy(t_busy[2]));

  // multiplexer steered by the template ID register
  always_comb begin
    mux_vld = 1'b0;
    mux_cmd = '0;
    for (int t = 0; t < NT; t++)
      if (tid_q == TIDS[t]) begin
        mux_vld = t_vld[t];
        mux_cmd = t_cmd[t];
      end
  end

  assign dec_err = |t_err;

  field_buffer u_fb (
    .clk, .rst_n, .in_vld(mux_vld), .in_cmd(mux_cmd),
    .out_vld(cmd_vld), .out_cmd(cmd), .out_rdy(cmd_rdy), .overflow(fb_overflow));

  a_one_busy: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(t_busy));

endmodule
