// fixfast_top: FIX/FAST market-data decoder and book builder.
//
// Two Ethernet ports deliver UDP packets that carry FAST-encoded market data
// messages. A five-stage pipeline, one 8-bit flit per clock, turns them into
// per-symbol order books:
//   1. Ethernet drivers (outside this module; their signals are the d_*
//      ports and ack);
//   2. packet processing: channel_select grants one driver and multiplexes
//      its flits; the packetizer strips the headers, checks the IP checksum
//      and passes the serial number and the UDP payload (1 cycle);
//   3. feed arbitration and flit extraction: the feed arbitrator checks the
//      serial number against the channel's previous one (1 cycle), the flit
//      counter and flit identifier tag each flit as PMAP, template ID or data
//      (1 cycle);
//   4. FAST decoding: three template FSMs decode the message into a book
//      command, held in the field buffer;
//   5. book building: command buffer, control FSM, book cache and book
//      memory apply the command to the symbol's book.
// Every updated book is presented on snap_vld / snap_idx / snap_book for the
// host link. The error outputs pulse for one cycle per event.
//
// Latency: a payload flit reaches the decoder three cycles after it leaves
// the driver; a command reaches the book builder three cycles after the flit
// that ends its message, and its book is written back four cycles later when
// the command buffer is empty.
module fixfast_top
  import fixfast_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // Ethernet driver channels
  input  logic [NUM_CHAN-1:0]       d_pkt_rdy,
  input  logic [NUM_CHAN-1:0][7:0]  d_flit,
  input  logic [NUM_CHAN-1:0]       d_vld,
  input  logic [NUM_CHAN-1:0]       d_end,
  output logic [NUM_CHAN-1:0]       ack,
  // updated books, towards the host
  output logic                      snap_vld,
  output logic [BOOK_AW-1:0]        snap_idx,
  output book_t                     snap_book,
  // status pulses
  output logic                      cksum_err,
  output logic                      seq_err,
  output logic                      tid_err,
  output logic                      dec_err,
  output logic                      fb_overflow,
  output logic                      cmd_err,
  output logic                      busy
);

  // stage 2
  logic [7:0] m_flit;
  logic       m_vld, m_end, m_chan;
  logic [7:0] p_flit;
  logic       p_vld, p_sop, p_eop, p_chan;
  seq_t       p_seq;
  // stage 3
  logic [7:0] a_flit;
  logic       a_vld, a_sop, a_eop;
  logic [7:0] a_count;
  logic [7:0] i_flit;
  logic       i_vld, i_eop;
  flit_role_e i_role;
  // stage 4/5
  logic       c_vld, c_rdy;
  book_cmd_t  c_cmd;
  logic       bb_busy;

  channel_select u_chsel (
    .clk, .rst_n, .pkt_rdy(d_pkt_rdy), .drv_flit(d_flit), .drv_vld(d_vld),
    .drv_end(d_end), .ack, .out_flit(m_flit), .out_vld(m_vld), .out_end(m_end),
    .out_chan(m_chan));

  packetizer u_pkt (
    .clk, .rst_n, .in_flit(m_flit), .in_vld(m_vld), .in_end(m_end), .in_chan(m_chan),
    .out_flit(p_flit), .out_vld(p_vld), .out_sop(p_sop), .out_eop(p_eop),
    .out_chan(p_chan), .out_seq(p_seq), .cksum_err);

  feed_arbitrator u_arb (
    .clk, .rst_n, .in_flit(p_flit), .in_vld(p_vld), .in_sop(p_sop), .in_eop(p_eop),
    .in_chan(p_chan), .in_seq(p_seq), .out_flit(a_flit), .out_vld(a_vld),
    .out_sop(a_sop), .out_eop(a_eop), .seq_err);

  flit_counter #(.POS_W(8)) u_cnt (
    .clk, .rst_n, .in_vld(a_vld), .in_sop(a_sop), .count(a_count));

  flit_identifier #(.POS_W(8)) u_fid (
    .clk, .rst_n, .in_flit(a_flit), .in_vld(a_vld), .in_eop(a_eop), .count(a_count),
    .out_flit(i_flit), .out_vld(i_vld), .out_eop(i_eop), .out_role(i_role));

  ff_decoder u_dec (
    .clk, .rst_n, .in_flit(i_flit), .in_vld(i_vld), .in_eop(i_eop), .in_role(i_role),
    .cmd_vld(c_vld), .cmd(c_cmd), .cmd_rdy(c_rdy), .tid_err, .dec_err, .fb_overflow);

  book_builder #(.CMD_DEPTH(16)) u_bb (
    .clk, .rst_n, .cmd_vld(c_vld), .cmd(c_cmd), .cmd_rdy(c_rdy), .snap_vld,
    .snap_idx, .snap_book, .cmd_err, .busy(bb_busy));

  assign busy = bb_busy || c_vld;

endmodule
