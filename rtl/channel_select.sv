// channel_select: picks one of the two Ethernet driver channels and
// multiplexes its flits onto the single 8-bit pipeline input.
//
// Each driver raises pkt_rdy while it holds a buffered packet that it has not
// started to send. A grant is given when the unit is idle, or in the cycle
// the current packet's end flit is on the bus: the chosen driver's ack rises
// in that cycle, and the driver puts one flit per clock on its output from
// the next cycle on, marking the last one with end. The other ack stays low.
// The current driver's ack falls in the cycle its end flit is seen, unless it
// is granted again, so a driver that samples ack on the clock edge never
// starts a packet it was not granted. Because the next grant overlaps the end
// flit, back-to-back packets follow each other with no idle cycle: the
// pipeline input runs at one flit per clock while packets are waiting. When
// both drivers request, the one not served last goes first (round robin),
// so neither port can starve the other.
//
// The selected channel number is also output (chan), for the feed arbitrator
// downstream. The multiplexer is combinational; the packetizer that follows
// registers its output.
//
// Following the design description: two ports, an ACK to the selected
// driver only, the select signal shared with the mux and the feed
// arbitrator, one flit per clock while the pipe is filled. Own choices: the
// pkt_rdy request, round-robin order, and the grant lasting one packet.
module channel_select
  import fixfast_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // driver side
  input  logic [NUM_CHAN-1:0]        pkt_rdy,
  input  logic [NUM_CHAN-1:0][7:0]   drv_flit,
  input  logic [NUM_CHAN-1:0]        drv_vld,
  input  logic [NUM_CHAN-1:0]        drv_end,
  output logic [NUM_CHAN-1:0]        ack,
  // pipeline side
  output logic [7:0]                 out_flit,
  output logic                       out_vld,
  output logic                       out_end,
  output logic                       out_chan
);

  logic busy_q, sel_q, last_q;
  logic sel_end;
  logic grant, grant_ch;

  assign sel_end = busy_q && drv_vld[sel_q] && drv_end[sel_q];

  // round robin: prefer the channel that was not served last
  always_comb begin
    grant    = 1'b0;
    grant_ch = 1'b0;
    if (!busy_q || sel_end) begin
      if (pkt_rdy[!last_q]) begin
        grant    = 1'b1;
        grant_ch = !last_q;
      end else if (pkt_rdy[last_q]) begin
        grant    = 1'b1;
        grant_ch = last_q;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      sel_q  <= 1'b0;
      last_q <= 1'b1;
    end else if (grant) begin
      busy_q <= 1'b1;
      sel_q  <= grant_ch;
      last_q <= grant_ch;
    end else if (sel_end) begin
      busy_q <= 1'b0;
    end
  end

  always_comb begin
    ack = '0;
    if (busy_q && !sel_end) ack[sel_q] = 1'b1;
    if (grant)              ack[grant_ch] = 1'b1;
  end

  assign out_flit = drv_flit[sel_q];
  assign out_vld  = busy_q && drv_vld[sel_q];
  assign out_end  = busy_q && drv_vld[sel_q] && drv_end[sel_q];
  assign out_chan = sel_q;

  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack));

endmodule
