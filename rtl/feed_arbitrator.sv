// feed_arbitrator: checks the serial number of every packet against the
// previous packet of the same channel.
//
// The packetizer delivers the payload flits of a packet with the packet's
// serial number (seq) and channel (chan) alongside. On the first flit
// (in_sop) the unit compares seq with the last serial number accepted on that
// channel. If it is exactly one more (modulo 2^16), the whole packet is
// passed on; otherwise seq_err pulses and the packet's flits are dropped.
// Either way the new number becomes the channel's reference, so the check
// resynchronises after a gap. The first packet seen on a channel after reset
// has nothing to compare with and is accepted.
//
// One register stage: output flits follow the input one cycle later, one flit
// per clock.
//
// Following the design description: the per-channel comparison with
// "previous + 1", passing correct packets and raising an error otherwise.
// Own choices: the wrong packet is dropped, the reference is resynchronised,
// the first packet per channel is accepted.
module feed_arbitrator
  import fixfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  in_flit,
  input  logic        in_vld,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic        in_chan,
  input  seq_t        in_seq,
  output logic [7:0]  out_flit,
  output logic        out_vld,
  output logic        out_sop,
  output logic        out_eop,
  output logic        seq_err
);

  seq_t [NUM_CHAN-1:0] last_q;
  logic [NUM_CHAN-1:0] seen_q;
  logic                pass_q;
  logic                seq_ok;
  logic                pass;

  assign seq_ok = !seen_q[in_chan] || (in_seq == last_q[in_chan] + seq_t'(1));
  assign pass   = in_sop ? seq_ok : pass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q   <= '0;
      seen_q   <= '0;
      pass_q   <= 1'b0;
      out_flit <= '0;
      out_vld  <= 1'b0;
      out_sop  <= 1'b0;
      out_eop  <= 1'b0;
      seq_err  <= 1'b0;
    end else begin
      seq_err <= 1'b0;
      out_vld <= 1'b0;
      out_sop <= 1'b0;
      out_eop <= 1'b0;
      if (in_vld) begin
        if (in_sop) begin
          last_q[in_chan] <= in_seq;
          seen_q[in_chan] <= 1'b1;
          pass_q          <= seq_ok;
          seq_err         <= !seq_ok;
        end
        if (pass) begin
          out_flit <= in_flit;
          out_vld  <= 1'b1;
          out_sop  <= in_sop;
          out_eop  <= in_eop;
        end
      end
    end
  end

endmodule
