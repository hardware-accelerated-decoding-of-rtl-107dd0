// packetizer: strips the Ethernet, IP and UDP headers from a packet and
// passes on only the IP serial number and the UDP payload.
//
// The input is one 8-bit flit per clock, with end on the last flit of the
// frame. Flits 1..42 are the headers (Ethernet 14, IPv4 20 without options,
// UDP 8); payload starts at flit 43. On the way the unit:
//   * adds up the ten 16-bit words of the IP header (flits 15..34) in one's
//     complement; the header is good when the sum is 0xFFFF. A packet with a
//     bad checksum is dropped whole and cksum_err pulses once;
//   * captures the IP identification field (flits 19..20; flit 20 is its low
//     byte) as the packet's serial number, output as seq beside the payload;
//   * captures the UDP length (flits 39..40) and stops the payload after
//     (length - 8) bytes, so Ethernet padding is not passed on.
// The checksum is complete at flit 34, before any payload flit arrives, so
// nothing needs to be buffered: the output is the input delayed by one
// register stage (one cycle of latency), one flit per clock. out_sop marks
// the first payload flit, out_eop the last; seq and chan are valid with
// every payload flit.
//
// Following the design description: header stripping, checksum check and
// dropping, serial number passed along, one cycle of latency. Own choices:
// the serial number is the whole 16-bit IP identification field and travels
// as a side-band bus; which checksum (IP header) is checked; padding removal;
// the Ethernet FCS is assumed already removed by the driver.
module packetizer
  import fixfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  in_flit,
  input  logic        in_vld,
  input  logic        in_end,
  input  logic        in_chan,
  output logic [7:0]  out_flit,
  output logic        out_vld,
  output logic        out_sop,
  output logic        out_eop,
  output logic        out_chan,
  output seq_t        out_seq,
  output logic        cksum_err
);

  logic [15:0] pos_q;        // flits of this frame seen so far
  logic [15:0] cur;          // 1-based position of the incoming flit
  logic [15:0] sum_q;        // one's complement running sum
  logic [7:0]  hi_q;         // high byte of the current 16-bit word
  logic        ck_ok_q;
  seq_t        seq_q;
  logic [15:0] udp_len_q;
  logic [15:0] pay_idx;      // 1-based payload index of the incoming flit
  logic [15:0] pay_len;
  logic [15:0] sum_next;
  logic [16:0] sum_raw;
  logic        is_payload, last_payload;

  assign cur     = pos_q + 16'd1;
  assign pay_idx = cur - 16'(HDR_FLITS);
  assign pay_len = (udp_len_q > 16'd8) ? udp_len_q - 16'd8 : 16'd0;

  // one's complement addition of the word that completes on this flit
  assign sum_raw  = {1'b0, sum_q} + {1'b0, hi_q, in_flit};
  assign sum_next = sum_raw[15:0] + {15'd0, sum_raw[16]};

  assign is_payload   = (cur > 16'(HDR_FLITS)) && ck_ok_q && (pay_idx <= pay_len);
  assign last_payload = in_end || (pay_idx == pay_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q     <= '0;
      sum_q     <= '0;
      hi_q      <= '0;
      ck_ok_q   <= 1'b0;
      seq_q     <= '0;
      udp_len_q <= '0;
      out_flit  <= '0;
      out_vld   <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_chan  <= 1'b0;
      out_seq   <= '0;
      cksum_err <= 1'b0;
    end else begin
      out_vld   <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      cksum_err <= 1'b0;
      if (in_vld) begin
        pos_q <= in_end ? 16'd0 : ((pos_q == 16'hFFFF) ? pos_q : cur);
        // IP header checksum over flits 15..34
        if (cur >= 16'd15 && cur <= 16'd34) begin
          if (cur[0]) hi_q <= in_flit;          // odd position: high byte
          else begin
            sum_q <= (cur == 16'd16) ? {hi_q, in_flit} : sum_next;
            if (cur == 16'd34) begin
              ck_ok_q   <= (sum_next == 16'hFFFF);
              cksum_err <= (sum_next != 16'hFFFF);
            end
          end
        end
        if (cur == 16'd1)  ck_ok_q <= 1'b0;
        if (cur == 16'd19) seq_q[15:8] <= in_flit;
        if (cur == 16'd20) seq_q[7:0]  <= in_flit;
        if (cur == 16'd39) udp_len_q[15:8] <= in_flit;
        if (cur == 16'd40) udp_len_q[7:0]  <= in_flit;
        if (is_payload) begin
          out_flit <= in_flit;
          out_vld  <= 1'b1;
          out_sop  <= (pay_idx == 16'd1);
          out_eop  <= last_payload;
          out_chan <= in_chan;
          out_seq  <= seq_q;
        end
      end
    end
  end

endmodule
