// eth_driver_model: behavioural model of one Ethernet port driver, for
// simulation only (not synthesizable).
//
// The real driver belongs to the network board. Its required behaviour:
// buffer a received packet, then once selected put the next 8-bit flit on its
// output every clock and mark the last one with last. The model keeps a queue
// of frames (push()), raises pkt_rdy while it holds one, and streams the head
// frame while ack is high. Once a frame has started it is sent to its end.
module eth_driver_model
  import fixfast_tb_pkg::*;
(
  input  logic       clk,
  input  logic       ack,
  output logic       pkt_rdy,
  output logic [7:0] flit,
  output logic       vld,
  output logic       last
);

  bytes_t frames[$];
  bytes_t cur;
  int     idx;
  bit     active;
  int     sent;

  initial begin
    flit   = '0;
    vld    = 1'b0;
    last   = 1'b0;
    active = 1'b0;
    idx    = 0;
    sent   = 0;
  end

  function automatic void push(bytes_t f);
    frames.push_back(f);
  endfunction

  always @(posedge clk) begin
    vld  <= 1'b0;
    last <= 1'b0;
    if (ack) begin
      if (!active && frames.size() > 0) begin
        cur    = frames.pop_front();
        idx    = 0;
        active = 1'b1;
      end
      if (active) begin
        flit <= cur[idx];
        vld  <= 1'b1;
        last <= (idx == cur.size() - 1);
        idx++;
        if (idx == cur.size()) begin
          active = 1'b0;
          sent++;
        end
      end
    end
  end

  assign pkt_rdy = (frames.size() > 0) || active;

endmodule
