// flit_counter: numbers the flits of the current packet for the flit
// identifier.
//
// count is the 1-based position of the flit now on the input within its
// packet: 1 on the first flit (in_sop), then one more for every valid flit.
// It saturates at its largest value instead of wrapping, so a long packet
// never looks like the start of a new one. count is combinational from the
// inputs and the registered count of flits seen so far.
//
// Following the design description: a counter of received flits feeding the
// identifier. Own choices: the width and saturation.
module flit_counter #(
  parameter int unsigned POS_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_vld,
  input  logic             in_sop,
  output logic [POS_W-1:0] count
);

  logic [POS_W-1:0] seen_q;

  always_comb begin
    if (in_sop)             count = POS_W'(1);
    else if (&seen_q)       count = seen_q;
    else                    count = seen_q + POS_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      seen_q <= '0;
    else if (in_vld) seen_q <= count;
  end

endmodule
