// flit_identifier: tells the decoder what each payload flit is.
//
// From the flit's position in the packet (count, from the flit counter) it
// tags the flit: position 1 is the FAST presence map (PMAP), position 2 the
// template ID, every later flit is field data. The position numbers count
// payload flits only; in the raw frame they are flits 43, 44 and 45 onward,
// after the 42 header flits that the packetizer has removed.
//
// One register stage: the tagged flit appears one cycle after the input, one
// flit per clock.
//
// Following the design description: PMAP then template ID at the start of the
// payload, all later flits data. Own choice: positions counted after header
// removal.
module flit_identifier
  import fixfast_pkg::*;
#(
  parameter int unsigned POS_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       in_flit,
  input  logic             in_vld,
  input  logic             in_eop,
  input  logic [POS_W-1:0] count,
  output logic [7:0]       out_flit,
  output logic             out_vld,
  output logic             out_eop,
  output flit_role_e       out_role
);

  flit_role_e role;

  always_comb begin
    if (count == POS_W'(1))      role = ROLE_PMAP;
    else if (count == POS_W'(2)) role = ROLE_TID;
    else                         role = ROLE_DATA;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_flit <= '0;
      out_vld  <= 1'b0;
      out_eop  <= 1'b0;
      out_role <= ROLE_PMAP;
    end else begin
      out_vld <= in_vld;
      out_eop <= in_vld && in_eop;
      if (in_vld) begin
        out_flit <= in_flit;
        out_role <= role;
      end
    end
  end

endmodule
