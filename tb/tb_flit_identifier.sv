// tb_flit_identifier: the flit at position 1 must be tagged PMAP, position 2
// template ID, later positions data, one cycle after the input, with the flit
// value and the end-of-packet mark carried along.
module tb_flit_identifier;
  import fixfast_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] in_flit, out_flit, count;
  logic in_vld, in_eop, out_vld, out_eop;
  flit_role_e out_role;
  int checks = 0, failures = 0;

  flit_identifier #(.POS_W(8)) dut (.clk, .rst_n, .in_flit, .in_vld, .in_eop, .count,
                                     .out_flit, .out_vld, .out_eop, .out_role);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] f, c;
    bit v, e;
    flit_role_e r;
    in_vld = 0; in_eop = 0; in_flit = 0; count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      v = $urandom_range(0, 3) != 0;
      f = 8'($urandom);
      c = 8'($urandom_range(1, 6));
      e = $urandom_range(0, 4) == 0;
      in_vld = v; in_flit = f; count = c; in_eop = e;
      r = (c == 1) ? ROLE_PMAP : (c == 2) ? ROLE_TID : ROLE_DATA;
      @(negedge clk);
      in_vld = 0; in_eop = 0;
      checks++;
      if (out_vld != v || (v && (out_flit != f || out_role != r || out_eop != e)) || (!v && out_eop)) begin
        failures++;
        if (failures < 6) $display("FAIL at %0d: vld %0d role %0d", n, out_vld, out_role);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
