// tb_field_buffer: commands arrive at random and the consumer is randomly
// not ready; every command is either delivered in order or reported as an
// overflow, and a held command stays stable.
module tb_field_buffer;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_vld, out_vld, out_rdy, overflow;
  book_cmd_t in_cmd, out_cmd, held;
  book_cmd_t model[$];
  int checks = 0, failures = 0, ovf = 0, delivered = 0;

  field_buffer dut (.clk, .rst_n, .in_vld, .in_cmd, .out_vld, .out_cmd, .out_rdy, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit full, drain;
    in_vld = 0; out_rdy = 0; in_cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      full = model.size() > 0;
      checks++;
      if (out_vld !== full || (full && out_cmd !== model[0])) begin
        failures++;
        $display("FAIL at %0d: out_vld %0d expected %0d", n, out_vld, full);
      end
      in_vld  = $urandom_range(0, 2) == 0;
      in_cmd  = mk_cmd(cmd_action_e'($urandom_range(0, 2)), $urandom, $urandom, $urandom, $urandom, $urandom, $urandom);
      out_rdy = $urandom_range(0, 1);
      drain   = full && out_rdy;
      @(posedge clk);
      if (drain) begin void'(model.pop_front()); delivered++; end
      if (in_vld) begin
        if (model.size() == 0) model.push_back(in_cmd);
        else ovf++;
      end
      #1;
      checks++;
      if (overflow !== (in_vld && full && !drain)) begin
        failures++;
        $display("FAIL overflow flag at %0d", n);
      end
    end
    checks++;
    if (ovf == 0 || delivered == 0) begin failures++; $display("FAIL no overflow or no delivery"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
