// tb_command_buffer: random pushes and pops against a queue model; checks
// order, the full and empty flags, the fill level and simultaneous
// push/pop.
module tb_command_buffer;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_vld, wr_rdy, rd_vld, rd_pop;
  book_cmd_t wr_cmd, rd_cmd;
  logic [$clog2(D):0] level;
  book_cmd_t model[$];
  int checks = 0, failures = 0, fulls = 0;

  command_buffer #(.DEPTH(D)) dut (.clk, .rst_n, .wr_vld, .wr_cmd, .wr_rdy, .rd_vld, .rd_cmd, .rd_pop, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_vld = 0; rd_pop = 0; wr_cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // flags against the model
      checks++;
      if (rd_vld !== (model.size() > 0) || wr_rdy !== (model.size() < D) || level != model.size()) begin
        failures++;
        $display("FAIL flags at %0d: rd_vld %0d wr_rdy %0d level %0d model %0d", n, rd_vld, wr_rdy, level, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_cmd !== model[0]) begin failures++; $display("FAIL head at %0d", n); end
      end
      if (model.size() == D) fulls++;
      wr_vld = $urandom_range(0, 1);
      wr_cmd = mk_cmd(cmd_action_e'($urandom_range(0, 2)), $urandom, $urandom, $urandom, $urandom, $urandom, $urandom);
      rd_pop = (model.size() > 0) && ($urandom_range(0, 2) == 0 || n > 3000);
      @(posedge clk);
      // ready does not look at a pop in the same cycle
      if (wr_vld && model.size() < D) model.push_back(wr_cmd);
      if (rd_pop) void'(model.pop_front());
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
