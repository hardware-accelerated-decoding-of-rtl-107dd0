// tb_book_control_fsm: feeds commands and checks the four-cycle sequence
// cycle by cycle: pop + memory read (address = book), cache load, cache
// execute, write back + snapshot at the same address; then the next command.
module tb_book_control_fsm;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  localparam int N = 200;
  logic clk = 0, rst_n = 0;
  logic cmd_vld, cmd_pop, mem_rd_en, mem_wr_en, snap_vld, busy;
  book_cmd_t cmd_head, cache_cmd;
  logic [BOOK_AW-1:0] mem_rd_addr, mem_wr_addr, snap_idx;
  logic [1:0] cache_op;
  book_cmd_t cmds [N];
  int rd_idx = 0, avail = 0;
  int checks = 0, failures = 0;

  book_control_fsm dut (.clk, .rst_n, .cmd_vld, .cmd_head, .cmd_pop, .mem_rd_en, .mem_rd_addr,
                        .mem_wr_en, .mem_wr_addr, .cache_op, .cache_cmd, .snap_vld, .snap_idx, .busy);

  always #5 clk = ~clk;

  // stand-in for the command buffer: cmds[rd_idx..avail-1] are waiting
  assign cmd_vld  = rd_idx < avail;
  assign cmd_head = cmds[rd_idx < N ? rd_idx : 0];
  always @(posedge clk) if (cmd_pop) rd_idx <= rd_idx + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    book_cmd_t c;
    for (int n = 0; n < N; n++)
      cmds[n] = mk_cmd(cmd_action_e'($urandom_range(0, 2)), $urandom, $urandom, $urandom,
                       $urandom, $urandom, $urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!cmd_pop && !mem_rd_en && !mem_wr_en && cache_op == 0 && !busy, "idle outputs");
    avail = N;
    #1;
    for (int n = 0; n < N; n++) begin
      c = cmds[n];
      chk(cmd_pop && mem_rd_en && mem_rd_addr == c.book && cache_op == 0 && !mem_wr_en, "fetch cycle");
      @(negedge clk);
      chk(!cmd_pop && cache_op == 2'd1 && cache_cmd == c && !mem_wr_en, "load cycle");
      @(negedge clk);
      chk(!cmd_pop && cache_op == 2'd2 && cache_cmd == c && !mem_wr_en, "execute cycle");
      @(negedge clk);
      chk(!cmd_pop && cache_op == 0 && mem_wr_en && mem_wr_addr == c.book &&
          snap_vld && snap_idx == c.book, "write-back cycle");
      @(negedge clk);
    end
    chk(!busy && !cmd_pop, "idle after last command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
