// tb_book_builder: random update/insert/delete commands for 6 books, sent in
// bursts that fill the command buffer. Every snapshot must equal the
// reference book of its symbol after that command, cmd_err must match the
// reference's rejections (in the write-back cycle), and a steady stream must complete one command
// every four cycles.
module tb_book_builder;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  localparam int NB = 6;
  logic clk = 0, rst_n = 0;
  logic cmd_vld, cmd_rdy, snap_vld, cmd_err, busy;
  book_cmd_t cmd;
  logic [BOOK_AW-1:0] snap_idx;
  book_t snap_book;
  book_t refb [NB];
  book_cmd_t sent[$];
  int checks = 0, failures = 0, n_snap = 0, stalls = 0, errs = 0;
  int first_snap, last_snap;

  book_builder #(.CMD_DEPTH(16)) dut (.clk, .rst_n, .cmd_vld, .cmd, .cmd_rdy, .snap_vld, .snap_idx,
                                      .snap_book, .cmd_err, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // snapshot checker
  always @(posedge clk) if (rst_n && snap_vld) begin
    book_cmd_t c;
    bit e;
    c = sent.pop_front();
    e = ref_apply(refb[c.book], c);
    checks++;
    if (snap_idx != c.book || snap_book !== refb[c.book]) begin
      failures++;
      if (failures < 5) $display("FAIL snapshot %0d (book %0d action %0d)", n_snap, c.book, c.action);
    end
    checks++;
    if (cmd_err !== e) begin failures++; $display("FAIL cmd_err %0d expected %0d", cmd_err, e); end
    if (e) errs++;
    if (n_snap == 0) first_snap = $time / 10;
    last_snap = $time / 10;
    n_snap++;
  end
  initial begin
    book_cmd_t c;
    int n;
    cmd_vld = 0; cmd = '0;
    for (int i = 0; i < NB; i++) refb[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < 3000) begin
      @(negedge clk);
      if (n < 2000 || (n % 64) < 40) begin
        c = mk_cmd(cmd_action_e'($urandom_range(0, 9) < 5 ? 1 : $urandom_range(0, 2)),
                   $urandom_range(0, NB - 1), $urandom_range(0, 1), $urandom_range(1, BOOK_DEPTH),
                   10000 + $urandom_range(0, 30) * 25, $urandom_range(1, 500), $urandom_range(1, 9));
        cmd_vld = 1; cmd = c;
        @(posedge clk);
        if (cmd_rdy) begin sent.push_back(c); n++; end
        else stalls++;
      end else begin
        cmd_vld = 0;
        @(posedge clk);
        n++;
      end
    end
    @(negedge clk);
    cmd_vld = 0;
    wait (!busy && sent.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL command buffer never filled"); end
    checks++;
    if (errs == 0) begin failures++; $display("FAIL no rejected command seen"); end
    // rate: while saturated, one command per 4 cycles
    checks++;
    if (last_snap - first_snap > 4 * (n_snap - 1) + 4 * 400) begin
      failures++;
      $display("FAIL throughput: %0d snapshots in %0d cycles", n_snap, last_snap - first_snap);
    end
    $display("snapshots %0d, stalls %0d, rejected %0d", n_snap, stalls, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
