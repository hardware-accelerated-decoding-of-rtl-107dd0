// tb_channel_select: two driver models with queued frames of random length.
// Every frame must come out whole, in order per channel, tagged with its
// channel, one flit per clock; at most one ack is high; when both ports wait,
// grants alternate. While frames are waiting (the first 200, queued at once)
// the output must carry a flit in every cycle, with no idle cycle between
// frames.
module tb_channel_select;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] pkt_rdy, drv_vld, drv_end, ack;
  logic [1:0][7:0] drv_flit;
  logic [7:0] out_flit;
  logic out_vld, out_end, out_chan;
  bytes_t expq [2][$];
  bytes_t cur;
  int checks = 0, failures = 0, got = 0, alternations = 0, gaps = 0;
  int last_chan = -1;
  int idle_busy = 0;
  bit started = 0;
  bit in_pkt = 0;

  eth_driver_model d0 (.clk, .ack(ack[0]), .pkt_rdy(pkt_rdy[0]), .flit(drv_flit[0]), .vld(drv_vld[0]), .last(drv_end[0]));
  eth_driver_model d1 (.clk, .ack(ack[1]), .pkt_rdy(pkt_rdy[1]), .flit(drv_flit[1]), .vld(drv_vld[1]), .last(drv_end[1]));

  channel_select dut (.clk, .rst_n, .pkt_rdy, .drv_flit, .drv_vld, .drv_end, .ack,
                      .out_flit, .out_vld, .out_end, .out_chan);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (!$onehot0(ack)) begin failures++; $display("FAIL two acks"); end
    if (in_pkt && !out_vld) gaps++;
    if (out_vld) started = 1;
    if (started && got < 200 && !out_vld) idle_busy++;
    if (out_vld) begin
      in_pkt = 1;
      cur.push_back(out_flit);
      if (out_end) begin
        bytes_t e;
        in_pkt = 0;
        checks++;
        if (expq[out_chan].size() == 0) begin
          failures++; $display("FAIL unexpected frame on %0d", out_chan);
        end else begin
          e = expq[out_chan].pop_front();
          if (e != cur) begin failures++; $display("FAIL frame %0d differs", got); end
        end
        if (last_chan >= 0 && last_chan != out_chan) alternations++;
        last_chan = out_chan;
        got++;
        cur = {};
      end
    end
  end

  initial begin
    bytes_t f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int ch;
      ch = (n < 200) ? n % 2 : $urandom_range(0, 1);
      f = {};
      f.push_back(byte'(ch));
      for (int i = $urandom_range(0, 80); i >= 0; i--) f.push_back(byte'($urandom));
      expq[ch].push_back(f);
      if (ch == 0) d0.push(f); else d1.push(f);
      if (n >= 200) repeat ($urandom_range(0, 60)) @(posedge clk);
    end
    wait (got == 300);
    repeat (3) @(posedge clk);
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d gaps inside frames", gaps); end
    checks++;
    if (idle_busy != 0) begin failures++; $display("FAIL %0d idle cycles between waiting frames", idle_busy); end
    checks++;
    if (alternations < 100) begin failures++; $display("FAIL only %0d alternations", alternations); end
    $display("frames %0d alternations %0d", got, alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
