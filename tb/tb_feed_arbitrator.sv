// tb_feed_arbitrator: packets on two channels with serial numbers that mostly
// count up by one per channel, sometimes skip, repeat or wrap from 65535 to 0.
// A packet passes (whole, one cycle later) when its number is the channel's
// previous number plus one, or it is the channel's first packet; otherwise
// it is dropped and seq_err pulses once.
module tb_feed_arbitrator;
  import fixfast_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] in_flit, out_flit;
  logic in_vld, in_sop, in_eop, in_chan, out_vld, out_sop, out_eop, seq_err;
  seq_t in_seq;
  typedef struct { int cyc; logic [7:0] b; bit sop, eop; } exp_t;
  exp_t expq[$];
  int cyc = 0, checks = 0, failures = 0, n_err = 0, exp_err = 0, n_pass = 0, wraps = 0;

  feed_arbitrator dut (.clk, .rst_n, .in_flit, .in_vld, .in_sop, .in_eop, .in_chan, .in_seq,
                       .out_flit, .out_vld, .out_sop, .out_eop, .seq_err);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (seq_err) n_err++;
    if (out_vld) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected flit at %0d", cyc); end
      else begin
        e = expq.pop_front();
        if (out_flit != e.b || out_sop != e.sop || out_eop != e.eop || cyc != e.cyc) begin
          failures++;
          if (failures < 6) $display("FAIL flit at %0d, expected cycle %0d", cyc, e.cyc);
        end
      end
    end
  end

  initial begin
    int last [2];
    bit seen [2];
    int s, len;
    bit ch, ok;
    in_vld = 0; in_sop = 0; in_eop = 0; in_flit = 0; in_chan = 0; in_seq = 0;
    seen = '{0, 0};
    last = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      ch = $urandom_range(0, 1);
      case ($urandom_range(0, 9))
        0:       s = (last[ch] + $urandom_range(2, 100)) % 65536;
        1:       s = last[ch];
        default: s = (last[ch] + 1) % 65536;
      endcase
      if (n == 300) begin s = 65535; end
      ok = !seen[ch] || s == (last[ch] + 1) % 65536;
      if (ok && s == 0 && seen[ch]) wraps++;
      if (!ok) exp_err++;
      seen[ch] = 1;
      last[ch] = s;
      len = $urandom_range(1, 30);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        in_vld = 1; in_flit = 8'($urandom); in_sop = i == 0; in_eop = i == len - 1;
        in_chan = ch; in_seq = seq_t'(s);
        if (ok) expq.push_back('{cyc: cyc + 1, b: in_flit, sop: in_sop, eop: in_eop});
      end
      if ($urandom_range(0, 1)) begin
        @(negedge clk);
        in_vld = 0;
      end
    end
    @(negedge clk);
    in_vld = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d flits missing", expq.size()); end
    checks++;
    if (n_err != exp_err || exp_err == 0) begin failures++; $display("FAIL seq_err %0d expected %0d", n_err, exp_err); end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("errors %0d, wraps %0d", n_err, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
