// tb_packetizer: frames with random payload sizes (short ones padded to the
// Ethernet minimum), random serial numbers and channels, some with a bad IP
// checksum, sent back to back or with idle gaps. Expected output: for each
// good frame exactly its UDP payload, first flit marked sop, last eop, with
// the frame's serial number and channel, each flit exactly one cycle after it
// entered; bad frames produce nothing and one cksum_err pulse.
module tb_packetizer;
  import fixfast_pkg::*;
  import fixfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] in_flit, out_flit;
  logic in_vld, in_end, in_chan, out_vld, out_sop, out_eop, out_chan, cksum_err;
  seq_t out_seq;
  typedef struct { int cyc; byte unsigned b; bit sop, eop, chan; int seq; } exp_t;
  exp_t expq[$];
  int cyc = 0;
  int checks = 0, failures = 0, n_bad = 0, n_err = 0, n_out = 0;

  packetizer dut (.clk, .rst_n, .in_flit, .in_vld, .in_end, .in_chan, .out_flit, .out_vld,
                  .out_sop, .out_eop, .out_chan, .out_seq, .cksum_err);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (cksum_err) n_err++;
    if (out_vld) begin
      exp_t e;
      n_out++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected flit"); end
      else begin
        e = expq.pop_front();
        if (out_flit != e.b || out_sop != e.sop || out_eop != e.eop || out_chan != e.chan ||
            out_seq != e.seq || cyc != e.cyc) begin
          failures++;
          if (failures < 6)
            $display("FAIL flit %02x sop %0d eop %0d seq %0d cyc %0d, expected %02x %0d %0d %0d %0d",
                     out_flit, out_sop, out_eop, out_seq, cyc, e.b, e.sop, e.eop, e.seq, e.cyc);
        end
      end
    end
  end

  initial begin
    bytes_t p, f;
    bit bad, ch;
    int seq;
    in_vld = 0; in_end = 0; in_flit = 0; in_chan = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      p = {};
      for (int i = $urandom_range(1, 70); i > 0; i--) p.push_back(byte'($urandom));
      bad = $urandom_range(0, 5) == 0;
      ch  = $urandom_range(0, 1);
      seq = $urandom_range(0, 65535);
      f = frame(seq, p, bad);
      if (bad) n_bad++;
      foreach (f[i]) begin
        @(negedge clk);
        in_vld = 1; in_flit = f[i]; in_end = (i == f.size() - 1); in_chan = ch;
        if (!bad && i >= 42 && i - 42 < p.size())
          expq.push_back('{cyc: cyc + 1, b: f[i], sop: i == 42, eop: i - 42 == p.size() - 1,
                           chan: ch, seq: seq});
      end
      if ($urandom_range(0, 1) == 1) begin
        @(negedge clk);
        in_vld = 0; in_end = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_vld = 0; in_end = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d flits missing", expq.size()); end
    checks++;
    if (n_err != n_bad || n_bad == 0) begin failures++; $display("FAIL cksum_err %0d, bad frames %0d", n_err, n_bad); end
    $display("payload flits %0d, bad frames %0d", n_out, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
