// tb_flit_counter: random packets with gaps; count must be the 1-based
// position of each valid flit within its packet and saturate at 255.
module tb_flit_counter;
  logic clk = 0, rst_n = 0;
  logic in_vld, in_sop;
  logic [7:0] count;
  int checks = 0, failures = 0, sat = 0;

  flit_counter #(.POS_W(8)) dut (.clk, .rst_n, .in_vld, .in_sop, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, exp_c;
    in_vld = 0; in_sop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      len = (n % 50 == 7) ? 300 : $urandom_range(1, 40);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          in_vld = 0; in_sop = 0;
          @(negedge clk);
        end
        in_vld = 1; in_sop = i == 0;
        exp_c = (i + 1 > 255) ? 255 : i + 1;
        #1;
        checks++;
        if (count != exp_c) begin failures++; $display("FAIL count %0d expected %0d", count, exp_c); end
        if (exp_c == 255 && i + 1 > 255) sat++;
      end
    end
    @(negedge clk);
    in_vld = 0;
    checks++;
    if (sat == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
