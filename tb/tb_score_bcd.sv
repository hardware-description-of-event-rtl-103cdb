// Testbench of score_bcd: random and edge scores must come out as the five
// decimal digits computed here with division, 17 clocks after the start, and
// the output must hold between conversions.
module tb_score_bcd;
  import flyshoot_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy;
  score_t bin = 0;
  logic [19:0] bcd, exp;
  int checks = 0, failures = 0, lat;

  score_bcd dut (.*);

  always #5 clk = ~clk;

  function automatic logic [19:0] to_bcd(input int v);
    logic [19:0] r;
    for (int d = 0; d < 5; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    checks++; if (bcd != 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      bin = (i == 0) ? 16'd0 : (i == 1) ? 16'hFFFF : (i == 2) ? 16'd99 : (i == 3) ? 16'd50 : 16'($urandom);
      exp = to_bcd(int'(bin));
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (busy && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 17) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (bcd != exp) begin failures++; $display("FAIL %0d -> %h expected %h", bin, bcd, exp); end
      bin = 16'($urandom);
      repeat (3) @(negedge clk);
      checks++;
      if (bcd != exp) begin failures++; $display("FAIL output not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
