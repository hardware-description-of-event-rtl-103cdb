// Testbench of tick_gen: the strobe must be one clock wide and come every
// DIV clocks.
module tb_tick_gen;
  localparam int DIV = 7;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, n = 0;

  tick_gen #(.DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (DIV * 20) begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        n++;
        if (last >= 0) begin
          checks++;
          if (cyc - last != DIV) begin failures++; $display("FAIL spacing %0d", cyc - last); end
        end
        last = cyc;
      end
    end
    checks++;
    if (n < 19 || n > 20) begin failures++; $display("FAIL count %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
