// Testbench of lfsr: compares every state against an independent model of
// the x^16+x^14+x^13+x^11+1 Fibonacci register and checks the period 65535.
module tb_lfsr;
  logic clk = 0, rst = 1;
  logic [15:0] value, model;
  int checks = 0, failures = 0;
  int period;

  lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    model = 16'hACE1;
    checks++; if (value !== model) begin failures++; $display("FAIL seed %h", value); end
    period = 0;
    for (int i = 0; i < 70000; i++) begin
      @(negedge clk);
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      if (i < 200 || i % 1000 == 0) begin
        checks++;
        if (value !== model) begin failures++; $display("FAIL step %0d %h %h", i, value, model); end
      end
      if (period == 0 && value == 16'hACE1) period = i + 1;
      checks += (value == 0) ? 1 : 0;
      if (value == 0) begin failures++; $display("FAIL zero state"); end
    end
    checks++;
    if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
