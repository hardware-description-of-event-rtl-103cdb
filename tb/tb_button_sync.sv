// Testbench of button_sync: random active-low key patterns must appear
// inverted on `pressed` exactly two clocks later.
module tb_button_sync;
  logic clk = 0, rst = 1;
  logic [2:0] key_n = 3'b111, pressed;
  logic [2:0] hist [0:2];
  int checks = 0, failures = 0;

  button_sync #(.N(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    hist[0] = 3'b111; hist[1] = 3'b111; hist[2] = 3'b111;
    repeat (2) @(negedge clk);
    checks++; if (pressed != 3'b000) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      key_n = 3'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = key_n;
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (pressed != ~hist[1]) begin failures++; $display("FAIL %0d: %b vs %b", i, pressed, ~hist[1]); end
      end
    end
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
