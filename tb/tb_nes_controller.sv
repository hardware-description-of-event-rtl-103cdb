// Testbench of nes_controller against a pad model: random button bytes must
// be read back exactly, with Up/Down/Fire decoded, and the read must take
// (2 + 15) half periods plus the closing clock.
module tb_nes_controller;
  localparam int HALF = 4;
  logic clk = 0, rst = 1, poll = 0;
  logic nes_data, nes_latch, nes_clk, valid, up, down, fire;
  logic [7:0] buttons, pad;
  int checks = 0, failures = 0, t0, t1, latch_clks, rises;

  nes_controller #(.HALF(HALF)) dut (.*);
  nes_pad_model pad_m (.buttons(pad), .latch(nes_latch), .clk(nes_clk), .data(nes_data));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pad = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      pad = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk); poll = 1; t0 = i; @(negedge clk); poll = 0;
      latch_clks = 0; rises = 0; t1 = 1;
      while (!valid) begin
        logic c0;
        c0 = nes_clk;
        if (nes_latch) latch_clks++;
        @(negedge clk); t1++;
        if (!c0 && nes_clk) rises++;
      end
      check(buttons == pad, $sformatf("read %h expected %h", buttons, pad));
      check(up == pad[4] && down == pad[5] && fire == (pad[0] | pad[1]), "decode up/down/fire");
      check(latch_clks == 2 * HALF, $sformatf("latch width %0d", latch_clks));
      check(rises == 7, $sformatf("clock pulses %0d", rises));
      check(t1 == 17 * HALF + 1, $sformatf("read time %0d clocks", t1));
      @(negedge clk);
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
