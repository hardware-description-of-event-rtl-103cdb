// Testbench of timer: after a start on a tick, `up` must rise on exactly the
// TICKS-th following tick, stay high, and a new start must clear it.
module tb_timer;
  localparam int TICKS = 5;
  logic clk = 0, rst = 1, tick = 0, start = 0, up;
  int checks = 0, failures = 0;

  timer #(.TICKS(TICKS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_tick(input logic st);
    @(negedge clk); tick = 1; start = st;
    @(negedge clk); tick = 0; start = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check(!up, "up low after reset");
    repeat (3) do_tick(0);
    check(!up, "up low without start");
    for (int round = 0; round < 2; round++) begin
      do_tick(1);
      for (int i = 1; i < TICKS; i++) begin
        check(!up, $sformatf("up low %0d ticks after start", i - 1));
        do_tick(0);
      end
      check(up, "up high TICKS ticks after start");
      do_tick(0);
      check(up, "up stays high");
    end
    do_tick(1);
    check(!up, "restart clears up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
