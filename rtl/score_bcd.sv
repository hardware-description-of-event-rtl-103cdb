// Score converter for the on-screen score: binary to five BCD digits.
//
// On each SCORE event (`start`) it takes the 16-bit score and runs the
// shift-and-add-3 (double dabble) algorithm one bit per clock: before each
// left shift, every BCD digit that is 5 or more gets 3 added. After 16
// clocks the five digits are copied to `bcd`, which holds them until the next
// conversion; `busy` is high meanwhile. A start while busy restarts with the
// new value. That the ship reports the score to the tunnel with a SCORE event
// follows the game description; showing it in decimal, and this converter,
// are this design's choice.
//
// Interface: clk, rst (asynchronous; bcd reads 00000), start, bin in;
// bcd (digit 4 most significant, 4 bits each), busy out. Latency 17 clocks.
module score_bcd
  import flyshoot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  score_t      bin,
  output logic [19:0] bcd,
  output logic        busy
);
  logic [19:0] digits_reg, digits_adj;
  score_t      bin_reg;
  logic [4:0]  cnt_reg;

  always_comb begin
    for (int d = 0; d < 5; d++) begin
      digits_adj[4*d +: 4] = (digits_reg[4*d +: 4] >= 4'd5) ?
                             digits_reg[4*d +: 4] + 4'd3 : digits_reg[4*d +: 4];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      digits_reg <= '0;
      bin_reg    <= '0;
      cnt_reg    <= '0;
      bcd        <= '0;
    end else if (start) begin
      digits_reg <= '0;
      bin_reg    <= bin;
      cnt_reg    <= 5'd16;
    end else if (cnt_reg != '0) begin
      digits_reg <= {digits_adj[18:0], bin_reg[SCORE_W-1]};
      bin_reg    <= bin_reg << 1;
      cnt_reg    <= cnt_reg - 1'b1;
      if (cnt_reg == 5'd1) bcd <= {digits_adj[18:0], bin_reg[SCORE_W-1]};
    end
  end

  assign busy = (cnt_reg != '0);
endmodule
