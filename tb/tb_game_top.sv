// End-to-end testbench of the game at reduced timing: a game tick every 700
// pixel clocks instead of 416,667, a 2-clock NES half period, a 20-tick
// explosion and a 10-tick game-over screen. The scripted player plays two
// whole games through the top's pins (see game_player).
module tb_game_top;
  import flyshoot_pkg::*;
  localparam int TD = 700, EX = 20, GO = 10;
  logic clk = 0;
  logic pll_locked, nes_data, nes_latch, nes_clk;
  logic [2:0] key_n;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_blank_n, vga_sync_n, vga_clk;
  score_t score;
  logic [1:0] game_state;

  always #20 clk = ~clk;   // 25 MHz

  game_top #(.TICK_DIV(TD), .NES_HALF(2), .EXPLODE_TICKS(EX), .GAMEOVER_TICKS(GO)) dut (
    .clk_pix(clk), .pll_locked, .key_n, .nes_data, .nes_latch, .nes_clk,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_clk,
    .score, .game_state);

  game_player #(.TICK_DIV(TD), .EXPLODE_TICKS(EX), .GAMEOVER_TICKS(GO),
                .MAX_CLOCKS(64'd100_000_000)) player (
    .clk, .pll_locked, .key_n, .nes_data, .nes_latch, .nes_clk,
    .tick(dut.tick), .ship_active(dut.ship_active), .ship_flying(dut.ship_flying),
    .ship_exploding(dut.ship_exploding), .ship_y(dut.ship_y),
    .ship_hit_wall(dut.ship_hit_wall), .ship_hit_mine(dut.ship_hit_mine),
    .missile(dut.missile_pos), .mine1(dut.mine1_pos), .mine2(dut.mine2_pos),
    .mine1_exploding(dut.mine1_exploding), .mine2_exploding(dut.mine2_exploding),
    .mine2_hits(dut.mine2_hits), .mine1_destroyed(dut.mine1_destroyed),
    .mine2_destroyed(dut.mine2_destroyed),
    .px(dut.u_tunnel.px), .py(dut.u_tunnel.py), .video_on(dut.u_tunnel.video_on),
    .game_state, .score, .score_digits(dut.u_tunnel.score_digits), .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);
endmodule
