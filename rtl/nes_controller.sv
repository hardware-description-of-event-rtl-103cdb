// Reader for an NES game pad (a CD4021 parallel-in shift register inside).
//
// On each `poll` strobe the reader raises LATCH for two half periods, which
// loads the pad's eight buttons into its shift register and puts button A on
// DATA. It then reads the eight bits A, B, Select, Start, Up, Down, Left,
// Right: each bit is sampled at the end of a low phase of the pad clock, and
// a high phase (rising edge) shifts the next bit out. DATA is active low.
// The whole read takes 2 + 15 half periods; with HALF = 150 clocks at 25 MHz
// a half period is 6 us. The new button byte appears on `buttons` (active
// high, bit 0 = A ... bit 7 = Right) when `valid` pulses.
// That the player may use an NES pad for Up, Down and Shoot comes from the
// game description; the protocol is the pad's standard one and using A or B
// as Shoot is this design's choice.
//
// Interface: clk, rst (asynchronous), poll (start a read; ignored while
// busy), nes_data (pad DATA pin), nes_latch, nes_clk (pad pins),
// buttons, valid, up, down, fire.
module nes_controller #(
  parameter int unsigned HALF = 150
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       poll,
  input  logic       nes_data,
  output logic       nes_latch,
  output logic       nes_clk,
  output logic [7:0] buttons,
  output logic       valid,
  output logic       up,
  output logic       down,
  output logic       fire
);
  typedef enum logic [1:0] {S_IDLE, S_LATCH, S_LOW, S_HIGH} st_e;
  localparam int CW = $clog2(2 * HALF + 1);

  st_e           st_reg;
  logic [CW-1:0] cnt_reg;
  logic [2:0]    bit_reg;
  logic [7:0]    shift_reg, buttons_reg;
  logic          valid_reg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st_reg      <= S_IDLE;
      cnt_reg     <= '0;
      bit_reg     <= '0;
      shift_reg   <= '0;
      buttons_reg <= '0;
      valid_reg   <= 1'b0;
    end else begin
      valid_reg <= 1'b0;
      unique case (st_reg)
        S_IDLE: if (poll) begin
          st_reg  <= S_LATCH;
          cnt_reg <= CW'(2 * HALF - 1);
        end
        S_LATCH: if (cnt_reg == '0) begin
          st_reg  <= S_LOW;
          cnt_reg <= CW'(HALF - 1);
          bit_reg <= '0;
        end else cnt_reg <= cnt_reg - 1'b1;
        S_LOW: if (cnt_reg == '0) begin
          shift_reg[bit_reg] <= !nes_data;
          if (bit_reg == 3'd7) begin
            st_reg      <= S_IDLE;
            buttons_reg <= {!nes_data, shift_reg[6:0]};
            valid_reg   <= 1'b1;
          end else begin
            st_reg  <= S_HIGH;
            cnt_reg <= CW'(HALF - 1);
          end
        end else cnt_reg <= cnt_reg - 1'b1;
        S_HIGH: if (cnt_reg == '0) begin
          st_reg  <= S_LOW;
          cnt_reg <= CW'(HALF - 1);
          bit_reg <= bit_reg + 1'b1;
        end else cnt_reg <= cnt_reg - 1'b1;
      endcase
    end
  end

  assign nes_latch = (st_reg == S_LATCH);
  assign nes_clk   = (st_reg == S_HIGH);
  assign buttons   = buttons_reg;
  assign valid     = valid_reg;
  assign up        = buttons_reg[4];
  assign down      = buttons_reg[5];
  assign fire      = buttons_reg[0] | buttons_reg[1];
endmodule
