// Mine: one mine of the tunnel; HITS and SCORE select Mine1 or Mine2.
//
// States: UNUSED (not on screen), PLANTED, EXPLODING. The tunnel plants an
// unused mine at a random place (`plant` with plant_x/plant_y). A planted
// mine scrolls left SCROLL_SPEED pixels per tick with the tunnel and becomes
// UNUSED when it reaches the left edge. Each missile hit (`hit`, sampled with
// tick) is counted in a hit counter, which keeps the mine's history: when the
// count reaches HITS the mine explodes and pulses `destroyed` with its SCORE
// for the ship. Mine1 needs one hit and is worth 20 points, Mine2 needs two
// hits and is worth 50, as the game description gives. The explosion is
// shown for EXPLODE_TICKS ticks; after it the mine is UNUSED and can be
// planted again. Scrolling, the explosion length and `clear` (game not
// running: mine removed) are this design's choices.
//
// Interface: clk, rst (asynchronous), tick, clear, plant, plant_x, plant_y,
// hit in; pos (valid only while PLANTED), exploding, unused, hit_count,
// destroyed (pulse) and score_val out.
module mine
  import flyshoot_pkg::*;
#(
  parameter int unsigned HITS          = 1,
  parameter int unsigned SCORE         = MINE1_SCORE,
  parameter int unsigned EXPLODE_TICKS = 15
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       clear,
  input  logic       plant,
  input  coord_t     plant_x,
  input  coord_t     plant_y,
  input  logic       hit,
  output obj_pos_t   pos,
  output logic       exploding,
  output logic       unused,
  output logic [1:0] hit_count,
  output logic       destroyed,
  output score_inc_t score_val
);
  typedef enum logic [1:0] {UNUSED, PLANTED, EXPLODING} state_e;

  state_e     state_reg, state_next;
  coord_t     x_reg, x_next, y_reg, y_next;
  logic [1:0] hits_reg, hits_next;
  logic [4:0] exp_reg, exp_next;
  logic       destroyed_e;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_reg <= UNUSED;
      x_reg     <= '0;
      y_reg     <= '0;
      hits_reg  <= '0;
      exp_reg   <= '0;
    end else if (tick) begin
      state_reg <= state_next;
      x_reg     <= x_next;
      y_reg     <= y_next;
      hits_reg  <= hits_next;
      exp_reg   <= exp_next;
    end
  end

  always_comb begin
    state_next  = state_reg;
    x_next      = x_reg;
    y_next      = y_reg;
    hits_next   = hits_reg;
    exp_next    = exp_reg;
    destroyed_e = 1'b0;
    if (clear) begin
      state_next = UNUSED;
    end else begin
      unique case (state_reg)
        UNUSED: if (plant) begin
          state_next = PLANTED;
          x_next     = plant_x;
          y_next     = plant_y;
          hits_next  = '0;
        end
        PLANTED: begin
          if (hit) begin
            if (32'(hits_reg) + 1 >= HITS) begin
              state_next  = EXPLODING;
              exp_next    = '0;
              destroyed_e = 1'b1;
            end
            hits_next = hits_reg + 1'b1;
          end else if (32'(x_reg) < SCROLL_SPEED) begin
            state_next = UNUSED;
          end else begin
            x_next = x_reg - coord_t'(SCROLL_SPEED);
          end
        end
        EXPLODING: begin
          if (32'(exp_reg) + 1 >= EXPLODE_TICKS) state_next = UNUSED;
          else                                   exp_next   = exp_reg + 1'b1;
        end
        default: state_next = UNUSED;
      endcase
    end
  end

  assign pos.valid = (state_reg == PLANTED);
  assign pos.x     = x_reg;
  assign pos.y     = y_reg;
  assign exploding = (state_reg == EXPLODING);
  assign unused    = (state_reg == UNUSED);
  assign hit_count = hits_reg;
  assign destroyed = tick && destroyed_e;
  assign score_val = score_inc_t'(SCORE);
endmodule
