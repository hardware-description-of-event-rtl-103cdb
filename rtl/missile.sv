// Missile: the ship's single missile.
//
// Two states. ARMED: the missile is off screen and waits for MISSILE_FIRE
// from the ship; it then appears just right of the ship's nose, centred on
// the ship's height. FLYING: it moves MISSILE_SPEED pixels to the right per
// tick (faster than the tunnel scrolls) until it hits a wall, hits a mine or
// would leave the screen; then it is ARMED again and can be fired anew.
// A mine that the missile destroys reports this, with its score value, to
// the ship through the missile: mine_destroyed/mine_score are passed on as
// destroyed_mine/score_inc_val in the same clock. All of this follows the
// game description; the two-state split, the speed and the launch point are
// this design's choice. `clear` (game not running) forces ARMED.
//
// Interface: clk, rst (asynchronous), tick, clear, fire, ship position, hit
// events (sampled with tick), mine-destroyed event in; position and the
// forwarded mine-destroyed event out.
module missile
  import flyshoot_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       clear,
  input  logic       fire,
  input  coord_t     ship_x,
  input  coord_t     ship_y,
  input  logic       hit_wall,
  input  logic       hit_mine,
  input  logic       mine_destroyed,
  input  score_inc_t mine_score,
  output obj_pos_t   pos,
  output logic       destroyed_mine,
  output score_inc_t score_inc_val
);
  typedef enum logic {ARMED, FLYING} state_e;

  state_e state_reg, state_next;
  coord_t x_reg, x_next, y_reg, y_next;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_reg <= ARMED;
      x_reg     <= '0;
      y_reg     <= '0;
    end else if (tick) begin
      state_reg <= state_next;
      x_reg     <= x_next;
      y_reg     <= y_next;
    end
  end

  always_comb begin
    state_next = state_reg;
    x_next     = x_reg;
    y_next     = y_reg;
    if (clear) begin
      state_next = ARMED;
    end else begin
      unique case (state_reg)
        ARMED: if (fire) begin
          state_next = FLYING;
          x_next     = ship_x + coord_t'(SHIP_WIDTH);
          y_next     = ship_y + coord_t'(SHIP_HEIGHT / 2 - MISSILE_HEIGHT / 2);
        end
        FLYING: begin
          if (hit_wall || hit_mine ||
              (32'(x_reg) + MISSILE_SPEED + MISSILE_WIDTH > MAX_X))
            state_next = ARMED;
          else
            x_next = x_reg + coord_t'(MISSILE_SPEED);
        end
        default: state_next = ARMED;
      endcase
    end
  end

  assign pos.valid     = (state_reg == FLYING);
  assign pos.x         = x_reg;
  assign pos.y         = y_reg;
  assign destroyed_mine = mine_destroyed;
  assign score_inc_val  = mine_score;
endmodule
