// Ship: the player's object, a two-level (hierarchical) state machine.
//
// Upper level: INACTIVE / ACTIVE. Lower level inside ACTIVE: Parked /
// Flying / Exploding. It is written in the two-process style: one always_ff
// holds every *_reg register and one always_comb computes every *_next value
// and every event output. Behaviour, as the game description gives it:
//  - INACTIVE: a PLAYER_SHIP_MOVE event makes the ship ACTIVE (state Parked).
//  - Parked: the ship sits at x = 0, y = (MAX_Y-SHIP_HEIGHT)/2. A move event
//    starts the flight, clears the score and sends a SCORE event.
//  - Flying: the up/down buttons move the ship SHIP_DELTA_V pixels per tick
//    within the screen limits; every tick a local counter counts, and when it
//    equals 30 the score goes up by one (SCORE event) and the counter
//    restarts, so one point is earned every 31 ticks. PLAYER_FIRE sends
//    MISSILE_FIRE. DESTROYED_MINE adds the value the mine sent. HIT_MINE or
//    HIT_WALL start the explosion and the two-second timer.
//  - Exploding: EXPLOSION_SHIP is shown until the timer runs out; then the
//    ship is Parked and INACTIVE again and GAME_OVER is sent.
// Own choices: all registers step only on `tick` (the game tick strobe)
// instead of being clocked by the tick; when the 30-tick point and a
// destroyed mine fall on the same tick both are added; event outputs are
// one-clock pulses qualified by `tick`. exp_ctr counts the ticks spent
// exploding and is used only to animate the explosion.
//
// Interface: clk, rst (asynchronous), tick, player inputs, hit and
// mine-destroyed events in; position, score and events out.
module ship
  import flyshoot_pkg::*;
#(
  parameter int unsigned EXPLODE_TICKS = 2 * TICK_HZ
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       btn_up,            // btn(0)
  input  logic       btn_down,          // btn(1)
  input  logic       player_ship_move,
  input  logic       player_fire,
  input  logic       destroyed_mine,
  input  score_inc_t score_inc_val,
  input  logic       hit_mine,
  input  logic       hit_wall,
  output coord_t     x,
  output coord_t     y,
  output logic       active,            // superstate ACTIVE
  output logic       ship_flying,
  output logic       exploding,
  output logic [7:0] exp_ctr,
  output score_t     score,
  output logic       score_ev,          // SCORE event (pulse)
  output logic       missile_fire,      // MISSILE_FIRE event (pulse)
  output logic       explosion_ship,    // EXPLOSION_SHIP (level)
  output logic       game_over          // GAME_OVER event (pulse)
);
  typedef enum logic {INACTIVE, ACTIVE} superstate_e;
  typedef enum logic [1:0] {PARKED, FLYING, EXPLODING} state_e;

  localparam coord_t Y_HOME = coord_t'((MAX_Y - SHIP_HEIGHT) / 2);

  superstate_e superstate_reg, superstate_next;
  state_e      state_reg, state_next;
  coord_t      x_reg, x_next, y_reg, y_next;
  score_t      score_reg, score_next;
  logic [7:0]  local_ctr_reg, local_ctr_next;
  logic [7:0]  exp_ctr_reg, exp_ctr_next;
  logic        timer_2sec_start, timer_2sec_up;
  logic        score_e, fire_e, over_e;

  // process #1: registers
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      superstate_reg <= INACTIVE;
      state_reg      <= PARKED;
      x_reg          <= '0;
      y_reg          <= Y_HOME;
      score_reg      <= '0;
      local_ctr_reg  <= '0;
      exp_ctr_reg    <= '0;
    end else if (tick) begin
      superstate_reg <= superstate_next;
      state_reg      <= state_next;
      x_reg          <= x_next;
      y_reg          <= y_next;
      score_reg      <= score_next;
      local_ctr_reg  <= local_ctr_next;
      exp_ctr_reg    <= exp_ctr_next;
    end
  end

  // process #2: next state and output logic
  always_comb begin
    superstate_next  = superstate_reg;
    state_next       = state_reg;
    x_next           = x_reg;
    y_next           = y_reg;
    score_next       = score_reg;
    local_ctr_next   = local_ctr_reg;
    exp_ctr_next     = exp_ctr_reg;
    score_e          = 1'b0;
    fire_e           = 1'b0;
    over_e           = 1'b0;
    timer_2sec_start = 1'b0;
    ship_flying      = 1'b0;
    explosion_ship   = 1'b0;
    unique case (superstate_reg)
      INACTIVE: begin
        if (player_ship_move) superstate_next = ACTIVE;
      end
      ACTIVE: begin
        unique case (state_reg)
          PARKED: begin
            x_next = '0;
            y_next = Y_HOME;
            if (player_ship_move) begin
              state_next     = FLYING;
              score_next     = '0;
              score_e        = 1'b1;
              local_ctr_next = '0;
            end
          end
          FLYING: begin
            if (btn_down && (32'(y_reg) + SHIP_HEIGHT - 1) < (MAX_Y - 1 - SHIP_DELTA_V))
              y_next = y_reg + coord_t'(SHIP_DELTA_V);
            else if (btn_up && (32'(y_reg) > SHIP_DELTA_V))
              y_next = y_reg - coord_t'(SHIP_DELTA_V);
            ship_flying    = 1'b1;
            local_ctr_next = local_ctr_reg + 1'b1;
            if (local_ctr_reg == 8'(SCORE_PERIOD)) begin
              score_next     = score_next + 1'b1;
              score_e        = 1'b1;
              local_ctr_next = '0;
            end
            if (player_fire) fire_e = 1'b1;
            if (destroyed_mine) begin
              score_next = score_next + score_t'(score_inc_val);
              score_e    = 1'b1;
            end
            if (hit_mine || hit_wall) begin
              state_next       = EXPLODING;
              exp_ctr_next     = '0;
              timer_2sec_start = 1'b1;
            end
          end
          EXPLODING: begin
            explosion_ship = 1'b1;
            if (exp_ctr_reg != 8'hFF) exp_ctr_next = exp_ctr_reg + 1'b1;
            if (timer_2sec_up) begin
              state_next      = PARKED;
              over_e          = 1'b1;
              superstate_next = INACTIVE;
            end
          end
          default: state_next = PARKED;
        endcase
      end
      default: superstate_next = INACTIVE;
    endcase
  end

  timer #(.TICKS(EXPLODE_TICKS)) u_timer_2sec (
    .clk  (clk),
    .rst  (rst),
    .tick (tick),
    .start(timer_2sec_start),
    .up   (timer_2sec_up)
  );

  assign x            = x_reg;
  assign y            = y_reg;
  assign active       = (superstate_reg == ACTIVE);
  assign exploding    = (superstate_reg == ACTIVE) && (state_reg == EXPLODING);
  assign exp_ctr      = exp_ctr_reg;
  assign score        = score_reg;
  assign score_ev     = tick && score_e;
  assign missile_fire = tick && fire_e;
  assign game_over    = tick && over_e;
endmodule
