# Fly-n-Shoot in SystemVerilog

Fly-n-Shoot is a small side-scrolling arcade game. A ship flies through a tunnel
with walls. The player steers it up and down and fires its single missile at
mines. Mine1 explodes at the first hit and earns 20 points. Mine2 needs two hits
and earns 50. The ship also earns one point for every 31 game ticks of flight
(about half a second). It explodes if it touches a wall or a mine. The whole
game runs in logic, with no processor, and draws itself on a VGA monitor.

The game is written as a set of **communicating state machines**, one per game
object: Tunnel, Ship, Missile, Mine1 and Mine2. Each one is the hardware form of
a UML statechart:

| Statechart idea             | Hardware form here                                                  |
|-----------------------------|---------------------------------------------------------------------|
| statechart                  | a state machine; nested states become a two-level machine          |
| event                       | a one-clock pulse (or a level) on a port; an event that carries data gets a second signal for the data |
| default (initial) state     | the reset value of the state register                               |
| history                     | a counter (e.g. Mine2's hit counter)                                |
| timeout                     | a tick-counting timer                                               |

Every object uses the same **two-process style**. One `always_ff` holds all
`*_reg` registers. One `always_comb` computes every `*_next` value and every
event output from the registers and the incoming events. The ship (`rtl/ship.sv`)
shows this most clearly.

## Objects and the events between them

```
             key_n[2:0] ──► button_sync ─┐
  NES pad ◄─► nes_controller ────────────┼─► PLAYER_SHIP_MOVE, PLAYER_FIRE, up/down
                                         ▼
  tick_gen ──TIME_TICK──► tunnel ──tick──► ship ──MISSILE_FIRE, position──► missile
                            │  ▲            ▲  │                                ▲ │
                 HIT_WALL,  │  │ GAME_OVER, │  └─ SCORE, EXPLOSION_SHIP         │ │
                 HIT_MINE   ▼  │ flying     │                                   │ │
                          collision_detect  └───── DESTROYED_MINE + value ◄──────┘ │
                            ▲                                                      │
                  plant, x,y│        mine (Mine1: 1 hit, 20)  ──destroyed,value──►──┘
                            └──────► mine (Mine2: 2 hits, 50)
   tunnel ──► vga_sync ──► renderer ──► VGA pins
```

| Event / signal         | From → to                    | Meaning                                                   |
|------------------------|------------------------------|-----------------------------------------------------------|
| `tick` (TIME_TICK)     | game_top → tunnel → all      | step the game once (60 per second)                        |
| PLAYER_SHIP_MOVE       | input → ship                 | Up or Down held; blocked on the game-over screen          |
| PLAYER_FIRE            | input → ship                 | Shoot pressed (rising edge)                               |
| MISSILE_FIRE           | ship → missile               | launch, from the ship's nose                              |
| HIT_WALL, HIT_MINE     | tunnel → ship, missile       | collision flags, one set per receiver                     |
| HIT_MINE1, HIT_MINE2   | tunnel → mine                | the missile touches this mine                             |
| destroyed + score      | mine → missile → ship        | a mine was destroyed; the value (20 or 50) rides along    |
| SCORE, score           | ship → tunnel, out           | the score changed (the display is updated); the 16-bit score |
| EXPLOSION_SHIP         | ship → tunnel (drawing)      | the ship is exploding                                     |
| GAME_OVER              | ship → tunnel                | the explosion is over                                     |
| plant, plant_x/y       | tunnel → mine                | place an unused mine at a random spot                     |
| clear                  | tunnel → missile, mines      | the game is not running: remove them                      |

### One clock, one tick

All registers run on the 25 MHz pixel clock. They change only in the clock
cycle in which the one-cycle `tick` strobe is high. The original model instead
clocks each object with TIME_TICK. The strobe keeps one clock domain and gives
the same behaviour.

Events are combinational outputs, ANDed with `tick` where they are pulses.
Within one tick, an event chain settles through combinational logic and every
receiver acts on the same clock edge. For example, when the missile reaches a
mine:

1. `collision_detect` raises the hit from the registered positions.
2. The mine's `destroyed` pulse goes up, with its value.
3. The missile passes both on.
4. On that one edge, the ship adds the points, the missile becomes armed
   again, and the mine starts to explode.

No chain loops back on itself, so there are no combinational loops.

## The ship: a two-level state machine

`rtl/ship.sv` is the most detailed part of the design.

```
 INACTIVE ──PLAYER_SHIP_MOVE──► ACTIVE ┌──────────────────────────────────────────────┐
     ▲                                 │ Parked ──move──► Flying ──HIT_*──► Exploding │
     └──────── GAME_OVER ──────────────┤   ▲   (score:=0, SCORE)  (start 2 s timer)   │
                                       │   └──────────── timer up ◄───────────┘        │
                                       └──────────────────────────────────────────────┘
```

- **Registers.** `superstate_reg` and `state_reg`, the position `x_reg`/`y_reg`,
  `score_reg`, `local_ctr_reg` (the score period) and `exp_ctr_reg` (how many
  ticks the ship has been exploding; used only to animate the explosion).
- **Parked.** The ship sits at x = 0, y = (480 − 16)/2 = 232. The next move event
  clears the score, sends SCORE and starts the flight. The ship therefore needs
  two ticks with Up or Down held to take off: one tick to become ACTIVE, one to
  leave Parked.
- **Flying.**
  - Down (btn(1)) adds 4 to y while `y + 15 < 475`. Up (btn(0)) subtracts 4 while
    `y > 4`. These are screen limits; the tunnel walls (32 pixels thick) come
    first, and touching them is a crash.
  - `local_ctr` counts every tick. When it equals 30, one point is added and the
    counter restarts. That is one point per 31 ticks.
  - PLAYER_FIRE sends MISSILE_FIRE.
  - DESTROYED_MINE adds the value the mine sent. If it falls on the same tick as
    the periodic point, both are added.
  - HIT_MINE or HIT_WALL leads to Exploding and starts the timer.
- **Exploding.** The ship is drawn flashing. The `timer` block (`TICKS` = 120, which
  is 2 s) raises `up` exactly 120 ticks after the hit tick. The ship then sends
  GAME_OVER and returns to INACTIVE/Parked. The score is kept until the next
  take-off.

## Missile and mines

- **Missile** (`missile.sv`). It is ARMED or FLYING. It is launched at
  (ship x + 32, ship y + 7) and moves 8 pixels per tick. It becomes armed again
  when it hits a wall or a mine, or when the next step would leave the 640-pixel
  screen. A missile fired from x = 32 is on screen for 76 ticks. It ignores
  MISSILE_FIRE while it flies.
- **Mine** (`mine.sv`). One module covers both kinds. Parameters `HITS`/`SCORE`
  are 1/20 for Mine1 and 2/50 for Mine2. Its states are UNUSED, PLANTED and
  EXPLODING.
  - A planted mine moves left 2 pixels per tick with the tunnel. It disappears
    without score when it reaches the left edge.
  - A 2-bit hit counter holds the mine's history. It is cleared on planting.
    When it reaches `HITS`, the mine pulses `destroyed` with its value and
    explodes for 15 ticks.
  - A mine that the ship flies into stays where it is.
- **Speeds.** The mine scrolls at 2 pixels per tick and the missile flies at 8.
  So the missile closes on a mine by 10 pixels per tick. That is less than the
  24-pixel overlap window (16 + 8), so a missile cannot jump over a mine.

## Tunnel: game flow, collisions and video

`tunnel.sv` holds the game-flow state machine:

- **WELCOME.** Blue background and the parked ship. Play begins as soon as the
  ship flies.
- **PLAYING.** Each tick, an unused mine is planted: Mine1 first, at most one per
  tick. The place comes from a free-running 16-bit LFSR: x is in the right half
  of the screen (320 … 623) and y is inside the tunnel (32 … 415). It is computed
  as `offset + (r8 × span) >> 8`, with no division. GAME_OVER ends play.
- **GAMEOVER.** Dark red background for 120 ticks (2 s). During this time the
  ship's move event is blocked, so a held key does not restart the game at once.
  Then the tunnel returns to WELCOME.

Outside PLAYING, `clear` removes the missile and both mines.

The tunnel contains three blocks:

- **`collision_detect`.** An axis-aligned rectangle overlap test (ship 32×16,
  missile 8×2, mines 16×16) plus the wall bands `y < 32` and `y ≥ 448`. An object
  whose `valid` is low (for example a parked ship) collides with nothing.
- **`vga_sync`.** Standard 640×480 at 60 Hz timing: 800 × 525 clocks, with
  active-low syncs.
- **`renderer`.** Picks the colour of each pixel by priority: ship, missile,
  Mine1, Mine2, walls, background. It registers the colour and the syncs
  together, so the VGA pins lag the counters by one clock and stay aligned.
  Mine2 changes colour after its first hit.
- **`score_bcd`.** Converts the score for the screen. One clock after each
  SCORE event, when the ship's score register holds the new value, it turns the
  16-bit score into five decimal digits. It uses shift-and-add-3, one bit per
  clock, and takes 17 clocks. The renderer draws the digits in the top wall as
  seven-segment figures, each in a 10×18-pixel box.

## Player input and the top

`game_top.sv`:

- **Ports.** It takes the 25 MHz pixel clock and the PLL lock. The PLL that makes
  the clock is the FPGA vendor's IP and is not part of this RTL.
- **Reset.** Reset is held while the PLL is unlocked and released synchronously.
- **Game tick.** `tick_gen` divides 25 MHz by 416,667 to get 60 Hz.
- **Inputs.** The active-low keys (KEY0 up, KEY1 down, KEY2 shoot) go through
  `button_sync`. An NES pad is read once per tick by `nes_controller`, using the
  pad's latch/clock/data shift-register protocol with 6 µs half periods. Up and
  Down are the pad's Up/Down buttons; Shoot is A or B. The two sources are ORed.
- **Outputs.** 8 bits per colour with `blank_n`, `sync_n` and the pixel clock,
  which suit a video DAC such as the one on a DE1-SoC board. Also the score and
  the game state.

## Parameters

| Where          | Parameter                 | Default   | Origin                                 |
|----------------|---------------------------|-----------|----------------------------------------|
| flyshoot_pkg   | MAX_X × MAX_Y             | 640 × 480 | VGA mode, chosen                       |
| flyshoot_pkg   | SCORE_PERIOD              | 30 (→ one point per 31 ticks) | game description |
| flyshoot_pkg   | MINE1_SCORE / MINE2_SCORE / MINE2_HITS | 20 / 50 / 2 | game description |
| flyshoot_pkg   | ship, missile, mine sizes | 32×16, 8×2, 16×16 | chosen                         |
| flyshoot_pkg   | SHIP_DELTA_V, MISSILE_SPEED, SCROLL_SPEED | 4, 8, 2 px/tick | chosen (missile faster than the tunnel, as described) |
| flyshoot_pkg   | WALL_H                    | 32        | chosen                                 |
| game_top       | TICK_DIV                  | 416,667 (60 Hz) | chosen                           |
| game_top / ship| EXPLODE_TICKS             | 120 (2 s) | game description (2 s)                 |
| game_top / tunnel | GAMEOVER_TICKS         | 120       | chosen                                 |
| game_top       | MINE_EXPLODE_TICKS        | 15        | chosen                                 |
| game_top       | NES_HALF                  | 150 clocks (6 µs) | pad protocol                   |

Coarse synthesis of `game_top` gives about 750 word-level cells and 330
flip-flops. The only memory is a small constant table, the digit-to-segment
decoder.

## What follows the original game and what is this design's own

From the original description:

- the five objects and their events
- the ship's two-level machine with its exact rules: the home position, the
  4-pixel steps against screen limits, the point at counter value 30, the 2 s
  explosion, and the score cleared on take-off
- a single missile that flies faster than the ship and stops at a wall, a mine
  or the screen edge
- Mine1 takes 1 hit and gives 20 points; Mine2 takes 2 hits and gives 50
- the mine's value carried to the ship through the missile
- random mine places
- the tunnel owns collision detection and the VGA driver
- keys 0–2 or an NES pad for Up, Down and Shoot
- one PLL

This design's own choices:

- the tick as a clock-enable strobe at 60 Hz
- the VGA mode and colours
- rectangular sprites
- straight walls
- mines that scroll
- the missile's speed and launch point
- the welcome, playing and game-over flow, and blocking take-off on the
  game-over screen
- planting a mine as soon as one is free
- firing on the press edge
- adding both points when they fall on the same tick
- the NES read timing
- the reset scheme
- the decimal score display

Not built:

- **Text on screen.** The score is shown as digits, but there is no title or
  message text. The welcome and game-over screens differ only by background
  colour.
- **Missile hitting a wall.** The flag exists and is tested in
  `collision_detect` and `tunnel`. With straight walls and a missile that flies
  level, it cannot happen in play.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. Each testbench also has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ship \
    -Irtl -y rtl -y tb rtl/flyshoot_pkg.sv tb/tb_ship.sv
./obj_dir/Vtb_ship
```

Use the same command for any `tb_<block>`. `-y rtl -y tb` finds each module in
the file of its name.

- **`tb_game_top`.** Plays two whole games at reduced timing: a tick every 700
  clocks, a 20-tick explosion and a 10-tick game-over screen. It runs in a few
  seconds. A scripted player (`tb/game_player.sv`) does the following:
  1. With the keys: shoots both mine kinds, including Mine2's surviving first
     hit.
  2. Lets a mine scroll off the screen and fires a missile that leaves the
     screen.
  3. Flies into the wall, then holds Up through the game-over screen.
  4. With the NES pad model (`tb/nes_pad_model.sv`): takes off, shoots, and flies
     into a mine.

  Along the way it checks the tick period, the explosion and game-over lengths,
  the score against its own tally, the ship's pixels on the VGA output, and the
  line and frame periods. It fails if any of these mechanisms never happened.
- **`tb_game_top_full`.** Runs the top with every parameter at its default (real
  60 Hz ticks, 2 s timers). The player plays one short game: take-off, a shot
  mine, a wall crash, and back to the welcome screen. That is several hundred
  million clocks, a few minutes of simulation.
