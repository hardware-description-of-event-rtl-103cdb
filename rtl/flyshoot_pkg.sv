// Shared types and constants of the Fly-n-Shoot game.
//
// Screen geometry is the 640x480 VGA raster; every object position is a
// 10-bit screen coordinate of the object's top-left corner, as in the
// ship's state register (10-bit y). Object sizes, speeds and colours are
// this design's own choices; MAX_Y, the 10-bit coordinates, the 30-tick
// score period and the mine values 20 and 50 follow the game's description.
package flyshoot_pkg;

  localparam int COORD_W = 10;
  typedef logic [COORD_W-1:0] coord_t;

  // Visible screen
  localparam int MAX_X = 640;
  localparam int MAX_Y = 480;

  // Ship sprite and motion
  localparam int SHIP_WIDTH   = 32;
  localparam int SHIP_HEIGHT  = 16;
  localparam int SHIP_DELTA_V = 4;   // pixels per tick when moving up/down
  localparam int SCORE_PERIOD = 30;  // ticks of flight per score point

  // Missile sprite and speed
  localparam int MISSILE_WIDTH  = 8;
  localparam int MISSILE_HEIGHT = 2;
  localparam int MISSILE_SPEED  = 8; // pixels per tick

  // Mines
  localparam int MINE_SIZE    = 16;  // square sprite
  localparam int SCROLL_SPEED = 2;   // tunnel scroll, pixels per tick
  localparam int MINE1_SCORE  = 20;
  localparam int MINE2_SCORE  = 50;
  localparam int MINE2_HITS   = 2;

  // Tunnel walls: a top and a bottom band of this thickness
  localparam int WALL_H = 32;

  // Game tick
  localparam int TICK_HZ = 60;

  localparam int SCORE_W = 16;
  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [7:0] score_inc_t;

  // Bounding box of a sprite on the screen
  typedef struct packed {
    logic   valid;  // object is on screen
    coord_t x;
    coord_t y;
  } obj_pos_t;

  // Tunnel (game flow) states
  typedef enum logic [1:0] {
    G_WELCOME  = 2'd0,
    G_PLAYING  = 2'd1,
    G_GAMEOVER = 2'd2
  } game_state_e;

  // 24-bit VGA colour
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

endpackage
