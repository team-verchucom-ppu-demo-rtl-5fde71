// ppu_pkg: types and constants shared by the physics processing unit (PPU).
//
// The PPU keeps every physics object in one 256-bit memory word so that a
// whole object is read or written in a single cycle. obj_t below is that word
// as a packed struct; casting a memory word to obj_t is the "breakdown" of the
// word into fields, and casting back packs it for writeback.
//
// Field formats follow the design's fixed-point table: positions are unsigned
// 8.8, velocities two's-complement 8.8, the square's side a 5-bit integer,
// inverse mass and elasticity unsigned 4.4, accelerations 16-bit two's
// complement and the timestamp a 32-bit cycle count. The order of the fields
// inside the word, the 16-bit orientation and max-stress fields and the
// reserved padding are this design's own choice. An object ID of zero marks the
// end of the (null-terminated) object array.
//
// The *_SHIFT constants are the binary scalings between quantities (the
// "custom bit manipulation" of the update and force units); their values are
// this design's choice and only set the physical units seen by software.
package ppu_pkg;

  localparam int WORD_W = 256;

  typedef logic        [15:0] upos_t;   // unsigned 8.8 position
  typedef logic signed [15:0] svel_t;   // signed 8.8 velocity
  typedef logic signed [15:0] acc_t;    // signed 16-bit acceleration
  typedef logic        [15:0] ufix_t;   // unsigned 8.8 overlap / distance
  typedef logic        [7:0]  u44_t;    // unsigned 4.4 mass / elasticity

  typedef struct packed {
    logic [15:0] obj_id;        // 0 = end of the object array
    upos_t       pos_x;         // centre x, 8.8
    upos_t       pos_y;         // centre y, 8.8
    logic [15:0] pos_t;         // orientation, 2^16 = one full turn
    svel_t       vel_x;         // 8.8
    svel_t       vel_y;         // 8.8
    svel_t       vel_t;         // angular velocity, orientation units
    logic [4:0]  side;          // side length of the square, integer
    u44_t        inv_mass;      // 1/mass, 4.4 (0 = immovable)
    u44_t        elas;          // elasticity, 4.4
    logic [15:0] max_stress;    // largest tolerated |acceleration|
    logic        overstressed;  // a collision exceeded max_stress
    logic        destroyed;     // lazily deleted, removed by compaction
    logic [31:0] timestamp;     // cycle count of the last update
    logic [72:0] rsvd;          // unused, kept as read
  } obj_t;

  // Global physics parameters set by software.
  typedef struct packed {
    acc_t        gravity;       // added to acc_y of every object
    u44_t        wind_visc;     // wind viscosity, 4.4
    svel_t       wind_vx;       // wind velocity, 8.8
    svel_t       wind_vy;
  } globals_t;

  typedef struct packed {
    acc_t x;
    acc_t y;
    acc_t t;
  } acc3_t;

  // Position change = velocity * elapsed_cycles >>> VEL_SHIFT.
  localparam int VEL_SHIFT   = 8;
  // Velocity change = acceleration * elapsed_cycles >>> ACC_SHIFT.
  localparam int ACC_SHIFT   = 12;
  // Collision force a*b*d*(eA+eB)*m^-1 carries 32 fraction bits.
  localparam int FORCE_SHIFT = 32;
  // Wind drag (wind_v - v) * visc * side carries 12 fraction bits.
  localparam int WIND_SHIFT  = 12;
  // Global angular acceleration = orientation error >>> TORQUE_SHIFT.
  localparam int TORQUE_SHIFT = 4;

  // Latency of the collision and global calculators, in cycles.
  localparam int CALC_LAT = 4;

  // Saturate a wide signed value to 16-bit two's complement.
  function automatic acc_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return acc_t'(16'sh7fff);
    else if (v < -64'sd32768) return acc_t'(16'sh8000);
    else                      return acc_t'(v[15:0]);
  endfunction

  // Saturate a wide signed value to 16-bit unsigned.
  function automatic logic [15:0] satu16(input logic signed [63:0] v);
    if (v > 64'sd65535)  return 16'hffff;
    else if (v < 64'sd0) return 16'h0000;
    else                 return v[15:0];
  endfunction

  function automatic logic [15:0] abs16(input acc_t v);
    return v[15] ? 16'(-v) : 16'(v);
  endfunction

endpackage
