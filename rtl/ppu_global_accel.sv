// ppu_global_accel: global effects calculator.
//
// Computes the acceleration every object feels from its surroundings, applied
// once per update of object A, on A's final slot:
//   acc_x = (wind_vx - vel_x) * wind_visc * side >>> WIND_SHIFT
//   acc_y = gravity + (wind_vy - vel_y) * wind_visc * side >>> WIND_SHIFT
// i.e. a drag towards the wind velocity, stronger for a thicker wind and a
// larger face (width and height are the same for a square), plus gravity.
// The angular term turns the object towards the direction of this linear
// acceleration quantised to one of 8 orientations (multiples of 45 degrees,
// 2^13 orientation units each): acc_t = (target - pos_t) >>> TORQUE_SHIFT,
// zero when the linear acceleration is zero. All outputs saturate to 16 bits.
//
// Latency is CALC_LAT cycles, the same as the collision calculator, so the two
// results can be multiplexed in the same pipeline stage. Gravity, wind,
// viscosity, the side scaling and the 8-orientation angle are the design's;
// the drag being relative to the object's own velocity, the octant rule
// (tan 22.5 deg taken as 1/2) and the scalings are this implementation's.
module ppu_global_accel
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_in,
  input  svel_t       vel_x, vel_y,
  input  logic [15:0] pos_t,
  input  logic [4:0]  side,
  input  globals_t    glb,
  output logic        valid_out,
  output acc3_t       acc
);

  logic        [12:0] k;                 // visc * side, 9.4
  logic signed [16:0] rel_x, rel_y;      // wind - vel, 9.8
  logic signed [30:0] drag_x, drag_y;    // 19.12
  acc_t               lin_x, lin_y, ang;
  logic        [15:0] mx, my;
  logic        [2:0]  octant;
  logic        [15:0] target;
  logic signed [15:0] err;

  always_comb begin
    k      = 13'(glb.wind_visc * side);
    rel_x  = 17'(glb.wind_vx) - 17'(vel_x);
    rel_y  = 17'(glb.wind_vy) - 17'(vel_y);
    drag_x = 31'(rel_x) * $signed({18'd0, k});
    drag_y = 31'(rel_y) * $signed({18'd0, k});
    lin_x  = sat16(64'(drag_x >>> WIND_SHIFT));
    lin_y  = sat16(64'(glb.gravity) + 64'(drag_y >>> WIND_SHIFT));

    mx = abs16(lin_x);
    my = abs16(lin_y);
    if ({1'b0, my, 1'b0} <= {2'b0, mx})      octant = lin_x[15] ? 3'd4 : 3'd0;
    else if ({1'b0, mx, 1'b0} <= {2'b0, my}) octant = lin_y[15] ? 3'd6 : 3'd2;
    else case ({lin_x[15], lin_y[15]})
      2'b00:   octant = 3'd1;
      2'b10:   octant = 3'd3;
      2'b11:   octant = 3'd5;
      default: octant = 3'd7;
    endcase
    target = {octant, 13'd0};
    err    = $signed(target - pos_t);
    ang    = (mx == 16'd0 && my == 16'd0) ? acc_t'(0) : acc_t'(err >>> TORQUE_SHIFT);
  end

  // match the collision calculator's latency
  logic  [CALC_LAT-1:0] vpipe;
  acc3_t                apipe [CALC_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[CALC_LAT-2:0], valid_in};
  end

  always_ff @(posedge clk) begin
    apipe[0] <= '{x: lin_x, y: lin_y, t: ang};
    for (int i = 1; i < CALC_LAT; i++) apipe[i] <= apipe[i-1];
  end

  assign valid_out = vpipe[CALC_LAT-1];
  assign acc       = apipe[CALC_LAT-1];

endmodule
