// ppu_collision_accel: collision acceleration calculator.
//
// For an object A and another object B it returns the acceleration the
// collision puts on A. The force along each axis is modelled as
//   F_x = a * b * dx * (elas_A + elas_B),   F_y = a * b * dy * (elas_A + elas_B)
// where a, b are the sides of the overlap rectangle and dx, dy the distances
// between the centres; the acceleration is F times A's inverse mass m, so no
// divider is needed. The angular acceleration takes the component with the
// larger magnitude and negates it. Every result is saturated to 16-bit two's
// complement (-32768 .. 32767).
//
// Pipeline (CALC_LAT = 4 cycles from valid_in to valid_out, one pair per
// cycle, never stalls):
//   overlap calculator (comb)  -> register 1: a, b, dx, dy, directions,
//                                 elasticities, m
//   (elas_A + elas_B) * m, a * b -> register 2
//   a * b * m * (elas_A + elas_B) -> register 3
//   times dx and dy, scaled, saturated, signed -> output register
// This multiplier arrangement and the saturation follow the design's collision
// diagram. The scaling (FORCE_SHIFT drops the 32 fraction bits of the
// product), the sign convention (A is pushed away from B, +y up) and the sign
// of the angular term are this implementation's choices. With no overlap
// a * b = 0 and all outputs are zero.
module ppu_collision_accel
  import ppu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_in,
  input  upos_t      ax, ay,
  input  logic [4:0] as_,
  input  u44_t       a_inv_mass,
  input  u44_t       a_elas,
  input  upos_t      bx, by,
  input  logic [4:0] bs,
  input  u44_t       b_elas,
  output logic       valid_out,
  output acc3_t      acc
);

  // stage 0
  ufix_t ov_a, ov_b, ov_dx, ov_dy;
  logic  ov_dirx, ov_diry;

  ppu_overlap u_overlap (
    .ax(ax), .ay(ay), .as_(as_), .bx(bx), .by(by), .bs(bs),
    .a(ov_a), .b(ov_b), .dx(ov_dx), .dy(ov_dy), .dir_x(ov_dirx), .dir_y(ov_diry)
  );

  // stage 1: overlap results and object constants
  logic        v1, v2, v3, dirx1, diry1, dirx2, diry2, dirx3, diry3;
  ufix_t       a1, b1, dx1, dy1, dx2, dy2, dx3, dy3;
  u44_t        ea1, eb1, m1;
  // stage 2
  logic [16:0] em2;          // (eA + eB) * m, 9.8
  logic [31:0] ab2;          // a * b, 16.16
  // stage 3
  logic [48:0] k3;           // a*b*m*(eA+eB), 25.24

  logic [64:0] fx, fy;       // force products, 33.32
  logic [32:0] mag_x, mag_y;
  acc_t        acc_x, acc_y, acc_t_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; valid_out <= 1'b0;
    end else begin
      v1 <= valid_in; v2 <= v1; v3 <= v2; valid_out <= v3;
    end
  end

  always_ff @(posedge clk) begin
    a1    <= ov_a;     b1    <= ov_b;
    dx1   <= ov_dx;    dy1   <= ov_dy;
    dirx1 <= ov_dirx;  diry1 <= ov_diry;
    ea1   <= a_elas;   eb1   <= b_elas;   m1 <= a_inv_mass;

    em2   <= 17'(9'(ea1) + 9'(eb1)) * 17'(m1);
    ab2   <= a1 * b1;
    dx2   <= dx1;      dy2   <= dy1;
    dirx2 <= dirx1;    diry2 <= diry1;

    k3    <= 49'(ab2) * 49'(em2);
    dx3   <= dx2;      dy3   <= dy2;
    dirx3 <= dirx2;    diry3 <= diry2;

    acc   <= '{x: acc_x, y: acc_y, t: acc_t_c};
  end

  always_comb begin
    fx    = 65'(k3) * 65'(dx3);
    fy    = 65'(k3) * 65'(dy3);
    mag_x = fx[FORCE_SHIFT +: 33];
    mag_y = fy[FORCE_SHIFT +: 33];
    // A left of B (dir_x) is pushed towards -x; A above B (dir_y) towards +y
    acc_x = dirx3 ? sat16(-$signed({31'd0, mag_x})) : sat16($signed({31'd0, mag_x}));
    acc_y = diry3 ? sat16($signed({31'd0, mag_y})) : sat16(-$signed({31'd0, mag_y}));
    acc_t_c = (mag_x >= mag_y) ? sat16(-64'(acc_x)) : sat16(-64'(acc_y));
  end

endmodule
