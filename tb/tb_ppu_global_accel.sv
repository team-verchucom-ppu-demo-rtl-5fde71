// tb_ppu_global_accel: random objects and global parameters; each result is
// compared, CALC_LAT cycles after its input, with an integer model of the
// drag, gravity and 8-orientation angular terms.
module tb_ppu_global_accel;
  import ppu_pkg::*;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  svel_t vel_x, vel_y;
  logic [15:0] pos_t;
  logic [4:0] side;
  globals_t glb;
  acc3_t acc;
  int checks = 0, failures = 0, cyc = 0;
  int oct_seen [8];

  ppu_global_accel dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampi(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  function automatic longint floor_div(longint v, longint d);
    longint q = v / d;
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction

  function automatic acc3_t model(int vx, int vy, int pt, int sd, int g, int visc,
                                  int wx, int wy, output int oct);
    longint k, lx, ly, ax_, ay_, tgt, e;
    k  = longint'(visc) * sd;
    lx = clampi(floor_div(longint'(wx - vx) * k, 4096));
    ly = clampi(g + floor_div(longint'(wy - vy) * k, 4096));
    ax_ = lx < 0 ? -lx : lx;
    ay_ = ly < 0 ? -ly : ly;
    if (2 * ay_ <= ax_)      oct = (lx < 0) ? 4 : 0;
    else if (2 * ax_ <= ay_) oct = (ly < 0) ? 6 : 2;
    else if (lx >= 0 && ly >= 0) oct = 1;
    else if (lx < 0 && ly >= 0)  oct = 3;
    else if (lx < 0)             oct = 5;
    else                         oct = 7;
    tgt = longint'(oct) * 8192;
    e   = (tgt - pt) % 65536;
    if (e < 0) e += 65536;
    if (e >= 32768) e -= 65536;
    if (lx == 0 && ly == 0) e = 0;
    return '{x: acc_t'(lx), y: acc_t'(ly), t: acc_t'(floor_div(e, 16))};
  endfunction

  acc3_t exp_q [$];
  int    lat_q [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && valid_out) begin
      acc3_t e; int t0;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = exp_q.pop_front(); t0 = lat_q.pop_front();
        if (acc !== e) begin
          failures++;
          $display("FAIL got %0d %0d %0d exp %0d %0d %0d", $signed(acc.x), $signed(acc.y),
                   $signed(acc.t), $signed(e.x), $signed(e.y), $signed(e.t));
        end
        if (cyc - t0 != CALC_LAT) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      end
    end
  end

  initial begin
    int oct;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 2) != 0);
      vel_x = 16'($urandom); vel_y = 16'($urandom); pos_t = 16'($urandom);
      side = 5'($urandom);
      glb.gravity = (i % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 400)) - 16'd200;
      glb.wind_visc = (i % 4 == 0) ? 8'd0 : 8'($urandom);
      glb.wind_vx = 16'($urandom); glb.wind_vy = 16'($urandom);
      if (i % 5 == 1) begin vel_x = 0; vel_y = 0; glb.wind_vx = 0; glb.wind_vy = 0; end
      if (i == 7) begin          // still air, gravity -10: pure -y acceleration
        glb = '{gravity: -16'sd10, wind_visc: 8'h10, wind_vx: 0, wind_vy: 0};
        vel_x = 0; vel_y = 0; pos_t = 16'h0000; side = 8; valid_in = 1;
      end
      if (valid_in) begin
        exp_q.push_back(model(vel_x, vel_y, pos_t, side, glb.gravity, glb.wind_visc,
                              glb.wind_vx, glb.wind_vy, oct));
        oct_seen[oct]++;
        lat_q.push_back(cyc);
        if (i == 7) begin
          checks++;
          if (exp_q[$].x != 0 || exp_q[$].y != -10 || oct != 6) begin
            failures++; $display("FAIL gravity-only model case");
          end
        end
      end
    end
    @(negedge clk) valid_in = 0;
    repeat (CALC_LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (oct_seen[o] == 0) begin failures++; $display("FAIL orientation %0d never seen", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
