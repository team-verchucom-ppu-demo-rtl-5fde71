// tb_ppu_collision_accel: streams one random object pair per cycle through
// the collision calculator and compares each result, CALC_LAT cycles later,
// with a wide-integer model of F = a*b*d*(eA+eB)*m, scaled and saturated.
module tb_ppu_collision_accel;
  import ppu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid_in = 0;
  upos_t ax, ay, bx, by;
  logic [4:0] as_, bs;
  u44_t a_inv_mass, a_elas, b_elas;
  logic valid_out;
  acc3_t acc;
  int checks = 0, failures = 0, nonzero = 0, saturated = 0;

  ppu_collision_accel dut (.*);

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

  function automatic acc3_t model(upos_t ax_, upos_t ay_, int as__, upos_t bx_, upos_t by_,
                                  int bs__, int m, int ea, int eb);
    longint dx_, dy_, half, oa, ob, k;
    logic [127:0] fx, fy;
    longint mx, my, rx, ry, rt;
    dx_  = (ax_ > bx_) ? longint'(ax_) - longint'(bx_) : longint'(bx_) - longint'(ax_);
    dy_  = (ay_ > by_) ? longint'(ay_) - longint'(by_) : longint'(by_) - longint'(ay_);
    half = longint'(as__ + bs__) * 128;
    oa   = (half > dx_) ? half - dx_ : 0;
    ob   = (half > dy_) ? half - dy_ : 0;
    k    = oa * ob * longint'(ea + eb) * longint'(m);
    fx   = 128'(k) * 128'(dx_);
    fy   = 128'(k) * 128'(dy_);
    fx   = fx >> 32;
    fy   = fy >> 32;
    mx   = (fx > 128'd40000) ? 40000 : longint'(fx);
    my   = (fy > 128'd40000) ? 40000 : longint'(fy);
    rx   = (ax_ < bx_) ? clampi(-mx) : clampi(mx);
    ry   = (ay_ > by_) ? clampi(my) : clampi(-my);
    rt   = (fx >= fy) ? clampi(-rx) : clampi(-ry);
    return '{x: acc_t'(rx), y: acc_t'(ry), t: acc_t'(rt)};
  endfunction

  acc3_t exp_q [$];
  int    lat_q [$];
  int    cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && valid_out) begin
      acc3_t e;
      int    t0;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e  = exp_q.pop_front();
        t0 = lat_q.pop_front();
        if (acc !== e) begin
          failures++;
          $display("FAIL got %0d %0d %0d exp %0d %0d %0d", acc.x, acc.y, acc.t, e.x, e.y, e.t);
        end
        if (cyc - t0 != CALC_LAT) begin
          failures++; $display("FAIL latency %0d", cyc - t0);
        end
        if (e.x != 0 || e.y != 0) nonzero++;
        if (e.x == 32767 || e.x == -32768 || e.y == 32767 || e.y == -32768) saturated++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      valid_in   = ($urandom_range(0, 3) != 0);
      ax = 16'($urandom_range(16'h2000, 16'hd000));
      ay = 16'($urandom_range(16'h2000, 16'hd000));
      bx = 16'(ax + 16'($urandom_range(0, 16'h3000)) - 16'h1800);
      by = 16'(ay + 16'($urandom_range(0, 16'h3000)) - 16'h1800);
      as_ = 5'($urandom); bs = 5'($urandom);
      a_inv_mass = 8'($urandom); a_elas = 8'($urandom); b_elas = 8'($urandom);
      if (i < 5) begin   // the worked case: 4 x 16 px overlap, dx 12 px, m 1, e 1+1
        ax = 16'h4000; ay = 16'h4000; as_ = 16; bx = 16'h4c00; by = 16'h3000; bs = 16;
        a_inv_mass = 8'h10; a_elas = 8'h10; b_elas = 8'h10; valid_in = 1;
      end
      if (valid_in) begin
        exp_q.push_back(model(ax, ay, as_, bx, by, bs, a_inv_mass, a_elas, b_elas));
        lat_q.push_back(cyc);
      end
    end
    @(negedge clk) valid_in = 0;
    repeat (CALC_LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (nonzero < 100 || saturated < 10) begin
      failures++; $display("FAIL coverage nonzero=%0d saturated=%0d", nonzero, saturated);
    end
    $display("nonzero=%0d saturated=%0d", nonzero, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
