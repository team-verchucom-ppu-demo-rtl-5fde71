// tb_ppu_top: end-to-end test of the PPU at its default size (8192-word
// object memory).
//
// The testbench acts as the processor: it writes a null-terminated array of
// objects through the memory's processor port, sets gravity and wind, starts
// the PPU and watches every writeback. It keeps a mirror of the array:
//  - isolated objects (far from everything) are checked field by field
//    against a model of the global acceleration and the time update, using
//    the elapsed time between their previous and new timestamps;
//  - a pair of overlapping objects must be pushed apart;
//  - a second overlapping pair with a tiny max stress must become
//    overstressed, then destroyed, and then never be written again.
// Along the way it reads objects back while the PPU runs, forces a processor
// write into a PPU writeback cycle (write_error), stops the PPU (drain to
// idle), compacts the array while idle as the garbage collector would and
// restarts. Each mechanism is counted and one that never happened is a
// failure.
module tb_ppu_top;
  import ppu_pkg::*;
  localparam int AW = 13;

  logic clk = 0, rst_n = 0;
  logic mem_en = 0, mem_we = 0;
  logic [AW-1:0] mem_addr = '0;
  logic [WORD_W-1:0] mem_wdata = '0, mem_rdata;
  logic mem_ready, mem_write_error;
  logic reg_wr_en = 0;
  logic [2:0] reg_addr = '0;
  logic [15:0] reg_wdata = '0, reg_rdata;
  logic idle, wb_valid;
  logic [31:0] now;

  ppu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ the scene
  localparam int N_ISO = 8;
  localparam int P = N_ISO, Q = N_ISO + 1;          // colliding pair
  localparam int R = N_ISO + 2, S = N_ISO + 3;      // fragile pair
  localparam int N = N_ISO + 4;

  localparam logic signed [15:0] GRAV = -16'sd40;
  localparam logic [7:0]         VISC = 8'h08;      // 0.5
  localparam logic signed [15:0] WVX  = 16'sd0;
  localparam logic signed [15:0] WVY  = 16'sd0;

  obj_t mirror [N];
  int   n_live = N;
  int   wb_count [N];
  int   wb_after_destroy = 0;

  function automatic obj_t mk(int id, int x, int y, int s, int vx, int vy, int ms);
    obj_t o = '0;
    o.obj_id = 16'(id); o.pos_x = 16'(x); o.pos_y = 16'(y); o.side = 5'(s);
    o.vel_x = 16'(vx); o.vel_y = 16'(vy); o.vel_t = 16'sd64; o.pos_t = 16'h1000;
    o.inv_mass = 8'h10; o.elas = 8'h10; o.max_stress = 16'(ms);
    return o;
  endfunction

  task automatic mem_write(int a, logic [WORD_W-1:0] d);
    @(negedge clk); mem_en = 1; mem_we = 1; mem_addr = AW'(a); mem_wdata = d;
    @(negedge clk); mem_en = 0; mem_we = 0;
  endtask

  task automatic mem_read(int a, output logic [WORD_W-1:0] d);
    @(negedge clk); mem_en = 1; mem_we = 0; mem_addr = AW'(a);
    @(posedge clk); #1 d = mem_rdata;
    chk("processor read ready", mem_ready);
    @(negedge clk); mem_en = 0;
  endtask

  task automatic reg_write(int a, logic [15:0] d);
    @(negedge clk); reg_wr_en = 1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk); reg_wr_en = 0;
  endtask

  // ------------------------------------------------------------ reference
  function automatic longint fdiv(longint v, longint d);
    longint q = v / d;
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction
  function automatic longint cl(longint v, longint lo, longint hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  // expected writeback of an object that touches nothing
  function automatic obj_t expect_iso(obj_t o, logic [31:0] t_new);
    obj_t e = o;
    longint el, k, lx, ly, mx, my, tgt, er, at;
    int oct;
    el = longint'(32'(t_new - o.timestamp));
    k  = longint'(VISC) * longint'(o.side);
    lx = cl(fdiv(longint'(WVX - o.vel_x) * k, 4096), -32768, 32767);
    ly = cl(longint'(GRAV) + fdiv(longint'(WVY - o.vel_y) * k, 4096), -32768, 32767);
    mx = lx < 0 ? -lx : lx;  my = ly < 0 ? -ly : ly;
    if (2 * my <= mx)      oct = lx < 0 ? 4 : 0;
    else if (2 * mx <= my) oct = ly < 0 ? 6 : 2;
    else oct = (lx >= 0) ? ((ly >= 0) ? 1 : 7) : ((ly >= 0) ? 3 : 5);
    tgt = longint'(oct) * 8192;
    er  = (tgt - longint'(o.pos_t)) % 65536;
    if (er < 0) er += 65536;
    if (er >= 32768) er -= 65536;
    at  = (mx == 0 && my == 0) ? 0 : fdiv(er, 16);
    e.pos_x = 16'(cl(longint'(o.pos_x) + fdiv(longint'(o.vel_x) * el, 256), 0, 65535));
    e.pos_y = 16'(cl(longint'(o.pos_y) + fdiv(longint'(o.vel_y) * el, 256), 0, 65535));
    e.pos_t = 16'(longint'(o.pos_t) + fdiv(longint'(o.vel_t) * el, 256));
    e.vel_x = 16'(cl(longint'(o.vel_x) + fdiv(lx * el, 4096), -32768, 32767));
    e.vel_y = 16'(cl(longint'(o.vel_y) + fdiv(ly * el, 4096), -32768, 32767));
    e.vel_t = 16'(cl(longint'(o.vel_t) + fdiv(at * el, 4096), -32768, 32767));
    e.destroyed = o.destroyed | o.overstressed;
    e.timestamp = t_new;
    return e;
  endfunction

  // ------------------------------------------------------------ counters
  int c_load_a = 0, c_wrap_b = 0, c_wrap_a = 0, c_final = 0, c_collide = 0,
      c_stall = 0, c_overstress = 0, c_destroyed = 0, c_werr = 0, c_idle = 0,
      c_iso_checked = 0, c_destroyed_skip = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.load_a) c_load_a++;
    if (dut.is_null && !dut.ret_is_a) c_wrap_b++;
    if (dut.is_null && dut.ret_is_a) c_wrap_a++;
    if (dut.slot_final) c_final++;
    if (dut.coll_valid && (dut.coll_acc.x != 0 || dut.coll_acc.y != 0)) c_collide++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_RUN && wb_valid) c_stall++;
    if (dut.ret_valid && dut.ready_a && !dut.ret_is_a && !dut.ret_final && !dut.is_null &&
        dut.obj_b.destroyed) c_destroyed_skip++;
    if (mem_write_error) c_werr++;
  end

  // writeback monitor
  logic checking_on = 1;
  always @(posedge clk) if (rst_n && wb_valid) begin
    int a;
    obj_t w, e;
    a = int'(dut.wb_addr);
    w = obj_t'(dut.wb_data);
    checks++;
    if (a >= n_live) begin
      failures++; $display("FAIL writeback to %0d beyond the array", a);
    end else begin
      if (mirror[a].destroyed) wb_after_destroy++;
      if (w.timestamp != now - 32'd1) begin
        failures++; $display("FAIL timestamp %0d at now %0d", w.timestamp, now);
      end
      if (checking_on && a < N_ISO) begin
        e = expect_iso(mirror[a], w.timestamp);
        checks++;
        c_iso_checked++;
        if (w !== e) begin
          failures++;
          $display("FAIL object %0d update: pos %h,%h vel %0d,%0d t %h/%0d exp pos %h,%h vel %0d,%0d t %h/%0d",
                   a, w.pos_x, w.pos_y, w.vel_x, w.vel_y, w.pos_t, w.vel_t,
                   e.pos_x, e.pos_y, e.vel_x, e.vel_y, e.pos_t, e.vel_t);
        end
      end
      if (w.overstressed && !mirror[a].overstressed) c_overstress++;
      if (w.destroyed && !mirror[a].destroyed) c_destroyed++;
      mirror[a] = w;
      wb_count[a]++;
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [WORD_W-1:0] d;
    obj_t o;
    int wb_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle after reset", idle);

    // isolated objects: a row 40 px apart, 12 px wide, falling or rising
    for (int i = 0; i < N_ISO; i++)
      mirror[i] = mk(i + 1, (20 + 40 * i) * 256, 160 * 256, 12, 0,
                     (i % 2) ? 16'sd300 : -16'sd200, 16'hffff);
    // colliding pair: 16 px squares overlapping by 4 px in x, 16 px apart in y
    mirror[P] = mk(P + 1, 200 * 256, 60 * 256, 16, 0, 0, 16'hffff);
    mirror[Q] = mk(Q + 1, 212 * 256, 60 * 256, 16, 0, 0, 16'hffff);
    // fragile pair: same overlap, but max stress 10
    mirror[R] = mk(R + 1, 200 * 256, 220 * 256, 16, 0, 0, 10);
    mirror[S] = mk(S + 1, 212 * 256, 220 * 256, 16, 0, 0, 10);
    for (int i = 0; i < N; i++) mirror[i].timestamp = now + 32'd50;
    for (int i = 0; i < N; i++) mem_write(i, mirror[i]);
    mem_write(N, '0);                                  // terminator

    reg_write(1, GRAV);
    reg_write(2, {8'd0, VISC});
    reg_write(3, WVX);
    reg_write(4, WVY);
    reg_write(0, 16'd1);                               // run
    @(negedge clk);
    chk("running", !idle);

    // let it run; read objects back meanwhile
    repeat (20) begin
      repeat (300) @(posedge clk);
      mem_read($urandom_range(0, N - 1), d);
    end

    // force a processor write into a PPU writeback cycle
    do @(negedge clk); while (!wb_valid);
    mem_en = 1; mem_we = 1; mem_addr = AW'(4000); mem_wdata = '1;
    @(posedge clk); #1;
    chk("write_error on clash", mem_write_error);
    @(negedge clk); mem_en = 0; mem_we = 0;
    @(negedge clk); reg_addr = 3'd5; #1;
    chk("sticky write error visible", reg_rdata[1]);

    repeat (3000) @(posedge clk);

    // the colliding pair was pushed apart
    chk("pair pushed apart in x", mirror[P].vel_x < 0 && mirror[Q].vel_x > 0);
    chk("pair moved apart", mirror[Q].pos_x - mirror[P].pos_x > 16'(12 * 256));
    // the fragile pair broke
    chk("fragile objects overstressed", mirror[R].overstressed && mirror[S].overstressed);
    chk("fragile objects destroyed", mirror[R].destroyed && mirror[S].destroyed);
    chk("destroyed objects not updated", wb_after_destroy == 0);
    for (int i = 0; i < N_ISO; i++) chk("isolated object updated", wb_count[i] > 10);

    // stop: the PPU drains to idle and stays quiet
    reg_write(0, 16'd0);
    for (int t = 0; t < 200 && !idle; t++) @(negedge clk);
    chk("idle after stop", idle);
    if (idle) c_idle++;
    wb_before = 0;
    foreach (wb_count[i]) wb_before += wb_count[i];
    repeat (100) @(negedge clk);
    begin
      int wb_now = 0;
      foreach (wb_count[i]) wb_now += wb_count[i];
      chk("no writebacks while idle", wb_now == wb_before && idle);
    end
    // memory agrees with the mirror
    for (int i = 0; i < N; i++) begin
      mem_read(i, d);
      chk($sformatf("memory matches writebacks, object %0d", i), d == WORD_W'(mirror[i]));
    end

    // garbage collection while idle: drop the destroyed pair
    mem_write(R, '0);
    n_live = R;
    // and restart
    reg_write(0, 16'd1);
    repeat (3000) @(posedge clk);
    chk("restart: isolated objects still updated", wb_count[0] > 30);

    // mechanism coverage
    chk("A loaded", c_load_a > 0);
    chk("B wrapped at the terminator", c_wrap_b > 0);
    chk("A wrapped at the terminator", c_wrap_a > 0);
    chk("global effects applied on final slots", c_final > 0);
    chk("collisions computed", c_collide > 0);
    chk("read stage stalled for writebacks", c_stall > 0);
    chk("overstress detected", c_overstress > 0);
    chk("object destroyed", c_destroyed > 0);
    chk("destroyed objects skipped as B", c_destroyed_skip > 0);
    chk("write error", c_werr > 0);
    chk("stop to idle", c_idle > 0);
    chk("isolated updates checked", c_iso_checked > 100);
    $display("loads=%0d wrapB=%0d wrapA=%0d finals=%0d collisions=%0d stalls=%0d overstress=%0d destroyed=%0d skip=%0d werr=%0d iso_checked=%0d",
             c_load_a, c_wrap_b, c_wrap_a, c_final, c_collide, c_stall, c_overstress,
             c_destroyed, c_destroyed_skip, c_werr, c_iso_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
