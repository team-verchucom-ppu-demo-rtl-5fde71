// tb_ppu_demo_boxes: the demo scenes of the physics engine, run on the
// full-size PPU (default parameters, 8192-word memory).
//
// Scene 1: one large box (side 31, heavy) in the centre and 100 random boxes
// (sides 4 to 12, random velocities, every tenth with a low stress limit)
// around it, with wind blowing along +x and no gravity.
// Scene 2: a tower of eight boxes hit by a fast box, and a canyon of three
// large boxes with 30 random boxes, under gravity and a light wind.
// The testbench loads a scene while the PPU is idle, starts it, lets it sweep
// the array four times while it reads the whole array back through the
// processor port again and again, as the demo's display loop does, then stops
// it (drain to idle) and loads the next scene.
//
// The check is a full reference model of the sweep, kept independently of
// the RTL:
//  - a shadow copy of the memory, updated by every write seen on the PPU's
//    memory port;
//  - the expected read order of the A/B double loop (A, the objects after it,
//    the terminator, wrap to the base, up to A itself, then the next A). Every
//    read on the PPU port must match it;
//  - for each B read, the collision acceleration on A, computed from the
//    shadow word as it was in that cycle (wide integers, scaled, saturated)
//    and summed with saturation; the overstress flag from A's max_stress;
//  - on A's last slot, the global acceleration and the time update. The
//    writeback must match this field by field, come exactly 7 cycles after
//    the last slot's read, and carry the cycle count as its timestamp.
//    Destroyed objects must be skipped as B and never written back;
//  - the time between two writebacks of the first object must be exactly one
//    sweep: N*(N+2)+1 reads plus one stalled cycle per writeback in between;
//  - every processor read must return the shadow word of its cycle.
module tb_ppu_demo_boxes;
  import ppu_pkg::*;
  localparam int AW = 13;
  localparam int NMAX   = 101;
  localparam int SWEEPS = 4;
  localparam int NSH    = NMAX + 16;     // room for objects added at run time

  // the scene: object count and global parameters
  int                 n_obj = NMAX;
  logic signed [15:0] grav = '0, wvx = '0, wvy = '0;
  logic [7:0]         visc = '0;

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

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) fail(what);
  endtask

  initial begin : watchdog
    repeat (SWEEPS * 11000 + SWEEPS * 2000 + 40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ arithmetic
  function automatic longint fdiv(longint v, longint d);
    longint q = v / d;
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction
  function automatic longint cl(longint v, longint lo, longint hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  function automatic longint mag(longint v);
    return v < 0 ? -v : v;
  endfunction

  // acceleration on A from a collision with B
  function automatic void coll(obj_t a, obj_t b, output longint rx, output longint ry,
                               output longint rt);
    longint dx, dy, half, oa, ob, k, mx, my;
    logic [127:0] fx, fy;
    dx   = mag(longint'(a.pos_x) - longint'(b.pos_x));
    dy   = mag(longint'(a.pos_y) - longint'(b.pos_y));
    half = longint'(a.side + b.side) * 128;            // half the side sum, 8.8
    oa   = (half > dx) ? half - dx : 0;
    ob   = (half > dy) ? half - dy : 0;
    k    = oa * ob * longint'(a.elas + b.elas) * longint'(a.inv_mass);
    fx   = (128'(k) * 128'(dx)) >> 32;
    fy   = (128'(k) * 128'(dy)) >> 32;
    mx   = (fx > 128'd40000) ? 40000 : longint'(fx);
    my   = (fy > 128'd40000) ? 40000 : longint'(fy);
    rx   = (a.pos_x < b.pos_x) ? cl(-mx, -32768, 32767) : cl(mx, -32768, 32767);
    ry   = (a.pos_y > b.pos_y) ? cl(my, -32768, 32767) : cl(-my, -32768, 32767);
    rt   = (fx >= fy) ? cl(-rx, -32768, 32767) : cl(-ry, -32768, 32767);
  endfunction

  // A after its update, given the summed collision accelerations
  function automatic obj_t upd(obj_t o, longint sx, longint sy, longint st, logic os,
                               logic [31:0] t_new);
    obj_t e = o;
    longint el, k, lx, ly, mx, my, tgt, er, at, tx, ty, tt;
    int oct;
    el = longint'(32'(t_new - o.timestamp));
    k  = longint'(visc) * longint'(o.side);
    lx = cl(fdiv(longint'(wvx - o.vel_x) * k, 4096), -32768, 32767);
    ly = cl(longint'(grav) + fdiv(longint'(wvy - o.vel_y) * k, 4096), -32768, 32767);
    mx = mag(lx);  my = mag(ly);
    if (2 * my <= mx)      oct = lx < 0 ? 4 : 0;
    else if (2 * mx <= my) oct = ly < 0 ? 6 : 2;
    else oct = (lx >= 0) ? ((ly >= 0) ? 1 : 7) : ((ly >= 0) ? 3 : 5);
    tgt = longint'(oct) * 8192;
    er  = (tgt - longint'(o.pos_t)) % 65536;
    if (er < 0) er += 65536;
    if (er >= 32768) er -= 65536;
    at  = (mx == 0 && my == 0) ? 0 : fdiv(er, 16);
    tx  = cl(sx + lx, -32768, 32767);
    ty  = cl(sy + ly, -32768, 32767);
    tt  = cl(st + at, -32768, 32767);
    e.pos_x = 16'(cl(longint'(o.pos_x) + fdiv(longint'(o.vel_x) * el, 256), 0, 65535));
    e.pos_y = 16'(cl(longint'(o.pos_y) + fdiv(longint'(o.vel_y) * el, 256), 0, 65535));
    e.pos_t = 16'(longint'(o.pos_t) + fdiv(longint'(o.vel_t) * el, 256));
    e.vel_x = 16'(cl(longint'(o.vel_x) + fdiv(tx * el, 4096), -32768, 32767));
    e.vel_y = 16'(cl(longint'(o.vel_y) + fdiv(ty * el, 4096), -32768, 32767));
    e.vel_t = 16'(cl(longint'(o.vel_t) + fdiv(tt * el, 4096), -32768, 32767));
    e.overstressed = o.overstressed | os;
    e.destroyed    = o.destroyed | o.overstressed;
    e.timestamp    = t_new;
    return e;
  endfunction

  // ------------------------------------------------------------ reference
  obj_t shadow [NSH];

  // where the model is in the A/B loop
  typedef enum logic {M_LOAD_A, M_B} mode_e;
  mode_e  m_mode = M_LOAD_A;
  int     m_next_a = 0, m_next_b = 0, m_a = 0;
  obj_t   m_obj_a;
  longint m_sx, m_sy, m_st;
  logic   m_os;

  // pending writebacks
  typedef struct {
    int     addr;
    obj_t   a;
    longint sx, sy, st;
    logic   os;
    longint due;
  } pend_t;
  pend_t pend_q [$];

  longint cyc = 0;
  longint last_wb0 = -1;
  int     wb_since0 = 0, wb0_count = 0, wb_total = 0;
  int     wb_count [NSH];

  // processor reads in flight; processor write refused last cycle
  logic [WORD_W-1:0] rd_exp_q [$];
  logic exp_werr = 1'b0;
  logic period_on = 1'b1;

  // an ID of zero (or an address past the shadow) ends the array
  function automatic logic null_at(int a);
    return a >= NSH || shadow[a].obj_id == 16'd0;
  endfunction

  int c_collide = 0, c_wrap_b = 0, c_wrap_a = 0, c_final = 0, c_skip = 0,
      c_os = 0, c_destroyed = 0, c_sat = 0, c_rdall = 0, c_period = 0, c_stall = 0,
      c_werr = 0, c_pwrite = 0;

  always @(posedge clk) if (rst_n) begin
    logic pa_en, pa_we;
    int   pa_addr;
    obj_t pa_data;
    cyc++;
    pa_en   = dut.u_mem.en_a;
    pa_we   = dut.u_mem.write_en_a;
    pa_addr = int'(dut.u_mem.address_a);
    pa_data = obj_t'(dut.u_mem.data_in_a);

    // processor port: answer of the read issued last cycle, then a new read
    if (mem_ready) begin
      logic [WORD_W-1:0] e;
      checks++;
      if (rd_exp_q.size() == 0) fail("processor read answered twice");
      else begin
        e = rd_exp_q.pop_front();
        if (mem_rdata !== e) fail($sformatf("processor read differs from the array"));
        c_rdall++;
      end
    end
    if (mem_en && !mem_we) rd_exp_q.push_back(WORD_W'(shadow[int'(mem_addr)]));

    // PPU reads follow the A/B loop
    if (pa_en && !pa_we) begin
      checks++;
      if (m_mode == M_LOAD_A) begin
        if (pa_addr != m_next_a) fail($sformatf("A read at %0d, expected %0d", pa_addr, m_next_a));
        if (null_at(pa_addr)) begin
          c_wrap_a++;
          m_next_a = 0;
        end else begin
          m_a = pa_addr; m_obj_a = shadow[pa_addr];
          m_sx = 0; m_sy = 0; m_st = 0; m_os = 0;
          m_next_b = pa_addr + 1;
          m_mode = M_B;
        end
      end else begin
        if (pa_addr != m_next_b) fail($sformatf("B read at %0d, expected %0d (A %0d)",
                                                pa_addr, m_next_b, m_a));
        if (null_at(pa_addr)) begin
          c_wrap_b++;
          m_next_b = 0;
        end else if (pa_addr == m_a) begin
          c_final++;
          if (!m_obj_a.destroyed) begin
            pend_t p;
            p.addr = m_a;  p.a  = m_obj_a;
            p.sx   = m_sx; p.sy = m_sy; p.st = m_st;
            p.os   = m_os; p.due = cyc + 7;
            pend_q.push_back(p);
          end
          m_next_a = m_a + 1;
          m_mode = M_LOAD_A;
        end else begin
          obj_t b;
          b = shadow[pa_addr];
          m_next_b = pa_addr + 1;
          if (b.destroyed) c_skip++;
          else begin
            longint rx, ry, rt;
            coll(m_obj_a, b, rx, ry, rt);
            if (rx != 0 || ry != 0) c_collide++;
            if (mag(rx) == 32767 || mag(ry) == 32767 || rx == -32768 || ry == -32768) c_sat++;
            if (mag(rx) > longint'(m_obj_a.max_stress) || mag(ry) > longint'(m_obj_a.max_stress) ||
                mag(rt) > longint'(m_obj_a.max_stress)) m_os = 1;
            m_sx = cl(m_sx + rx, -32768, 32767);
            m_sy = cl(m_sy + ry, -32768, 32767);
            m_st = cl(m_st + rt, -32768, 32767);
          end
        end
      end
    end

    // PPU writes are A's writebacks
    if (pa_en && pa_we) begin
      checks++;
      if (dut.u_ctrl.state == dut.u_ctrl.S_RUN) c_stall++;
      if (pend_q.size() == 0) fail($sformatf("unexpected writeback to %0d", pa_addr));
      else begin
        pend_t p;
        obj_t  e;
        p = pend_q.pop_front();
        e = upd(p.a, p.sx, p.sy, p.st, p.os, pa_data.timestamp);
        checks += 3;
        if (pa_addr != p.addr) fail($sformatf("writeback to %0d, expected %0d", pa_addr, p.addr));
        if (cyc != p.due) fail($sformatf("writeback of %0d %0d cycles late", p.addr, cyc - p.due));
        if (pa_data.timestamp != now - 32'd1) fail("timestamp is not the cycle count");
        if (pa_data !== e)
          fail($sformatf("object %0d: pos %h,%h/%h vel %0d,%0d/%0d os%b d%b exp pos %h,%h/%h vel %0d,%0d/%0d os%b d%b",
                         p.addr, pa_data.pos_x, pa_data.pos_y, pa_data.pos_t, pa_data.vel_x,
                         pa_data.vel_y, pa_data.vel_t, pa_data.overstressed, pa_data.destroyed,
                         e.pos_x, e.pos_y, e.pos_t, e.vel_x, e.vel_y, e.vel_t,
                         e.overstressed, e.destroyed));
        if (e.overstressed && !p.a.overstressed) c_os++;
        if (e.destroyed && !p.a.destroyed) c_destroyed++;
      end
      if (pa_addr < NSH) begin
        shadow[pa_addr] = pa_data;
        wb_count[pa_addr]++;
      end
      wb_total++;
      wb_since0++;
      if (pa_addr == 0) begin
        if (last_wb0 >= 0 && period_on) begin
          checks++;
          c_period++;
          if (cyc - last_wb0 != longint'(n_obj * (n_obj + 2) + 1 + wb_since0))
            fail($sformatf("sweep took %0d cycles, expected %0d", cyc - last_wb0,
                           n_obj * (n_obj + 2) + 1 + wb_since0));
        end
        last_wb0 = cyc;
        wb_since0 = 0;
        wb0_count++;
      end
    end

    // processor writes: refused (write_error next cycle) when the PPU writes
    // in the same cycle, otherwise they land after this cycle's reads
    checks++;
    if (mem_write_error !== exp_werr) fail($sformatf("write_error %b, expected %b", mem_write_error, exp_werr));
    exp_werr = mem_en && mem_we && pa_en && pa_we;
    if (exp_werr) c_werr++;
    if (mem_en && mem_we && !(pa_en && pa_we) && int'(mem_addr) < NSH) begin
      shadow[int'(mem_addr)] = obj_t'(mem_wdata);
      c_pwrite++;
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic mem_write(int a, logic [WORD_W-1:0] d);
    @(negedge clk); mem_en = 1; mem_we = 1; mem_addr = AW'(a); mem_wdata = d;
    @(negedge clk); mem_en = 0; mem_we = 0;
  endtask

  // the processor's write with retry: a write refused because the PPU wrote
  // in the same cycle is simply repeated. With sync set, the first attempt is
  // timed to land on a PPU writeback.
  int c_retry = 0;
  task automatic mem_write_retry(int a, logic [WORD_W-1:0] d, bit sync);
    logic refused;
    if (sync) do @(negedge clk); while (!wb_valid);
    do begin
      if (!sync) @(negedge clk);
      sync = 0;
      mem_en = 1; mem_we = 1; mem_addr = AW'(a); mem_wdata = d;
      @(posedge clk); #1 refused = mem_write_error;
      @(negedge clk); mem_en = 0; mem_we = 0;
      if (refused) c_retry++;
    end while (refused);
  endtask

  task automatic mem_read(int a, output logic [WORD_W-1:0] d);
    @(negedge clk); mem_en = 1; mem_we = 0; mem_addr = AW'(a);
    @(posedge clk); #1 d = mem_rdata;
    @(negedge clk); mem_en = 0;
  endtask

  task automatic reg_write(int a, logic [15:0] d);
    @(negedge clk); reg_wr_en = 1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk); reg_wr_en = 0;
  endtask

  // a random box
  function automatic obj_t rnd_box(int id, int x0, int x1, int y0, int y1, int s0, int s1);
    obj_t o = '0;
    o.obj_id   = 16'(id);
    o.pos_x    = 16'($urandom_range(x0, x1) * 256 + $urandom_range(0, 255));
    o.pos_y    = 16'($urandom_range(y0, y1) * 256 + $urandom_range(0, 255));
    o.pos_t    = 16'($urandom);
    o.vel_x    = 16'($urandom_range(0, 160)) - 16'sd80;
    o.vel_y    = 16'($urandom_range(0, 160)) - 16'sd80;
    o.vel_t    = 16'($urandom_range(0, 512)) - 16'sd256;
    o.side     = 5'($urandom_range(s0, s1));
    o.inv_mass = 8'($urandom_range(4, 24));
    o.elas     = 8'($urandom_range(2, 12));
    o.max_stress = 16'hffff;
    return o;
  endfunction

  function automatic obj_t box(int id, int x, int y, int s, int im, int vx);
    obj_t o = '0;
    o.obj_id = 16'(id); o.pos_x = 16'(x * 256); o.pos_y = 16'(y * 256);
    o.side = 5'(s); o.inv_mass = 8'(im); o.elas = 8'h08; o.max_stress = 16'hffff;
    o.vel_x = 16'(vx);
    return o;
  endfunction

  // load the scene in shadow[0 .. n_obj-1] while idle, run it for SWEEPS
  // sweeps with the display loop reading, stop it and check its coverage
  // the display loop: read every object, over and over, until the first
  // object has been written back `sweeps` more times
  task automatic display(int sweeps);
    wb0_count = 0;
    while (wb0_count < sweeps) begin
      for (int i = 0; i < n_obj && wb0_count < sweeps; i++) begin
        @(negedge clk); mem_en = 1; mem_we = 0; mem_addr = AW'(i);
        @(negedge clk); mem_en = 0;
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
    end
  endtask

  // the game on top of a running scene: ADD packets append boxes while the
  // PPU runs (new terminator first, then the box in the old terminator's
  // place), DELETE packets mark boxes destroyed (read, set the flag, write;
  // read again after the object's writeback could have landed, and repeat if
  // a PPU writeback overwrote the flag)
  int c_add = 0, c_del = 0, c_del_lost = 0;
  int del_wb [$];
  int victims [3] = '{12, 20, 25};
  task automatic game();
    obj_t o;
    logic [WORD_W-1:0] d;
    period_on = 0;
    for (int k = 0; k < 5; k++) begin
      mem_write_retry(n_obj + 1, '0, 0);
      o = rnd_box(n_obj + 1, 20, 230, 150, 230, 4, 10);
      o.timestamp = now;
      mem_write_retry(n_obj, o, k == 0);
      n_obj++;
      c_add++;
      repeat ($urandom_range(0, 200)) @(negedge clk);
    end
    foreach (victims[j]) begin
      int v = victims[j];
      do begin
        mem_read(v, d);
        o = obj_t'(d);
        o.destroyed = 1'b1;
        mem_write_retry(v, o, j == 0);
        repeat (3 * (n_obj + 3) + 20) @(negedge clk);
        mem_read(v, d);
        o = obj_t'(d);
        if (!o.destroyed) c_del_lost++;
      end while (!o.destroyed);
      del_wb.push_back(wb_count[v]);
      c_del++;
    end
    display(SWEEPS);
    chk("game: added boxes updated", wb_count[n_obj - 1] >= SWEEPS - 1 &&
                                     wb_count[n_obj - 5] >= SWEEPS - 1);
    foreach (victims[j])
      chk($sformatf("game: deleted box %0d no longer updated", victims[j]),
          wb_count[victims[j]] == del_wb[j]);
  endtask

  task automatic run_scene(string name, int min_collide, bit with_game);
    int live_written, coll0, dest0, wrapb0, wrapa0, period0, rd0;
    coll0 = c_collide; dest0 = c_destroyed; wrapb0 = c_wrap_b; wrapa0 = c_wrap_a;
    period0 = c_period; rd0 = c_rdall;
    shadow[n_obj] = '0;
    for (int i = 0; i < n_obj; i++) shadow[i].timestamp = now;
    for (int i = 0; i <= n_obj; i++) mem_write(i, shadow[i]);
    for (int i = 0; i < NSH; i++) wb_count[i] = 0;
    m_mode = M_LOAD_A; m_next_a = 0;
    last_wb0 = -1; period_on = 1;

    reg_write(1, grav);
    reg_write(2, {8'd0, visc});
    reg_write(3, wvx);
    reg_write(4, wvy);
    reg_write(0, 16'd1);

    display(SWEEPS);
    if (with_game) game();

    // stop: the PPU finishes its A and drains
    reg_write(0, 16'd0);
    for (int t = 0; t < 3 * n_obj + 50 && !idle; t++) @(negedge clk);
    chk({name, ": idle after stop"}, idle);
    chk({name, ": no writeback left pending"}, pend_q.size() == 0);

    live_written = 0;
    for (int i = 0; i < n_obj; i++)
      if (wb_count[i] >= SWEEPS - 1 || shadow[i].destroyed) live_written++;
    chk({name, ": sweep period measured"}, c_period - period0 >= SWEEPS - 1);
    chk({name, ": every live object updated each sweep"}, live_written == n_obj);
    chk({name, ": B wrapped at the terminator"}, c_wrap_b - wrapb0 >= n_obj);
    chk({name, ": A wrapped at the terminator"}, c_wrap_a - wrapa0 >= SWEEPS - 1);
    chk({name, ": boxes collided"}, c_collide - coll0 >= min_collide);
    chk({name, ": processor reads checked"}, c_rdall - rd0 > n_obj);
    $display("%s: objects=%0d collisions=%0d destroyed=%0d", name, n_obj,
             c_collide - coll0, c_destroyed - dest0);
  endtask

  initial begin
    obj_t o;
    int   n;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // scene 1: the big box in the centre (side 31, mass 16, still) and a
    // hundred random boxes kept off its centre, in a wind
    shadow[0] = box(1, 128, 128, 31, 8'h01, 0);
    for (int i = 1; i < NMAX; i++) begin
      do o = rnd_box(i + 1, 24, 232, 24, 232, 4, 12);
      while (o.pos_x > 16'(108 * 256) && o.pos_x < 16'(148 * 256) &&
             o.pos_y > 16'(108 * 256) && o.pos_y < 16'(148 * 256));
      if (i % 10 == 3) o.max_stress = 16'd40;
      shadow[i] = o;
    end
    n_obj = NMAX;
    grav = 16'sd0; visc = 8'h06; wvx = 16'sd96; wvy = 16'sd0;
    run_scene("big box and 100 boxes", 50, 0);

    // scene 2: a tower of 8 boxes, a fast box flying at it, a canyon of
    // three large boxes and 30 random boxes above it; gravity on
    n = 0;
    for (int i = 0; i < 8; i++) begin
      shadow[n] = box(n + 1, 60, 20 + 11 * i, 12, 8'h10, 0);
      n++;
    end
    shadow[n] = box(n + 1, 30, 40, 8, 8'h08, 16'sd600); n++;        // the fast box
    shadow[n] = box(n + 1, 160, 20, 31, 8'h00, 0); n++;             // canyon floor
    shadow[n] = box(n + 1, 140, 50, 31, 8'h00, 0); n++;             // left wall
    shadow[n] = box(n + 1, 180, 50, 31, 8'h00, 0); n++;             // right wall
    for (int i = 0; i < 30; i++) begin
      shadow[n] = rnd_box(n + 1, 130, 190, 60, 200, 4, 10);
      n++;
    end
    n_obj = n;
    grav = -16'sd24; visc = 8'h02; wvx = 16'sd40; wvy = 16'sd0;
    run_scene("tower and canyon, then the game", 10, 1);

    // whole run
    chk("read stage stalled for writebacks", c_stall > 0);
    chk("objects overstressed and destroyed", c_os > 0 && c_destroyed > 0);
    chk("destroyed objects skipped as B", c_skip > 0);
    chk("boxes added while running", c_add == 5);
    chk("boxes deleted while running", c_del == 3);
    chk("processor writes refused during writebacks and retried", c_werr > 0 && c_retry > 0);
    chk("no reads left unanswered", rd_exp_q.size() <= 1);
    $display("added=%0d deleted=%0d lost_deletes=%0d refused_writes=%0d retries=%0d processor_writes=%0d",
             c_add, c_del, c_del_lost, c_werr, c_retry, c_pwrite);
    $display("collisions=%0d saturated=%0d overstress=%0d destroyed=%0d skip=%0d wrapB=%0d wrapA=%0d finals=%0d writebacks=%0d reads=%0d",
             c_collide, c_sat, c_os, c_destroyed, c_skip, c_wrap_b, c_wrap_a,
             c_final, wb_total, c_rdall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
