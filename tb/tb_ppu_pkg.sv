// tb_ppu_pkg: checks the shared object word layout and the arithmetic helpers
// of the PPU package.
//
// The object word must be exactly 256 bits, with each field at the bit
// positions of the documented layout table (written out again here as plain
// numbers). For every field the test puts random bits into that slice of an
// otherwise random word and reads them back through the struct, then writes
// the field through the struct and checks that only that slice changed. The
// saturating helpers (to signed 16 bits, to unsigned 16 bits) and the 16-bit
// magnitude are compared with integer models on random and edge values.
module tb_ppu_pkg;
  import ppu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // the documented layout: field number, top bit, bottom bit
  localparam int NF = 15;
  localparam int HI [NF] = '{255, 239, 223, 207, 191, 175, 159, 143, 138, 130, 122, 106, 105, 104, 72};
  localparam int LO [NF] = '{240, 224, 208, 192, 176, 160, 144, 139, 131, 123, 107, 106, 105,  73,  0};

  function automatic logic [255:0] rnd_word();
    logic [255:0] w;
    for (int i = 0; i < 8; i++) w[32*i +: 32] = $urandom;
    return w;
  endfunction

  function automatic logic [255:0] mask(int f);
    logic [255:0] m = '0;
    for (int i = LO[f]; i <= HI[f]; i++) m[i] = 1'b1;
    return m;
  endfunction

  // read field f of an object through the struct
  function automatic logic [255:0] get(obj_t o, int f);
    case (f)
      0:  return 256'(o.obj_id);
      1:  return 256'(o.pos_x);
      2:  return 256'(o.pos_y);
      3:  return 256'(o.pos_t);
      4:  return 256'($unsigned(o.vel_x));
      5:  return 256'($unsigned(o.vel_y));
      6:  return 256'($unsigned(o.vel_t));
      7:  return 256'(o.side);
      8:  return 256'(o.inv_mass);
      9:  return 256'(o.elas);
      10: return 256'(o.max_stress);
      11: return 256'(o.overstressed);
      12: return 256'(o.destroyed);
      13: return 256'(o.timestamp);
      default: return 256'(o.rsvd);
    endcase
  endfunction

  // write field f of an object through the struct
  function automatic obj_t put(obj_t o, int f, logic [255:0] v);
    case (f)
      0:  o.obj_id       = v[15:0];
      1:  o.pos_x        = v[15:0];
      2:  o.pos_y        = v[15:0];
      3:  o.pos_t        = v[15:0];
      4:  o.vel_x        = v[15:0];
      5:  o.vel_y        = v[15:0];
      6:  o.vel_t        = v[15:0];
      7:  o.side         = v[4:0];
      8:  o.inv_mass     = v[7:0];
      9:  o.elas         = v[7:0];
      10: o.max_stress   = v[15:0];
      11: o.overstressed = v[0];
      12: o.destroyed    = v[0];
      13: o.timestamp    = v[31:0];
      default: o.rsvd    = v[72:0];
    endcase
    return o;
  endfunction

  initial begin
    logic [255:0] w, v, m, w2;
    longint x, e;
    int width;
    obj_t o;

    chk("object word is 256 bits", $bits(obj_t) == 256 && WORD_W == 256);
    chk("acceleration triple is 3 x 16 bits", $bits(acc3_t) == 48);
    width = 0;
    for (int f = 0; f < NF; f++) width += HI[f] - LO[f] + 1;
    chk("layout table covers the word", width == 256);

    for (int n = 0; n < 200; n++) begin
      for (int f = 0; f < NF; f++) begin
        @(posedge clk);
        m = mask(f);
        w = rnd_word();
        v = rnd_word();
        // read: the field returns its slice
        o = obj_t'(w);
        chk($sformatf("field %0d read from bits %0d:%0d", f, HI[f], LO[f]),
            get(o, f) == ((w & m) >> LO[f]));
        // write: only the slice changes
        w2 = 256'(put(o, f, v));
        chk($sformatf("field %0d written to bits %0d:%0d", f, HI[f], LO[f]),
            (w2 & ~m) == (w & ~m) && ((w2 & m) >> LO[f]) == (v & (m >> LO[f])));
      end
    end

    // saturation helpers
    for (int n = 0; n < 3000; n++) begin
      case (n % 4)
        0: x = longint'($signed($urandom)) * longint'($urandom_range(0, 7));
        1: x = longint'($signed(16'($urandom)));
        2: x = longint'($urandom_range(0, 140000)) - 70000;
        default: x = longint'(n) / 4 - 375 + ((n % 8 < 4) ? 32767 : -32767);
      endcase
      e = x > 32767 ? 32767 : x < -32768 ? -32768 : x;
      chk($sformatf("sat16(%0d)", x), longint'(sat16(64'(x))) == e);
      e = x > 65535 ? 65535 : x < 0 ? 0 : x;
      chk($sformatf("satu16(%0d)", x), longint'(satu16(64'(x))) == e);
      if (x >= -32768 && x <= 32767) begin
        e = x < 0 ? -x : x;
        chk($sformatf("abs16(%0d)", x), longint'(abs16(acc_t'(x))) == e);
      end
    end
    chk("abs16 of the most negative value", abs16(acc_t'(16'sh8000)) == 16'd32768);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
