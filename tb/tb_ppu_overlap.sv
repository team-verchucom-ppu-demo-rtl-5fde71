// tb_ppu_overlap: random and hand-picked square pairs; the overlap widths,
// centre distances and directions are compared with an integer model.
module tb_ppu_overlap;
  import ppu_pkg::*;
  upos_t ax, ay, bx, by;
  logic [4:0] as_, bs;
  ufix_t a, b, dx, dy;
  logic dir_x, dir_y;
  int checks = 0, failures = 0;

  ppu_overlap dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int edx, edy, half, ea, eb;
    #1;
    edx  = (int'(ax) > int'(bx)) ? int'(ax) - int'(bx) : int'(bx) - int'(ax);
    edy  = (int'(ay) > int'(by)) ? int'(ay) - int'(by) : int'(by) - int'(ay);
    half = (int'(as_) + int'(bs)) * 128;
    ea   = (half > edx) ? half - edx : 0;
    eb   = (half > edy) ? half - edy : 0;
    checks++;
    if (int'(dx) != edx || int'(dy) != edy || int'(a) != ea || int'(b) != eb ||
        dir_x != (ax < bx) || dir_y != (ay > by)) begin
      failures++;
      $display("FAIL A(%h,%h,%0d) B(%h,%h,%0d): a=%h/%h b=%h/%h dx=%h/%h dy=%h/%h",
               ax, ay, as_, bx, by, bs, a, ea, b, eb, dx, edx, dy, edy);
    end
  endtask

  initial begin
    // two 16-px squares 12 px apart in x, 4 px apart in y: a = 4 px, b = 12 px
    ax = 16'h4000; ay = 16'h4000; as_ = 16; bx = 16'h4c00; by = 16'h3c00; bs = 16;
    check_one();
    if (a != 16'h0400 || b != 16'h0c00 || !dir_x || !dir_y) begin
      failures++; $display("FAIL hand case a=%h b=%h", a, b);
    end
    // far apart: no overlap
    bx = 16'h9000; check_one();
    if (a != 0) begin failures++; $display("FAIL expected no overlap"); end
    for (int i = 0; i < 2000; i++) begin
      ax = 16'($urandom); ay = 16'($urandom);
      bx = (i % 2) ? 16'($urandom) : 16'(ax + 16'($urandom_range(0, 8192)) - 16'd4096);
      by = (i % 2) ? 16'($urandom) : 16'(ay + 16'($urandom_range(0, 8192)) - 16'd4096);
      as_ = 5'($urandom); bs = 5'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
