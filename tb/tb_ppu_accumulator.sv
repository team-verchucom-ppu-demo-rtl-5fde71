// tb_ppu_accumulator: random streams of collision results and final slots;
// the running sum and the total handed on at each final slot are compared
// with a saturating model.
module tb_ppu_accumulator;
  import ppu_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_final = 0, out_valid;
  acc3_t coll_acc, glob_acc, total, sum;
  int checks = 0, failures = 0, finals = 0, sats = 0;

  ppu_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  int mx = 0, my = 0, mt = 0;          // model running sum
  int ex, ey, et;
  logic exp_valid = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // check what the previous edge produced
      checks++;
      if (out_valid !== exp_valid ||
          (exp_valid && (int'(total.x) != ex || int'(total.y) != ey || int'(total.t) != et)) ||
          int'(sum.x) != mx || int'(sum.y) != my || int'(sum.t) != mt) begin
        failures++;
        $display("FAIL i=%0d out_valid=%b total=%0d,%0d,%0d exp %0d,%0d,%0d sum=%0d model %0d",
                 i, out_valid, total.x, total.y, total.t, ex, ey, et, sum.x, mx);
      end
      in_final = ($urandom_range(0, 9) == 0);
      in_valid = !in_final && ($urandom_range(0, 2) != 0);
      coll_acc = (i % 100 < 50) ? '{x: 16'($urandom), y: 16'($urandom), t: 16'($urandom)}
                                : '{x: 16'($urandom_range(0, 200) - 100), y: 16'($urandom_range(0, 200) - 100),
                                    t: 16'($urandom_range(0, 200) - 100)};
      glob_acc = '{x: 16'($urandom), y: 16'($urandom), t: 16'($urandom)};
      exp_valid = in_final;
      if (in_final) begin
        ex = clampi(mx + int'(glob_acc.x));
        ey = clampi(my + int'(glob_acc.y));
        et = clampi(mt + int'(glob_acc.t));
        mx = 0; my = 0; mt = 0;
        finals++;
      end else if (in_valid) begin
        if (mx + int'(coll_acc.x) != clampi(mx + int'(coll_acc.x))) sats++;
        mx = clampi(mx + int'(coll_acc.x));
        my = clampi(my + int'(coll_acc.y));
        mt = clampi(mt + int'(coll_acc.t));
      end
    end
    checks++;
    if (finals < 100 || sats < 10) begin failures++; $display("FAIL coverage %0d %0d", finals, sats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
