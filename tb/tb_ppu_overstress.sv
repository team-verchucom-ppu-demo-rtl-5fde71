// tb_ppu_overstress: random collision results against random max-stress
// values; the sticky flag reported at each final slot is compared with a
// model that remembers whether any |acceleration| exceeded the limit.
module tb_ppu_overstress;
  import ppu_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_final = 0, out_valid, overstressed;
  acc3_t coll_acc;
  logic [15:0] max_stress;
  int checks = 0, failures = 0, hits = 0, clean = 0;

  ppu_overstress dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  logic sticky = 0, exp_valid = 0, exp_flag = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid || (exp_valid && overstressed !== exp_flag)) begin
        failures++;
        $display("FAIL i=%0d out_valid=%b flag=%b exp %b %b", i, out_valid, overstressed,
                 exp_valid, exp_flag);
      end
      in_final = ($urandom_range(0, 7) == 0);
      in_valid = !in_final && ($urandom_range(0, 1) != 0);
      coll_acc = '{x: 16'($urandom_range(0, 2000) - 1000), y: 16'($urandom_range(0, 2000) - 1000),
                   t: 16'($urandom_range(0, 2000) - 1000)};
      if (i % 50 == 3) coll_acc.t = 16'h8000;
      max_stress = 16'($urandom_range(900, 1010));
      exp_valid = in_final;
      if (in_final) begin
        exp_flag = sticky;
        if (sticky) hits++; else clean++;
        sticky = 0;
      end else if (in_valid && (iabs(int'(coll_acc.x)) > int'(max_stress) ||
                                iabs(int'(coll_acc.y)) > int'(max_stress) ||
                                iabs(int'(coll_acc.t)) > int'(max_stress))) begin
        sticky = 1;
      end
    end
    checks++;
    if (hits < 20 || clean < 20) begin failures++; $display("FAIL coverage %0d %0d", hits, clean); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
