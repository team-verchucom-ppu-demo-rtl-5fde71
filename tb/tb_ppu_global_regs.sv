// tb_ppu_global_regs: writes every register, reads it back, checks the
// globals bundle and run bit, the read-only status and time registers and the
// sticky write-error bit with its write-1-to-clear.
module tb_ppu_global_regs;
  import ppu_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, idle = 0, write_error = 0, run;
  logic [2:0] addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic [31:0] now = 0;
  globals_t glb;
  int checks = 0, failures = 0;

  ppu_global_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [15:0] d);
    @(negedge clk); wr_en = 1; addr = 3'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rchk(string what, int a, logic [15:0] exp);
    addr = 3'(a); #1;
    chk(what, rd_data == exp);
  endtask

  initial begin
    logic [15:0] v [5];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset: stopped", run == 0);
    chk("reset: globals zero", glb == '0);
    for (int r = 0; r < 50; r++) begin
      for (int a = 0; a < 5; a++) begin
        v[a] = 16'($urandom);
        wr(a, v[a]);
      end
      chk("run bit", run == v[0][0]);
      chk("gravity", glb.gravity == acc_t'(v[1]));
      chk("visc", glb.wind_visc == v[2][7:0]);
      chk("wind x", glb.wind_vx == svel_t'(v[3]));
      chk("wind y", glb.wind_vy == svel_t'(v[4]));
      rchk("read run", 0, {15'd0, v[0][0]});
      rchk("read gravity", 1, v[1]);
      rchk("read visc", 2, {8'd0, v[2][7:0]});
      rchk("read wind x", 3, v[3]);
      rchk("read wind y", 4, v[4]);
      now = $urandom; idle = 1'($urandom);
      rchk("time lo", 6, now[15:0]);
      rchk("time hi", 7, now[31:16]);
      rchk("idle", 5, {14'd0, 1'b0, idle});
    end
    // sticky write error
    @(negedge clk) write_error = 1;
    @(negedge clk) write_error = 0;
    repeat (3) @(negedge clk);
    rchk("error sticky", 5, {14'd0, 1'b1, idle});
    wr(5, 16'h0001);
    rchk("write 0 keeps error", 5, {14'd0, 1'b1, idle});
    wr(5, 16'h0002);
    rchk("write 1 clears error", 5, {14'd0, 1'b0, idle});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
