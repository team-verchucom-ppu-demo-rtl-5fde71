// tb_ppu_time_update: random objects, accelerations and times; the packed
// writeback word is unpacked and every field compared with an integer model
// of the position/velocity update, the timestamp and the stress flags.
module tb_ppu_time_update;
  import ppu_pkg::*;
  localparam int AW = 13;
  logic clk = 0, rst_n = 0, in_valid = 0, overstressed = 0;
  obj_t obj;
  logic [AW-1:0] addr;
  acc3_t acc;
  logic [31:0] now, dt;
  logic wb_valid;
  logic [AW-1:0] wb_addr;
  logic [WORD_W-1:0] wb_data;
  int checks = 0, failures = 0, clipped = 0;

  ppu_time_update #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(longint v, longint d);
    longint q = v / d;
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction
  function automatic longint cl(longint v, longint lo, longint hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  obj_t exp_obj;
  logic exp_valid = 0;
  logic [AW-1:0] exp_addr;

  initial begin
    longint el;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (wb_valid !== exp_valid ||
          (exp_valid && (obj_t'(wb_data) !== exp_obj || wb_addr !== exp_addr))) begin
        failures++;
        $display("FAIL i=%0d valid=%b/%b", i, wb_valid, exp_valid);
        $display("  got %h", wb_data);
        $display("  exp %h", exp_obj);
      end
      in_valid = ($urandom_range(0, 1) != 0);
      obj = obj_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      now = $urandom;
      el  = (i % 3 == 0) ? longint'($urandom_range(0, 100000)) : longint'($urandom_range(0, 300));
      obj.timestamp = now - 32'(el);
      acc = '{x: 16'($urandom), y: 16'($urandom), t: 16'($urandom)};
      overstressed = ($urandom_range(0, 3) == 0);
      addr = AW'($urandom);
      exp_valid = in_valid;
      if (in_valid) begin
        exp_obj = obj;
        exp_addr = addr;
        exp_obj.pos_x = 16'(cl(longint'(obj.pos_x) + fdiv(longint'(obj.vel_x) * el, 256), 0, 65535));
        exp_obj.pos_y = 16'(cl(longint'(obj.pos_y) + fdiv(longint'(obj.vel_y) * el, 256), 0, 65535));
        exp_obj.pos_t = 16'(longint'(obj.pos_t) + fdiv(longint'(obj.vel_t) * el, 256));
        exp_obj.vel_x = 16'(cl(longint'(obj.vel_x) + fdiv(longint'(acc.x) * el, 4096), -32768, 32767));
        exp_obj.vel_y = 16'(cl(longint'(obj.vel_y) + fdiv(longint'(acc.y) * el, 4096), -32768, 32767));
        exp_obj.vel_t = 16'(cl(longint'(obj.vel_t) + fdiv(longint'(acc.t) * el, 4096), -32768, 32767));
        exp_obj.overstressed = obj.overstressed | overstressed;
        exp_obj.destroyed    = obj.destroyed | obj.overstressed;
        exp_obj.timestamp    = now;
        if (exp_obj.pos_x == 0 || exp_obj.pos_x == 16'hffff) clipped++;
        #1 checks++;
        if (dt != 32'(el)) begin failures++; $display("FAIL dt %0d exp %0d", dt, el); end
      end
    end
    checks++;
    if (clipped < 10) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
