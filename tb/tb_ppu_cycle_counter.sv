// tb_ppu_cycle_counter: checks that the cycle counter starts at zero after
// reset and advances by exactly one per clock.
module tb_ppu_cycle_counter;
  logic clk = 0, rst_n = 0;
  logic [31:0] now;
  int checks = 0, failures = 0;

  ppu_cycle_counter dut (.clk, .rst_n, .now);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    repeat (3) @(posedge clk);
    #1 checks++; if (now !== 32'd0) begin failures++; $display("FAIL reset value %0d", now); end
    rst_n = 1;
    @(posedge clk); #1 prev = now;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      checks++;
      if (now !== prev + 32'd1) begin failures++; $display("FAIL step %0d -> %0d", prev, now); end
      prev = now;
    end
    checks++; if (now != 32'd501) begin failures++; $display("FAIL count %0d", now); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
