// tb_ppu_control: start, writeback stalls, a stop request that has to wait
// for an object boundary and for the pipeline to drain, and a restart.
module tb_ppu_control;
  logic clk = 0, rst_n = 0;
  logic run = 0, at_boundary = 0, pipe_busy = 0, wb_active = 0;
  logic issue_en, restart, idle;
  int checks = 0, failures = 0;

  ppu_control dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (issue=%b restart=%b idle=%b)", what, issue_en, restart, idle); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle after reset", idle && restart && !issue_en);
    run = 1;
    @(negedge clk);
    chk("running", !idle && !restart && issue_en);
    for (int i = 0; i < 200; i++) begin
      wb_active = 1'($urandom); at_boundary = 1'($urandom);
      #1 chk("issue unless writeback", issue_en == !wb_active && !idle);
      @(negedge clk);
    end
    // stop requested between boundaries: keep issuing
    wb_active = 0; at_boundary = 0; run = 0; pipe_busy = 1;
    repeat (5) begin #1 chk("finish current object", issue_en && !idle); @(negedge clk); end
    at_boundary = 1;
    #1 chk("stop at boundary", !issue_en);
    @(negedge clk);
    repeat (5) begin #1 chk("draining", !issue_en && !idle); @(negedge clk); end
    pipe_busy = 0;
    @(negedge clk);
    chk("idle after drain", idle && restart && !issue_en);
    repeat (3) begin @(negedge clk); chk("stays idle", idle && !issue_en); end
    run = 1;
    @(negedge clk);
    chk("restart", !idle && issue_en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
