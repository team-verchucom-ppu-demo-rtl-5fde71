// tb_ppu_addr_gen: the testbench plays the memory (a null-terminated array of
// N objects, one word each) and stalls the generator at random. Every read
// the generator issues is compared with the A/B visiting order worked out
// independently: load A, B = A+1 .. end of array, wrap, B = first .. A (final),
// next A, with A wrapping at the terminator. Runs for several N, switching with
// restart.
module tb_ppu_addr_gen;
  localparam int AW = 13;
  logic clk = 0, rst_n = 0, restart = 0, issue_en = 0, ret_null;
  logic rd_en, rd_is_a, rd_final, ret_valid, ret_is_a, ret_final, at_boundary;
  logic [AW-1:0] rd_addr, ret_addr, addr_a;
  int checks = 0, failures = 0, wraps_b = 0, wraps_a = 0, stalls = 0, finals = 0;
  int n_obj;

  ppu_addr_gen #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: objects at 0..n_obj-1, terminator at n_obj
  logic [AW-1:0] last_addr;
  logic          last_valid = 0;
  always_ff @(posedge clk) begin
    last_valid <= rd_en;
    if (rd_en) last_addr <= rd_addr;
  end
  assign ret_null = last_valid && (int'(last_addr) >= n_obj);

  typedef struct { bit is_a; bit fin; int addr; } rd_t;
  rd_t exp_q [$];

  task automatic build_expected(int n, int loops);
    int a = 0, b;
    exp_q.delete();
    for (int l = 0; l < loops; l++) begin
      exp_q.push_back('{1, 0, a});
      if (a == n) begin a = 0; continue; end
      b = a + 1;
      forever begin
        exp_q.push_back('{0, b == a, b});
        if (b == a) break;
        b = (b == n) ? 0 : b + 1;
      end
      a = a + 1;
    end
  endtask

  task automatic run_case(int n);
    int issued = 0;
    n_obj = n;
    build_expected(n, 3 * n + 6);
    @(negedge clk) restart = 1; issue_en = 1;
    @(negedge clk) restart = 0;
    while (exp_q.size() > 0) begin
      issue_en = ($urandom_range(0, 3) != 0);
      if (!issue_en) stalls++;
      #1;
      if (rd_en) begin
        rd_t e = exp_q.pop_front();
        checks++;
        if (rd_is_a != e.is_a || rd_final != e.fin || int'(rd_addr) != e.addr ||
            at_boundary != rd_is_a) begin
          failures++;
          $display("FAIL n=%0d read %0d: got a=%b f=%b @%0d exp a=%b f=%b @%0d", n, issued,
                   rd_is_a, rd_final, rd_addr, e.is_a, e.fin, e.addr);
        end
        if (rd_is_a && rd_addr == 0 && ret_valid && ret_null) wraps_a++;
        if (!rd_is_a && rd_addr == 0 && ret_valid && ret_null) wraps_b++;
        if (rd_final) finals++;
        issued++;
      end else begin
        checks++;
        if (issue_en) begin failures++; $display("FAIL no read while enabled"); end
      end
      @(negedge clk);
    end
    issue_en = 0;
  endtask

  initial begin
    n_obj = 4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(1);
    run_case(2);
    run_case(5);
    run_case(9);
    checks++;
    if (wraps_a == 0 || wraps_b == 0 || stalls == 0 || finals == 0) begin
      failures++; $display("FAIL coverage wraps_a=%0d wraps_b=%0d stalls=%0d", wraps_a, wraps_b, stalls);
    end
    $display("wraps_a=%0d wraps_b=%0d stalls=%0d finals=%0d", wraps_a, wraps_b, stalls, finals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
