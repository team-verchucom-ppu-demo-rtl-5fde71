// tb_ppu_bram: fills the object memory through both ports, reads it back
// through both, and checks the one-cycle read latency, the data-ready flags,
// PPU write priority and the write_error flag on simultaneous writes.
module tb_ppu_bram;
  localparam int AW = 13, DW = 256;
  logic clk = 0, rst_n = 0;
  logic en_a = 0, write_en_a = 0, en_b = 0, write_en_b = 0;
  logic [AW-1:0] address_a = 0, address_b = 0;
  logic [DW-1:0] data_in_a = 0, data_in_b = 0, data_out_a, data_out_b;
  logic data_ready_a, data_ready_b, write_error;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [int];

  ppu_bram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // writes through both ports (on different cycles)
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en_a = (i % 2 == 0); write_en_a = en_a; address_a = AW'(i * 17);
      en_b = (i % 2 == 1); write_en_b = en_b; address_b = AW'(i * 17);
      data_in_a = rnd(); data_in_b = rnd();
      model[i * 17 % (1 << AW)] = en_a ? data_in_a : data_in_b;
      @(posedge clk); #1;
      chk("no error on single write", write_error == 0);
      chk("no ready after write", data_ready_a == 0 && data_ready_b == 0);
    end
    // reads through both ports
    foreach (model[k]) begin
      @(negedge clk);
      en_a = 1; write_en_a = 0; address_a = AW'(k);
      en_b = 1; write_en_b = 0; address_b = AW'(k);
      @(posedge clk); #1;
      chk("ready after read", data_ready_a && data_ready_b);
      chk($sformatf("read a %0d", k), data_out_a == model[k]);
      chk($sformatf("read b %0d", k), data_out_b == model[k]);
    end
    // simultaneous writes: PPU wins, error flagged
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      en_a = 1; write_en_a = 1; address_a = AW'(100 + i); data_in_a = rnd();
      en_b = 1; write_en_b = 1; address_b = AW'((i % 2) ? 100 + i : 3000 + i); data_in_b = rnd();
      model[100 + i] = data_in_a;
      @(posedge clk); #1;
      chk("write_error on clash", write_error == 1);
      @(negedge clk);
      en_a = 1; write_en_a = 0; address_a = AW'(100 + i);
      en_b = 0; write_en_b = 0;
      @(posedge clk); #1;
      chk("PPU write kept", data_out_a == model[100 + i]);
      chk("error is a pulse", write_error == 0);
    end
    // a write and a read in the same cycle on the two ports: read-before-write
    @(negedge clk);
    en_a = 1; write_en_a = 1; address_a = AW'(17); data_in_a = rnd();
    en_b = 1; write_en_b = 0; address_b = AW'(17);
    @(posedge clk); #1;
    chk("read during write returns old data", data_out_b == model[17]);
    @(negedge clk); en_a = 0; en_b = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
