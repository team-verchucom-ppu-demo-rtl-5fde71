// ppu_cycle_counter: the PPU's notion of time.
//
// A 32-bit counter that advances by one every clock cycle and wraps around.
// Object timestamps are values of this counter, and the time update takes
// the difference between the current count and an object's timestamp as the
// elapsed time; modular subtraction keeps that difference right across a
// wrap. The 32-bit width is the design's; counting from zero after reset is
// this implementation's choice.
module ppu_cycle_counter (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] now
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 32'd1;
  end

endmodule
