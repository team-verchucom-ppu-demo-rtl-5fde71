// ppu_bram: the shared object memory, a dual-port block RAM wrapper.
//
// Port A belongs to the PPU pipeline, port B to the embedded processor that
// talks to the workstation. Each port has an enable, a write enable, an
// address and 256-bit data in and out, so one access moves a whole object.
// Reads are synchronous: data_out and data_ready appear the cycle after the
// enabled read. data_ready is high for one cycle after every enabled read
// (an enabled write returns no data).
//
// Only one write can happen per cycle. When both ports write in the same cycle
// the PPU (port A) wins, the port B write is dropped and write_error is high
// the following cycle, so software can retry. Reads on both ports proceed in
// parallel with a write; a read of the address being written returns the old
// contents. The port list and the 13-bit addresses (8192 words) follow the
// design's BRAM wrapper; read-before-write and the registered error pulse are
// this implementation's choice.
module ppu_bram #(
  parameter int ADDR_W = 13,
  parameter int DATA_W = 256
) (
  input  logic              clk,
  input  logic              rst_n,   // clears the ready and error flags
  // port A: PPU
  input  logic              en_a,
  input  logic              write_en_a,
  input  logic [ADDR_W-1:0] address_a,
  input  logic [DATA_W-1:0] data_in_a,
  output logic [DATA_W-1:0] data_out_a,
  output logic              data_ready_a,
  // port B: processor
  input  logic              en_b,
  input  logic              write_en_b,
  input  logic [ADDR_W-1:0] address_b,
  input  logic [DATA_W-1:0] data_in_b,
  output logic [DATA_W-1:0] data_out_b,
  output logic              data_ready_b,
  output logic              write_error
);

  localparam int DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  logic              wr_a, wr_b, do_wr;
  logic [ADDR_W-1:0] wr_addr;
  logic [DATA_W-1:0] wr_data;

  // single physical write port, PPU has priority
  always_comb begin
    wr_a    = en_a & write_en_a;
    wr_b    = en_b & write_en_b;
    do_wr   = wr_a | wr_b;
    wr_addr = wr_a ? address_a : address_b;
    wr_data = wr_a ? data_in_a : data_in_b;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (en_a && !write_en_a) data_out_a <= mem[address_a];
    if (en_b && !write_en_b) data_out_b <= mem[address_b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_ready_a <= 1'b0;
      data_ready_b <= 1'b0;
      write_error  <= 1'b0;
    end else begin
      data_ready_a <= en_a & ~write_en_a;
      data_ready_b <= en_b & ~write_en_b;
      write_error  <= wr_a & wr_b;
    end
  end

endmodule
