// ppu_global_regs: software-addressable global parameters of the PPU.
//
// Holds the values software may change at any time while the PPU runs:
// gravity, wind viscosity, wind velocity (x, y) and the run bit that starts
// and stops the PPU loop. They reach the global effects calculator as one
// globals_t bundle. A simple synchronous register port (16-bit data, 3-bit
// word address) stands in for the processor bus:
//   0 CTRL       bit 0 run                           read/write
//   1 GRAVITY    signed acceleration added to acc_y   read/write
//   2 WIND_VISC  unsigned 4.4                         read/write
//   3 WIND_VX    signed 8.8                           read/write
//   4 WIND_VY    signed 8.8                           read/write
//   5 STATUS     bit 0 idle, bit 1 a processor write to the object memory
//                was refused (sticky; write 1 to bit 1 to clear)
//   6 TIME_LO    current cycle count, bits 15:0       read only
//   7 TIME_HI    current cycle count, bits 31:16      read only
// Writes take effect at the next clock edge, reads are combinational. All
// registers reset to zero (PPU stopped, no gravity, still air). The parameter
// set is the design's; the map, widths and reset values are this
// implementation's. The time registers let software stamp a new object with
// the current time.
module ppu_global_regs
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [2:0]  addr,
  input  logic [15:0] wr_data,
  output logic [15:0] rd_data,
  input  logic        idle,
  input  logic        write_error,
  input  logic [31:0] now,
  output globals_t    glb,
  output logic        run
);

  logic werr_sticky;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      glb         <= '0;
      run         <= 1'b0;
      werr_sticky <= 1'b0;
    end else begin
      if (wr_en) begin
        case (addr)
          3'd0: run           <= wr_data[0];
          3'd1: glb.gravity   <= acc_t'(wr_data);
          3'd2: glb.wind_visc <= wr_data[7:0];
          3'd3: glb.wind_vx   <= svel_t'(wr_data);
          3'd4: glb.wind_vy   <= svel_t'(wr_data);
          default: ;
        endcase
      end
      if (write_error)                          werr_sticky <= 1'b1;
      else if (wr_en && addr == 3'd5 && wr_data[1]) werr_sticky <= 1'b0;
    end
  end

  always_comb begin
    case (addr)
      3'd0:    rd_data = {15'd0, run};
      3'd1:    rd_data = glb.gravity;
      3'd2:    rd_data = {8'd0, glb.wind_visc};
      3'd3:    rd_data = glb.wind_vx;
      3'd4:    rd_data = glb.wind_vy;
      3'd5:    rd_data = {14'd0, werr_sticky, idle};
      3'd6:    rd_data = now[15:0];
      default: rd_data = now[31:16];
    endcase
  end

endmodule
