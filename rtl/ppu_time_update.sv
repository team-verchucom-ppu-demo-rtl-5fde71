// ppu_time_update: time-dependent update and writeback packing of object A.
//
// Every object carries the cycle count of its last update. When A's final
// slot arrives with its total acceleration, this stage subtracts that
// timestamp from the current cycle count to get the elapsed cycles dt and
//   pos += vel * dt >>> VEL_SHIFT     (x, y saturate to 0..65535,
//                                       the orientation wraps around)
//   vel += acc * dt >>> ACC_SHIFT     (saturates to 16-bit signed)
//   timestamp = now
// The position uses the velocity from before this update. The overstress
// flag of this update is OR-ed into the object, and an object that was
// already overstressed is marked destroyed. The updated fields are packed back
// into one memory word.
//
// Timing: one register stage; wb_valid/wb_addr/wb_data are held for exactly
// one cycle, during which the writeback uses the PPU memory port. The
// subtraction, the multiplications and the new timestamp follow the design;
// the shifts, saturation and the overstressed-then-destroyed rule are this
// implementation's choices.
module ppu_time_update
  import ppu_pkg::*;
#(
  parameter int ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  obj_t              obj,
  input  logic [ADDR_W-1:0] addr,
  input  acc3_t             acc,
  input  logic              overstressed,
  input  logic [31:0]       now,
  output logic              wb_valid,
  output logic [ADDR_W-1:0] wb_addr,
  output logic [WORD_W-1:0] wb_data,
  output logic [31:0]       dt
);

  obj_t nobj;

  function automatic logic signed [63:0] scaled(input logic signed [15:0] v,
                                                input logic [31:0] t,
                                                input int unsigned sh);
    logic signed [63:0] p;
    p = 64'(v) * $signed({32'd0, t});
    return p >>> sh;
  endfunction

  always_comb begin
    dt   = now - obj.timestamp;
    nobj = obj;
    nobj.pos_x = satu16(64'($signed({1'b0, obj.pos_x})) + scaled(obj.vel_x, dt, VEL_SHIFT));
    nobj.pos_y = satu16(64'($signed({1'b0, obj.pos_y})) + scaled(obj.vel_y, dt, VEL_SHIFT));
    nobj.pos_t = 16'(obj.pos_t + 16'(scaled(obj.vel_t, dt, VEL_SHIFT)));
    nobj.vel_x = sat16(64'(obj.vel_x) + scaled(acc.x, dt, ACC_SHIFT));
    nobj.vel_y = sat16(64'(obj.vel_y) + scaled(acc.y, dt, ACC_SHIFT));
    nobj.vel_t = sat16(64'(obj.vel_t) + scaled(acc.t, dt, ACC_SHIFT));
    nobj.overstressed = obj.overstressed | overstressed;
    nobj.destroyed    = obj.destroyed | obj.overstressed;
    nobj.timestamp    = now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_addr  <= '0;
      wb_data  <= '0;
    end else begin
      wb_valid <= in_valid;
      if (in_valid) begin
        wb_addr <= addr;
        wb_data <= WORD_W'(nobj);
      end
    end
  end

endmodule
