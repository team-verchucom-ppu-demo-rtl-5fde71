// ppu_accumulator: collision effects accumulator for object A.
//
// Keeps a running sum of all collision accelerations acting on the object A
// currently being processed: three 16-bit adders (x, y, angle) whose result
// feeds back into the sum register (the forwarding path), and three muxes that
// keep junk out of the sum when the incoming slot holds no valid collision.
// On A's final slot (in_final) the global-effects acceleration takes the place
// of a collision: the total = sum + global is handed to the time update stage
// (out_valid for one cycle) and the sum restarts from zero for the next A.
//
// Timing: one cycle from in_* to out_*. The sums saturate at the 16-bit
// limits; saturating rather than wrapping is this implementation's choice.
module ppu_accumulator
  import ppu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,    // a collision result for A
  input  logic  in_final,    // A's final slot: add the global result
  input  acc3_t coll_acc,
  input  acc3_t glob_acc,
  output logic  out_valid,
  output acc3_t total,
  output acc3_t sum          // running collision sum (for observation)
);

  acc3_t addend, nsum;

  always_comb begin
    if (in_final)      addend = glob_acc;
    else if (in_valid) addend = coll_acc;
    else               addend = '0;
    nsum.x = sat16(64'(sum.x) + 64'(addend.x));
    nsum.y = sat16(64'(sum.y) + 64'(addend.y));
    nsum.t = sat16(64'(sum.t) + 64'(addend.t));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      total     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_final;
      if (in_final) begin
        total <= nsum;
        sum   <= '0;
      end else if (in_valid) begin
        sum   <= nsum;
      end
    end
  end

endmodule
