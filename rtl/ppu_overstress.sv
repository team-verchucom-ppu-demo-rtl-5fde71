// ppu_overstress: overstress detector for object A.
//
// For each valid collision result on A it compares the magnitudes of the
// three accelerations (x, y, angle) with A's max_stress; any one larger marks
// A as overstressed (three comparators into an OR, gated by the slot being
// valid). The flag is sticky over all of A's collisions and is reported on A's
// final slot (out_valid for one cycle, then cleared for the next A). The
// time update writes it into the object, and an object that was already
// overstressed at its previous update is then marked destroyed.
//
// Timing: one cycle from in_* to out_*. Comparing magnitudes against a 16-bit
// unsigned max_stress is this implementation's choice.
module ppu_overstress
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_final,
  input  acc3_t       coll_acc,
  input  logic [15:0] max_stress,
  output logic        out_valid,
  output logic        overstressed
);

  logic hit, sticky;

  always_comb begin
    hit = in_valid && ((abs16(coll_acc.x) > max_stress) ||
                       (abs16(coll_acc.y) > max_stress) ||
                       (abs16(coll_acc.t) > max_stress));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sticky       <= 1'b0;
      overstressed <= 1'b0;
      out_valid    <= 1'b0;
    end else begin
      out_valid <= in_final;
      if (in_final) begin
        overstressed <= sticky;
        sticky       <= 1'b0;
      end else if (hit) begin
        sticky <= 1'b1;
      end
    end
  end

endmodule
