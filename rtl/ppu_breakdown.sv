// ppu_breakdown: first pipeline stage after the memory read.
//
// It takes the 256-bit word coming out of the memory, splits it into the
// object's fields (obj_t) and classifies the slot using what the address
// generator says about the read (ret_*):
//   - load_a:     the read was "load new A" and found a real object; the
//                 object and its address are captured in the A register,
//                 which then stays put for the rest of A's loop.
//   - slot_valid: a B object to test against A (data ready, not the null
//                 terminator, B not destroyed, A present and not destroyed).
//   - slot_final: A's last slot, where global effects are applied.
//   - nop:        none of these (no data, terminator, destroyed object).
// is_null is the combinational "object ID is 0" flag fed back to the
// Mealy address generator so it can wrap in the same cycle.
//
// Keeping all field extraction here means the word layout can change without
// touching the rest of the pipeline, as the design intends. The A register
// sitting in this stage and the destroyed-object rules are this
// implementation's choice.
module ppu_breakdown
  import ppu_pkg::*;
#(
  parameter int ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] mem_data,
  input  logic              mem_ready,
  input  logic              ret_valid,
  input  logic              ret_is_a,
  input  logic              ret_final,
  input  logic [ADDR_W-1:0] ret_addr,
  output obj_t              obj_b,       // the object on the memory output
  output logic              is_null,
  output logic              load_a,
  output logic              slot_valid,
  output logic              slot_final,
  output logic              nop,
  output obj_t              obj_a,       // the A register
  output logic [ADDR_W-1:0] addr_a,
  output logic              a_live
);

  logic have_data;

  always_comb begin
    obj_b      = obj_t'(mem_data);
    have_data  = ret_valid && mem_ready;
    is_null    = have_data && (obj_b.obj_id == 16'd0);
    load_a     = have_data && ret_is_a && !is_null;
    slot_final = have_data && !ret_is_a && ret_final && a_live;
    slot_valid = have_data && !ret_is_a && !ret_final && !is_null &&
                 !obj_b.destroyed && a_live;
    nop        = !(load_a || slot_valid || slot_final);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obj_a  <= '0;
      addr_a <= '0;
      a_live <= 1'b0;
    end else if (have_data && ret_is_a) begin
      // a null A leaves nothing to update until the next A is loaded
      a_live <= !is_null && !obj_b.destroyed;
      if (!is_null) begin
        obj_a  <= obj_b;
        addr_a <= ret_addr;
      end
    end
  end

endmodule
