// ppu_top: physics processing unit with its shared object memory.
//
// The PPU sweeps a null-terminated array of square objects held in a
// dual-port block RAM. For each object A it reads A, then every other object
// B, one per cycle, and accumulates the collision acceleration each B puts on
// A; on A's last slot it adds the global acceleration (gravity, wind), lets
// the elapsed time since A's last update act on A's position and velocity,
// and writes A back. Then it moves on to the next A, forever, while the
// processor (port B of the memory) adds, deletes and reads objects.
//
// Pipeline, one slot per cycle (t = cycle the address is issued):
//   t     next address generator puts &A or &B on memory port A
//   t+1   breakdown splits the word, classifies the slot, loads the A register
//   t+1.. collision calculator and global calculator in parallel (CALC_LAT)
//   t+5   accumulator and overstress detector
//   t+6   time-dependent update, packs A
//   t+7   writeback on memory port A; the read stage stalls for this cycle
// A's data travels alongside the slots so that the next A can be loaded while
// the previous one is still in the pipeline. An object's read for the next
// loop is not held back until its own writeback lands: with fewer objects than
// the pipeline is deep, an update may start from the not yet written value.
//
// Processor side: mem_* is port B of the object memory (256-bit words, one
// object each, write_error when a write collides with a PPU writeback);
// reg_* is the global register port (see ppu_global_regs). All outputs are
// plain signals. The block structure and ports follow the design; the
// processor bus itself is outside this module.
//
// Some internal signals (the read-slot kind, load_a, the running sum, the
// elapsed time) are connected but not used here. They are left for
// observation and debugging, so a lint run reports them as unused. rst_n
// also gates the two assertions at the end of the file synchronously, which
// a lint run notes as a net used both ways; no logic depends on that use.
module ppu_top
  import ppu_pkg::*;
#(
  parameter int                ADDR_W    = 13,
  parameter logic [ADDR_W-1:0] BASE_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor port of the object memory
  input  logic              mem_en,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [WORD_W-1:0] mem_wdata,
  output logic [WORD_W-1:0] mem_rdata,
  output logic              mem_ready,
  output logic              mem_write_error,
  // global register port
  input  logic              reg_wr_en,
  input  logic [2:0]        reg_addr,
  input  logic [15:0]       reg_wdata,
  output logic [15:0]       reg_rdata,
  // status
  output logic              idle,
  output logic              wb_valid,    // a writeback happens this cycle
  output logic [31:0]       now
);

  // ---------------------------------------------------------------- control
  globals_t glb;
  logic     run, issue_en, restart, at_boundary, pipe_busy;

  ppu_cycle_counter u_time (.clk, .rst_n, .now);

  ppu_global_regs u_regs (
    .clk, .rst_n, .wr_en(reg_wr_en), .addr(reg_addr), .wr_data(reg_wdata),
    .rd_data(reg_rdata), .idle, .write_error(mem_write_error), .now,
    .glb, .run
  );

  ppu_control u_ctrl (
    .clk, .rst_n, .run, .at_boundary, .pipe_busy, .wb_active(wb_valid),
    .issue_en, .restart, .idle
  );

  // ------------------------------------------------------- address + memory
  logic              rd_en, rd_is_a, rd_final;
  logic [ADDR_W-1:0] rd_addr, ag_addr_a;
  logic              ret_valid, ret_is_a, ret_final;
  logic [ADDR_W-1:0] ret_addr;
  logic              is_null;
  logic [ADDR_W-1:0] wb_addr;
  logic [WORD_W-1:0] wb_data;
  logic [WORD_W-1:0] dout_a;
  logic              ready_a;

  ppu_addr_gen #(.ADDR_W(ADDR_W), .BASE_ADDR(BASE_ADDR)) u_agen (
    .clk, .rst_n, .restart, .issue_en, .ret_null(is_null),
    .rd_en, .rd_addr, .rd_is_a, .rd_final,
    .ret_valid, .ret_is_a, .ret_final, .ret_addr,
    .addr_a(ag_addr_a), .at_boundary
  );

  ppu_bram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_mem (
    .clk, .rst_n,
    .en_a(rd_en | wb_valid), .write_en_a(wb_valid),
    .address_a(wb_valid ? wb_addr : rd_addr), .data_in_a(wb_data),
    .data_out_a(dout_a), .data_ready_a(ready_a),
    .en_b(mem_en), .write_en_b(mem_we), .address_b(mem_addr),
    .data_in_b(mem_wdata), .data_out_b(mem_rdata), .data_ready_b(mem_ready),
    .write_error(mem_write_error)
  );

  // -------------------------------------------------------------- breakdown
  obj_t              obj_b, obj_a;
  logic              load_a, slot_valid, slot_final, slot_nop, a_live;
  logic [ADDR_W-1:0] addr_a;

  ppu_breakdown #(.ADDR_W(ADDR_W)) u_brk (
    .clk, .rst_n, .mem_data(dout_a), .mem_ready(ready_a),
    .ret_valid, .ret_is_a, .ret_final, .ret_addr,
    .obj_b, .is_null, .load_a, .slot_valid, .slot_final, .nop(slot_nop),
    .obj_a, .addr_a, .a_live
  );

  // ----------------------------------------------- collision + global effects
  logic  coll_valid, glob_valid;
  acc3_t coll_acc, glob_acc;

  ppu_collision_accel u_coll (
    .clk, .rst_n, .valid_in(slot_valid),
    .ax(obj_a.pos_x), .ay(obj_a.pos_y), .as_(obj_a.side),
    .a_inv_mass(obj_a.inv_mass), .a_elas(obj_a.elas),
    .bx(obj_b.pos_x), .by(obj_b.pos_y), .bs(obj_b.side), .b_elas(obj_b.elas),
    .valid_out(coll_valid), .acc(coll_acc)
  );

  ppu_global_accel u_glob (
    .clk, .rst_n, .valid_in(slot_final),
    .vel_x(obj_a.vel_x), .vel_y(obj_a.vel_y), .pos_t(obj_a.pos_t),
    .side(obj_a.side), .glb,
    .valid_out(glob_valid), .acc(glob_acc)
  );

  // A's data and address travel with the slots
  obj_t              a_pipe    [CALC_LAT];
  logic [ADDR_W-1:0] addr_pipe [CALC_LAT];
  logic [CALC_LAT-1:0] busy_pipe;

  always_ff @(posedge clk) begin
    a_pipe[0]    <= obj_a;
    addr_pipe[0] <= addr_a;
    for (int i = 1; i < CALC_LAT; i++) begin
      a_pipe[i]    <= a_pipe[i-1];
      addr_pipe[i] <= addr_pipe[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_pipe <= '0;
    else        busy_pipe <= {busy_pipe[CALC_LAT-2:0], slot_valid | slot_final};
  end

  // ------------------------------------------------------------ accumulation
  logic              acc_valid, os_valid, os_flag;
  acc3_t             acc_total, acc_sum;
  obj_t              a_acc;
  logic [ADDR_W-1:0] addr_acc;

  ppu_accumulator u_acc (
    .clk, .rst_n, .in_valid(coll_valid), .in_final(glob_valid),
    .coll_acc, .glob_acc, .out_valid(acc_valid), .total(acc_total), .sum(acc_sum)
  );

  ppu_overstress u_os (
    .clk, .rst_n, .in_valid(coll_valid), .in_final(glob_valid),
    .coll_acc, .max_stress(a_pipe[CALC_LAT-1].max_stress),
    .out_valid(os_valid), .overstressed(os_flag)
  );

  always_ff @(posedge clk) begin
    a_acc    <= a_pipe[CALC_LAT-1];
    addr_acc <= addr_pipe[CALC_LAT-1];
  end

  // ------------------------------------------------ time update + writeback
  logic [31:0] elapsed;

  ppu_time_update #(.ADDR_W(ADDR_W)) u_tu (
    .clk, .rst_n, .in_valid(acc_valid), .obj(a_acc), .addr(addr_acc),
    .acc(acc_total), .overstressed(os_flag), .now,
    .wb_valid, .wb_addr, .wb_data, .dt(elapsed)
  );

  assign pipe_busy = ret_valid | (|busy_pipe) | acc_valid | wb_valid;

  // the read stage must never issue while the writeback owns the port, and
  // the overstress detector reports together with the accumulator
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_port_clash: assert (!(rd_en && wb_valid))
        else $error("read issued during writeback");
      a_os_aligned: assert (os_valid == acc_valid)
        else $error("overstress and accumulator out of step");
    end
  end

endmodule
