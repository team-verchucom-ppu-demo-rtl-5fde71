// ppu_control: start/stop control of the PPU loop.
//
// Software starts and stops the PPU with the run bit. The controller lets the
// address generator issue one read per cycle while running, except in a cycle
// where the writeback stage uses the shared memory port (wb_active): this is
// the read-stage stall. When run is cleared the loop carries on to the end of
// the current object A, stops issuing at the next "load new A" boundary,
// waits until the pipeline has drained (pipe_busy low) and then sits in the
// idle state, with idle high and the address generator held at the start of
// the array (restart). While idle, software may rewrite or compact the object
// memory safely; the next start begins again at the first object.
//
// States: IDLE -> RUN (run set) -> DRAIN (run clear and at a boundary) ->
// IDLE (pipeline empty). The idle state and start/stop come from the design;
// stopping only at an object boundary and restarting from the first object
// are this implementation's choices.
module ppu_control (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic at_boundary,
  input  logic pipe_busy,
  input  logic wb_active,
  output logic issue_en,
  output logic restart,
  output logic idle
);

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_DRAIN } state_t;

  state_t state, state_d;
  logic   stop_now;

  always_comb begin
    stop_now = !run && at_boundary;
    state_d  = state;
    issue_en = 1'b0;
    case (state)
      S_IDLE:  if (run) state_d = S_RUN;
      S_RUN: begin
        if (stop_now) state_d  = S_DRAIN;
        else          issue_en = !wb_active;
      end
      S_DRAIN: if (!pipe_busy) state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
    restart = (state == S_IDLE);
    idle    = (state == S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_d;
  end

endmodule
