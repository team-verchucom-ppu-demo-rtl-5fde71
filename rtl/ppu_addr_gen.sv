// ppu_addr_gen: next-address generator for the PPU's double loop.
//
// The PPU updates one object A at a time. For each A it first reads A itself
// ("load new A"), then reads every other object B in turn so that A can be
// tested against it, and finally reads A's own slot once more: that last slot
// ("reached end", B == A) is where the global effects are applied instead of a
// collision. Then the next A is loaded. Two registers hold &A and &B; B starts
// at &A + OBJ_WORDS, counts up, wraps to BASE_ADDR, and the slot whose address
// equals &A is the final one.
//
// The object array is null-terminated (object ID 0), so the generator cannot
// know where the array ends until the data of a read comes back. It is
// therefore a Mealy machine: in the cycle a read's data returns, ret_null says
// whether that object was the terminator, and if so the address put on the
// memory in that same cycle is already the wrapped one (BASE_ADDR as B, or
// BASE_ADDR as the next A). Only the terminator read itself is lost.
//
// Interface: one read per cycle while issue_en is high (rd_en, rd_addr,
// rd_is_a, rd_final). The memory returns data one cycle later; the ret_*
// outputs describe the read whose data is on the memory output now. When
// issue_en is low (writeback using the port, or the PPU stopping) nothing is
// issued and the pending choice, including any wrap just learnt from the
// returning data, is held. restart returns the loop to A = BASE_ADDR.
// at_boundary is high when the next read would load a new A.
//
// The &A/&B registers, the wrap on a null ID and the B == A comparison follow
// the design; the exact hand-over rules are this implementation's.
module ppu_addr_gen #(
  parameter int                ADDR_W    = 13,
  parameter logic [ADDR_W-1:0] BASE_ADDR = '0,
  parameter logic [ADDR_W-1:0] OBJ_WORDS = ADDR_W'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              issue_en,
  input  logic              ret_null,    // returning data has object ID 0
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              rd_is_a,
  output logic              rd_final,
  output logic              ret_valid,
  output logic              ret_is_a,
  output logic              ret_final,
  output logic [ADDR_W-1:0] ret_addr,
  output logic [ADDR_W-1:0] addr_a,
  output logic              at_boundary
);

  typedef struct packed {
    logic              is_a;
    logic              fin;
    logic [ADDR_W-1:0] addr;
  } req_t;

  req_t              cand_q, cand_d, issue;
  logic [ADDR_W-1:0] addr_a_d;
  logic              do_issue;

  always_comb begin
    issue = cand_q;
    if (ret_valid && ret_null) begin
      if (ret_is_a) issue = '{is_a: 1'b1, fin: 1'b0, addr: BASE_ADDR};
      else          issue = '{is_a: 1'b0, fin: (BASE_ADDR == addr_a), addr: BASE_ADDR};
    end

    do_issue = issue_en && !restart;
    cand_d   = issue;
    addr_a_d = addr_a;
    if (restart) begin
      cand_d = '{is_a: 1'b1, fin: 1'b0, addr: BASE_ADDR};
    end else if (do_issue) begin
      if (issue.is_a) begin
        addr_a_d = issue.addr;
        cand_d   = '{is_a: 1'b0, fin: 1'b0, addr: issue.addr + OBJ_WORDS};
      end else if (issue.fin) begin
        cand_d   = '{is_a: 1'b1, fin: 1'b0, addr: addr_a + OBJ_WORDS};
      end else begin
        cand_d   = '{is_a: 1'b0, fin: ((issue.addr + OBJ_WORDS) == addr_a),
                     addr: issue.addr + OBJ_WORDS};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_q    <= '{is_a: 1'b1, fin: 1'b0, addr: BASE_ADDR};
      addr_a    <= BASE_ADDR;
      ret_valid <= 1'b0;
      ret_is_a  <= 1'b0;
      ret_final <= 1'b0;
      ret_addr  <= '0;
    end else begin
      cand_q    <= cand_d;
      addr_a    <= addr_a_d;
      ret_valid <= do_issue;
      ret_is_a  <= issue.is_a;
      ret_final <= issue.fin;
      ret_addr  <= issue.addr;
    end
  end

  assign rd_en       = do_issue;
  assign rd_addr     = issue.addr;
  assign rd_is_a     = issue.is_a;
  assign rd_final    = issue.fin;
  assign at_boundary = issue.is_a;

endmodule
