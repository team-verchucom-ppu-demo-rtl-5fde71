// tb_ppu_breakdown: random memory words and read descriptions; checks the
// field split, the slot classification (load A, collision slot, final slot,
// NOP, null) and that the A register captures exactly the loaded objects.
module tb_ppu_breakdown;
  import ppu_pkg::*;
  localparam int AW = 13;
  logic clk = 0, rst_n = 0;
  logic [WORD_W-1:0] mem_data;
  logic mem_ready, ret_valid, ret_is_a, ret_final;
  logic [AW-1:0] ret_addr, addr_a;
  obj_t obj_b, obj_a;
  logic is_null, load_a, slot_valid, slot_final, nop, a_live;
  int checks = 0, failures = 0;
  int seen_load = 0, seen_slot = 0, seen_final = 0, seen_nop = 0;

  ppu_breakdown #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the A register
  logic [WORD_W-1:0] m_a = '0;
  logic [AW-1:0]     m_addr = '0;
  logic              m_live = 0;

  initial begin
    logic have, nul, dstr, e_load, e_slot, e_fin;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      mem_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if ($urandom_range(0, 3) == 0) mem_data[255:240] = 16'd0;
      mem_data[105] = ($urandom_range(0, 5) == 0);   // destroyed flag
      mem_ready = ($urandom_range(0, 7) != 0);
      ret_valid = ($urandom_range(0, 7) != 0);
      ret_is_a  = ($urandom_range(0, 4) == 0);
      ret_final = ($urandom_range(0, 5) == 0);
      ret_addr  = AW'($urandom);
      #1;
      have   = ret_valid && mem_ready;
      nul    = have && mem_data[255:240] == 0;
      dstr   = mem_data[105];
      e_load = have && ret_is_a && !nul;
      e_fin  = have && !ret_is_a && ret_final && m_live;
      e_slot = have && !ret_is_a && !ret_final && !nul && !dstr && m_live;
      checks++;
      if (obj_b.obj_id != mem_data[255:240] || obj_b.pos_x != mem_data[239:224] ||
          obj_b.pos_y != mem_data[223:208] || obj_b.timestamp != mem_data[104:73] ||
          obj_b.destroyed != dstr || obj_b.side != mem_data[143:139]) begin
        failures++; $display("FAIL field split");
      end
      checks++;
      if (is_null != nul || load_a != e_load || slot_valid != e_slot || slot_final != e_fin ||
          nop != !(e_load || e_slot || e_fin)) begin
        failures++;
        $display("FAIL classify i=%0d null=%b/%b load=%b/%b slot=%b/%b fin=%b/%b", i,
                 is_null, nul, load_a, e_load, slot_valid, e_slot, slot_final, e_fin);
      end
      checks++;
      if (a_live != m_live || (m_live && (obj_a != obj_t'(m_a) || addr_a != m_addr))) begin
        failures++; $display("FAIL A register");
      end
      if (e_load) seen_load++;
      if (e_slot) seen_slot++;
      if (e_fin) seen_final++;
      if (!(e_load || e_slot || e_fin)) seen_nop++;
      if (have && ret_is_a) begin
        m_live = !nul && !dstr;
        if (!nul) begin m_a = mem_data; m_addr = ret_addr; end
      end
    end
    checks++;
    if (seen_load == 0 || seen_slot == 0 || seen_final == 0 || seen_nop == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
