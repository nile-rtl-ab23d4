// tb_nile_match_unit: self-checking test of one Match Unit.
//
// Programs a pattern (entry values and wildcard masks, process filter,
// threshold, MU_data selection) and drives random commit-log records, half of
// them made to match. A reference model in the testbench computes the
// expected match, count and activation packet; the packet is checked one
// cycle after the record and then acknowledged. Also checks enable/disable,
// reset of the count, counter writes and threshold 0 (count only).
module tb_nile_match_unit;
  import nile_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic commit_fire;
  commit_log_t commit;
  logic [PID_W-1:0] cur_pid;
  logic cfg_we;
  mu_cfg_op_e cfg_op;
  field_e cfg_field;
  logic [XLEN-1:0] cfg_wdata, count, thresh;
  logic enabled, act_valid, act_ack;
  act_pkt_t act_pkt;

  int checks = 0, failures = 0;

  nile_match_unit #(.MU_ID(8'd5)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(mu_cfg_op_e op, field_e f, logic [XLEN-1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_op = op; cfg_field = f; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Reference pattern.
  logic [31:0] m_inst, k_inst;
  logic [63:0] m_src, k_src, m_addr, k_addr;
  logic [31:0] m_pid;
  logic [63:0] m_count, m_thresh;

  function automatic logic ref_match(commit_log_t c, logic [31:0] pid);
    return ((c.inst & ~k_inst) == (m_inst & ~k_inst))
        && ((c.pc_src & ~k_src) == (m_src & ~k_src))
        && ((c.addr & ~k_addr) == (m_addr & ~k_addr))
        && pid == m_pid;
  endfunction

  task automatic send(commit_log_t c, logic [31:0] pid, logic en);
    logic exp_hit, exp_act;
    @(negedge clk);
    commit = c; cur_pid = pid; commit_fire = 1;
    exp_hit = en && ref_match(c, pid);
    exp_act = exp_hit && m_thresh != 0 && m_count + 1 == m_thresh;
    @(negedge clk);
    commit_fire = 0;
    if (exp_act) m_count = 0; else if (exp_hit) m_count++;
    check(count == m_count, $sformatf("count %0d exp %0d", count, m_count));
    check(act_valid == exp_act, "act_valid");
    if (exp_act) begin
      check(act_pkt.mu_addr == c.pc_src, "MU_addr");
      check(act_pkt.mu_data == c.pc_dst, "MU_data = pc_dst");
      check(act_pkt.mu_id == 8'd5, "MU_id");
      act_ack = 1;
      @(negedge clk);
      act_ack = 0;
      check(!act_valid, "ack clears");
    end
  endtask

  commit_log_t c;
  int acts;

  initial begin
    commit_fire = 0; commit = '0; cur_pid = 0; cfg_we = 0; cfg_op = MUCFG_MATCH;
    cfg_field = FLD_INST; cfg_wdata = 0; act_ack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Pattern: JAL/JALR-like inst with rd = ra, pc_src in a 4 KiB page, addr low
    // byte 0x40, process 7.
    m_inst = 32'h0000_00ef; k_inst = 32'hffff_f000;
    m_src = 64'h0000_0000_8000_1000; k_src = 64'h0000_0000_0000_0fff;
    m_addr = 64'h40; k_addr = 64'hffff_ffff_ffff_ff00;
    m_pid = 7;
    cfg(MUCFG_MATCH, FLD_INST, 64'(m_inst));
    cfg(MUCFG_MASK, FLD_INST, 64'(k_inst));
    cfg(MUCFG_MATCH, FLD_PC_SRC, m_src);
    cfg(MUCFG_MASK, FLD_PC_SRC, k_src);
    cfg(MUCFG_MATCH, FLD_ADDR, m_addr);
    cfg(MUCFG_MASK, FLD_ADDR, k_addr);
    cfg(MUCFG_PID, FLD_INST, 64'(m_pid));  // pid_any = 0
    cfg(MUCFG_DSEL, FLD_INST, 64'(FLD_PC_DST));
    m_thresh = 3;
    cfg(MUCFG_THRESH, FLD_INST, m_thresh);
    m_count = 0;
    // Disabled: nothing counts.
    c = '0; c.inst = 32'h1234_50ef; c.pc_src = 64'h8000_1abc; c.addr = 64'h1240;
    send(c, 7, 0);
    cfg(MUCFG_ENABLE, FLD_INST, 0);
    check(enabled, "enabled");
    acts = 0;
    for (int i = 0; i < 400; i++) begin
      c.inst   = $urandom;
      c.pc_src = {$urandom, $urandom};
      c.pc_dst = {$urandom, $urandom};
      c.addr   = {$urandom, $urandom};
      c.data   = {$urandom, $urandom};
      if ($urandom_range(0, 1) == 1) begin
        c.inst   = (c.inst & k_inst) | m_inst;
        c.pc_src = (c.pc_src & k_src) | m_src;
        c.addr   = (c.addr & k_addr) | m_addr;
        if ($urandom_range(0, 7) == 0) c.inst[0] = 1'b0;  // near miss
      end
      if (m_count + 1 == m_thresh && ref_match(c, (i % 5 == 0) ? 3 : 7)) acts++;
      send(c, (i % 5 == 0) ? 3 : 7, 1);
    end
    check(acts > 5, "several activations seen");
    // Counter write and reset.
    cfg(MUCFG_COUNT, FLD_INST, 64'd2); m_count = 2;
    check(count == 2, "wr_count");
    c.inst = m_inst; c.pc_src = m_src; c.addr = m_addr;
    send(c, 7, 1);  // reaches threshold 3
    cfg(MUCFG_COUNT, FLD_INST, 64'd1);
    cfg(MUCFG_RESET, FLD_INST, 0); m_count = 0;
    check(count == 0, "reset count");
    // Threshold 0: counts, never activates.
    cfg(MUCFG_THRESH, FLD_INST, 0); m_thresh = 0;
    for (int i = 0; i < 5; i++) send(c, 7, 1);
    check(count == 5, "threshold 0 counts");
    // Disable.
    cfg(MUCFG_DISABLE, FLD_INST, 0);
    send(c, 7, 0);
    check(count == 5, "disabled holds count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
