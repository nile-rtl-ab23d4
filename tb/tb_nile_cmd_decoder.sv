// tb_nile_cmd_decoder: self-checking test of the RoCC command decoder.
//
// Random commands (all operations, unknown codes, user and supervisor mode,
// valid and out-of-range MU ids, with and without a response) are issued
// while the register inputs hold random values. A reference decoder in the
// testbench predicts the MU configuration strobe, the storage write, the
// interrupt clear, the current-process register and the response data. The
// second cycle of COMM, the refusal of OS-only operations in user mode and
// the response back-pressure are checked too.
module tb_nile_cmd_decoder;
  import nile_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, resp_valid, resp_ready;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic [N-1:0] mu_cfg_we;
  mu_cfg_op_e mu_cfg_op;
  field_e mu_cfg_field;
  logic [XLEN-1:0] mu_cfg_wdata;
  logic [N-1:0][XLEN-1:0] counts, threshs;
  logic [PID_W-1:0] cur_pid;
  logic st_we;
  st_sel_e st_sel;
  logic [MU_ID_W-1:0] st_idx;
  logic [XLEN-1:0] st_wdata, sm_base, sm_offset, sm_size;
  logic irq_pending, irq_clr;
  irq_cause_e irq_cause;
  logic [MU_ID_W-1:0] irq_mu;

  int checks = 0, failures = 0, denied = 0, comms = 0, waits = 0;

  nile_cmd_decoder #(.NUM_MU(N)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (op %0d)", what, cmd.funct7); end
  endtask

  function automatic logic is_os(int op);
    return op inside {9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19};
  endfunction

  logic [31:0] m_pid;

  initial begin
    cmd_valid = 0; cmd = '0; resp_ready = 1;
    counts = '0; threshs = '0; sm_base = 0; sm_offset = 0; sm_size = 0;
    irq_pending = 0; irq_cause = IRQ_NONE; irq_mu = 0;
    m_pid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int op, id;
      logic ok, idok, sup, waited;
      logic [63:0] exp_rd;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        counts[i] = {$urandom, $urandom}; threshs[i] = {$urandom, $urandom};
      end
      sm_base = {$urandom, $urandom}; sm_offset = {$urandom, $urandom};
      sm_size = {$urandom, $urandom};
      irq_pending = $urandom_range(0, 1); irq_cause = irq_cause_e'($urandom_range(0, 3));
      irq_mu = 8'($urandom_range(0, 3));
      op = $urandom_range(0, 21);
      id = $urandom_range(0, N + 1);
      sup = $urandom_range(0, 1);
      cmd.funct7 = 7'(op); cmd.rd = 5'($urandom); cmd.xd = $urandom_range(0, 1);
      cmd.supervisor = sup;
      cmd.rs1 = {$urandom, $urandom};
      cmd.rs1[7:0] = 8'(id);
      cmd.rs1[15:8] = 8'($urandom_range(0, N + 1));
      cmd.rs1[10:8] = 3'($urandom_range(0, 4));
      cmd.rs2 = {$urandom, $urandom};
      cmd.rs2[7:5] = 3'($urandom_range(0, 4));
      cmd.rs2[39:37] = 3'($urandom_range(0, 4));
      cmd_valid = 1;
      #1;
      check(cmd_ready, "ready");
      ok = sup || !is_os(op);
      idok = id < N;
      if (!ok) denied++;
      // Expected strobes in the accepting cycle.
      if (ok && op inside {0, 1, 2, 3, 4, 5, 6, 7, 9} && idok) begin
        logic [N-1:0] m;
        m = '0; m[id] = 1;
        check(mu_cfg_we == m, "mu strobe");
      end else check(mu_cfg_we == '0, "no mu strobe");
      if (ok) unique case (op)
        0: check(mu_cfg_op == MUCFG_MATCH && mu_cfg_field == field_e'(cmd.rs1[10:8])
                 && mu_cfg_wdata == cmd.rs2, "set match");
        1: check(mu_cfg_op == MUCFG_MASK && mu_cfg_wdata == cmd.rs2, "set mask");
        2: check(mu_cfg_op == MUCFG_PID && mu_cfg_wdata == cmd.rs2, "set pid");
        3: check(mu_cfg_op == MUCFG_DSEL && 3'(mu_cfg_wdata) == cmd.rs2[7:5]
                 && st_we && st_sel == ST_CFG && st_idx == 8'(id)
                 && st_wdata == 64'(cmd.rs2[31:0]), "comm first");
        4: check(mu_cfg_op == MUCFG_RESET, "reset");
        5: check(mu_cfg_op == MUCFG_ENABLE, "enable");
        6: check(mu_cfg_op == MUCFG_DISABLE, "disable");
        7: check(mu_cfg_op == MUCFG_THRESH && mu_cfg_wdata == cmd.rs2, "thresh");
        9: check(mu_cfg_op == MUCFG_COUNT && mu_cfg_wdata == cmd.rs2, "wr count");
        10: check(st_we && st_sel == ST_BASE && st_wdata == cmd.rs1, "wr base");
        11: check(st_we && st_sel == ST_OFFSET && st_wdata == cmd.rs1, "wr offset");
        12: check(st_we && st_sel == ST_SIZE && st_wdata == cmd.rs1, "wr size");
        default: ;
      endcase
      if (!(ok && op inside {3, 10, 11, 12})) check(!st_we, "no storage write");
      check(irq_clr == (ok && op == 19), "irq clear");
      exp_rd = 0;
      if (ok) unique case (op)
        8:  exp_rd = idok ? counts[id] : 0;
        16: exp_rd = idok ? threshs[id] : 0;
        13: exp_rd = sm_base;
        14: exp_rd = sm_offset;
        15: exp_rd = sm_size;
        18: exp_rd = {irq_pending, 53'b0, irq_cause, irq_mu};
        default: ;
      endcase
      if (ok && op == 17) m_pid = cmd.rs1[31:0];
      resp_ready = $urandom_range(0, 3) != 0;
      @(posedge clk);
      @(negedge clk);
      cmd_valid = 0;
      #1;
      check(cur_pid == m_pid, "current pid");
      waited = 0;
      if (cmd.xd) begin
        check(resp_valid && resp.rd == cmd.rd && resp.data == exp_rd, "response");
        while (!resp_ready) begin
          check(!cmd_ready, "stalled behind response");
          waits++;
          waited = 1;
          @(negedge clk);
          resp_ready = 1;
          #1;
        end
      end
      if (ok && op == 3 && !waited) begin
        int id2;
        logic [N-1:0] m;
        comms++;
        id2 = cmd.rs1[15:8];
        m = '0; if (id2 < N) m[id2] = 1;
        check(!cmd_ready, "comm second cycle busy");
        check(mu_cfg_we == m && mu_cfg_op == MUCFG_DSEL && 3'(mu_cfg_wdata) == cmd.rs2[39:37]
              && st_we && st_sel == ST_CFG && st_idx == 8'(id2)
              && st_wdata == 64'(cmd.rs2[63:32]), "comm second");
        @(negedge clk);
        #1;
      end
      check(mu_cfg_we == '0 && !st_we, "idle after command");
      resp_ready = 1;
      @(negedge clk);
    end
    check(denied > 100 && comms > 50 && waits > 50, "coverage");
    $display("denied=%0d comms=%0d waits=%0d", denied, comms, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
