// tb_nile_top: end-to-end test of the Nile coprocessor at its default sizes.
//
// A trace generator stands in for the core: it emits the commit log of a
// synthetic program (ALU operations, loads and stores, branches, calls with
// jal ra and returns with jalr x0, 0(ra)) and honours commit_ready. A
// behavioural data cache answers the memory port. The operating system is
// played by tasks that issue RoCC commands in supervisor mode; the monitored
// program issues the user-level ones.
//
// Nile is programmed as in the shadow-stack use case: MU 0 matches calls and
// pushes their pc_src, MU 1 matches rets and checks pc_dst - popped == 4;
// MU 2 guards the shadow-stack page itself with an interrupt; MU 3 counts
// branches as a plain event counter. Phases:
//   1  normal run of process 7: no interrupt, pushes/pops as predicted,
//      shadow-stack offset equal to call depth * 8, branch count exact;
//   2  return-address overwrite: mismatch interrupt naming MU 1; the OS
//      handler reads the cause, clears it and "terminates" the process;
//   3  program store into the shadow-stack page: event interrupt naming
//      MU 2;
//   4  context switch to process 8: counts saved and restored, the process
//      filter keeps MU 0/1 quiet, the shadow stack is untouched;
//   5  OS-only commands from user mode are ignored;
//   6  recursion deeper than the shadow-stack region: bounds interrupt;
//   7  dense calls against a slow memory: the activation queue fills and
//      the core is stalled, no push lost.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_nile_top;
  import nile_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic commit_valid, commit_ready;
  commit_log_t commit;
  logic cmd_valid, cmd_ready, resp_valid, resp_ready;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [XLEN-1:0] mem_resp_data;
  logic interrupt, busy;
  int reads, writes;

  nile_top dut (.*);
  nile_mem_model #(.LATENCY(6), .STALL_PCT(50)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .reads, .writes);

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_stall = 0, n_qfull = 0, n_push = 0, n_pop = 0, n_mismatch = 0, n_event = 0;
  int n_bounds = 0, n_filtered = 0, n_ctxsw = 0, n_denied = 0, n_count_only = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // A single activation stalls the commit log for one cycle; in this test no
  // record activates two MUs, so a longer stall means the activation queue
  // was full.
  int stall_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (commit_valid && !commit_ready) begin
      n_stall++;
      stall_run++;
      if (stall_run == 2) n_qfull++;
    end else stall_run = 0;
  end

  // ---------------------------------------------------------------- RoCC
  task automatic rocc(nile_op_e op, logic [63:0] rs1, logic [63:0] rs2, logic sup,
                      output logic [63:0] rd);
    @(negedge clk);
    cmd = '{funct7: op, rd: 5'd10, xd: 1'b1, supervisor: sup, rs1: rs1, rs2: rs2};
    cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    rd = resp.data;
    check(resp.rd == 5'd10, "response register");
    @(posedge clk);
    @(negedge clk);
  endtask

  logic [63:0] tmp;
  task automatic os(nile_op_e op, logic [63:0] rs1, logic [63:0] rs2 = 0);
    rocc(op, rs1, rs2, 1'b1, tmp);
  endtask
  task automatic usr(nile_op_e op, logic [63:0] rs1, logic [63:0] rs2 = 0);
    rocc(op, rs1, rs2, 1'b0, tmp);
  endtask

  // -------------------------------------------------------- commit log
  task automatic retire(logic [31:0] inst, logic [63:0] pc, logic [63:0] dst,
                        logic [63:0] addr, logic [63:0] data);
    @(negedge clk);
    commit = '{inst: inst, pc_src: pc, pc_dst: dst, addr: addr, data: data};
    commit_valid = 1;
    do @(posedge clk); while (!commit_ready);
    @(negedge clk);
    commit_valid = 0;
  endtask

  // Program model: the return addresses live on the model call stack.
  logic [63:0] pc;
  logic [63:0] calls[$];
  int branches;

  localparam logic [31:0] JAL_RA   = 32'h0000_00ef;
  localparam logic [31:0] RET      = 32'h0000_8067;
  // The shadow stack lives in a 4 KiB page that MU 2 also guards against
  // ordinary loads and stores of the program.
  localparam logic [63:0] SM_BASE  = 64'h0000_0000_7fff_0000;
  localparam logic [63:0] SENS     = SM_BASE;

  task automatic do_call();
    logic [63:0] tgt;
    tgt = 64'h0001_0000 + 64'($urandom_range(0, 4095) * 4);
    retire(JAL_RA | {$urandom_range(0, 1048575), 12'h0}, pc, tgt, 64'd1, pc + 4);
    calls.push_back(pc);
    pc = tgt;
  endtask

  task automatic do_ret(logic [63:0] corrupt = 0);
    logic [63:0] back;
    back = calls.pop_back() + 4 + corrupt;
    retire(RET, pc, back, 64'd1, 64'd0);
    pc = back;
  endtask

  task automatic do_other(int kind);
    unique case (kind)
      0: begin retire(32'h0050_0513, pc, pc + 4, 64'd10, {$urandom, $urandom}); pc += 4; end
      1: begin
        logic [63:0] a;
        a = 64'h1000_0000 + 64'($urandom_range(0, 65535) * 8);
        retire($urandom_range(0, 1) ? 32'h0005_3503 : 32'h00a5_3023, pc, pc + 4, a,
               {$urandom, $urandom});
        pc += 4;
      end
      default: begin
        logic [63:0] t;
        t = $urandom_range(0, 1) ? pc + 4 : pc + 64'h40;
        retire(32'h0000_0063 | {$urandom_range(0, 33554431), 7'h0} & 32'hffff_ff80 | 32'h63,
               pc, t, 64'd0, 64'd0);
        branches++;
        pc = t;
      end
    endcase
  endtask

  // Random program of n instructions with call depth up to maxd.
  task automatic run(int n, int maxd);
    for (int i = 0; i < n; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 12 && calls.size() < maxd) do_call();
      else if (r < 24 && calls.size() > 0) do_ret();
      else do_other(r % 3);
    end
  endtask

  task automatic drain();
    while (busy || commit_valid) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  function automatic logic [63:0] cfgw(act_type_e a, addr_mode_e m, ptr_upd_e p,
                                       field_e d, int diff);
    act_cfg_t c;
    c = '{diff: 16'(diff), rsvd: 8'd0, data_sel: d, ptr_upd: p, addr_mode: m, act: a};
    return 64'(c);
  endfunction

  logic [63:0] v, saved_cnt, saved_thr, saved_off;
  int w0, r0, depth0;

  initial begin
    commit_valid = 0; commit = '0; cmd_valid = 0; cmd = '0; resp_ready = 1;
    pc = 64'h0001_0000; branches = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // OS: shared memory for process 7 (4 KiB = 512 slots), current pid.
    os(OP_WR_SM_BASE, SM_BASE);
    os(OP_WR_SM_SIZE, 64'd4096);
    os(OP_WR_SM_OFFSET, 64'd0);
    os(OP_WR_CUR_PID, 64'd7);
    // User: MU 0 = calls (jal ra), MU 1 = rets, both for pid 7 only.
    usr(OP_SET_MATCH, {53'd0, 3'(FLD_INST), 8'd0}, 64'(JAL_RA));
    usr(OP_SET_MASK,  {53'd0, 3'(FLD_INST), 8'd0}, 64'hffff_f000);
    usr(OP_SET_PID, 64'd0, 64'd7);
    usr(OP_SET_MATCH, {53'd0, 3'(FLD_INST), 8'd1}, 64'(RET));
    usr(OP_SET_MASK,  {53'd0, 3'(FLD_INST), 8'd1}, 64'd0);
    usr(OP_SET_PID, 64'd1, 64'd7);
    usr(OP_COMM, {48'd0, 8'd1, 8'd0},
        {cfgw(ACT_SM_READ_CMP, AM_PTR, PTR_PRE_DEC, FLD_PC_DST, 4)  << 32 |
         cfgw(ACT_SM_WRITE, AM_PTR, PTR_POST_INC, FLD_PC_SRC, 0)});
    // MU 2: any program access to the shadow-stack page raises an interrupt.
    usr(OP_SET_MATCH, {53'd0, 3'(FLD_ADDR), 8'd2}, SENS);
    usr(OP_SET_MASK,  {53'd0, 3'(FLD_ADDR), 8'd2}, 64'hfff);
    usr(OP_COMM, {48'd0, 8'd2, 8'd2},
        {cfgw(ACT_IRQ, AM_PTR, PTR_NONE, FLD_ADDR, 0) << 32 |
         cfgw(ACT_IRQ, AM_PTR, PTR_NONE, FLD_ADDR, 0)});
    // MU 3: branch counter (threshold 0: count only).
    usr(OP_SET_MATCH, {53'd0, 3'(FLD_INST), 8'd3}, 64'h63);
    usr(OP_SET_MASK,  {53'd0, 3'(FLD_INST), 8'd3}, 64'hffff_ff80);
    for (int i = 0; i < 4; i++) begin
      usr(OP_SET_THRESH, 64'(i), (i == 3) ? 64'd0 : 64'd1);
      usr(OP_RESET, 64'(i));
      usr(OP_ENABLE, 64'(i));
    end

    // ---- 1: normal run
    w0 = writes; r0 = reads;
    run(3000, 20);
    drain();
    n_push += writes - w0; n_pop += reads - r0;
    check(!interrupt, "no false positive on a well-behaved program");
    rocc(OP_RD_SM_OFFSET, 0, 0, 1, v);
    check(v == 64'(calls.size() * 8), "shadow-stack offset equals call depth");
    for (int i = 0; i < calls.size(); i++)
      check(mem.peek(SM_BASE + 64'(i * 8)) == calls[i], "shadow-stack contents");
    rocc(OP_RD_COUNT, 64'd3, 0, 0, v);
    check(v == 64'(branches), "branch count");
    if (v == 64'(branches) && v > 0) n_count_only++;
    rocc(OP_RD_COUNT, 64'd0, 0, 0, v);
    check(v == 0, "threshold-1 MU restarts its count");

    // ---- 2: return-address overwrite
    while (calls.size() < 3) do_call();
    do_other(0);
    do_ret(64'h1000);
    drain();
    check(interrupt, "overwrite detected");
    rocc(OP_RD_IRQ, 0, 0, 1, v);
    check(v[63] && irq_cause_e'(v[9:8]) == IRQ_MISMATCH && v[7:0] == 8'd1,
          "mismatch cause, MU 1");
    if (v[63] && irq_cause_e'(v[9:8]) == IRQ_MISMATCH) n_mismatch++;
    os(OP_CLR_IRQ, 0);
    check(!interrupt, "interrupt cleared");
    // Terminate the process: empty its stacks.
    calls.delete();
    os(OP_WR_SM_OFFSET, 64'd0);
    pc = 64'h0001_0000;

    // ---- 3: sensitive data
    run(200, 8);
    retire(32'h00a5_3023, pc, pc + 4, SENS + 64'h10, 64'h1234);
    pc += 4;
    drain();
    rocc(OP_RD_IRQ, 0, 0, 1, v);
    check(interrupt && v[63] && irq_cause_e'(v[9:8]) == IRQ_EVENT && v[7:0] == 8'd2,
          "sensitive access interrupt, MU 2");
    if (v[63] && irq_cause_e'(v[9:8]) == IRQ_EVENT) n_event++;
    os(OP_CLR_IRQ, 0);

    // ---- 4: context switch to process 8 and back
    os(OP_RD_COUNT, 64'd3);     saved_cnt = tmp;
    rocc(OP_RD_THRESH, 64'd3, 0, 1, saved_thr);
    rocc(OP_RD_SM_OFFSET, 0, 0, 1, saved_off);
    check(saved_thr == 0, "threshold save");
    os(OP_WR_COUNT, 64'd3, 64'd0);
    os(OP_WR_CUR_PID, 64'd8);
    depth0 = calls.size();
    w0 = writes; r0 = reads;
    for (int i = 0; i < 20; i++) begin do_call(); do_other(2); end
    for (int i = 0; i < 20; i++) do_ret();
    drain();
    check(writes == w0 && reads == r0, "process filter: no shadow-stack traffic for pid 8");
    if (writes == w0) n_filtered++;
    rocc(OP_RD_COUNT, 64'd3, 0, 1, v);
    check(v == 20, "branch count of process 8");
    os(OP_WR_CUR_PID, 64'd7);
    os(OP_WR_COUNT, 64'd3, saved_cnt);
    rocc(OP_RD_COUNT, 64'd3, 0, 1, v);
    rocc(OP_RD_SM_OFFSET, 0, 0, 1, tmp);
    check(v == saved_cnt && tmp == saved_off && calls.size() == depth0, "context restored");
    if (v == saved_cnt) n_ctxsw++;

    // ---- 5: OS-only command from user mode
    usr(OP_WR_SM_BASE, 64'hdead_0000);
    check(tmp == 0, "denied command answers 0");
    rocc(OP_RD_SM_BASE, 0, 0, 1, v);
    check(v == SM_BASE, "user cannot move the shared memory");
    rocc(OP_RD_SM_BASE, 0, 0, 0, v);
    check(v == 0, "user cannot read the base");
    if (v == 0) n_denied++;

    // ---- 6: recursion deeper than the region (8 slots)
    calls.delete();
    os(OP_WR_SM_OFFSET, 64'd0);
    os(OP_WR_SM_SIZE, 64'd64);
    for (int i = 0; i < 8; i++) do_call();
    drain();
    check(!interrupt, "8 calls fit");
    do_call();
    drain();
    rocc(OP_RD_IRQ, 0, 0, 1, v);
    check(interrupt && irq_cause_e'(v[9:8]) == IRQ_BOUNDS && v[7:0] == 8'd0,
          "shadow-stack overflow interrupt");
    if (irq_cause_e'(v[9:8]) == IRQ_BOUNDS) n_bounds++;
    os(OP_CLR_IRQ, 0);

    // ---- 7: dense calls against a slow memory
    calls.delete();
    os(OP_WR_SM_OFFSET, 64'd0);
    os(OP_WR_SM_SIZE, 64'd4096);
    w0 = writes; r0 = reads;
    for (int i = 0; i < 60; i++) do_call();
    for (int i = 0; i < 60; i++) do_ret();
    drain();
    check(writes - w0 == 60 && reads - r0 == 60, "no activation lost under back-pressure");
    n_push += writes - w0; n_pop += reads - r0;
    check(!interrupt, "balanced calls and rets");
    rocc(OP_RD_SM_OFFSET, 0, 0, 1, v);
    check(v == 0, "stack empty again");

    $display("mechanisms: stall=%0d queue_full=%0d push=%0d pop=%0d mismatch=%0d event=%0d",
             n_stall, n_qfull, n_push, n_pop, n_mismatch, n_event);
    $display("            bounds=%0d pid_filter=%0d ctx_switch=%0d denied=%0d count_only=%0d",
             n_bounds, n_filtered, n_ctxsw, n_denied, n_count_only);
    check(n_stall > 0, "commit stall happened");
    check(n_qfull > 0, "activation queue full happened");
    check(n_push > 0 && n_pop > 0, "shadow-stack push and pop happened");
    check(n_mismatch > 0, "mismatch interrupt happened");
    check(n_event > 0, "event interrupt happened");
    check(n_bounds > 0, "bounds interrupt happened");
    check(n_filtered > 0, "process filter happened");
    check(n_ctxsw > 0, "context switch happened");
    check(n_denied > 0, "privilege denial happened");
    check(n_count_only > 0, "count-only MU happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
