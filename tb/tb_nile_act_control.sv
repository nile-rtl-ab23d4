// tb_nile_act_control: self-checking test of the Action Unit control.
//
// The local storage is modelled in the testbench; packets are offered one at
// a time. Covers: an interrupt action; a shadow stack (MU 0 pushes pc_src on
// calls, MU 1 pops on rets and checks pc_dst - popped == 4) over random
// nesting, with a corrupted return detected; pushes beyond size and pops
// from an empty stack (bounds interrupt, no access); writes at MU_addr inside
// and outside the region; a count-only MU. Expected memory contents, offsets
// and interrupt causes come from a reference model of the stack.
module tb_nile_act_control;
  import nile_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_ready;
  act_pkt_t pkt;
  act_cfg_t [N-1:0] cfgs;
  logic [XLEN-1:0] sm_base, sm_offset, sm_size, ptr_wdata;
  logic ptr_we;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [XLEN-1:0] mem_resp_data;
  logic irq_pending, irq_clr, busy;
  irq_cause_e irq_cause;
  logic [MU_ID_W-1:0] irq_mu;
  int reads, writes;

  int checks = 0, failures = 0;

  nile_act_control #(.NUM_MU(N)) dut (.*);
  nile_mem_model #(.LATENCY(3)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .reads, .writes);

  always_ff @(posedge clk) if (ptr_we) sm_offset <= ptr_wdata;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Offer one packet and wait until it has been fully handled.
  task automatic act(logic [7:0] id, logic [63:0] a, logic [63:0] d);
    @(negedge clk);
    pkt = '{mu_addr: a, mu_data: d, mu_id: id};
    pkt_valid = 1;
    do @(posedge clk); while (!pkt_ready);
    @(negedge clk);
    pkt_valid = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic expect_irq(logic pend, irq_cause_e c, logic [7:0] id, string what);
    check(irq_pending == pend, {what, ": irq pending"});
    if (pend) check(irq_cause == c && irq_mu == id, {what, ": irq cause/id"});
    @(negedge clk); irq_clr = 1; @(negedge clk); irq_clr = 0;
    check(!irq_pending, {what, ": cleared"});
  endtask

  localparam logic [63:0] BASE = 64'h0000_0000_7000_0000;
  localparam logic [63:0] SIZE = 64'd64;  // 8 slots
  logic [63:0] stk[$];
  int w0, r0, pushes = 0, pops = 0, mism = 0, bnds = 0;

  initial begin
    pkt_valid = 0; pkt = '0; irq_clr = 0; cfgs = '0;
    sm_base = BASE; sm_offset = 0; sm_size = SIZE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfgs[0] = '{diff: 16'sd0, rsvd: 8'd0, data_sel: FLD_PC_SRC, ptr_upd: PTR_POST_INC,
                addr_mode: AM_PTR, act: ACT_SM_WRITE};
    cfgs[1] = '{diff: 16'sd4, rsvd: 8'd0, data_sel: FLD_PC_DST, ptr_upd: PTR_PRE_DEC,
                addr_mode: AM_PTR, act: ACT_SM_READ_CMP};
    cfgs[2] = '{diff: 16'sd0, rsvd: 8'd0, data_sel: FLD_ADDR, ptr_upd: PTR_NONE,
                addr_mode: AM_PTR, act: ACT_IRQ};
    cfgs[3] = '{diff: 16'sd0, rsvd: 8'd0, data_sel: FLD_DATA, ptr_upd: PTR_NONE,
                addr_mode: AM_MU_ADDR, act: ACT_SM_WRITE};

    // Interrupt action.
    act(2, 64'h1234, 64'h5678);
    expect_irq(1, IRQ_EVENT, 2, "ACT_IRQ");

    // Shadow stack with random nesting, depth kept below 8.
    for (int n = 0; n < 300; n++) begin
      logic [63:0] pc;
      pc = {32'h0, $urandom} & ~64'h3;
      if (stk.size() < 7 && (stk.size() == 0 || $urandom_range(0, 1) == 1)) begin
        w0 = writes;
        act(0, pc, pc);
        stk.push_back(pc);
        pushes++;
        check(writes == w0 + 1, "push writes once");
        check(mem.peek(BASE + 64'((stk.size() - 1) * 8)) == pc, "pushed value in memory");
        check(sm_offset == 64'(stk.size() * 8), "offset after push");
        expect_irq(0, IRQ_NONE, 0, "push");
      end else begin
        logic [63:0] ret_to;
        logic bad;
        bad = $urandom_range(0, 9) == 0;
        ret_to = stk.pop_back() + 4 + (bad ? 64'h40 : 64'h0);
        r0 = reads;
        act(1, 64'hdead_0000, ret_to);
        pops++;
        if (bad) mism++;
        check(reads == r0 + 1, "pop reads once");
        check(sm_offset == 64'(stk.size() * 8), "offset after pop");
        expect_irq(bad, IRQ_MISMATCH, 1, "pop compare");
      end
    end
    // Drain, then pop from an empty stack: bounds.
    while (stk.size() > 0) begin
      act(1, 0, stk.pop_back() + 4);
      expect_irq(0, IRQ_NONE, 0, "drain");
    end
    r0 = reads;
    act(1, 0, 64'h4);
    bnds++;
    check(reads == r0 && sm_offset == 0, "empty pop makes no access");
    expect_irq(1, IRQ_BOUNDS, 1, "underflow");
    // Fill to size, then one more push: bounds.
    for (int i = 0; i < 8; i++) act(0, 0, 64'(i));
    w0 = writes;
    act(0, 0, 64'h99);
    bnds++;
    check(writes == w0 && sm_offset == SIZE, "full push makes no access");
    expect_irq(1, IRQ_BOUNDS, 0, "overflow");
    // Write at MU_addr: inside, last slot, outside.
    act(3, BASE + 16, 64'hAAAA);
    check(mem.peek(BASE + 16) == 64'hAAAA, "MU_addr write");
    expect_irq(0, IRQ_NONE, 0, "MU_addr in range");
    act(3, BASE + SIZE - 8, 64'hBBBB);
    check(mem.peek(BASE + SIZE - 8) == 64'hBBBB, "MU_addr last slot");
    w0 = writes;
    act(3, BASE + SIZE, 64'hCCCC);
    check(writes == w0, "MU_addr out of range not written");
    expect_irq(1, IRQ_BOUNDS, 3, "MU_addr out of range");
    // Count-only MU.
    cfgs[2].act = ACT_NONE;
    w0 = writes; r0 = reads;
    act(2, 0, 0);
    check(writes == w0 && reads == r0, "ACT_NONE no access");
    expect_irq(0, IRQ_NONE, 0, "ACT_NONE");
    // First cause kept while pending.
    cfgs[2].act = ACT_IRQ;
    act(2, 0, 0);
    act(3, 0, 0);
    check(irq_cause == IRQ_EVENT && irq_mu == 2, "first cause kept");
    expect_irq(1, IRQ_EVENT, 2, "two events");
    check(pushes > 50 && pops > 50 && mism > 0 && bnds > 0, "coverage");
    $display("pushes=%0d pops=%0d mismatches=%0d", pushes, pops, mism);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
