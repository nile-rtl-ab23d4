// tb_nile_action_unit: self-checking test of the Action Unit (queue, storage
// and control together).
//
// The storage is programmed through the st_* port as the command decoder
// would. Bursts of back-to-back activation packets arrive while the memory is
// slow, so the activation queue fills and refuses packets. A burst of 20
// shadow-stack pushes is checked against the expected memory contents and
// offset; a burst of 20 pops, one of them with a wrong return address, must
// leave the offset at zero and raise exactly one mismatch interrupt naming the
// popping MU. Storage read-back and the busy flag are checked too.
module tb_nile_action_unit;
  import nile_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic act_valid, act_ready;
  act_pkt_t act_pkt;
  logic st_we;
  st_sel_e st_sel;
  logic [MU_ID_W-1:0] st_idx;
  logic [XLEN-1:0] st_wdata, sm_base, sm_offset, sm_size;
  act_cfg_t [N-1:0] cfgs;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [XLEN-1:0] mem_resp_data;
  logic irq_pending, irq_clr, busy;
  irq_cause_e irq_cause;
  logic [MU_ID_W-1:0] irq_mu;
  int reads, writes;

  int checks = 0, failures = 0, refused = 0, irqs = 0;

  nile_action_unit #(.NUM_MU(N), .QUEUE_DEPTH(8)) dut (.*);
  nile_mem_model #(.LATENCY(4), .STALL_PCT(60)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .reads, .writes);

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

  task automatic st(st_sel_e s, logic [7:0] i, logic [63:0] d);
    @(negedge clk);
    st_we = 1; st_sel = s; st_idx = i; st_wdata = d;
    @(negedge clk);
    st_we = 0;
  endtask

  // Called at a negative edge; returns at the negative edge after acceptance
  // with act_valid still high, so bursts are back to back.
  task automatic send(logic [7:0] id, logic [63:0] d);
    act_pkt = '{mu_addr: 64'h0, mu_data: d, mu_id: id};
    act_valid = 1;
    @(posedge clk);
    while (!act_ready) begin refused++; @(posedge clk); end
    @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && irq_pending && !irq_clr) irqs <= irqs + 1;

  localparam logic [63:0] BASE = 64'h8000;
  logic [63:0] pcs[20];
  act_cfg_t c0, c1;

  initial begin
    act_valid = 0; act_pkt = '0; st_we = 0; st_sel = ST_BASE; st_idx = 0; st_wdata = 0;
    irq_clr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c0 = '{diff: 16'sd0, rsvd: 8'd0, data_sel: FLD_PC_SRC, ptr_upd: PTR_POST_INC,
           addr_mode: AM_PTR, act: ACT_SM_WRITE};
    c1 = '{diff: 16'sd4, rsvd: 8'd0, data_sel: FLD_PC_DST, ptr_upd: PTR_PRE_DEC,
           addr_mode: AM_PTR, act: ACT_SM_READ_CMP};
    st(ST_BASE, 0, BASE);
    st(ST_SIZE, 0, 64'd256);
    st(ST_OFFSET, 0, 64'd0);
    st(ST_CFG, 0, 64'(c0));
    st(ST_CFG, 1, 64'(c1));
    check(sm_base == BASE && sm_size == 256 && sm_offset == 0, "storage read-back");
    check(cfgs[0] == c0 && cfgs[1] == c1, "cfg read-back");
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      pcs[i] = 64'h1_0000 + 64'(i * 64);
      send(0, pcs[i]);
    end
    act_valid = 0;
    check(busy, "busy while draining");
    while (busy) @(negedge clk);
    check(refused > 0, "queue filled and refused packets");
    check(writes == 20, "20 writes");
    check(sm_offset == 160, "offset after pushes");
    for (int i = 0; i < 20; i++) check(mem.peek(BASE + 64'(i * 8)) == pcs[i], "stack slot");
    for (int i = 19; i >= 0; i--) send(1, pcs[i] + ((i == 14) ? 64'd8 : 64'd4));
    act_valid = 0;
    while (busy) @(negedge clk);
    check(reads == 20, "20 reads");
    check(sm_offset == 0, "offset after pops");
    check(irq_pending && irq_cause == IRQ_MISMATCH && irq_mu == 1, "mismatch interrupt");
    @(negedge clk); irq_clr = 1; @(negedge clk); irq_clr = 0;
    check(!irq_pending, "interrupt cleared");
    $display("refused=%0d", refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
