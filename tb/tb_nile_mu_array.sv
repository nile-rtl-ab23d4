// tb_nile_mu_array: self-checking test of the Match Unit array.
//
// Four MUs are programmed with overlapping patterns so that one record can
// activate several of them. Random records arrive with random valid gaps and
// the downstream ready toggles randomly. A reference model predicts, for each
// accepted record, which MUs activate; the packets must leave in record order
// and, within a record, in ascending MU id. Also checks that the commit log is
// stalled while a packet is pending, and the counters.
module tb_nile_mu_array;
  import nile_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic commit_valid, commit_ready;
  commit_log_t commit;
  logic [PID_W-1:0] cur_pid;
  logic [N-1:0] mu_cfg_we;
  mu_cfg_op_e cfg_op;
  field_e cfg_field;
  logic [XLEN-1:0] cfg_wdata;
  logic [N-1:0][XLEN-1:0] counts, threshs;
  logic [N-1:0] enables, pending;
  logic act_valid, act_ready;
  act_pkt_t act_pkt;

  int checks = 0, failures = 0;

  nile_mu_array #(.NUM_MU(N)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(int mu, mu_cfg_op_e op, field_e f, logic [XLEN-1:0] d);
    @(negedge clk);
    mu_cfg_we = '0; mu_cfg_we[mu] = 1; cfg_op = op; cfg_field = f; cfg_wdata = d;
    @(negedge clk);
    mu_cfg_we = '0;
  endtask

  // Reference: MU0 inst == 0x00008067, MU1 inst[6:0] == 0x67 (any JALR),
  // MU2 pc_src[63:12] == 0x80001, MU3 inst == 0x00008067 with threshold 2.
  logic [63:0] ref_cnt [N];
  logic [63:0] ref_thr [N];
  act_pkt_t exp_q[$];
  int stalls = 0, multi = 0, got = 0;

  function automatic logic [N-1:0] ref_hit(commit_log_t c);
    logic [N-1:0] h;
    h[0] = c.inst == 32'h0000_8067;
    h[1] = c.inst[6:0] == 7'h67;
    h[2] = c.pc_src[63:12] == 52'h80001;
    h[3] = c.inst == 32'h0000_8067;
    return h;
  endfunction

  // Output monitor.
  always @(posedge clk) if (rst_n && act_valid && act_ready) begin
    act_pkt_t e;
    got++;
    if (exp_q.size() == 0) check(0, "unexpected packet");
    else begin
      e = exp_q.pop_front();
      check(act_pkt == e, $sformatf("packet id %0d exp id %0d", act_pkt.mu_id, e.mu_id));
    end
  end

  // Input model.
  always @(posedge clk) if (rst_n) begin
    if (commit_valid && !commit_ready) stalls++;
    if (commit_valid && commit_ready) begin
      logic [N-1:0] h;
      int nf;
      h = ref_hit(commit);
      nf = 0;
      for (int i = 0; i < N; i++) if (h[i] && enables[i]) begin
        if (ref_cnt[i] + 1 == ref_thr[i]) begin
          act_pkt_t p;
          p.mu_addr = commit.pc_src;
          p.mu_data = (i == 1) ? commit.data : commit.pc_src;
          p.mu_id = 8'(i);
          exp_q.push_back(p);
          ref_cnt[i] = 0;
          nf++;
        end else ref_cnt[i]++;
      end
      if (nf > 1) multi++;
    end
  end

  initial begin
    commit_valid = 0; commit = '0; cur_pid = 0; mu_cfg_we = 0; cfg_op = MUCFG_MATCH;
    cfg_field = FLD_INST; cfg_wdata = 0; act_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(0, MUCFG_MATCH, FLD_INST, 64'h8067); cfg(0, MUCFG_MASK, FLD_INST, 0);
    cfg(1, MUCFG_MATCH, FLD_INST, 64'h67);   cfg(1, MUCFG_MASK, FLD_INST, 64'hffff_ff80);
    cfg(1, MUCFG_DSEL, FLD_INST, 64'(FLD_DATA));
    cfg(2, MUCFG_MATCH, FLD_PC_SRC, 64'h8000_1000); cfg(2, MUCFG_MASK, FLD_PC_SRC, 64'hfff);
    cfg(3, MUCFG_MATCH, FLD_INST, 64'h8067); cfg(3, MUCFG_MASK, FLD_INST, 0);
    for (int i = 0; i < N; i++) begin
      ref_cnt[i] = 0; ref_thr[i] = (i == 3) ? 2 : 1;
      cfg(i, MUCFG_THRESH, FLD_INST, ref_thr[i]);
      cfg(i, MUCFG_ENABLE, FLD_INST, 0);
    end
    fork
      begin
        for (int n = 0; n < 600; n++) begin
          commit_log_t c;
          int kind;
          c.inst = $urandom; c.pc_src = {$urandom, $urandom};
          c.pc_dst = {$urandom, $urandom}; c.addr = {$urandom, $urandom};
          c.data = {$urandom, $urandom};
          kind = $urandom_range(0, 3);
          unique case (kind)
            0: c.inst = 32'h0000_8067;
            1: c.inst[6:0] = 7'h67;
            2: c.pc_src = 64'h8000_1000 | 64'($urandom_range(0, 4095));
            default: ;
          endcase
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          commit = c; commit_valid = 1;
          do @(posedge clk); while (!commit_ready);
          @(negedge clk);
          commit_valid = 0;
        end
      end
      forever begin
        @(negedge clk);
        act_ready = $urandom_range(0, 2) != 0;
      end
    join_any
    act_ready = 1;
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all packets delivered");
    check(got > 100, "enough packets");
    check(stalls > 0, "commit log was stalled");
    check(multi > 0, "a record activated several MUs");
    for (int i = 0; i < N; i++) check(counts[i] == ref_cnt[i], "count");
    check(threshs[3] == 2, "threshold readback");
    $display("packets=%0d stalls=%0d multi=%0d", got, stalls, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
