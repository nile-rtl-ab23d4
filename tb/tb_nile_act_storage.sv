// tb_nile_act_storage: self-checking test of the Action Unit local storage.
//
// Random writes of base, offset, size and per-MU configuration words, and
// pointer updates from the control side, against a reference model. Checks
// that a command write to the offset wins over a pointer update and that an
// MU index beyond NUM_MU is ignored.
module tb_nile_act_storage;
  import nile_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, ptr_we;
  st_sel_e wr_sel;
  logic [MU_ID_W-1:0] wr_idx;
  logic [XLEN-1:0] wr_data, ptr_wdata, sm_base, sm_offset, sm_size;
  act_cfg_t [N-1:0] cfgs;

  int checks = 0, failures = 0;
  logic [63:0] m_base, m_off, m_size;
  logic [31:0] m_cfg [N];

  nile_act_storage #(.NUM_MU(N)) dut (.*);

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

  initial begin
    wr_en = 0; ptr_we = 0; wr_sel = ST_BASE; wr_idx = 0; wr_data = 0; ptr_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    m_base = 0; m_off = 0; m_size = 0;
    for (int i = 0; i < N; i++) m_cfg[i] = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(sm_base == m_base && sm_offset == m_off && sm_size == m_size, "registers");
      for (int i = 0; i < N; i++) check(32'(cfgs[i]) == m_cfg[i], "cfg");
      wr_en = $urandom_range(0, 1);
      wr_sel = st_sel_e'($urandom_range(0, 3));
      wr_idx = 8'($urandom_range(0, N + 1));
      wr_data = {$urandom, $urandom};
      ptr_we = $urandom_range(0, 1);
      ptr_wdata = {$urandom, $urandom};
      @(posedge clk);
      if (ptr_we) m_off = ptr_wdata;
      if (wr_en) unique case (wr_sel)
        ST_BASE: m_base = wr_data;
        ST_OFFSET: m_off = wr_data;
        ST_SIZE: m_size = wr_data;
        ST_CFG: if (wr_idx < N) m_cfg[wr_idx] = wr_data[31:0];
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
