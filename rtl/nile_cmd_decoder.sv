// nile_cmd_decoder: RoCC command interface of Nile.
//
// Decodes the custom instructions that implement the Nile software interface
// (funct7 = nile_op_e) and turns them into configuration writes to one MU,
// writes to the Action Unit storage, and register reads answered on the
// response channel. Operand use:
//   per-MU ops     rs1[7:0] = MU_id; SET_MATCH/SET_MASK: rs1[10:8] = entry
//                  (field_e), rs2 = value or mask; SET_PID: rs2[31:0] = pid,
//                  rs2[32] = match all processes; SET_THRESH/WR_COUNT: rs2.
//   COMM           rs1[7:0] = MU_id1, rs1[15:8] = MU_id2,
//                  rs2[31:0] = act_cfg_t of MU 1, rs2[63:32] = of MU 2.
//   WR_SM_*        rs1 = value;  WR_CUR_PID: rs1[31:0].
//   RD_IRQ         returns {pending, 53'b0, cause[1:0], MU_id[7:0]}.
// Operations that the API reserves to the OS (wr_count, the shared-memory
// registers, and the context-switch and interrupt helpers) are ignored when
// issued from user mode (cmd.supervisor low); a response is still returned,
// with data 0. An MU id beyond NUM_MU is ignored and reads as 0.
//
// Timing: one command per cycle, except COMM, which writes its second MU in
// the following cycle (cmd_ready low for that cycle). A command with xd set
// gets its response in the next cycle; cmd_ready stays low while a response
// waits for resp_ready.
//
// Follows the published Nile design: the API function list with its User/OS
// accessibility, and the OS reading counts and thresholds at a context
// switch.
// Own choices: the opcode numbers, operand packing, the current-process
// register, the interrupt status/clear operations and the response timing.
module nile_cmd_decoder
  import nile_pkg::*;
#(
  parameter int unsigned NUM_MU = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  rocc_cmd_t       cmd,
  output logic            resp_valid,
  input  logic            resp_ready,
  output rocc_resp_t      resp,
  // Match Units
  output logic [NUM_MU-1:0] mu_cfg_we,
  output mu_cfg_op_e      mu_cfg_op,
  output field_e          mu_cfg_field,
  output logic [XLEN-1:0] mu_cfg_wdata,
  input  logic [NUM_MU-1:0][XLEN-1:0] counts,
  input  logic [NUM_MU-1:0][XLEN-1:0] threshs,
  output logic [PID_W-1:0] cur_pid,
  // Action Unit storage and interrupt
  output logic            st_we,
  output st_sel_e         st_sel,
  output logic [MU_ID_W-1:0] st_idx,
  output logic [XLEN-1:0] st_wdata,
  input  logic [XLEN-1:0] sm_base,
  input  logic [XLEN-1:0] sm_offset,
  input  logic [XLEN-1:0] sm_size,
  input  logic            irq_pending,
  input  irq_cause_e      irq_cause,
  input  logic [MU_ID_W-1:0] irq_mu,
  output logic            irq_clr
);

  logic               comm2_q;   // second half of a COMM pending
  logic [MU_ID_W-1:0] comm2_id_q;
  logic [31:0]        comm2_cfg_q;

  logic fire, allowed, os_only;
  nile_op_e op;
  logic [MU_ID_W-1:0] id;
  logic [XLEN-1:0] rdata;
  act_cfg_t comm1_cfg, comm2_cfg;

  assign comm1_cfg = act_cfg_t'(cmd.rs2[31:0]);
  assign comm2_cfg = act_cfg_t'(comm2_cfg_q);

  assign cmd_ready = !comm2_q && (!resp_valid || resp_ready);
  assign fire      = cmd_valid && cmd_ready;
  assign op        = nile_op_e'(cmd.funct7);
  assign id        = cmd.rs1[MU_ID_W-1:0];

  always_comb begin
    unique case (op)
      OP_WR_COUNT, OP_WR_SM_BASE, OP_WR_SM_OFFSET, OP_WR_SM_SIZE,
      OP_RD_SM_BASE, OP_RD_SM_OFFSET, OP_RD_SM_SIZE, OP_RD_THRESH,
      OP_WR_CUR_PID, OP_RD_IRQ, OP_CLR_IRQ: os_only = 1'b1;
      default: os_only = 1'b0;
    endcase
    allowed = fire && (cmd.supervisor || !os_only);
  end

  // Configuration writes.
  always_comb begin
    mu_cfg_we    = '0;
    mu_cfg_op    = MUCFG_MATCH;
    mu_cfg_field = field_e'(cmd.rs1[10:8]);
    mu_cfg_wdata = cmd.rs2;
    st_we        = 1'b0;
    st_sel       = ST_BASE;
    st_idx       = '0;
    st_wdata     = cmd.rs1;
    irq_clr      = 1'b0;
    if (comm2_q) begin
      for (int i = 0; i < NUM_MU; i++) mu_cfg_we[i] = MU_ID_W'(i) == comm2_id_q;
      mu_cfg_op    = MUCFG_DSEL;
      mu_cfg_wdata = XLEN'(comm2_cfg.data_sel);
      st_we        = 1'b1;
      st_sel       = ST_CFG;
      st_idx       = comm2_id_q;
      st_wdata     = XLEN'(comm2_cfg_q);
    end else if (allowed) begin
      unique case (op)
        OP_SET_MATCH:  mu_cfg_op = MUCFG_MATCH;
        OP_SET_MASK:   mu_cfg_op = MUCFG_MASK;
        OP_SET_PID:    mu_cfg_op = MUCFG_PID;
        OP_COMM: begin
          mu_cfg_op    = MUCFG_DSEL;
          mu_cfg_wdata = XLEN'(comm1_cfg.data_sel);
          st_sel       = ST_CFG;
          st_idx       = id;
          st_wdata     = XLEN'(cmd.rs2[31:0]);
        end
        OP_RESET:      mu_cfg_op = MUCFG_RESET;
        OP_ENABLE:     mu_cfg_op = MUCFG_ENABLE;
        OP_DISABLE:    mu_cfg_op = MUCFG_DISABLE;
        OP_SET_THRESH: mu_cfg_op = MUCFG_THRESH;
        OP_WR_COUNT:   mu_cfg_op = MUCFG_COUNT;
        OP_WR_SM_BASE:   st_sel = ST_BASE;
        OP_WR_SM_OFFSET: st_sel = ST_OFFSET;
        OP_WR_SM_SIZE:   st_sel = ST_SIZE;
        default: ;
      endcase
      unique case (op)
        OP_SET_MATCH, OP_SET_MASK, OP_SET_PID, OP_RESET, OP_ENABLE,
        OP_DISABLE, OP_SET_THRESH, OP_WR_COUNT:
          for (int i = 0; i < NUM_MU; i++) mu_cfg_we[i] = MU_ID_W'(i) == id;
        OP_COMM: begin
          for (int i = 0; i < NUM_MU; i++) mu_cfg_we[i] = MU_ID_W'(i) == id;
          st_we = 1'b1;
        end
        OP_WR_SM_BASE, OP_WR_SM_OFFSET, OP_WR_SM_SIZE: st_we = 1'b1;
        OP_CLR_IRQ: irq_clr = 1'b1;
        default: ;
      endcase
    end
  end

  // Read data.
  always_comb begin
    rdata = '0;
    if (allowed) begin
      unique case (op)
        OP_RD_COUNT:
          for (int i = 0; i < NUM_MU; i++) if (MU_ID_W'(i) == id) rdata = counts[i];
        OP_RD_THRESH:
          for (int i = 0; i < NUM_MU; i++) if (MU_ID_W'(i) == id) rdata = threshs[i];
        OP_RD_SM_BASE:   rdata = sm_base;
        OP_RD_SM_OFFSET: rdata = sm_offset;
        OP_RD_SM_SIZE:   rdata = sm_size;
        OP_RD_IRQ:       rdata = {irq_pending, 53'b0, irq_cause, irq_mu};
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comm2_q     <= 1'b0;
      comm2_id_q  <= '0;
      comm2_cfg_q <= '0;
      cur_pid     <= '0;
      resp_valid  <= 1'b0;
      resp        <= '0;
    end else begin
      comm2_q <= allowed && op == OP_COMM;
      if (allowed && op == OP_COMM) begin
        comm2_id_q  <= cmd.rs1[2*MU_ID_W-1:MU_ID_W];
        comm2_cfg_q <= cmd.rs2[63:32];
      end
      if (allowed && op == OP_WR_CUR_PID) cur_pid <= cmd.rs1[PID_W-1:0];
      if (fire && cmd.xd) begin
        resp_valid <= 1'b1;
        resp.rd    <= cmd.rd;
        resp.data  <= rdata;
      end else if (resp_ready) begin
        resp_valid <= 1'b0;
      end
    end
  end

endmodule
