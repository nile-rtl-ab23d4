// nile_match_unit: one Match Unit (MU) of the Nile monitoring coprocessor.
//
// Every accepted commit-log record is compared with a programmed pattern. Each
// of the five entries (inst, pc_src, pc_dst, addr, data) has a match value and
// a wildcard mask; a mask bit of 1 makes that bit "don't care", so a mask of
// zero asks for an exact match (ret = inst 0x00008067, mask 0). An optional
// process filter restricts matching to one process id. On a match the event
// counter increments; when it reaches the programmed threshold the MU stores an
// activation packet {MU_addr = pc_src, MU_data = selected entry, MU_id} in a
// one-entry pending slot and the counter restarts from zero. A threshold of 0
// never activates (the MU is then a plain event counter).
//
// Interface: commit_fire qualifies commit (the array only fires when no MU
// has a pending packet, so a pending packet is never overwritten). The
// pending packet is offered on act_valid/act_pkt and is removed by act_ack.
// Configuration writes (cfg_we/cfg_op/cfg_field/cfg_wdata) come from the
// command decoder; a configuration write to the counter wins over a match in
// the same cycle.
//
// Timing: the count and the pending packet update on the clock edge that
// accepts the record; act_valid is high from the next cycle.
//
// Follows the published Nile design: entry-wise wildcard match, counter, threshold,
// packet contents, enable/disable, reset of the count. Own choices: mask
// polarity as read from the ret example, restart of the counter at the
// threshold, the 64-bit counter, the process-filter form, reset values
// (disabled, all-wildcard masks, threshold 0).
module nile_match_unit
  import nile_pkg::*;
#(
  parameter logic [MU_ID_W-1:0] MU_ID = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  // commit log
  input  logic               commit_fire,
  input  commit_log_t        commit,
  input  logic [PID_W-1:0]   cur_pid,
  // configuration
  input  logic               cfg_we,
  input  mu_cfg_op_e         cfg_op,
  input  field_e             cfg_field,
  input  logic [XLEN-1:0]    cfg_wdata,
  output logic [XLEN-1:0]    count,
  output logic [XLEN-1:0]    thresh,
  output logic               enabled,
  // activation packet
  output logic               act_valid,
  output act_pkt_t           act_pkt,
  input  logic               act_ack
);

  logic [ILEN-1:0] inst_val, inst_mask;
  logic [XLEN-1:0] src_val, src_mask, dst_val, dst_mask;
  logic [XLEN-1:0] addr_val, addr_mask, data_val, data_mask;
  logic [PID_W-1:0] pid;
  logic             pid_any;
  field_e           data_sel;

  logic match, hit, fire_act;
  logic [XLEN-1:0] sel_data;

  always_comb begin
    match = ((commit.inst   ^ inst_val) & ~inst_mask) == '0
         && ((commit.pc_src ^ src_val)  & ~src_mask)  == '0
         && ((commit.pc_dst ^ dst_val)  & ~dst_mask)  == '0
         && ((commit.addr   ^ addr_val) & ~addr_mask) == '0
         && ((commit.data   ^ data_val) & ~data_mask) == '0
         && (pid_any || pid == cur_pid);
    hit = commit_fire && enabled && match;
    fire_act = hit && thresh != '0 && count + 1'b1 == thresh;
    unique case (data_sel)
      FLD_INST:   sel_data = XLEN'(commit.inst);
      FLD_PC_SRC: sel_data = commit.pc_src;
      FLD_PC_DST: sel_data = commit.pc_dst;
      FLD_ADDR:   sel_data = commit.addr;
      FLD_DATA:   sel_data = commit.data;
      default:    sel_data = commit.data;
    endcase
  end

  // Pattern, filter and data selection.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inst_val <= '0; inst_mask <= '1;
      src_val  <= '0; src_mask  <= '1;
      dst_val  <= '0; dst_mask  <= '1;
      addr_val <= '0; addr_mask <= '1;
      data_val <= '0; data_mask <= '1;
      pid      <= '0; pid_any   <= 1'b1;
      data_sel <= FLD_PC_SRC;
      thresh   <= '0;
      enabled  <= 1'b0;
    end else if (cfg_we) begin
      unique case (cfg_op)
        MUCFG_MATCH:
          unique case (cfg_field)
            FLD_INST:   inst_val <= cfg_wdata[ILEN-1:0];
            FLD_PC_SRC: src_val  <= cfg_wdata;
            FLD_PC_DST: dst_val  <= cfg_wdata;
            FLD_ADDR:   addr_val <= cfg_wdata;
            default:    data_val <= cfg_wdata;
          endcase
        MUCFG_MASK:
          unique case (cfg_field)
            FLD_INST:   inst_mask <= cfg_wdata[ILEN-1:0];
            FLD_PC_SRC: src_mask  <= cfg_wdata;
            FLD_PC_DST: dst_mask  <= cfg_wdata;
            FLD_ADDR:   addr_mask <= cfg_wdata;
            default:    data_mask <= cfg_wdata;
          endcase
        MUCFG_PID: begin
          pid     <= cfg_wdata[PID_W-1:0];
          pid_any <= cfg_wdata[PID_W];
        end
        MUCFG_DSEL:    data_sel <= field_e'(cfg_wdata[2:0]);
        MUCFG_THRESH:  thresh   <= cfg_wdata;
        MUCFG_ENABLE:  enabled  <= 1'b1;
        MUCFG_DISABLE: enabled  <= 1'b0;
        default: ;
      endcase
    end
  end

  // Event counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (cfg_we && cfg_op == MUCFG_COUNT) begin
      count <= cfg_wdata;
    end else if (cfg_we && cfg_op == MUCFG_RESET) begin
      count <= '0;
    end else if (fire_act) begin
      count <= '0;
    end else if (hit) begin
      count <= count + 1'b1;
    end
  end

  // One-entry pending activation slot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_valid <= 1'b0;
      act_pkt   <= '0;
    end else if (fire_act) begin
      act_valid       <= 1'b1;
      act_pkt.mu_addr <= commit.pc_src;
      act_pkt.mu_data <= sel_data;
      act_pkt.mu_id   <= MU_ID;
    end else if (act_ack) begin
      act_valid <= 1'b0;
    end
  end

  // A record must not be accepted while a packet is still pending.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    !(commit_fire && act_valid && !act_ack));

endmodule
