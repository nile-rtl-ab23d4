// nile_top: Nile, a programmable monitoring coprocessor for an in-order
// RISC-V core, attached through a RoCC-style coprocessor port.
//
// The core exports a commit log (inst, pc_src, pc_dst, addr, data) from its
// write-back stage. Nile broadcasts each record to NUM_MU Match Units; each MU
// matches a wildcard pattern, counts matches and, at its threshold, sends an
// activation packet to the Action Unit. The Action Unit queues the packets
// and, per the sending MU's configuration, raises an interrupt or reads and
// writes a shared memory region through the core's data-cache port. Two MUs
// and the shared region programmed as a stack give a shadow stack: calls push
// their pc_src, rets pop and check pc_dst - popped == 4.
//
// Ports (all plain signals and structs from nile_pkg):
//   commit_valid/commit_ready/commit   commit log; commit_ready low stalls
//                                      the core's write-back
//   cmd_*, resp_*                      RoCC custom-instruction command and
//                                      response channels
//   mem_req_*, mem_resp_*              one-word requests to the data cache,
//                                      one outstanding
//   interrupt                          level, until cleared with OP_CLR_IRQ
//   busy                               activations still in flight
//
// Follows the published Nile design's structure. The sizes NUM_MU and
// QUEUE_DEPTH, the instruction encoding and the handshakes are this design's
// own choices; see the individual modules.
module nile_top
  import nile_pkg::*;
#(
  parameter int unsigned NUM_MU      = 4,
  parameter int unsigned QUEUE_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // commit log from the core
  input  logic            commit_valid,
  output logic            commit_ready,
  input  commit_log_t     commit,
  // RoCC command / response
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  rocc_cmd_t       cmd,
  output logic            resp_valid,
  input  logic            resp_ready,
  output rocc_resp_t      resp,
  // data-cache port
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output mem_req_t        mem_req,
  input  logic            mem_resp_valid,
  input  logic [XLEN-1:0] mem_resp_data,
  // to the core
  output logic            interrupt,
  output logic            busy
);

  logic [NUM_MU-1:0]             mu_cfg_we;
  mu_cfg_op_e                    mu_cfg_op;
  field_e                        mu_cfg_field;
  logic [XLEN-1:0]               mu_cfg_wdata;
  logic [NUM_MU-1:0][XLEN-1:0]   counts, threshs;
  logic [NUM_MU-1:0]             enables, pending;
  logic [PID_W-1:0]              cur_pid;

  logic     act_valid, act_ready;
  act_pkt_t act_pkt;

  logic               st_we;
  st_sel_e            st_sel;
  logic [MU_ID_W-1:0] st_idx;
  logic [XLEN-1:0]    st_wdata, sm_base, sm_offset, sm_size;
  act_cfg_t [NUM_MU-1:0] cfgs;

  logic               irq_pending, irq_clr, au_busy;
  irq_cause_e         irq_cause;
  logic [MU_ID_W-1:0] irq_mu;

  nile_cmd_decoder #(.NUM_MU(NUM_MU)) u_decoder (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .resp_valid, .resp_ready, .resp,
    .mu_cfg_we, .mu_cfg_op, .mu_cfg_field, .mu_cfg_wdata,
    .counts, .threshs, .cur_pid,
    .st_we, .st_sel, .st_idx, .st_wdata,
    .sm_base, .sm_offset, .sm_size,
    .irq_pending, .irq_cause, .irq_mu, .irq_clr
  );

  nile_mu_array #(.NUM_MU(NUM_MU)) u_mus (
    .clk, .rst_n,
    .commit_valid, .commit_ready, .commit, .cur_pid,
    .mu_cfg_we,
    .cfg_op    (mu_cfg_op),
    .cfg_field (mu_cfg_field),
    .cfg_wdata (mu_cfg_wdata),
    .counts, .threshs, .enables,
    .act_valid, .act_ready, .act_pkt,
    .pending
  );

  nile_action_unit #(.NUM_MU(NUM_MU), .QUEUE_DEPTH(QUEUE_DEPTH)) u_au (
    .clk, .rst_n,
    .act_valid, .act_ready, .act_pkt,
    .st_we, .st_sel, .st_idx, .st_wdata,
    .sm_base, .sm_offset, .sm_size, .cfgs,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp_data,
    .irq_pending, .irq_cause, .irq_mu, .irq_clr,
    .busy (au_busy)
  );

  assign interrupt = irq_pending;
  assign busy      = au_busy || pending != '0;

endmodule
