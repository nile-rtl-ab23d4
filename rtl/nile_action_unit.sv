// nile_action_unit: the Nile Action Unit, made of the activation queue, the
// local storage and the control unit.
//
// Activation packets from the MUs enter the queue (act_valid/act_ready); the
// control unit dequeues them one at a time and acts on them using the per-MU
// configuration and the shared-memory registers of the local storage, through
// a one-word memory port towards the core's data cache, and by raising the
// interrupt. The command decoder writes the storage (st_*) and clears the
// interrupt. busy is high while a packet is queued or being processed.
//
// Follows the published Nile design's split into control, storage and queue.
module nile_action_unit
  import nile_pkg::*;
#(
  parameter int unsigned NUM_MU      = 4,
  parameter int unsigned QUEUE_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            act_valid,
  output logic            act_ready,
  input  act_pkt_t        act_pkt,
  input  logic            st_we,
  input  st_sel_e         st_sel,
  input  logic [MU_ID_W-1:0] st_idx,
  input  logic [XLEN-1:0] st_wdata,
  output logic [XLEN-1:0] sm_base,
  output logic [XLEN-1:0] sm_offset,
  output logic [XLEN-1:0] sm_size,
  output act_cfg_t [NUM_MU-1:0] cfgs,
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output mem_req_t        mem_req,
  input  logic            mem_resp_valid,
  input  logic [XLEN-1:0] mem_resp_data,
  output logic            irq_pending,
  output irq_cause_e      irq_cause,
  output logic [MU_ID_W-1:0] irq_mu,
  input  logic            irq_clr,
  output logic            busy
);

  logic     q_valid, q_ready;
  act_pkt_t q_pkt;
  logic [$clog2(QUEUE_DEPTH+1)-1:0] q_level;
  logic     ptr_we;
  logic [XLEN-1:0] ptr_wdata;
  logic     ctl_busy;

  nile_act_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid  (act_valid),
    .in_ready  (act_ready),
    .in_pkt    (act_pkt),
    .out_valid (q_valid),
    .out_ready (q_ready),
    .out_pkt   (q_pkt),
    .level     (q_level)
  );

  nile_act_storage #(.NUM_MU(NUM_MU)) u_storage (
    .clk, .rst_n,
    .wr_en   (st_we),
    .wr_sel  (st_sel),
    .wr_idx  (st_idx),
    .wr_data (st_wdata),
    .ptr_we, .ptr_wdata,
    .sm_base, .sm_offset, .sm_size, .cfgs
  );

  nile_act_control #(.NUM_MU(NUM_MU)) u_control (
    .clk, .rst_n,
    .pkt_valid (q_valid),
    .pkt_ready (q_ready),
    .pkt       (q_pkt),
    .cfgs, .sm_base, .sm_offset, .sm_size,
    .ptr_we, .ptr_wdata,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp_data,
    .irq_pending, .irq_cause, .irq_mu, .irq_clr,
    .busy (ctl_busy)
  );

  assign busy = ctl_busy || q_level != '0;

endmodule
