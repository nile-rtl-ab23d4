// nile_mu_array: the Match Units of Nile and the commit-log broadcast.
//
// The commit log is broadcast to NUM_MU Match Units. Each MU holds at most
// one pending activation packet; a fixed-priority selector (lowest MU id
// first) forwards one pending packet per cycle to the Action Unit's
// activation queue. The commit log is accepted (commit_ready) only while no
// MU holds a pending packet, so packets enter the queue in program order and
// none is lost: when several MUs fire on one record, or the queue is full,
// the core's write-back is stalled until the packets have moved on.
//
// Interface: commit_valid/commit_ready/commit from the core; per-MU
// configuration strobes mu_cfg_we[i] with shared op/field/data from the
// command decoder; counts/threshs back for reads; act_valid/act_ready/act_pkt
// towards the activation queue.
//
// Timing: a record accepted in cycle t makes its packet(s) pending in t+1;
// each one leaves in the first cycle the queue is ready for it.
//
// Follows the published Nile design: one commit log broadcast to all MUs, packets to the
// activation queue. Own choices: the pending slots, the fixed priority and
// the stall (back-pressure) on the commit log, which the published design does not
// describe; NUM_MU, which it does not give (the shadow stack uses two MUs).
module nile_mu_array
  import nile_pkg::*;
#(
  parameter int unsigned NUM_MU = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     commit_valid,
  output logic                     commit_ready,
  input  commit_log_t              commit,
  input  logic [PID_W-1:0]         cur_pid,
  input  logic [NUM_MU-1:0]        mu_cfg_we,
  input  mu_cfg_op_e               cfg_op,
  input  field_e                   cfg_field,
  input  logic [XLEN-1:0]          cfg_wdata,
  output logic [NUM_MU-1:0][XLEN-1:0] counts,
  output logic [NUM_MU-1:0][XLEN-1:0] threshs,
  output logic [NUM_MU-1:0]        enables,
  output logic                     act_valid,
  input  logic                     act_ready,
  output act_pkt_t                 act_pkt,
  output logic [NUM_MU-1:0]        pending
);

  act_pkt_t [NUM_MU-1:0] pkts;
  logic [NUM_MU-1:0]     ack;
  logic                  commit_fire;

  assign commit_ready = ~|pending;
  assign commit_fire  = commit_valid && commit_ready;

  for (genvar i = 0; i < NUM_MU; i++) begin : g_mu
    nile_match_unit #(.MU_ID(MU_ID_W'(i))) u_mu (
      .clk, .rst_n,
      .commit_fire,
      .commit,
      .cur_pid,
      .cfg_we    (mu_cfg_we[i]),
      .cfg_op,
      .cfg_field,
      .cfg_wdata,
      .count     (counts[i]),
      .thresh    (threshs[i]),
      .enabled   (enables[i]),
      .act_valid (pending[i]),
      .act_pkt   (pkts[i]),
      .act_ack   (ack[i])
    );
  end

  // Lowest pending MU id wins.
  always_comb begin
    act_valid = 1'b0;
    act_pkt   = pkts[0];
    ack       = '0;
    for (int i = NUM_MU - 1; i >= 0; i--) begin
      if (pending[i]) begin
        act_valid = 1'b1;
        act_pkt   = pkts[i];
      end
    end
    for (int i = 0; i < NUM_MU; i++) begin
      if (pending[i] && (pending & ((NUM_MU'(1) << i) - 1'b1)) == '0)
        ack[i] = act_ready;
    end
  end

endmodule
