// nile_act_control: the control unit of the Nile Action Unit.
//
// While the activation queue is not empty the controller takes one packet,
// looks up the communication configuration of the MU that sent it and acts:
//   ACT_NONE        drop the packet (the MU only counts);
//   ACT_IRQ         raise the interrupt, cause IRQ_EVENT;
//   ACT_SM_WRITE    write MU_data to the shared memory;
//   ACT_SM_READ_CMP read a word of the shared memory and check that
//                   MU_data - word == diff (sign-extended); otherwise raise
//                   the interrupt, cause IRQ_MISMATCH.
// The shared-memory address is MU_addr (AM_MU_ADDR) or base + offset from the
// local storage (AM_PTR). With AM_PTR the offset can be post-incremented
// (push) or pre-decremented (pop) by one word, which makes the offset a stack
// pointer: one MU pushes the pc_src of each call, another pops on each ret
// and compares with the ret's pc_dst, with diff = 4. An access that would
// leave [base, base + size) is not made and raises IRQ_BOUNDS.
//
// The interrupt is a level: irq_pending stays high, with the cause and MU id
// of the first event, until irq_clr. Events while it is pending are still
// processed but do not replace the recorded cause.
//
// Timing: a packet is dequeued in the cycle it is seen (IDLE). A memory
// action then holds mem_req_valid until mem_req_ready, and a read waits for
// mem_resp_valid; the next packet is taken after that. One memory access is
// outstanding at a time.
//
// Follows the published Nile design: the two action kinds, the address taken from MU_addr
// or from local storage, the difference match. Own choices: the pointer
// update modes and word stride, the bounds check against size, the
// interrupt cause register and its clearing, and the handshake.
module nile_act_control
  import nile_pkg::*;
#(
  parameter int unsigned NUM_MU = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // activation queue
  input  logic            pkt_valid,
  output logic            pkt_ready,
  input  act_pkt_t        pkt,
  // local storage
  input  act_cfg_t [NUM_MU-1:0] cfgs,
  input  logic [XLEN-1:0] sm_base,
  input  logic [XLEN-1:0] sm_offset,
  input  logic [XLEN-1:0] sm_size,
  output logic            ptr_we,
  output logic [XLEN-1:0] ptr_wdata,
  // memory port
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output mem_req_t        mem_req,
  input  logic            mem_resp_valid,
  input  logic [XLEN-1:0] mem_resp_data,
  // interrupt
  output logic            irq_pending,
  output irq_cause_e      irq_cause,
  output logic [MU_ID_W-1:0] irq_mu,
  input  logic            irq_clr,
  output logic            busy
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RESP} state_e;

  state_e             state;
  mem_req_t           req_q;
  logic [XLEN-1:0]    cmp_data_q;
  logic signed [15:0] diff_q;
  logic [MU_ID_W-1:0] mu_q;

  // Decode of the packet at the head of the queue.
  act_cfg_t        cfg;
  logic            take;
  logic [XLEN-1:0] addr;
  logic [XLEN-1:0] new_off;
  logic            move_ptr;
  logic            in_bounds;

  always_comb begin
    cfg = '0;
    if (pkt.mu_id < MU_ID_W'(NUM_MU)) cfg = cfgs[pkt.mu_id];
    take     = state == S_IDLE && pkt_valid;
    addr     = sm_base + sm_offset;
    new_off  = sm_offset;
    move_ptr = 1'b0;
    in_bounds = 1'b1;
    if (cfg.addr_mode == AM_MU_ADDR) begin
      addr = pkt.mu_addr;
      in_bounds = pkt.mu_addr >= sm_base && sm_size >= SLOT_BYTES
                  && (pkt.mu_addr - sm_base) <= (sm_size - SLOT_BYTES);
    end else begin
      unique case (cfg.ptr_upd)
        PTR_POST_INC: begin
          in_bounds = {1'b0, sm_offset} + {1'b0, SLOT_BYTES} <= {1'b0, sm_size};
          new_off   = sm_offset + SLOT_BYTES;
          move_ptr  = 1'b1;
        end
        PTR_PRE_DEC: begin
          in_bounds = sm_offset >= SLOT_BYTES
                      && {1'b0, sm_offset} <= {1'b0, sm_size};
          new_off   = sm_offset - SLOT_BYTES;
          addr      = sm_base + new_off;
          move_ptr  = 1'b1;
        end
        default:
          in_bounds = {1'b0, sm_offset} + {1'b0, SLOT_BYTES} <= {1'b0, sm_size};
      endcase
    end
  end

  assign pkt_ready     = state == S_IDLE;
  assign mem_req_valid = state == S_REQ;
  assign mem_req       = req_q;
  assign busy          = state != S_IDLE;

  wire is_mem  = cfg.act == ACT_SM_WRITE || cfg.act == ACT_SM_READ_CMP;
  assign ptr_we    = take && is_mem && in_bounds && move_ptr;
  assign ptr_wdata = new_off;

  // Interrupt raised this cycle, if any.
  logic       raise;
  irq_cause_e raise_cause;
  logic [MU_ID_W-1:0] raise_mu;

  always_comb begin
    raise       = 1'b0;
    raise_cause = IRQ_NONE;
    raise_mu    = pkt.mu_id;
    if (take && cfg.act == ACT_IRQ) begin
      raise = 1'b1; raise_cause = IRQ_EVENT;
    end else if (take && is_mem && !in_bounds) begin
      raise = 1'b1; raise_cause = IRQ_BOUNDS;
    end else if (state == S_RESP && mem_resp_valid
                 && cmp_data_q - mem_resp_data != XLEN'(diff_q)) begin
      raise = 1'b1; raise_cause = IRQ_MISMATCH; raise_mu = mu_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      req_q      <= '0;
      cmp_data_q <= '0;
      diff_q     <= '0;
      mu_q       <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (take && is_mem && in_bounds) begin
            req_q.addr  <= addr;
            req_q.wr    <= cfg.act == ACT_SM_WRITE;
            req_q.wdata <= pkt.mu_data;
            cmp_data_q  <= pkt.mu_data;
            diff_q      <= cfg.diff;
            mu_q        <= pkt.mu_id;
            state       <= S_REQ;
          end
        S_REQ:
          if (mem_req_ready) state <= req_q.wr ? S_IDLE : S_RESP;
        S_RESP:
          if (mem_resp_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_pending <= 1'b0;
      irq_cause   <= IRQ_NONE;
      irq_mu      <= '0;
    end else if (raise && (!irq_pending || irq_clr)) begin
      irq_pending <= 1'b1;
      irq_cause   <= raise_cause;
      irq_mu      <= raise_mu;
    end else if (irq_clr) begin
      irq_pending <= 1'b0;
      irq_cause   <= IRQ_NONE;
      irq_mu      <= '0;
    end
  end

  // The memory request must stay stable until accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req));

endmodule
