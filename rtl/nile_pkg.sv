// nile_pkg: types and constants shared by the Nile monitoring coprocessor.
//
// Nile watches the commit log of an in-order RISC-V core. The commit log has
// five entries: the undecoded instruction (32 bits), the current PC, the next
// PC, the memory/register address and the data of the instruction, the last
// four being one processor word (64 bits). Match Units (MUs) compare it with
// a wildcard pattern, count matches and, at a programmed threshold, send an
// activation packet {MU_addr, MU_data, MU_id} to the Action Unit, which raises
// an interrupt or reads/writes a shared memory region.
//
// The entry list, the packet contents and the two action kinds follow the
// published description. The custom-instruction opcode numbers, the packing of
// the per-MU action configuration word, the interrupt cause codes and the
// simplified RoCC command/response/memory structs are this design's own
// choices.
package nile_pkg;

  // Processor word length and instruction length.
  localparam int XLEN = 64;
  localparam int ILEN = 32;
  // Width of the MU identification number carried in packets and commands.
  localparam int MU_ID_W = 8;
  // Width of a process identifier used by the per-MU process filter.
  localparam int PID_W = 32;
  // Byte stride of one shared-memory (shadow stack) slot: one word.
  localparam logic [XLEN-1:0] SLOT_BYTES = XLEN'(XLEN / 8);

  // One retired instruction as seen at the write-back stage.
  typedef struct packed {
    logic [ILEN-1:0] inst;
    logic [XLEN-1:0] pc_src;
    logic [XLEN-1:0] pc_dst;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] data;
  } commit_log_t;

  // Commit-log entry selector (pattern programming and MU_data selection).
  typedef enum logic [2:0] {
    FLD_INST   = 3'd0,
    FLD_PC_SRC = 3'd1,
    FLD_PC_DST = 3'd2,
    FLD_ADDR   = 3'd3,
    FLD_DATA   = 3'd4
  } field_e;

  // Activation packet from an MU to the Action Unit.
  typedef struct packed {
    logic [XLEN-1:0]    mu_addr;  // pc_src of the matching instruction
    logic [XLEN-1:0]    mu_data;  // programmable: one commit-log entry
    logic [MU_ID_W-1:0] mu_id;
  } act_pkt_t;

  // What the Action Unit does with a packet from a given MU.
  typedef enum logic [1:0] {
    ACT_NONE        = 2'd0,  // count only, packet dropped
    ACT_IRQ         = 2'd1,  // raise an interrupt
    ACT_SM_WRITE    = 2'd2,  // write MU_data to shared memory
    ACT_SM_READ_CMP = 2'd3   // read shared memory, check MU_data - mem == diff
  } act_type_e;

  // Where the shared-memory address comes from.
  typedef enum logic {
    AM_PTR     = 1'b0,  // base + offset from the Action Unit local storage
    AM_MU_ADDR = 1'b1   // MU_addr of the packet
  } addr_mode_e;

  // How the local-storage offset moves (used with AM_PTR).
  typedef enum logic [1:0] {
    PTR_NONE     = 2'd0,
    PTR_POST_INC = 2'd1,  // use base+offset, then offset += SLOT_BYTES (push)
    PTR_PRE_DEC  = 2'd2   // offset -= SLOT_BYTES, then use base+offset (pop)
  } ptr_upd_e;

  // Per-MU communication configuration, one 32-bit word.
  typedef struct packed {
    logic signed [15:0] diff;      // expected MU_data - mem for ACT_SM_READ_CMP
    logic [7:0]         rsvd;
    field_e             data_sel;  // which entry the MU sends as MU_data
    ptr_upd_e           ptr_upd;
    addr_mode_e         addr_mode;
    act_type_e          act;
  } act_cfg_t;

  // Interrupt causes reported by the Action Unit.
  typedef enum logic [1:0] {
    IRQ_NONE     = 2'd0,
    IRQ_EVENT    = 2'd1,  // ACT_IRQ packet
    IRQ_MISMATCH = 2'd2,  // read-compare difference differs from diff
    IRQ_BOUNDS   = 2'd3   // shared-memory access outside base..base+size
  } irq_cause_e;

  // Custom instruction function codes (funct7) implementing the Nile API.
  typedef enum logic [6:0] {
    OP_SET_MATCH   = 7'd0,   // set_pattern: match value of one entry
    OP_SET_MASK    = 7'd1,   // set_pattern: wildcard mask of one entry
    OP_SET_PID     = 7'd2,   // set_pattern: process filter
    OP_COMM        = 7'd3,   // comm(MU_id1, MU_id2, *comm)
    OP_RESET       = 7'd4,
    OP_ENABLE      = 7'd5,
    OP_DISABLE     = 7'd6,
    OP_SET_THRESH  = 7'd7,
    OP_RD_COUNT    = 7'd8,
    OP_WR_COUNT    = 7'd9,
    OP_WR_SM_BASE  = 7'd10,
    OP_WR_SM_OFFSET= 7'd11,
    OP_WR_SM_SIZE  = 7'd12,
    OP_RD_SM_BASE  = 7'd13,
    OP_RD_SM_OFFSET= 7'd14,
    OP_RD_SM_SIZE  = 7'd15,
    OP_RD_THRESH   = 7'd16,  // context-switch save of the threshold
    OP_WR_CUR_PID  = 7'd17,  // OS tells Nile which process runs
    OP_RD_IRQ      = 7'd18,  // {pending, cause, MU_id} of the interrupt
    OP_CLR_IRQ     = 7'd19   // acknowledge the interrupt
  } nile_op_e;

  // Configuration operations on one MU, issued by the command decoder.
  typedef enum logic [3:0] {
    MUCFG_MATCH   = 4'd0,
    MUCFG_MASK    = 4'd1,
    MUCFG_PID     = 4'd2,
    MUCFG_DSEL    = 4'd3,
    MUCFG_THRESH  = 4'd4,
    MUCFG_COUNT   = 4'd5,
    MUCFG_RESET   = 4'd6,
    MUCFG_ENABLE  = 4'd7,
    MUCFG_DISABLE = 4'd8
  } mu_cfg_op_e;

  // Local-storage registers written by the command decoder.
  typedef enum logic [1:0] {
    ST_BASE   = 2'd0,
    ST_OFFSET = 2'd1,
    ST_SIZE   = 2'd2,
    ST_CFG    = 2'd3
  } st_sel_e;

  // RoCC command as delivered by the core (simplified).
  typedef struct packed {
    logic [6:0]      funct7;
    logic [4:0]      rd;
    logic            xd;          // the core waits for a response
    logic            supervisor;  // issued in supervisor (OS) mode
    logic [XLEN-1:0] rs1;
    logic [XLEN-1:0] rs2;
  } rocc_cmd_t;

  typedef struct packed {
    logic [4:0]      rd;
    logic [XLEN-1:0] data;
  } rocc_resp_t;

  // One-word memory request on the coprocessor's cache port.
  typedef struct packed {
    logic [XLEN-1:0] addr;
    logic            wr;
    logic [XLEN-1:0] wdata;
  } mem_req_t;

endpackage
