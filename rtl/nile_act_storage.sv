// nile_act_storage: local storage of the Nile Action Unit.
//
// Holds the shared-memory base address, offset and size that the OS writes
// for the monitored process, and one communication-configuration word per MU
// (act_cfg_t: action kind, address mode, pointer update, MU_data selection,
// expected difference). The offset acts as the shadow-stack pointer: the
// action control unit moves it with ptr_we/ptr_wdata.
//
// Interface: wr_en/wr_sel/wr_idx/wr_data from the command decoder; the
// current base/offset/size and the whole configuration table are read
// combinationally. A command write to the offset wins over a pointer update
// in the same cycle.
//
// Follows the published Nile design: base, offset and size registers of the API and a
// per-MU communication type set by comm(). Own choices: the layout of the
// configuration word and the reset values (all zero, actions off).
module nile_act_storage
  import nile_pkg::*;
#(
  parameter int unsigned NUM_MU = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  st_sel_e         wr_sel,
  input  logic [MU_ID_W-1:0] wr_idx,
  input  logic [XLEN-1:0] wr_data,
  input  logic            ptr_we,
  input  logic [XLEN-1:0] ptr_wdata,
  output logic [XLEN-1:0] sm_base,
  output logic [XLEN-1:0] sm_offset,
  output logic [XLEN-1:0] sm_size,
  output act_cfg_t [NUM_MU-1:0] cfgs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sm_base   <= '0;
      sm_offset <= '0;
      sm_size   <= '0;
      cfgs      <= '0;
    end else begin
      if (ptr_we) sm_offset <= ptr_wdata;
      if (wr_en) begin
        unique case (wr_sel)
          ST_BASE:   sm_base   <= wr_data;
          ST_OFFSET: sm_offset <= wr_data;
          ST_SIZE:   sm_size   <= wr_data;
          ST_CFG:
            if (wr_idx < MU_ID_W'(NUM_MU)) cfgs[wr_idx] <= act_cfg_t'(wr_data[31:0]);
          default: ;
        endcase
      end
    end
  end

endmodule
