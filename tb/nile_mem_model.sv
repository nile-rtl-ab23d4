// nile_mem_model: behavioural model of the core's data cache as seen from the
// coprocessor memory port (testbench only, not synthesizable).
//
// Word-addressed storage in an associative array; unwritten words read 0.
// A request is accepted when req_ready is high; req_ready is withheld at
// random (STALL_PCT percent of cycles) to exercise back-pressure. A read
// returns its data on resp_valid LATENCY cycles after acceptance; only one
// request is outstanding at a time. reads/writes count accepted requests.
module nile_mem_model
  import nile_pkg::*;
#(
  parameter int LATENCY   = 2,
  parameter int STALL_PCT = 30
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  output logic            req_ready,
  input  mem_req_t        req,
  output logic            resp_valid,
  output logic [XLEN-1:0] resp_data,
  output int              reads,
  output int              writes
);

  logic [XLEN-1:0] mem [logic [XLEN-1:0]];
  int wait_cnt;
  logic busy_rd;
  logic [XLEN-1:0] rd_addr;

  function automatic logic [XLEN-1:0] peek(logic [XLEN-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(logic [XLEN-1:0] a, logic [XLEN-1:0] d);
    mem[a] = d;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready  <= 1'b0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      busy_rd    <= 1'b0;
      wait_cnt   <= 0;
      reads      <= 0;
      writes     <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        req_ready <= 1'b0;
        if (req.wr) begin
          mem[req.addr] = req.wdata;
          writes <= writes + 1;
        end else begin
          busy_rd  <= 1'b1;
          rd_addr  <= req.addr;
          wait_cnt <= LATENCY;
          reads    <= reads + 1;
        end
      end else if (busy_rd) begin
        if (wait_cnt <= 1) begin
          resp_valid <= 1'b1;
          resp_data  <= peek(rd_addr);
          busy_rd    <= 1'b0;
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end else begin
        req_ready <= $urandom_range(0, 99) >= STALL_PCT;
      end
    end
  end

endmodule
