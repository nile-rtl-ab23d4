// tb_nile_act_queue: self-checking test of the activation queue.
//
// Random pushes and pops against a SystemVerilog queue as reference. Checks
// order and contents, full (in_ready low at DEPTH entries), empty, the level
// output, and simultaneous push and pop.
module tb_nile_act_queue;
  import nile_pkg::*;

  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  act_pkt_t in_pkt, out_pkt;
  logic [$clog2(D+1)-1:0] level;

  int checks = 0, failures = 0;
  act_pkt_t model[$];
  int fulls = 0, both = 0;

  nile_act_queue #(.DEPTH(D)) dut (.*);

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
    in_valid = 0; out_ready = 0; in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(level == model.size(), "level");
      check(in_ready == (model.size() < D), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      if (model.size() > 0) check(out_pkt == model[0], "head");
      in_valid  = (n % 600 < 300) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      out_ready = (n % 600 < 300) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      in_pkt = {$urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (model.size() == D) fulls++;
      if (in_valid && in_ready && out_valid && out_ready) both++;
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_pkt);
    end
    check(fulls > 0, "queue filled");
    check(both > 0, "push and pop together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
