// tb_bdr_inj_fifo -- randomized check of the injection queue against a
// queue model: order, head flit, full/empty back-pressure, level, and the
// one-clock minimum from push to pop.
module tb_bdr_inj_fifo;
  import bdr_pkg::*;
  localparam int DEPTH = 8;

  logic  clk = 0, rst_n = 0;
  logic  push_valid = 0, push_ready, pop_ready = 0;
  flit_t push_flit = '0, pop_flit;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0, cycles = 0;
  flit_t model[$];

  bdr_inj_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  initial begin
    bit acc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      cycles++;
      // Outputs against the model.
      check(push_ready == (model.size() < DEPTH), "push_ready");
      check(level == ($clog2(DEPTH)+1)'(model.size()), "level");
      check(pop_flit.valid == (model.size() > 0), "head valid");
      if (model.size() > 0) check(pop_flit.data == model[0].data && pop_flit.dst_x == model[0].dst_x, "head flit");
      // New stimulus; phases bias towards filling or draining.
      push_valid = ($urandom_range(99) < ((t / 500) % 2 ? 30 : 75));
      push_flit = '0;
      push_flit.valid = 1'b1;
      push_flit.data = $urandom;
      push_flit.dst_x = COORD_W'($urandom);
      pop_ready = (model.size() > 0) && ($urandom_range(99) < ((t / 500) % 2 ? 75 : 30));
      #1;
      acc = push_valid && push_ready;
      @(posedge clk);
      if (pop_ready) void'(model.pop_front());
      if (acc) model.push_back(push_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
