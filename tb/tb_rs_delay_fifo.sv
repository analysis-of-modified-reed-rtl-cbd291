// tb_rs_delay_fifo -- random push/pop traffic against a queue model: data
// order, level, empty and full, including filling the buffer completely and
// draining it, and simultaneous push and pop.
module tb_rs_delay_fifo;
  import rs_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, empty, full;
  sym_t wdata = '0, rdata;
  logic [$clog2(DEPTH):0] level;
  sym_t model [$];
  int checks = 0, failures = 0, fulls = 0;

  rs_delay_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int push_pct, input int pop_pct);
    @(negedge clk);
    check(int'(level) == model.size(), $sformatf("level %0d, model %0d", level, model.size()));
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == DEPTH), "full");
    if (full) fulls++;
    push  = ($urandom_range(99, 0) < push_pct) && (!full || pop);
    pop   = ($urandom_range(99, 0) < pop_pct) && !empty;
    push  = push && (!full || pop);
    wdata = sym_t'($urandom);
    if (pop) check(rdata == model[0], $sformatf("rdata %0d, expected %0d", rdata, model[0]));
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (push) model.push_back(wdata);
    #1;
    push = 0;
    pop = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) step(60, 40);
    for (int i = 0; i < 200; i++) step(100, 0);
    for (int i = 0; i < 200; i++) step(0, 100);
    for (int i = 0; i < 3000; i++) step(50, 50);
    for (int i = 0; i < 500; i++) step(100, 100);
    check(fulls > 0, "buffer filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
