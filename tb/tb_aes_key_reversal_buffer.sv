// tb_aes_key_reversal_buffer: self-checking testbench for the key stack.
//
// Fills the buffer with DEPTH random keys, checking count, empty and full
// as it goes, then pops them all and checks that they come back newest
// first. Also checks push and pop in the same cycle (top replaced, count
// unchanged), clear, and random push/pop sequences against a queue model.
module tb_aes_key_reversal_buffer;
  import aes_ref_pkg::*;

  localparam int unsigned DEPTH = 14;   // the buffer's default depth

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, clear, push, pop, empty, full;
  logic [127:0] wdata, top;
  logic [3:0]   count;
  logic [127:0] model [$];

  aes_key_reversal_buffer dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .push(push), .wdata(wdata), .pop(pop),
    .top(top), .count(count), .empty(empty), .full(full));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic compare_model(input string what);
    check(128'(count), 128'(model.size()), {what, ": count"});
    check(128'(empty), 128'(model.size() == 0), {what, ": empty"});
    check(128'(full),  128'(model.size() == DEPTH), {what, ": full"});
    if (model.size() > 0) check(top, model[$], {what, ": top"});
  endtask

  task automatic cycle(input logic do_push, input logic do_pop, input logic [127:0] d);
    push = do_push; pop = do_pop; wdata = d;
    @(posedge clk); #1;
    if (do_pop)  void'(model.pop_back());
    if (do_push) model.push_back(d);
    push = 1'b0; pop = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; push = 1'b0; pop = 1'b0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare_model("after reset");
    for (int i = 0; i < DEPTH; i++) begin
      cycle(1'b1, 1'b0, rand128());
      compare_model($sformatf("push %0d", i));
    end
    // replace the top while full
    cycle(1'b1, 1'b1, rand128());
    compare_model("push+pop when full");
    for (int i = 0; i < DEPTH; i++) begin
      cycle(1'b0, 1'b1, '0);
      compare_model($sformatf("pop %0d", i));
    end
    // random traffic within the legal range
    for (int n = 0; n < 500; n++) begin
      logic pu, po;
      pu = $urandom_range(0, 1) == 1 && model.size() < DEPTH;
      po = $urandom_range(0, 1) == 1 && model.size() > 0;
      cycle(pu, po, rand128());
      compare_model($sformatf("random %0d", n));
    end
    clear = 1'b1; @(posedge clk); #1 clear = 1'b0;
    model.delete();
    compare_model("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
