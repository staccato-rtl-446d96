// tb_stac_seed_queue: drives random pushes and pops into the 2-entry Seed
// Queue and compares order, full/empty flags and count with a queue model.
module tb_stac_seed_queue;
  import staccato_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       push_valid = 1'b0, pop_ready = 1'b0;
  sv_t        push_data = '0;
  logic       push_ready, pop_valid;
  sv_t        pop_data;
  logic [1:0] count;
  int         checks = 0, failures = 0;
  sv_t        model[$];

  stac_seed_queue #(.DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fulls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      push_valid = ($urandom_range(0, 2) != 0);
      push_data  = $urandom;
      pop_ready  = ($urandom_range(0, 2) == 0);
      #1;
      expect_eq("count", 32'(count), 32'(model.size()));
      expect_eq("push_ready", 32'(push_ready), 32'(model.size() < 2));
      expect_eq("pop_valid", 32'(pop_valid), 32'(model.size() > 0));
      if (model.size() > 0) expect_eq("pop_data", pop_data, model[0]);
      if (model.size() == 2) fulls++;
      @(posedge clk);
      if (pop_ready && model.size() > 0) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_data);
    end
    checks++;
    if (fulls == 0) begin
      failures++;
      $display("FAIL queue never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
