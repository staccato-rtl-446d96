// tb_stac_sv_queue: checks the 8-entry SV Queue against a queue model: tail
// reads return and remove the oldest value, head reads return the newest
// and remove nothing, a full queue accepts a push in the cycle of a tail
// read, and a full queue sustains one tail read per cycle.
module tb_stac_sv_queue;
  import staccato_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       push_valid = 1'b0, rd_valid = 1'b0;
  sv_t        push_data = '0;
  rd_end_e    rd_end = END_TAIL;
  logic       push_ready, rd_ready;
  sv_t        rd_data;
  logic [3:0] count;
  int         checks = 0, failures = 0;
  int         fulls = 0, heads = 0, both = 0;
  sv_t        model[$];

  stac_sv_queue #(.DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cycle();
    logic pop;
    #1;
    pop = rd_valid && (rd_end == END_TAIL) && model.size() > 0;
    expect_eq("count", 32'(count), 32'(model.size()));
    expect_eq("rd_ready", 32'(rd_ready), 32'(model.size() > 0));
    expect_eq("push_ready", 32'(push_ready), 32'(model.size() < 8 || pop));
    if (rd_valid && model.size() > 0) begin
      if (rd_end == END_HEAD) begin
        expect_eq("head", rd_data, model[$]);
        heads++;
      end else begin
        expect_eq("tail", rd_data, model[0]);
      end
    end
    if (model.size() == 8) fulls++;
    if (model.size() == 8 && pop && push_valid) both++;
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (push_valid && push_ready) model.push_back(push_data);
    @(negedge clk);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      push_valid = ($urandom_range(0, 3) != 0);
      push_data  = $urandom;
      rd_valid   = ($urandom_range(0, 2) == 0);
      rd_end     = rd_end_e'($urandom_range(0, 1));
      cycle();
    end
    // fill, then stream: one tail read per cycle with no stall
    rd_valid = 1'b0; push_valid = 1'b1;
    repeat (10) begin push_data = $urandom; cycle(); end
    rd_valid = 1'b1; rd_end = END_TAIL;
    for (int i = 0; i < 50; i++) begin
      push_data = $urandom;
      #1;
      checks++;
      if (!(rd_ready && push_ready)) begin
        failures++;
        $display("FAIL stream stalled i=%0d rd_ready=%b push_ready=%b count=%0d", i, rd_ready, push_ready, count);
      end
      cycle();
    end
    checks++;
    if (fulls == 0 || heads == 0 || both == 0) begin
      failures++;
      $display("FAIL coverage fulls=%0d heads=%0d both=%0d", fulls, heads, both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
