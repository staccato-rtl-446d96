// tb_stac_taus_gen: checks the generator core against a Taus88 reference
// written in the usual shift-and-mask form:
//   b = ((s << q) ^ s) >> (32 - ... );  s = ((s & mask) << r) ^ b
// with (q, shift, mask, r) = (13,19,~1,12), (2,25,~7,4), (3,11,~15,17).
// It checks the value after reset, one new value per cycle while `step` is
// high, holding while it is low, and a reseed (S1 = seed, S2 = 8, S3 = 16)
// taking priority over a step.
module tb_stac_taus_gen;
  import staccato_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0, reseed = 1'b0;
  sv_t  seed = '0, out;
  int   checks = 0, failures = 0;

  localparam sv_t RSEED = 32'hDEAD_BEEF;

  stac_taus_gen #(.RESET_SEED(RSEED)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] r1, r2, r3;

  function automatic void ref_step();
    logic [31:0] b;
    b  = ((r1 << 13) ^ r1) >> 19;  r1 = ((r1 & 32'hFFFF_FFFE) << 12) ^ b;
    b  = ((r2 << 2)  ^ r2) >> 25;  r2 = ((r2 & 32'hFFFF_FFF8) << 4)  ^ b;
    b  = ((r3 << 3)  ^ r3) >> 11;  r3 = ((r3 & 32'hFFFF_FFF0) << 17) ^ b;
  endfunction

  task automatic check(string what);
    checks++;
    if (out !== (r1 ^ r2 ^ r3)) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, out, r1 ^ r2 ^ r3);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = RSEED; r2 = 32'd8; r3 = 32'd16;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("after reset");
    // a known first value of Taus88 from (0xDEADBEEF, 8, 16)
    checks++;
    if (out !== (32'hDEAD_BEEF ^ 32'd8 ^ 32'd16)) failures++;
    // one value per cycle
    step = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ref_step();
      check("stream");
    end
    // hold
    step = 1'b0;
    repeat (5) begin
      @(negedge clk);
      check("hold");
    end
    // reseed beats step
    step = 1'b1; reseed = 1'b1; seed = 32'h1234_5678;
    @(negedge clk);
    reseed = 1'b0;
    r1 = 32'h1234_5678; r2 = 32'd8; r3 = 32'd16;
    check("reseed");
    for (int i = 0; i < 200; i++) begin
      if ((i % 7) == 3) step = 1'b0; else step = 1'b1;
      @(negedge clk);
      if (step) ref_step();
      check("after reseed");
    end
    // several reseeds with random seeds
    for (int k = 0; k < 20; k++) begin
      seed = $urandom | 32'h100;
      reseed = 1'b1; step = 1'b0;
      @(negedge clk);
      reseed = 1'b0; step = 1'b1;
      r1 = seed; r2 = 32'd8; r3 = 32'd16;
      check("random reseed");
      repeat (10) begin
        @(negedge clk);
        ref_step();
        check("random stream");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
