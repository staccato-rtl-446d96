// tb_stac_hwrng: checks the whole generator (Seed Queue, Taus88 core, SV
// Queue, reseed policy) cycle by cycle against a transaction model written
// with queues and the shift-and-mask form of Taus88.
//
// Directed parts:
//  - after reset the SV Queue fills at one value per cycle and then serves
//    one tail read per cycle with no stall; the stream is Taus88 from the
//    reset state;
//  - a head read returns the value the main thread receives eight tail
//    reads later (helper-thread lookahead);
//  - with interval 0 a software seed S is applied at once: after the eight
//    values already queued, the stream is S^8^16 followed by Taus88 from
//    (S, 8, 16), so a stream can be replayed;
//  - with interval 100 and a seed generator always ready, reseeds happen
//    once per 100 values (the 1% rate).
// A random phase then mixes reads, head peeks, software and generator
// seeds and interval changes.
module tb_stac_hwrng;
  import staccato_pkg::*;

  localparam sv_t RSEED = 32'h2545_F491;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        core_seed_valid = 1'b0, sg_seed_valid = 1'b0, rd_valid = 1'b0;
  sv_t         core_seed_data = '0, sg_seed_data = '0;
  logic        core_seed_ready, sg_seed_ready, rd_ready, reseed_event;
  logic [15:0] reseed_interval = 16'd100;
  rd_end_e     rd_end = END_TAIL;
  sv_t         rd_data;
  logic [3:0]  sv_count;
  logic [1:0]  seed_count;
  int          checks = 0, failures = 0;

  stac_hwrng #(.RESET_SEED(RSEED)) dut (.*);

  always #5 clk = ~clk;

  // ---- model ----
  logic [31:0] m1, m2, m3;
  sv_t         msv[$], mseed[$];
  int unsigned mcnt;
  int          n_reseed = 0, n_stall = 0, n_head = 0;

  function automatic void taus(inout logic [31:0] a, inout logic [31:0] b, inout logic [31:0] c);
    logic [31:0] t;
    t = ((a << 13) ^ a) >> 19;  a = ((a & 32'hFFFF_FFFE) << 12) ^ t;
    t = ((b << 2)  ^ b) >> 25;  b = ((b & 32'hFFFF_FFF8) << 4)  ^ t;
    t = ((c << 3)  ^ c) >> 11;  c = ((c & 32'hFFFF_FFF0) << 17) ^ t;
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // One clock cycle: inputs are set; compare, then advance the model.
  sv_t last_rd;
  task automatic cycle();
    logic pop, step, rs, push_seed;
    sv_t  sd;
    #1;
    expect_eq("sv_count", 32'(sv_count), 32'(msv.size()));
    expect_eq("seed_count", 32'(seed_count), 32'(mseed.size()));
    expect_eq("rd_ready", 32'(rd_ready), 32'(msv.size() > 0));
    expect_eq("core_seed_ready", 32'(core_seed_ready), 32'(mseed.size() < 2));
    expect_eq("sg_seed_ready", 32'(sg_seed_ready), 32'(mseed.size() < 2 && !core_seed_valid));
    if (rd_valid && msv.size() > 0) begin
      expect_eq(rd_end == END_HEAD ? "head value" : "tail value", rd_data,
                rd_end == END_HEAD ? msv[$] : msv[0]);
      last_rd = rd_data;
      if (rd_end == END_HEAD) n_head++;
    end
    if (rd_valid && msv.size() == 0) n_stall++;
    pop  = rd_valid && rd_end == END_TAIL && msv.size() > 0;
    step = (msv.size() < 8) || pop;
    rs   = (mseed.size() > 0) &&
           ((mcnt >= reseed_interval) || (step && mcnt + 1 >= reseed_interval));
    expect_eq("reseed_event", 32'(reseed_event), 32'(rs));
    push_seed = (core_seed_valid || sg_seed_valid) && mseed.size() < 2;
    sd = core_seed_valid ? core_seed_data : sg_seed_data;
    @(posedge clk);
    if (pop) void'(msv.pop_front());
    if (step) msv.push_back(m1 ^ m2 ^ m3);
    if (rs) begin
      m1 = mseed.pop_front(); m2 = 32'd8; m3 = 32'd16; mcnt = 0;
      n_reseed++;
    end else if (step) begin
      taus(m1, m2, m3);
      if (mcnt != 32'hFFFF) mcnt++;
    end
    if (push_seed) mseed.push_back(sd);
    @(negedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv_t ahead, s;
    int  c0, t0, r0;
    m1 = RSEED; m2 = 32'd8; m3 = 32'd16; mcnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // fill: eight cycles to a full queue
    for (int i = 0; i < 8; i++) cycle();
    expect_eq("filled after 8 cycles", 32'(sv_count), 32'd8);

    // stream: one value per cycle, no stall
    rd_valid = 1'b1; rd_end = END_TAIL;
    t0 = n_stall;
    repeat (100) cycle();
    expect_eq("no stall at one read per cycle", 32'(n_stall - t0), 0);

    // head lookahead: newest value is the 8th tail read from now
    rd_valid = 1'b1; rd_end = END_HEAD;
    cycle();
    ahead = last_rd;
    rd_end = END_TAIL;
    repeat (8) cycle();
    expect_eq("head read seen 8 tail reads later", last_rd, ahead);

    // replay from a software seed with interval 0
    rd_valid = 1'b0;
    reseed_interval = 16'd0;
    repeat (4) cycle();
    core_seed_valid = 1'b1; core_seed_data = 32'hC0FF_EE00;
    cycle();
    core_seed_valid = 1'b0;
    repeat (3) cycle();
    rd_valid = 1'b1;
    repeat (8) cycle();
    cycle();
    expect_eq("first value after replay seed", last_rd, 32'hC0FF_EE00 ^ 32'd8 ^ 32'd16);
    begin
      logic [31:0] a, b, c;
      a = 32'hC0FF_EE00; b = 8; c = 16;
      for (int i = 0; i < 20; i++) begin
        taus(a, b, c);
        cycle();
        expect_eq("replayed stream", last_rd, a ^ b ^ c);
      end
    end

    // 1% reseed rate from an always-ready seed generator
    reseed_interval = 16'd100;
    sg_seed_valid = 1'b1;
    rd_valid = 1'b1; rd_end = END_TAIL;
    for (int i = 0; i < 120; i++) begin sg_seed_data = $urandom; cycle(); end
    r0 = n_reseed;
    for (int i = 0; i < 1000; i++) begin sg_seed_data = $urandom; cycle(); end
    expect_eq("10 reseeds per 1000 values", 32'(n_reseed - r0), 32'd10);
    sg_seed_valid = 1'b0;

    // random phase
    for (int i = 0; i < 8000; i++) begin
      rd_valid        = ($urandom_range(0, 3) != 0);
      rd_end          = ($urandom_range(0, 4) == 0) ? END_HEAD : END_TAIL;
      core_seed_valid = ($urandom_range(0, 40) == 0);
      core_seed_data  = $urandom;
      sg_seed_valid   = ($urandom_range(0, 10) == 0);
      sg_seed_data    = $urandom;
      if ((i % 1000) == 0) reseed_interval = 16'($urandom_range(0, 30));
      cycle();
    end
    checks++;
    if (n_reseed < 20 || n_head < 20) begin
      failures++;
      $display("FAIL coverage reseeds=%0d heads=%0d", n_reseed, n_head);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
