// tb_staccato_top: end-to-end run of the StAccato hardware at its default
// sizes, in the pattern of a mini-batch sampler: a main thread draws random
// row indices and loads the rows, and a helper thread runs ahead on the same
// random stream and prefetches those rows.
//
//  - main thread: RDRAND END=TAIL, line = row(r), a few cycles of work, then
//    a demand access to that line;
//  - helper thread: after each main draw, RDRAND END=HEAD (the value the
//    main thread draws eight draws later), then PREFETCH with the STACCATO
//    hint for its line, waiting when both reserved entries are held;
//  - a seed generator keeps the Seed Queue supplied, reseeding every 100
//    values;
//  - the next cache level answers miss requests after 20 cycles.
// Checks: the first values follow Taus88 from the reset state; each head
// value reappears eight tail reads later; StAccato fills carry the keep
// flag; after warm-up every main-thread demand finds its line owned;
// a replay seed gives seed^8^16 after the eight queued values; ordinary
// prefetches beyond their six entries are dropped. Each mechanism (queue
// full, stall of the helper, merge, reseed, keep fill, demand hit, drop,
// replay) is counted and must occur.
module tb_staccato_top;
  import staccato_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        core_seed_valid = 1'b0, sg_seed_valid = 1'b0, rd_valid = 1'b0;
  sv_t         core_seed_data = '0, sg_seed_data = '0;
  logic        core_seed_ready, sg_seed_ready, rd_ready, reseed_event;
  logic [15:0] reseed_interval = 16'd100;
  rd_end_e     rd_end = END_TAIL;
  sv_t         rd_data;
  logic [3:0]  sv_count;
  logic [1:0]  seed_count;
  logic        pf_req_valid = 1'b0;
  logic [41:0] pf_req_line = '0;
  pf_hint_e    pf_req_hint = HINT_STACCATO;
  logic        pf_req_ready, pf_drop, pf_merge;
  logic        mem_req_valid, mem_req_ready;
  logic [41:0] mem_req_line;
  logic [2:0]  mem_req_id;
  logic        mem_resp_valid;
  logic [2:0]  mem_resp_id;
  logic        fill_valid, fill_keep;
  logic [41:0] fill_line;
  pf_hint_e    fill_hint;
  logic        demand_valid = 1'b0;
  logic [41:0] demand_line = '0;
  logic        demand_stac_hit;
  logic [7:0]  pf_owned;

  int checks = 0, failures = 0;

  staccato_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // row of a 3,999,805-row table of 304-byte rows, as a 64-byte line number
  localparam longint unsigned ROWS = 64'd3999805;
  localparam longint unsigned ROW_BYTES = 64'd304;
  localparam longint unsigned BASE = 64'h10_0000_0000;
  function automatic logic [41:0] row_line(sv_t r);
    return 42'((BASE + (64'(r) % ROWS) * ROW_BYTES) >> 6);
  endfunction

  // ---- event counters ----
  int n_full = 0, n_helper_stall = 0, n_merge = 0, n_reseed = 0, n_keep = 0;
  int n_hit = 0, n_drop = 0, n_replay = 0, n_demand = 0;

  always @(posedge clk) if (rst_n) begin
    if (sv_count == 4'd8) n_full++;
    if (reseed_event) n_reseed++;
    if (pf_req_valid && !pf_req_ready) n_helper_stall++;
    if (pf_merge) n_merge++;
    if (pf_drop) n_drop++;
    if (demand_valid && demand_stac_hit) n_hit++;
  end

  // ---- next cache level: fixed 20-cycle latency ----
  logic       mem_en = 1'b1;
  logic [2:0] q_id[$];
  int         q_due[$];
  int         cyc = 0;
  logic [41:0] line_of[8];
  always @(posedge clk) cyc <= cyc + 1;
  assign mem_req_ready = mem_en;
  always_comb begin
    mem_resp_valid = (q_id.size() > 0) && (q_due[0] <= cyc);
    mem_resp_id    = (q_id.size() > 0) ? q_id[0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (mem_resp_valid) begin
      expect_eq("fill line", 64'(fill_line), 64'(line_of[mem_resp_id]));
      if (fill_hint == HINT_STACCATO) begin
        expect_eq("StAccato fill keeps the line", 64'(fill_keep), 64'd1);
        n_keep++;
      end else begin
        expect_eq("ordinary fill not kept", 64'(fill_keep), 64'd0);
      end
      void'(q_id.pop_front()); void'(q_due.pop_front());
    end
    if (mem_req_valid && mem_req_ready) begin
      line_of[mem_req_id] = mem_req_line;
      q_id.push_back(mem_req_id);
      q_due.push_back(cyc + 20);
    end
  end

  // ---- seed generator ----
  always @(negedge clk) begin
    sg_seed_valid <= rst_n && !core_seed_valid && sg_on;
    sg_seed_data  <= $urandom;
  end
  logic sg_on = 1'b1;

  // ---- helper thread: values peeked at the head, prefetched in order ----
  sv_t  helper_q[$];
  sv_t  peeked[$];
  logic helper_on = 1'b1;

  initial begin
    sv_t hv;
    forever begin
      @(negedge clk);
      if (helper_on && helper_q.size() > 0) begin
        hv = helper_q.pop_front();
        pf_req_valid = 1'b1; pf_req_line = row_line(hv); pf_req_hint = HINT_STACCATO;
        #1;
        while (!pf_req_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        pf_req_valid = 1'b0;
      end
    end
  end

  // one RDRAND: returns the value once it is available
  task automatic rdrand(rd_end_e e, output sv_t v);
    rd_valid = 1'b1; rd_end = e;
    #1;
    while (!rd_ready) begin @(negedge clk); #1; end
    v = rd_data;
    @(negedge clk);
    rd_valid = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv_t v, h, r;
    logic [31:0] a, b, c, t;
    int iters = 400;
    int tails = 0;
    sv_t tail_hist[$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);

    // Taus88 continuity for the first values from reset (interval 100 > 40)
    a = 32'h2545_F491; b = 8; c = 16;
    for (int i = 0; i < 40; i++) begin
      rdrand(END_TAIL, v);
      tails++; tail_hist.push_back(v);
      expect_eq("stream from reset", 64'(v), 64'(a ^ b ^ c));
      t = ((a << 13) ^ a) >> 19;  a = ((a & 32'hFFFF_FFFE) << 12) ^ t;
      t = ((b << 2)  ^ b) >> 25;  b = ((b & 32'hFFFF_FFF8) << 4)  ^ t;
      t = ((c << 3)  ^ c) >> 11;  c = ((c & 32'hFFFF_FFF0) << 17) ^ t;
    end

    // helper warm-up: peek the eight values ahead one by one is not possible
    // (the head is always the newest); the helper starts from the head now
    // and the main thread reaches it eight draws later.
    for (int i = 0; i < iters; i++) begin
      // main thread draw
      rdrand(END_TAIL, r);
      tails++; tail_hist.push_back(r);
      // the helper peeks the value eight draws ahead
      rdrand(END_HEAD, h);
      peeked.push_back(h);
      helper_q.push_back(h);
      // lookahead check
      if (peeked.size() > 8) begin
        expect_eq("head value drawn eight draws later", 64'(r), 64'(peeked[0]));
        void'(peeked.pop_front());
      end
      // main-thread work, then the demand access
      repeat (25) @(negedge clk);
      demand_valid = 1'b1; demand_line = row_line(r);
      #1;
      n_demand++;
      if (i >= 12) begin
        checks++;
        if (!demand_stac_hit) begin
          failures++;
          if (failures < 20) $display("FAIL demand %0d found no StAccato line", i);
        end
      end
      @(negedge clk);
      demand_valid = 1'b0;
    end

    // the main thread stops: release the lines the helper fetched ahead
    helper_on = 1'b0;
    repeat (3) begin
      repeat (60) @(negedge clk);
      foreach (peeked[k]) begin
        demand_valid = 1'b1; demand_line = row_line(peeked[k]);
        @(negedge clk);
      end
      demand_valid = 1'b0;
    end
    helper_q.delete();
    #1;
    expect_eq("no line left owned", 64'(pf_owned), 64'd0);

    // a duplicate StAccato prefetch merges
    pf_req_valid = 1'b1; pf_req_line = 42'h77; pf_req_hint = HINT_STACCATO;
    @(negedge clk);
    pf_req_valid = 1'b1;
    #1;
    expect_eq("second request for a held line merges", 64'(pf_merge), 64'd1);
    @(negedge clk);
    pf_req_valid = 1'b0;

    // ordinary prefetches beyond six entries are dropped
    mem_en = 1'b0;
    for (int i = 0; i < 7; i++) begin
      pf_req_valid = 1'b1; pf_req_line = 42'h5000 + 42'(i); pf_req_hint = HINT_T1;
      @(negedge clk);
    end
    pf_req_valid = 1'b0;
    mem_en = 1'b1;
    repeat (200) @(negedge clk);

    // replay: interval 0 and a software seed
    sg_on = 1'b0;
    repeat (3) @(negedge clk);
    reseed_interval = 16'd0;
    // drain the seeds already queued
    while (seed_count != 0) begin rdrand(END_TAIL, v); end
    repeat (3) @(negedge clk);
    core_seed_valid = 1'b1; core_seed_data = 32'h0BAD_5EED;
    @(negedge clk);
    core_seed_valid = 1'b0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 8; i++) rdrand(END_TAIL, v);
    rdrand(END_TAIL, v);
    expect_eq("replay seed value", 64'(v), 64'(32'h0BAD_5EED ^ 32'd8 ^ 32'd16));
    if (v == (32'h0BAD_5EED ^ 32'd8 ^ 32'd16)) n_replay++;

    // coverage of the mechanisms
    checks++;
    if (n_full == 0 || n_helper_stall == 0 || n_merge == 0 || n_reseed == 0 ||
        n_keep == 0 || n_hit < iters - 12 || n_drop == 0 || n_replay == 0) begin
      failures++;
    end
    $display("events: queue_full=%0d helper_stall=%0d merge=%0d reseed=%0d keep_fill=%0d demand_hit=%0d/%0d drop=%0d replay=%0d",
             n_full, n_helper_stall, n_merge, n_reseed, n_keep, n_hit, n_demand, n_drop, n_replay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
