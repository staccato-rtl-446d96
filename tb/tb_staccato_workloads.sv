// tb_staccato_workloads: the kinds of work the generator is meant for, run
// on staccato_top at its default sizes.
//
//  pi       Monte Carlo estimate of pi from 100,000 points (200,000 values)
//           read back to back: the queue must deliver one value per cycle
//           without a stall, and the estimate must lie within 0.03 of pi
//           (about six standard deviations).
//  dop      Box-Muller post-processing moved to a helper thread: after each
//           main-thread draw the helper peeks the head (eight draws ahead)
//           and, once it holds both values of a pair, precomputes the
//           normal deviate. The main thread finds the precomputed value for
//           each of its pairs and checks it equals its own computation; the
//           deviates must have mean near 0 and variance near 1.
//  reseed   rate sweep with an always-ready seed source: intervals 1, 50 and
//           100 (100%, 2%, 1% of values) must give 5000/interval reseeds per
//           5000 values.
//  replay   seeding twice with the same software seed gives the same
//           stream.
module tb_staccato_workloads;
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
  logic        pf_req_ready, pf_drop, pf_merge;
  logic        mem_req_valid;
  logic [41:0] mem_req_line;
  logic [2:0]  mem_req_id;
  logic        fill_valid, fill_keep;
  logic [41:0] fill_line;
  pf_hint_e    fill_hint;
  logic        demand_stac_hit;
  logic [7:0]  pf_owned;

  int checks = 0, failures = 0;

  staccato_top dut (
    .clk, .rst_n,
    .core_seed_valid, .core_seed_data, .core_seed_ready,
    .sg_seed_valid, .sg_seed_data, .sg_seed_ready,
    .reseed_interval,
    .rd_valid, .rd_end, .rd_ready, .rd_data,
    .reseed_event, .sv_count, .seed_count,
    .pf_req_valid (1'b0), .pf_req_line ('0), .pf_req_hint (HINT_T0),
    .pf_req_ready, .pf_drop, .pf_merge,
    .mem_req_valid, .mem_req_line, .mem_req_id, .mem_req_ready (1'b1),
    .mem_resp_valid (1'b0), .mem_resp_id ('0),
    .fill_valid, .fill_line, .fill_hint, .fill_keep,
    .demand_valid (1'b0), .demand_line ('0), .demand_stac_hit,
    .pf_owned
  );

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one read per call, returning the value in the cycle it is taken
  int n_stall = 0;
  task automatic rdrand(rd_end_e e, output sv_t v);
    rd_valid = 1'b1; rd_end = e;
    #1;
    while (!rd_ready) begin n_stall++; @(negedge clk); #1; end
    v = rd_data;
    @(negedge clk);
    rd_valid = 1'b0;
  endtask

  int n_reseed = 0;
  always @(posedge clk) if (rst_n && reseed_event) n_reseed++;

  function automatic real box_muller(sv_t a, sv_t b);
    real u1, u2;
    u1 = (real'(a) + 1.0) / 4294967297.0;
    u2 = real'(b) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv_t x, y, v, h;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);

    // ---- pi: back-to-back draws at one value per cycle ----
    begin
      automatic int n_in = 0;
      longint t0, t1;
      real    est;
      t0 = cyc;
      n_stall = 0;
      for (int i = 0; i < 100000; i++) begin
        rdrand(END_TAIL, x);
        rdrand(END_TAIL, y);
        if ((65'(x) * 65'(x) + 65'(y) * 65'(y)) < (65'd1 << 64)) n_in++;
      end
      t1 = cyc;
      est = 4.0 * real'(n_in) / 100000.0;
      $display("pi: estimate %f from 100000 points, %0d values in %0d cycles, %0d stalls",
               est, 200000, t1 - t0, n_stall);
      check("pi: one value per cycle", (t1 - t0) == 200000 && n_stall == 0);
      check("pi: estimate within 0.03", est > 3.11159 && est < 3.17159);
    end

    // ---- dop: Box-Muller precomputed by a helper thread ----
    begin
      sv_t  peek[$];          // values the helper has seen, in draw order
      real  pre[int];         // precomputed deviates by pair number
      int   base;             // draw number of peek[0]
      automatic int hits = 0, mism = 0;
      automatic real sum = 0.0, sq = 0.0;
      real  g, m, var_;
      sv_t  a;
      automatic int n_pairs = 10000;
      // the head is eight draws ahead of the next tail read
      base = 8;
      for (int d = 0; d < 2 * n_pairs; d++) begin
        rdrand(END_TAIL, v);
        if (d % 2 == 0) a = v;
        else begin
          g = box_muller(a, v);
          if (pre.exists(d / 2)) begin
            hits++;
            if (pre[d / 2] != g) mism++;
          end
          sum += g; sq += g * g;
        end
        // helper thread
        rdrand(END_HEAD, h);
        peek.push_back(h);
        if (((base + peek.size() - 1) % 2) == 1 && peek.size() >= 2)
          pre[(base + peek.size() - 1) / 2] = box_muller(peek[$-1], peek[$]);
      end
      m = sum / n_pairs;
      var_ = sq / n_pairs - m * m;
      $display("dop: %0d of %0d deviates precomputed ahead, mean %f variance %f", hits, n_pairs, m, var_);
      check("dop: helper precomputed nearly all deviates", hits >= n_pairs - 5);
      check("dop: precomputed equals main-thread value", mism == 0);
      check("dop: mean near 0", m > -0.05 && m < 0.05);
      check("dop: variance near 1", var_ > 0.93 && var_ < 1.07);
    end

    // ---- reseed-rate sweep ----
    begin
      automatic int iv[3] = '{1, 50, 100};
      foreach (iv[k]) begin
        int r0;
        reseed_interval = 16'(iv[k]);
        sg_seed_valid = 1'b1;
        for (int i = 0; i < 300; i++) begin sg_seed_data = $urandom | 32'h100; rdrand(END_TAIL, v); end
        r0 = n_reseed;
        for (int i = 0; i < 5000; i++) begin sg_seed_data = $urandom | 32'h100; rdrand(END_TAIL, v); end
        $display("reseed: interval %0d gives %0d reseeds per 5000 values", iv[k], n_reseed - r0);
        check("reseed: rate", (n_reseed - r0) >= 5000 / iv[k] - 1 && (n_reseed - r0) <= 5000 / iv[k] + 1);
      end
      sg_seed_valid = 1'b0;
    end

    // ---- replay ----
    begin
      sv_t first[$], second[$];
      reseed_interval = 16'd0;
      repeat (3) @(negedge clk);
      while (seed_count != 0) rdrand(END_TAIL, v);
      for (int run = 0; run < 2; run++) begin
        core_seed_valid = 1'b1; core_seed_data = 32'h5EED_0001;
        @(negedge clk);
        core_seed_valid = 1'b0;
        repeat (3) @(negedge clk);
        for (int i = 0; i < 8; i++) rdrand(END_TAIL, v);
        for (int i = 0; i < 64; i++) begin
          rdrand(END_TAIL, v);
          if (run == 0) first.push_back(v); else second.push_back(v);
        end
      end
      check("replay: same seed, same stream", first == second);
      check("replay: first value", first[0] == (32'h5EED_0001 ^ 32'd8 ^ 32'd16));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
endmodule
