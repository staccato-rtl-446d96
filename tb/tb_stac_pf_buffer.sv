// tb_stac_pf_buffer: checks the prefetch buffer with StAccato-owned entries.
// A next-level memory model answers miss requests after a random delay.
//
// Directed parts: two STACCATO prefetches are fetched, filled with the keep
// flag and stay owned after the fill; a third waits until a demand access
// releases one; a repeated STACCATO prefetch merges; ordinary prefetches
// fill without the keep flag, are dropped when their six entries are busy,
// and StAccato entries win the miss-request port. A random phase then
// checks, against a model of the StAccato entries, acceptance, merging,
// demand hits and ownership, and that every miss request is filled once.
module tb_stac_pf_buffer;
  import staccato_pkg::*;

  localparam int LW = 42;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          pf_req_valid = 1'b0;
  logic [LW-1:0] pf_req_line = '0;
  pf_hint_e      pf_req_hint = HINT_T0;
  logic          pf_req_ready, pf_drop, pf_merge;
  logic          mem_req_valid, mem_req_ready;
  logic [LW-1:0] mem_req_line;
  logic [2:0]    mem_req_id;
  logic          mem_resp_valid;
  logic [2:0]    mem_resp_id;
  logic          fill_valid, fill_keep;
  logic [LW-1:0] fill_line;
  pf_hint_e      fill_hint;
  logic          demand_valid = 1'b0;
  logic [LW-1:0] demand_line = '0;
  logic          demand_stac_hit;
  logic [7:0]    owned;
  int            checks = 0, failures = 0;

  stac_pf_buffer #(.ENTRIES(8), .STAC_ENTRIES(2), .LINE_W(LW)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // ---- next-level memory model ----
  logic        mem_en = 1'b1;
  int          n_req = 0, n_fill = 0, n_keep = 0;
  logic [2:0]  pend_id[$];
  int          pend_due[$];
  logic [LW-1:0] req_line_of[8];
  int          cyc = 0;
  logic [2:0]  first_req_id;
  int          first_req_n;

  assign mem_req_ready = mem_en;
  always @(posedge clk) cyc <= cyc + 1;

  // answer the oldest pending request once it is due
  always_comb begin
    mem_resp_valid = 1'b0;
    mem_resp_id    = '0;
    if (pend_id.size() > 0 && pend_due[0] <= cyc) begin
      mem_resp_valid = 1'b1;
      mem_resp_id    = pend_id[0];
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_resp_valid) begin
        n_fill++;
        if (fill_keep) n_keep++;
        expect_eq("fill line", 64'(fill_line), 64'(req_line_of[mem_resp_id]));
        expect_eq("keep flag for StAccato entries", 64'(fill_keep), 64'(mem_resp_id < 2));
        void'(pend_id.pop_front());
        void'(pend_due.pop_front());
      end
      if (mem_req_valid && mem_req_ready) begin
        n_req++;
        if (n_req == first_req_n) first_req_id = mem_req_id;
        req_line_of[mem_req_id] = mem_req_line;
        pend_id.push_back(mem_req_id);
        pend_due.push_back(cyc + $urandom_range(3, 12));
      end
    end
  end

  // one request, held until accepted; returns what happened
  task automatic prefetch(logic [LW-1:0] line, pf_hint_e hint,
                          output logic merged, output logic dropped);
    pf_req_valid = 1'b1; pf_req_line = line; pf_req_hint = hint;
    #1;
    while (!pf_req_ready) begin
      @(negedge clk); #1;
    end
    merged = pf_merge; dropped = pf_drop;
    @(negedge clk);
    pf_req_valid = 1'b0;
  endtask

  task automatic demand(logic [LW-1:0] line, output logic hit);
    demand_valid = 1'b1; demand_line = line;
    #1;
    hit = demand_stac_hit;
    @(negedge clk);
    demand_valid = 1'b0;
  endtask

  task automatic settle();
    while (pend_id.size() > 0 || mem_req_valid) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- StAccato entry model for the random phase ----
  typedef struct { logic [LW-1:0] line; logic own; logic filled; } sent_t;
  sent_t  sm[$];            // busy StAccato entries (model)
  int     n_stac_stall = 0, n_drop = 0, n_merge = 0, n_hit = 0;

  initial begin
    logic m, d, h;
    int   req0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // two StAccato prefetches, held after fill
    prefetch(42'h100, HINT_STACCATO, m, d);
    prefetch(42'h200, HINT_STACCATO, m, d);
    settle();
    expect_eq("two fills with keep", 64'(n_keep), 64'd2);
    expect_eq("both still owned after fill", 64'(owned), 64'b0000_0011);
    // a third waits while both reserved entries are held
    pf_req_valid = 1'b1; pf_req_line = 42'h300; pf_req_hint = HINT_STACCATO;
    #1;
    expect_eq("third StAccato prefetch waits", 64'(pf_req_ready), 64'd0);
    repeat (3) @(negedge clk);
    #1;
    expect_eq("still waiting", 64'(pf_req_ready), 64'd0);
    pf_req_valid = 1'b0;
    // a repeated one merges
    req0 = n_req;
    prefetch(42'h200, HINT_STACCATO, m, d);
    expect_eq("repeat merges", 64'(m), 64'd1);
    // demand of an unowned line is no hit, of an owned one releases it
    demand(42'h999, h);
    expect_eq("no hit on other line", 64'(h), 64'd0);
    demand(42'h100, h);
    expect_eq("demand hit on owned line", 64'(h), 64'd1);
    #1;
    expect_eq("entry released", 64'(owned), 64'b0000_0010);
    prefetch(42'h300, HINT_STACCATO, m, d);
    settle();
    expect_eq("merge sent no request", 64'(n_req - req0), 64'd1);
    expect_eq("new entry owned", 64'(owned), 64'b0000_0011);
    demand(42'h200, h);
    demand(42'h300, h);
    #1;
    expect_eq("all released", 64'(owned), 64'd0);

    // ordinary prefetches: six entries, then drops; no keep flag
    mem_en = 1'b0;
    for (int i = 0; i < 6; i++) begin
      prefetch(42'h1000 + 42'(i), HINT_T0, m, d);
      expect_eq("ordinary accepted", 64'(d), 64'd0);
    end
    prefetch(42'h2000, HINT_NTA, m, d);
    expect_eq("seventh ordinary dropped", 64'(d), 64'd1);
    // StAccato entry issues before the waiting ordinary ones
    prefetch(42'h3000, HINT_STACCATO, m, d);
    first_req_n = n_req + 2;  // the ordinary request already on the port goes first
    req0 = n_keep;
    mem_en = 1'b1;
    settle();
    expect_eq("StAccato request next", 64'(first_req_id), 64'd0);
    expect_eq("one keep fill among seven", 64'(n_keep - req0), 64'd1);
    expect_eq("only StAccato entry owned", 64'(owned), 64'b0000_0001);
    demand(42'h3000, h);
    expect_eq("hit", 64'(h), 64'd1);

    // random phase with a model of the StAccato entries
    for (int i = 0; i < 4000; i++) begin
      logic [LW-1:0] ln;
      pf_hint_e      hn;
      logic          mexp, rexp, acc;
      int            idx;
      hn = ($urandom_range(0, 1) == 0) ? HINT_STACCATO : pf_hint_e'($urandom_range(0, 3));
      ln = (hn == HINT_STACCATO) ? 42'($urandom_range(0, 5)) : 42'($urandom_range(0, 40));
      mexp = 1'b0;
      mem_en = ($urandom_range(0, 3) != 0);
      pf_req_valid = ($urandom_range(0, 1) == 0);
      pf_req_line = ln; pf_req_hint = hn;
      demand_valid = ($urandom_range(0, 2) == 0);
      demand_line = 42'($urandom_range(0, 5));
      #1;
      // model: StAccato acceptance and merge
      if (pf_req_valid && hn == HINT_STACCATO) begin
        idx = -1;
        foreach (sm[k]) if (sm[k].line == ln) idx = k;
        mexp = (idx >= 0);
        rexp = mexp || sm.size() < 2;
        expect_eq("stac ready", 64'(pf_req_ready), 64'(rexp));
        if (rexp) expect_eq("stac merge", 64'(pf_merge), 64'(mexp));
        if (!rexp) n_stac_stall++;
        if (mexp) n_merge++;
      end
      if (pf_req_valid && hn != HINT_STACCATO) begin
        expect_eq("ordinary always ready", 64'(pf_req_ready), 64'd1);
        if (pf_drop) n_drop++;
      end
      // model: demand hits on owned StAccato lines
      begin
        logic hexp;
        hexp = 1'b0;
        if (demand_valid) foreach (sm[k]) if (sm[k].own && sm[k].line == demand_line) hexp = 1'b1;
        expect_eq("demand hit", 64'(demand_stac_hit), 64'(hexp));
        if (hexp) n_hit++;
      end
      acc = pf_req_ready;
      if (mem_resp_valid && fill_keep)
        foreach (sm[k]) if (sm[k].line == fill_line) sm[k].filled = 1'b1;
      @(posedge clk);
      #1;
      // model update after the edge
      if (demand_valid) foreach (sm[k]) if (sm[k].line == demand_line) sm[k].own = 1'b0;
      if (pf_req_valid && hn == HINT_STACCATO && acc && !mexp) begin
        sent_t e; e.line = ln; e.own = 1'b1; e.filled = 1'b0; sm.push_back(e);
      end
      // an entry is free once it is unowned and its fill has returned
      for (int k = sm.size() - 1; k >= 0; k--)
        if (!sm[k].own && sm[k].filled) sm.delete(k);
      expect_eq("owned count", 64'($countones(owned)), 64'(sm.size() - count_unowned()));
      @(negedge clk);
    end
    pf_req_valid = 1'b0; demand_valid = 1'b0; mem_en = 1'b1;
    settle();
    expect_eq("every request filled once", 64'(n_fill), 64'(n_req));
    checks++;
    if (n_stac_stall == 0 || n_drop == 0 || n_merge == 0 || n_hit == 0) begin
      failures++;
      $display("FAIL coverage stall=%0d drop=%0d merge=%0d hit=%0d", n_stac_stall, n_drop, n_merge, n_hit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int count_unowned();
    int n = 0;
    foreach (sm[k]) if (!sm[k].own) n++;
    return n;
  endfunction
endmodule
