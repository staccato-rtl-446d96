// stac_pf_buffer: data prefetch buffer with StAccato-owned entries.
//
// The helper thread issues prefetches for stochastic memory accesses (SMAs)
// ahead of the main thread. So that such a line is not evicted before the
// main thread uses it, two entries of the buffer are reserved for prefetches
// with the STACCATO hint, and each entry carries an ownership bit. An owned
// entry stays allocated after its fill returns and is released only when the
// main thread's demand access to that line arrives. When its fill returns it
// is passed to the L1 with `fill_keep` set, telling the cache to place it
// away from the next-to-be-evicted position.
//
// Entries [0, STAC_ENTRIES) serve STACCATO prefetches; the rest serve T0, T1,
// T2 and NTA prefetches. Per entry: FREE -> ISSUE (waiting to send the miss
// request) -> WAIT (request sent) -> HELD (owned, filled, waiting for the
// demand), or back to FREE after the fill for an ordinary entry.
//
// Interface and timing:
//  - pf_req_*: one prefetch per cycle, valid/ready. A request for a line
//    already held by an entry of the same class is merged. A STACCATO
//    request with both reserved entries busy waits (ready low); an ordinary
//    request with no free entry is accepted and dropped (`pf_drop`).
//  - mem_req_*: miss requests to the next cache level, valid/ready, tagged
//    with the entry index; the lowest-numbered entry goes first, so StAccato
//    entries have priority. A request that is not taken stays on the port
//    unchanged until it is. mem_resp_valid/mem_resp_id: one fill per cycle.
//  - fill_*: combinational from mem_resp, the line to install in the L1.
//  - demand_valid/demand_line: main-thread load; a match on an owned entry
//    releases it (`demand_stac_hit`).
// The number of entries, the address width, the merge and drop rules, the
// request order and the state encoding are this design's own choices; the
// two reserved entries, the ownership bit and the keep-on-fill behaviour
// follow the design. The 64-byte line matches the cache configuration.
module stac_pf_buffer
  import staccato_pkg::*;
#(
  parameter int unsigned ENTRIES      = 8,
  parameter int unsigned STAC_ENTRIES = 2,
  parameter int unsigned LINE_W       = 42,   // 48-bit address, 64-byte lines
  localparam int unsigned ID_W        = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // PREFETCHh Rsrc, Hint
  input  logic              pf_req_valid,
  input  logic [LINE_W-1:0] pf_req_line,
  input  pf_hint_e          pf_req_hint,
  output logic              pf_req_ready,
  output logic              pf_drop,
  output logic              pf_merge,
  // miss requests to the next level
  output logic              mem_req_valid,
  output logic [LINE_W-1:0] mem_req_line,
  output logic [ID_W-1:0]   mem_req_id,
  input  logic              mem_req_ready,
  input  logic              mem_resp_valid,
  input  logic [ID_W-1:0]   mem_resp_id,
  // fill into the L1
  output logic              fill_valid,
  output logic [LINE_W-1:0] fill_line,
  output pf_hint_e          fill_hint,
  output logic              fill_keep,
  // main-thread demand accesses
  input  logic              demand_valid,
  input  logic [LINE_W-1:0] demand_line,
  output logic              demand_stac_hit,
  // entries currently owned by StAccato
  output logic [ENTRIES-1:0] owned
);

  typedef enum logic [1:0] {
    ST_FREE  = 2'd0,
    ST_ISSUE = 2'd1,
    ST_WAIT  = 2'd2,
    ST_HELD  = 2'd3
  } ent_state_e;

  typedef struct packed {
    ent_state_e        state;
    logic              own;
    pf_hint_e          hint;
    logic [LINE_W-1:0] line;
  } entry_t;

  entry_t ent_q [ENTRIES];

  logic               is_stac;
  logic               merge_hit;
  logic               alloc_ok;
  logic [ID_W-1:0]    alloc_idx;
  logic               issue_ok;
  logic [ID_W-1:0]    issue_idx;
  logic               accept;
  logic [ENTRIES-1:0] demand_match;
  logic               hold_q;          // a request is waiting for ready
  logic [ID_W-1:0]    hold_idx_q;

  assign is_stac = (pf_req_hint == HINT_STACCATO);

  // Merge check, free-entry search and issue pick.
  always_comb begin
    merge_hit = 1'b0;
    alloc_ok  = 1'b0;
    alloc_idx = '0;
    issue_ok  = 1'b0;
    issue_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if ((i < STAC_ENTRIES) == is_stac) begin
        if (ent_q[i].state != ST_FREE && ent_q[i].line == pf_req_line)
          merge_hit = 1'b1;
        if (ent_q[i].state == ST_FREE) begin
          alloc_ok  = 1'b1;
          alloc_idx = ID_W'(i);
        end
      end
      if (ent_q[i].state == ST_ISSUE) begin
        issue_ok  = 1'b1;
        issue_idx = ID_W'(i);
      end
    end
    // a request not yet taken stays on the port
    if (hold_q) begin
      issue_ok  = 1'b1;
      issue_idx = hold_idx_q;
    end
  end

  assign pf_req_ready = !is_stac || merge_hit || alloc_ok;
  assign accept       = pf_req_valid && pf_req_ready;
  assign pf_merge     = accept && merge_hit;
  assign pf_drop      = accept && !merge_hit && !alloc_ok;

  assign mem_req_valid = issue_ok;
  assign mem_req_id    = issue_idx;
  assign mem_req_line  = ent_q[issue_idx].line;

  assign fill_valid = mem_resp_valid;
  assign fill_line  = ent_q[mem_resp_id].line;
  assign fill_hint  = ent_q[mem_resp_id].hint;
  assign fill_keep  = mem_resp_valid && (int'(mem_resp_id) < STAC_ENTRIES);

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      demand_match[i] = demand_valid && (i < STAC_ENTRIES) && ent_q[i].own &&
                        ent_q[i].line == demand_line;
      owned[i]        = ent_q[i].own;
    end
  end
  assign demand_stac_hit = |demand_match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q     <= 1'b0;
      hold_idx_q <= '0;
    end else begin
      hold_q     <= mem_req_valid && !mem_req_ready;
      hold_idx_q <= issue_idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        // the demand access releases ownership
        if (demand_match[i]) begin
          ent_q[i].own <= 1'b0;
          if (ent_q[i].state == ST_HELD) ent_q[i].state <= ST_FREE;
        end
        if (mem_req_valid && mem_req_ready && issue_idx == ID_W'(i))
          ent_q[i].state <= ST_WAIT;
        if (mem_resp_valid && mem_resp_id == ID_W'(i) && ent_q[i].state == ST_WAIT)
          ent_q[i].state <= (ent_q[i].own && !demand_match[i]) ? ST_HELD : ST_FREE;
      end
      if (accept && !merge_hit && alloc_ok) begin
        ent_q[alloc_idx].state <= ST_ISSUE;
        ent_q[alloc_idx].own   <= is_stac;
        ent_q[alloc_idx].hint  <= pf_req_hint;
        ent_q[alloc_idx].line  <= pf_req_line;
      end
    end
  end

  // A miss request holds still until it is taken.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_line);
  endproperty
  a_req_stable: assert property (p_req_stable);

  // Fills answer only outstanding requests.
  a_resp_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> ent_q[mem_resp_id].state == ST_WAIT);

endmodule
