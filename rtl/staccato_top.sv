// staccato_top: the StAccato hardware added to one SMT core.
//
// Two parts, both used through the core's instructions:
//  - stac_hwrng, the decoupled random number generator. RDSEED with a source
//    register writes a seed (core_seed_*); the processor's seed generator,
//    if present, fills the same Seed Queue (sg_seed_*). RDRAND with END=TAIL
//    gives the main thread the next value; END=HEAD gives the helper thread
//    the newest value, which the main thread will receive SV_DEPTH reads
//    later, so the helper can run ahead.
//  - stac_pf_buffer, the data prefetch buffer with two StAccato-owned
//    entries. The helper thread's PREFETCHh with the STACCATO hint lands
//    there and is kept until the main thread's demand access to the line.
// The two parts share only clock and reset; software running on the core's
// helper thread links them. The core, its caches and the seed generator
// are outside: their connections are the ports below. Timing is that of the
// two blocks (one random value per cycle from a full SV Queue; prefetch
// requests and fills one per cycle).
module staccato_top
  import staccato_pkg::*;
#(
  parameter int unsigned SEED_DEPTH   = 2,
  parameter int unsigned SV_DEPTH     = 8,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned PF_ENTRIES   = 8,
  parameter int unsigned STAC_ENTRIES = 2,
  parameter int unsigned LINE_W       = 42,
  localparam int unsigned ID_W        = (PF_ENTRIES > 1) ? $clog2(PF_ENTRIES) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // RDSEED Rdest, Rsrc
  input  logic                            core_seed_valid,
  input  sv_t                             core_seed_data,
  output logic                            core_seed_ready,
  // processor seed generator
  input  logic                            sg_seed_valid,
  input  sv_t                             sg_seed_data,
  output logic                            sg_seed_ready,
  input  logic [CNT_W-1:0]                reseed_interval,
  // RDRAND Rdest, END
  input  logic                            rd_valid,
  input  rd_end_e                         rd_end,
  output logic                            rd_ready,
  output sv_t                             rd_data,
  output logic                            reseed_event,
  output logic [$clog2(SV_DEPTH+1)-1:0]   sv_count,
  output logic [$clog2(SEED_DEPTH+1)-1:0] seed_count,
  // PREFETCHh Rsrc, Hint
  input  logic                            pf_req_valid,
  input  logic [LINE_W-1:0]               pf_req_line,
  input  pf_hint_e                        pf_req_hint,
  output logic                            pf_req_ready,
  output logic                            pf_drop,
  output logic                            pf_merge,
  // next cache level
  output logic                            mem_req_valid,
  output logic [LINE_W-1:0]               mem_req_line,
  output logic [ID_W-1:0]                 mem_req_id,
  input  logic                            mem_req_ready,
  input  logic                            mem_resp_valid,
  input  logic [ID_W-1:0]                 mem_resp_id,
  // L1 fill and demand
  output logic                            fill_valid,
  output logic [LINE_W-1:0]               fill_line,
  output pf_hint_e                        fill_hint,
  output logic                            fill_keep,
  input  logic                            demand_valid,
  input  logic [LINE_W-1:0]               demand_line,
  output logic                            demand_stac_hit,
  output logic [PF_ENTRIES-1:0]           pf_owned
);

  stac_hwrng #(
    .SEED_DEPTH (SEED_DEPTH),
    .SV_DEPTH   (SV_DEPTH),
    .CNT_W      (CNT_W)
  ) u_hwrng (
    .clk, .rst_n,
    .core_seed_valid, .core_seed_data, .core_seed_ready,
    .sg_seed_valid, .sg_seed_data, .sg_seed_ready,
    .reseed_interval,
    .rd_valid, .rd_end, .rd_ready, .rd_data,
    .reseed_event, .sv_count, .seed_count
  );

  stac_pf_buffer #(
    .ENTRIES      (PF_ENTRIES),
    .STAC_ENTRIES (STAC_ENTRIES),
    .LINE_W       (LINE_W)
  ) u_pf (
    .clk, .rst_n,
    .pf_req_valid, .pf_req_line, .pf_req_hint, .pf_req_ready, .pf_drop, .pf_merge,
    .mem_req_valid, .mem_req_line, .mem_req_id, .mem_req_ready,
    .mem_resp_valid, .mem_resp_id,
    .fill_valid, .fill_line, .fill_hint, .fill_keep,
    .demand_valid, .demand_line, .demand_stac_hit,
    .owned (pf_owned)
  );

endmodule
