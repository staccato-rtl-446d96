// stac_hwrng: the StAccato per-core hardware random number generator. It
// keeps random-number generation off the core's critical path by producing
// values ahead of demand.
//
// Seed Queue -> (select) -> S1/S2/S3 Taus88 generator -> SV Queue -> core
//
// The generator steps once per cycle whenever the SV Queue can take a value,
// so the queue refills itself and a full queue serves one tail read per
// cycle with no wait. Seeds enter the Seed Queue from RDSEED with a source
// register (`core_seed_*`) or from the processor's seed generator
// (`sg_seed_*`); a core write is taken first when both arrive together.
//
// Reseed policy: a counter counts values pushed since the last reseed. When
// the current seed has produced `reseed_interval` values and a new seed is
// waiting, the seed replaces S1 and S2/S3 restart from 8 and 16 (the value
// produced in that same cycle is the last one of the old seed). With an interval of 100, one reseed
// per 100 values matches the 1% reseed rate at which this generator reaches
// the statistical quality of a hardware entropy source. An interval of 0
// applies each seed as soon as it arrives, which lets software replay a
// stream from a known seed. A reseed does not flush values already in the SV
// Queue.
//
// Timing: a seed written in cycle t is in the Seed Queue at t+1 and, if the
// interval allows, loaded into the state at t+2; the first value derived
// from it (seed ^ 8 ^ 16) enters the SV Queue at the next push after that.
// The counter, the priority and the interval port are this design's
// choices; the datapath and the queue sizes follow the design.
module stac_hwrng
  import staccato_pkg::*;
#(
  parameter int unsigned SEED_DEPTH = 2,
  parameter int unsigned SV_DEPTH   = 8,
  parameter int unsigned CNT_W      = 16,
  parameter sv_t         RESET_SEED = 32'h2545_F491
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // RDSEED Rdest, Rsrc: seed written by software
  input  logic                            core_seed_valid,
  input  sv_t                             core_seed_data,
  output logic                            core_seed_ready,
  // processor seed generator, when present
  input  logic                            sg_seed_valid,
  input  sv_t                             sg_seed_data,
  output logic                            sg_seed_ready,
  // values pushed between reseeds (0: reseed whenever a seed waits)
  input  logic [CNT_W-1:0]                reseed_interval,
  // RDRAND Rdest, END
  input  logic                            rd_valid,
  input  rd_end_e                         rd_end,
  output logic                            rd_ready,
  output sv_t                             rd_data,
  // status
  output logic                            reseed_event,
  output logic [$clog2(SV_DEPTH+1)-1:0]   sv_count,
  output logic [$clog2(SEED_DEPTH+1)-1:0] seed_count
);

  logic             sq_push_valid, sq_push_ready;
  sv_t              sq_push_data;
  logic             sq_pop_valid, sq_pop_ready;
  sv_t              sq_pop_data;
  logic             gen_step, gen_reseed;
  sv_t              gen_out;
  logic             svq_push_ready;
  logic [CNT_W-1:0] since_reseed;

  // Seed source select: software first, then the seed generator.
  always_comb begin
    sq_push_valid   = core_seed_valid || sg_seed_valid;
    sq_push_data    = core_seed_valid ? core_seed_data : sg_seed_data;
    core_seed_ready = sq_push_ready;
    sg_seed_ready   = sq_push_ready && !core_seed_valid;
  end

  stac_seed_queue #(.DEPTH(SEED_DEPTH)) u_seed_q (
    .clk, .rst_n,
    .push_valid (sq_push_valid),
    .push_data  (sq_push_data),
    .push_ready (sq_push_ready),
    .pop_valid  (sq_pop_valid),
    .pop_data   (sq_pop_data),
    .pop_ready  (sq_pop_ready),
    .count      (seed_count)
  );

  // Reseed on the step that produces the interval-th value of the current
  // seed (or later, if no seed was waiting then), so every seed yields
  // reseed_interval values when seeds keep up.
  assign gen_reseed   = sq_pop_valid &&
                        ((since_reseed >= reseed_interval) ||
                         (gen_step && ({1'b0, since_reseed} + 1'b1 >= {1'b0, reseed_interval})));
  assign sq_pop_ready = gen_reseed;
  assign gen_step     = svq_push_ready;
  assign reseed_event = gen_reseed;

  stac_taus_gen #(.RESET_SEED(RESET_SEED)) u_gen (
    .clk, .rst_n,
    .step   (gen_step),
    .reseed (gen_reseed),
    .seed   (sq_pop_data),
    .out    (gen_out)
  );

  stac_sv_queue #(.DEPTH(SV_DEPTH)) u_sv_q (
    .clk, .rst_n,
    .push_valid (1'b1),
    .push_data  (gen_out),
    .push_ready (svq_push_ready),
    .rd_valid, .rd_end, .rd_ready, .rd_data,
    .count      (sv_count)
  );

  // Values produced since the last reseed, saturating.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_reseed <= '0;
    end else if (gen_reseed) begin
      since_reseed <= '0;
    end else if (gen_step && since_reseed != '1) begin
      since_reseed <= since_reseed + 1'b1;
    end
  end

endmodule
