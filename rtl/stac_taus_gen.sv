// stac_taus_gen: the StAccato generator core, three 32-bit state registers
// S1, S2 and S3 with Taus88 next-state logic and a three-input XOR output.
//
// Each register is updated by a bit rearrangement and a partial self-XOR:
//   S1' = {S1[19:1],  S1[18:6]  ^ S1[31:19]}   (13-bit XOR)
//   S2' = {S2[27:3],  S2[29:23] ^ S2[31:25]}   (7-bit XOR)
//   S3' = {S3[14:4],  S3[28:8]  ^ S3[31:11]}   (21-bit XOR)
//   out = S1 ^ S2 ^ S3
// These are the Taus88 recurrences of L'Ecuyer written as slices. A select in
// front of S1 loads an external seed; S2 and S3 then restart from 8 and 16,
// so all three registers stay non-zero as Taus88 requires.
//
// Interface: `out` is combinational from the registers, so the value that
// will be produced is always visible. `step` advances all three registers by
// one Taus88 step at the clock edge. `reseed` (with `seed`) replaces the
// state at the clock edge whatever `step` is, and wins over it.
// Timing: one new value per cycle while `step` is high.
//
// The reset value of S1 (parameter RESET_SEED) is this design's choice; the
// reseed constants for S2 and S3 follow the design. The S3 slice S3[14:4] is
// the one Taus88 defines.
module stac_taus_gen
  import staccato_pkg::*;
#(
  parameter sv_t RESET_SEED = 32'h2545_F491
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic reseed,
  input  sv_t  seed,
  output sv_t  out
);

  sv_t s1_q, s2_q, s3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= RESET_SEED;
      s2_q <= S2_RESEED;
      s3_q <= S3_RESEED;
    end else if (reseed) begin
      s1_q <= seed;
      s2_q <= S2_RESEED;
      s3_q <= S3_RESEED;
    end else if (step) begin
      s1_q <= s1_next(s1_q);
      s2_q <= s2_next(s2_q);
      s3_q <= s3_next(s3_q);
    end
  end

  assign out = s1_q ^ s2_q ^ s3_q;

endmodule
