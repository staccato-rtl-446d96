// staccato_pkg: types and constants shared by the StAccato random-number and
// prefetch blocks.
//
// The generator is the Taus88 combined Tausworthe generator laid out as
// three 32-bit state registers. After a reseed, S2 and S3 restart from the
// fixed non-zero values 8 and 16, as the design specifies. The RDRAND END
// operand and the PREFETCHh hint encodings are this design's own choice; the
// design names the values but not their codes.
package staccato_pkg;

  localparam int unsigned SV_W = 32;              // width of a stochastic value
  typedef logic [SV_W-1:0] sv_t;

  // Values S2 and S3 take when S1 is reseeded.
  localparam sv_t S2_RESEED = 32'd8;
  localparam sv_t S3_RESEED = 32'd16;

  // Which end of the SV queue an RDRAND reads.
  //   TAIL: oldest value, consumed (main thread)
  //   HEAD: newest value, not consumed (helper thread lookahead)
  typedef enum logic {
    END_TAIL = 1'b0,
    END_HEAD = 1'b1
  } rd_end_e;

  // PREFETCHh hints: the four x86 hints plus STACCATO.
  typedef enum logic [2:0] {
    HINT_T0       = 3'd0,
    HINT_T1       = 3'd1,
    HINT_T2       = 3'd2,
    HINT_NTA      = 3'd3,
    HINT_STACCATO = 3'd4
  } pf_hint_e;

  // One Taus88 step of each state register.
  function automatic sv_t s1_next(sv_t s);
    return {s[19:1], s[18:6] ^ s[31:19]};
  endfunction

  function automatic sv_t s2_next(sv_t s);
    return {s[27:3], s[29:23] ^ s[31:25]};
  endfunction

  function automatic sv_t s3_next(sv_t s);
    return {s[14:4], s[28:8] ^ s[31:11]};
  endfunction

endpackage
