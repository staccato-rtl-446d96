// stac_sv_queue: the SV Queue, which decouples the generator from the core
// by holding stochastic values produced ahead of demand.
//
// New values enter at the head. The main thread reads the tail (the oldest
// value) with RDRAND END=TAIL, which removes it; the generator then refills
// the head. The helper thread reads the head (the newest value) with RDRAND
// END=HEAD, which does not remove it: with a full queue that is the value the
// main thread will receive DEPTH tail reads later, so the helper thread can
// precompute and prefetch for it. The default depth of 8 entries (32 bytes)
// is the design's.
//
// Interface: `push_valid/push_data/push_ready` from the generator;
// `rd_valid/rd_end` with `rd_ready/rd_data` to the core. `rd_ready` is high
// when the queue holds a value; `rd_data` is combinational from the selected
// end. A tail read and a push may happen in the same cycle, so a full queue
// sustains one value per cycle. The circular-buffer layout is this design's.
module stac_sv_queue
  import staccato_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_valid,
  input  sv_t                        push_data,
  output logic                       push_ready,
  input  logic                       rd_valid,
  input  rd_end_e                    rd_end,
  output logic                       rd_ready,
  output sv_t                        rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  sv_t           mem [DEPTH];
  logic [PW-1:0] tail_ptr, head_ptr;   // head_ptr: next slot to write
  logic [PW-1:0] newest_ptr;
  logic          do_push, do_pop;

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign newest_ptr = (head_ptr == '0) ? PW'(DEPTH - 1) : head_ptr - 1'b1;
  assign rd_ready   = (count != '0);
  assign rd_data    = (rd_end == END_HEAD) ? mem[newest_ptr] : mem[tail_ptr];
  assign do_pop     = rd_valid && rd_ready && (rd_end == END_TAIL);
  // A tail read frees a slot in the same cycle.
  assign push_ready = (count < DEPTH[$clog2(DEPTH+1)-1:0]) || do_pop;
  assign do_push    = push_valid && push_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_ptr <= '0;
      head_ptr <= '0;
      count    <= '0;
    end else begin
      if (do_push) head_ptr <= ptr_inc(head_ptr);
      if (do_pop)  tail_ptr <= ptr_inc(tail_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[head_ptr] <= push_data;
  end

endmodule
