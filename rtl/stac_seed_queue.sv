// stac_seed_queue: the Seed Queue, a small FIFO of 32-bit seeds waiting to
// replace the generator's S1 register.
//
// It is filled by RDSEED with a source register, or by the processor's seed
// generator when one is present, and drained by the reseed logic. With the
// default depth of 2 it holds 8 bytes, the size the design gives.
//
// Interface: valid/ready on both sides. `push_ready` is low when full,
// `pop_valid` low when empty; `pop_data` is the oldest seed, combinational.
// A push and a pop may happen in the same cycle. Storage is a circular
// buffer; the pointer layout is this design's choice.
module stac_seed_queue
  import staccato_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_valid,
  input  sv_t                        push_data,
  output logic                       push_ready,
  output logic                       pop_valid,
  output sv_t                        pop_data,
  input  logic                       pop_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  sv_t           mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign push_ready = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop_valid  = (count != '0);
  assign pop_data   = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= ptr_inc(wr_ptr);
      if (do_pop)  rd_ptr <= ptr_inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

endmodule
