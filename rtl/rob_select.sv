// rob_select: selection priority of the reorder buffer.
//
// Every cycle the buffer may send one ray to the cache. This block picks it
// from the per-entry valid/ready/occupied bits:
//   1. a retained ray whose miss has completed (valid=0, ready=1): its data
//      has arrived in the cache, so it is sure to hit;
//   2. otherwise a newly arrived ray (valid=1), which might hit.
// Waiting rays (valid=0, ready=0) and entries marked `busy` (their cache
// lookup is in progress) are never picked. That two-level order is the one
// the reorder-buffer scheme defines. Within a level the choice is this
// design's own: round-robin, starting just after the entry granted last, so
// that no entry starves.
//
// Interface: purely combinational from the entry bits and `last`, the index
// granted previously (kept by the buffer). `gnt_valid` says something was
// picked, `gnt_idx` which entry, `gnt_ready` from which level.
module rob_select #(
  parameter int unsigned DEPTH = 16
) (
  input  logic [DEPTH-1:0]         occ,     // entry holds a ray
  input  logic [DEPTH-1:0]         valid,   // valid bit per entry
  input  logic [DEPTH-1:0]         ready,   // ready bit per entry
  input  logic [DEPTH-1:0]         busy,    // lookup in flight, skip
  input  logic [$clog2(DEPTH)-1:0] last,    // index granted last
  output logic                     gnt_valid,
  output logic                     gnt_ready, // granted from level 1
  output logic [$clog2(DEPTH)-1:0] gnt_idx
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] lvl1, lvl2;

  assign lvl1 = occ & ~busy & ~valid & ready;
  assign lvl2 = occ & ~busy & valid;

  // Round-robin pick: first set bit at or after last+1, wrapping.
  function automatic logic [IW:0] rr_pick(logic [DEPTH-1:0] req,
                                          logic [IW-1:0] start);
    logic [IW:0] res;
    int unsigned k;
    res = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      k = (int'(start) + 1 + i) % DEPTH;
      if (!res[IW] && req[k]) res = {1'b1, IW'(k)};
    end
    return res;
  endfunction

  logic [IW:0] p1, p2;

  always_comb begin
    p1 = rr_pick(lvl1, last);
    p2 = rr_pick(lvl2, last);
    if (p1[IW]) begin
      gnt_valid = 1'b1;
      gnt_ready = 1'b1;
      gnt_idx   = p1[IW-1:0];
    end else begin
      gnt_valid = p2[IW];
      gnt_ready = 1'b0;
      gnt_idx   = p2[IW-1:0];
    end
  end

endmodule
