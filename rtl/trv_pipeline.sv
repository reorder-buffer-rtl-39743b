// trv_pipeline: the traversal (or intersection) pipeline behind the buffer.
//
// A ray enters together with the node record the cache returned for it. It
// passes a chain of pipeline latches with logic between them and never
// stalls: a ray accepted on cycle t appears at the output on cycle
// t + STAGES + 1 (an input latch, then STAGES logic levels each closed by a
// latch). At the output a ray either leaves the unit finished (`done_*`) or
// is sent back to the input buffer with the address of the next node it
// needs (`fb_*`). The latch chain, the never-stalling flow and the split
// into an exit and a feedback path follow the traversal-unit organisation
// this design is built around.
//
// The arithmetic of a real traversal step (ray/box and ray/triangle tests,
// a traversal stack) is not part of this design. The logic levels here
// perform a node walk on the record layout defined in rt_pkg: level 1
// decodes the next-node address and the terminal flag, level 2 counts the
// visited node in the ray, the remaining levels carry the result.
module trv_pipeline
  import rt_pkg::*;
#(
  parameter int unsigned STAGES = 4   // logic levels, at least 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  ray_req_t in_req,
  input  node_t    in_data,
  // finished rays
  output logic     done_valid,
  output ray_t     done_ray,
  // rays returning to the input buffer
  output logic     fb_valid,
  output ray_req_t fb_req,
  // a ray is in some latch (pipeline utilisation)
  output logic     busy
);
  typedef struct packed {
    ray_req_t req;
    node_t    data;
    logic     last;
  } slot_t;

  logic [STAGES:0] v_q;
  slot_t           s_q [STAGES+1];

  // logic of each level, from latch k to latch k+1
  function automatic slot_t level(int unsigned k, slot_t s);
    slot_t r;
    r = s;
    if (k == 0) begin
      r.req.addr = node_next(s.data);
      r.last     = node_last(s.data);
    end else if (k == 1) begin
      r.req.ray.visits = s.req.ray.visits + VISIT_W'(1);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[STAGES-1:0], in_valid};
  end

  always_ff @(posedge clk) begin
    s_q[0] <= '{req: in_req, data: in_data, last: 1'b0};
    for (int unsigned k = 0; k < STAGES; k++)
      s_q[k+1] <= level(k, s_q[k]);
  end

  assign done_valid = v_q[STAGES] && s_q[STAGES].last;
  assign done_ray   = s_q[STAGES].req.ray;
  assign fb_valid   = v_q[STAGES] && !s_q[STAGES].last;
  assign fb_req     = s_q[STAGES].req;
  assign busy       = |v_q;

endmodule
