// reorder_buffer: the input buffer of a traversal pipeline, extended so that
// it hides cache-miss latency by itself.
//
// Each entry holds a ray plus three fields: a valid bit, a ready bit and the
// 26-bit address of the node data the ray needs. A ray enters with valid=1
// ("new, has not accessed the cache"). The buffer sends one ray per cycle to
// the non-blocking cache, chosen by rob_select (retained rays whose data has
// arrived first, then new rays). One cycle later the cache answers:
//   hit  - the ray leaves the buffer and goes into the pipeline together with
//          its data (`disp_*`, driven in that same cycle);
//   miss - the ray stays in its entry with valid=0, ready=0.
// When the cache reports a completed miss (`fill_*`), every retained entry
// with that address gets ready=1 and becomes eligible again; it will hit.
// Redundancy control: a ray arriving with the address of a ray that is
// already waiting on a miss does not access the cache at all; it is stored
// with valid=0, ready=0 next to it and woken by the same fill, and the merge
// counter is incremented. All of this follows the reorder-buffer scheme.
//
// This design's own choices: rays come from two ports, new rays (`in_*`,
// valid/ready handshake) and rays fed back from the pipeline (`fb_*`, always
// accepted). To make the feedback port never stall, the buffer counts rays in
// the pipeline and admits a new ray only while occupied entries plus rays in
// the pipeline stay below DEPTH; a pipeline ray that finishes is reported on
// `retire`. A new ray matching an entry whose miss has already completed is
// stored with valid=0, ready=1 so that the two leave together. Entries are
// allocated at the lowest free index, feedback first.
//
// Timing: lookup request `lk_*` is combinational from registers; the result
// `res_*` is expected exactly one cycle after the request (L1 latency 1).
module reorder_buffer
  import rt_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // new rays
  input  logic                     in_valid,
  output logic                     in_ready,
  input  ray_req_t                 in_req,
  // rays fed back by the pipeline (always accepted)
  input  logic                     fb_valid,
  input  ray_req_t                 fb_req,
  // a ray left the pipeline finished
  input  logic                     retire,
  // cache lookup request, one per cycle
  output logic                     lk_valid,
  output addr_t                    lk_addr,
  output logic [$clog2(DEPTH)-1:0] lk_idx,
  // cache lookup result, one cycle after the request
  input  logic                     res_valid,
  input  logic                     res_hit,
  input  logic [$clog2(DEPTH)-1:0] res_idx,
  // miss completion broadcast from the cache
  input  logic                     fill_valid,
  input  addr_t                    fill_addr,
  // ray dispatched to the pipeline (same cycle as a hit result)
  output logic                     disp_valid,
  output ray_req_t                 disp_req,
  // status and statistics
  output logic [$clog2(DEPTH):0]   occupancy,
  output logic [$clog2(DEPTH):0]   in_pipe,
  output logic [31:0]              merge_cnt,
  output logic                     ev_retain,   // a ray missed and was kept
  output logic                     ev_sel_ready,// lookup granted to a woken ray
  output logic [$clog2(DEPTH):0]   ev_wake      // entries woken this cycle
);
  localparam int unsigned IW = $clog2(DEPTH);

  typedef logic [IW-1:0] idx_t;

  ray_req_t         ent [DEPTH];
  logic [DEPTH-1:0] occ, vld, rdy, busy;
  idx_t             last;
  logic [IW:0]      pipe_q;
  logic [31:0]      merge_q;

  // ---------------------------------------------------------------- select
  logic gnt_valid, gnt_ready;
  idx_t gnt_idx;

  rob_select #(.DEPTH(DEPTH)) u_sel (
    .occ(occ), .valid(vld), .ready(rdy), .busy(busy), .last(last),
    .gnt_valid(gnt_valid), .gnt_ready(gnt_ready), .gnt_idx(gnt_idx)
  );

  assign lk_valid = gnt_valid;
  assign lk_addr  = ent[gnt_idx].addr;
  assign lk_idx   = gnt_idx;

  // -------------------------------------------------------------- dispatch
  logic hit_now, miss_now;
  assign hit_now    = res_valid && res_hit;
  assign miss_now   = res_valid && !res_hit;
  assign disp_valid = hit_now;
  assign disp_req   = ent[res_idx];

  // ------------------------------------------------------------ occupancy
  always_comb begin
    occupancy = '0;
    for (int unsigned i = 0; i < DEPTH; i++) occupancy += (IW+1)'(occ[i]);
  end
  assign in_pipe   = pipe_q;
  assign merge_cnt = merge_q;
  assign in_ready  = (32'(occupancy) + 32'(pipe_q)) < DEPTH;

  // ------------------------------------------------------------ allocation
  logic       fb_slot_ok, in_slot_ok;
  idx_t       fb_slot, in_slot;
  always_comb begin
    fb_slot_ok = 1'b0; fb_slot = '0;
    in_slot_ok = 1'b0; in_slot = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (!occ[i]) begin
        if (fb_valid && !fb_slot_ok) begin
          fb_slot_ok = 1'b1; fb_slot = idx_t'(i);
        end else if (!in_slot_ok) begin
          in_slot_ok = 1'b1; in_slot = idx_t'(i);
        end
      end
    end
  end

  // ----------------------------------------------- redundancy comparisons
  // For an incoming address: does a retained ray wait on it (merge), or has
  // a retained ray with it already been woken?
  function automatic logic [1:0] classify(addr_t a);
    logic wait_m, woke_m;
    wait_m = 1'b0; woke_m = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (occ[i] && !vld[i] && ent[i].addr == a) begin
        if (rdy[i]) woke_m = 1'b1;
        else        wait_m = 1'b1;
      end
    end
    return {wait_m, woke_m};
  endfunction

  logic [1:0] fb_cls, in_cls;
  logic       fb_fill, in_fill;
  logic       in_fire;
  assign fb_cls  = classify(fb_req.addr);
  assign in_cls  = classify(in_req.addr);
  assign fb_fill = fill_valid && fill_addr == fb_req.addr;
  assign in_fill = fill_valid && fill_addr == in_req.addr;
  assign in_fire = in_valid && in_ready && in_slot_ok;

  logic fb_merge, in_merge, ev_merge;
  // merge: a waiting ray with the same address exists, or the same-cycle
  // fill / earlier wake made the data already present.
  assign fb_merge = fb_valid && (fb_cls[1] || fb_cls[0]);
  assign in_merge = in_fire  && (in_cls[1] || in_cls[0]);

  assign ev_retain    = miss_now;
  assign ev_sel_ready = gnt_valid && gnt_ready;
  assign ev_merge  = (fb_merge && fb_cls[1]) || (in_merge && in_cls[1]);

  always_comb begin
    ev_wake = '0;
    if (fill_valid)
      for (int unsigned i = 0; i < DEPTH; i++)
        if (occ[i] && !vld[i] && !rdy[i] && ent[i].addr == fill_addr)
          ev_wake += (IW+1)'(1);
  end

  // ------------------------------------------------ entry storage (no reset)
  always_ff @(posedge clk) begin
    if (fb_valid && fb_slot_ok) ent[fb_slot] <= fb_req;
    if (in_fire)                ent[in_slot] <= in_req;
  end

  // --------------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ     <= '0;
      vld     <= '0;
      rdy     <= '0;
      busy    <= '0;
      last    <= '0;
      pipe_q  <= '0;
      merge_q <= '0;
    end else begin
      // wake-up of retained rays by a completed miss
      if (fill_valid)
        for (int unsigned i = 0; i < DEPTH; i++)
          if (occ[i] && !vld[i] && ent[i].addr == fill_addr) rdy[i] <= 1'b1;

      // lookup grant
      if (gnt_valid) begin
        busy[gnt_idx] <= 1'b1;
        last          <= gnt_idx;
      end

      // lookup result
      if (res_valid) begin
        busy[res_idx] <= 1'b0;
        if (res_hit) begin
          occ[res_idx] <= 1'b0;
        end else begin
          vld[res_idx] <= 1'b0;
          rdy[res_idx] <= 1'b0;
        end
      end

      // insertion of a fed-back ray
      if (fb_valid && fb_slot_ok) begin
        occ[fb_slot]  <= 1'b1;
        busy[fb_slot] <= 1'b0;
        vld[fb_slot]  <= !fb_merge;
        rdy[fb_slot]  <= fb_merge && (fb_cls[0] || fb_fill);
      end

      // insertion of a new ray
      if (in_fire) begin
        occ[in_slot]  <= 1'b1;
        busy[in_slot] <= 1'b0;
        vld[in_slot]  <= !in_merge;
        rdy[in_slot]  <= in_merge && (in_cls[0] || in_fill);
      end

      // rays in the pipeline: +1 per hit, -1 per feedback or retirement
      pipe_q <= pipe_q + (IW+1)'(hit_now) - (IW+1)'(fb_valid)
                       - (IW+1)'(retire);

      if (ev_merge)
        merge_q <= merge_q + ((fb_merge && fb_cls[1]) && (in_merge && in_cls[1])
                              ? 32'd2 : 32'd1);
    end
  end

  // ----------------------------------------------------------- assertions
  a_fb_room: assert property (@(posedge clk) disable iff (!rst_n)
    fb_valid |-> fb_slot_ok);
  a_res_busy: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> busy[res_idx] && occ[res_idx]);
  a_pipe_credit: assert property (@(posedge clk) disable iff (!rst_n)
    32'(occupancy) + 32'(pipe_q) <= DEPTH);

endmodule
