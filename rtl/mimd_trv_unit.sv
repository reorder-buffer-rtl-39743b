// mimd_trv_unit: one MIMD ray traversal unit with reorder-buffer
// multithreading.
//
// Rays arrive at the input buffer, are looked up in a non-blocking L1 cache
// and, on a hit, enter the traversal pipeline with their node data. A ray
// that misses is not stalled on, bypassed or parked in a separate buffer: it
// stays in its input-buffer entry (reorder_buffer) until the cache reports
// its miss complete, and meanwhile other rays use the cache and the
// pipeline. Rays that need another node come back from the pipeline into the
// same buffer; finished rays leave on `out_*`. This organisation (input
// buffer, cache feeding data into the buffer path, pipeline with a feedback
// path) follows the reorder-buffer scheme; the memory behind the L1 (an L2
// and DRAM) is outside this unit and reached through `mem_*`.
//
// Interface: `in_*` valid/ready for new rays, each with the address of its
// first node; `out_*` finished rays (no backpressure, a finished ray must be
// taken when shown); `mem_*` one request per cycle (valid/ready) and
// responses carrying address and node record, in any order.
// Statistics: cycles in which a ray entered the pipeline (`cnt_exec`),
// cycles in which rays were buffered but none entered (`cnt_idle`), misses
// kept in the buffer (`cnt_retain`), redundant lookups avoided
// (`cnt_merge`), finished rays (`cnt_done`), retained rays woken by a
// completed miss (`cnt_wake`), lookups granted to woken rays
// (`cnt_sel_ready`), misses sent to memory (`cnt_mem_req`), misses merged in
// the cache (`cnt_mshr_merge`), cycles with a ray in the pipeline
// (`cnt_pipe_busy`) and cycles in which a new ray was refused (`cnt_full`);
// `rays_buffered` and `rays_in_pipe` show the current load.
module mimd_trv_unit
  import rt_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned SETS   = 256,
  parameter int unsigned STAGES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  ray_req_t    in_req,
  output logic        out_valid,
  output ray_t        out_ray,
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output addr_t       mem_req_addr,
  input  logic        mem_rsp_valid,
  input  addr_t       mem_rsp_addr,
  input  node_t       mem_rsp_data,
  output logic [31:0] cnt_exec,
  output logic [31:0] cnt_idle,
  output logic [31:0] cnt_retain,
  output logic [31:0] cnt_merge,
  output logic [31:0] cnt_done,
  output logic [31:0] cnt_wake,
  output logic [31:0] cnt_sel_ready,
  output logic [31:0] cnt_mem_req,
  output logic [31:0] cnt_mshr_merge,
  output logic [31:0] cnt_pipe_busy,
  output logic [31:0] cnt_full,
  output logic [$clog2(DEPTH):0] rays_buffered,
  output logic [$clog2(DEPTH):0] rays_in_pipe
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic          lk_valid, res_valid, res_hit, fill_valid;
  addr_t         lk_addr, fill_addr;
  logic [IW-1:0] lk_idx, res_idx;
  node_t         res_data;
  logic          disp_valid, fb_valid, done_valid;
  ray_req_t      disp_req, fb_req;
  logic [IW:0]   occupancy, in_pipe, ev_wake;
  logic          ev_retain, ev_sel_ready, pipe_busy;
  logic          ev_miss_alloc, ev_miss_merge;
  logic [31:0]   merge_cnt;

  reorder_buffer #(.DEPTH(DEPTH)) u_rob (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_req,
    .fb_valid, .fb_req,
    .retire(done_valid),
    .lk_valid, .lk_addr, .lk_idx,
    .res_valid, .res_hit, .res_idx,
    .fill_valid, .fill_addr,
    .disp_valid, .disp_req,
    .occupancy, .in_pipe, .merge_cnt,
    .ev_retain, .ev_sel_ready, .ev_wake
  );

  nb_cache #(.SETS(SETS), .MSHRS(DEPTH), .TAG_W(IW)) u_l1 (
    .clk, .rst_n,
    .req_valid(lk_valid), .req_addr(lk_addr), .req_tag(lk_idx),
    .rsp_valid(res_valid), .rsp_hit(res_hit), .rsp_tag(res_idx),
    .rsp_data(res_data),
    .fill_valid, .fill_addr,
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_rsp_valid, .mem_rsp_addr, .mem_rsp_data,
    .ev_miss_alloc, .ev_miss_merge
  );

  trv_pipeline #(.STAGES(STAGES)) u_pipe (
    .clk, .rst_n,
    .in_valid(disp_valid), .in_req(disp_req), .in_data(res_data),
    .done_valid, .done_ray(out_ray),
    .fb_valid, .fb_req,
    .busy(pipe_busy)
  );

  assign out_valid     = done_valid;
  assign rays_buffered = occupancy;
  assign rays_in_pipe  = in_pipe;
  assign cnt_merge = merge_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_exec   <= '0;
      cnt_idle   <= '0;
      cnt_retain <= '0;
      cnt_done   <= '0;
      cnt_wake       <= '0;
      cnt_sel_ready  <= '0;
      cnt_mem_req    <= '0;
      cnt_mshr_merge <= '0;
      cnt_pipe_busy  <= '0;
      cnt_full       <= '0;
    end else begin
      cnt_wake <= cnt_wake + 32'(ev_wake);
      if (ev_sel_ready)           cnt_sel_ready  <= cnt_sel_ready + 1;
      if (ev_miss_alloc)          cnt_mem_req    <= cnt_mem_req + 1;
      if (ev_miss_merge)          cnt_mshr_merge <= cnt_mshr_merge + 1;
      if (pipe_busy)              cnt_pipe_busy  <= cnt_pipe_busy + 1;
      if (in_valid && !in_ready)  cnt_full       <= cnt_full + 1;
      if (disp_valid)                      cnt_exec   <= cnt_exec + 1;
      if (!disp_valid && occupancy != '0)  cnt_idle   <= cnt_idle + 1;
      if (ev_retain)                       cnt_retain <= cnt_retain + 1;
      if (done_valid)                      cnt_done   <= cnt_done + 1;
    end
  end

endmodule
