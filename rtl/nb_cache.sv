// nb_cache: non-blocking ("lockup-free") L1 cache for node data.
//
// The reorder buffer relies on a cache that keeps serving lookups while
// misses are outstanding and that tells it when a miss has completed. This
// block gives exactly that; its organisation is this design's own choice,
// the simplest that does the job:
//   - direct mapped, SETS lines of one node record (DATA_W bits) each,
//     indexed by the low address bits, tagged by the rest;
//   - one lookup per cycle, answered one cycle later (L1 latency 1):
//     `rsp_hit` with `rsp_data`, or a miss;
//   - a miss allocates a miss-status register (MSHR) holding the address,
//     unless one with the same address is already pending, in which case it
//     is merged and no second memory request is sent;
//   - MSHRs issue their requests to the next level (`mem_req_*`,
//     valid/ready) lowest index first; a response (`mem_rsp_*`, address and
//     data) is written into the line, frees the MSHR and is broadcast on
//     `fill_*` in the same cycle, which is the "miss complete" signal;
//   - a lookup that finds its data arriving in the same cycle is answered as
//     a hit with the arriving data, so no completion is ever missed.
// With MSHRS equal to the buffer depth the MSHRs cannot run out: every
// pending MSHR has at least one ray waiting on it in the buffer. An assertion
// checks that. `req_tag` is carried to `rsp_tag` unchanged.
module nb_cache
  import rt_pkg::*;
#(
  parameter int unsigned SETS  = 256,
  parameter int unsigned MSHRS = 16,
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic             req_valid,
  input  addr_t            req_addr,
  input  logic [TAG_W-1:0] req_tag,
  output logic             rsp_valid,
  output logic             rsp_hit,
  output logic [TAG_W-1:0] rsp_tag,
  output node_t            rsp_data,
  // miss completion broadcast
  output logic             fill_valid,
  output addr_t            fill_addr,
  // next memory level
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output addr_t            mem_req_addr,
  input  logic             mem_rsp_valid,
  input  addr_t            mem_rsp_addr,
  input  node_t            mem_rsp_data,
  // events
  output logic             ev_miss_alloc,   // miss sent to memory
  output logic             ev_miss_merge    // miss merged into a pending MSHR
);
  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned TW = ADDR_W - SW;
  localparam int unsigned MW = $clog2(MSHRS);

  logic [TW-1:0]   tag_q [SETS];
  node_t           dat_q [SETS];
  logic [SETS-1:0] lv_q;

  logic [MSHRS-1:0] m_vld, m_iss;
  addr_t            m_addr [MSHRS];

  // ------------------------------------------------------ lookup stage
  logic             s_vld;
  addr_t            s_addr;
  logic [TAG_W-1:0] s_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_vld <= 1'b0;
    else        s_vld <= req_valid;
  end
  always_ff @(posedge clk) begin
    s_addr <= req_addr;
    s_tag  <= req_tag;
  end

  logic [SW-1:0] s_set;
  logic          arr_hit, fwd_hit;
  assign s_set   = s_addr[SW-1:0];
  assign arr_hit = lv_q[s_set] && tag_q[s_set] == s_addr[ADDR_W-1:SW];
  assign fwd_hit = mem_rsp_valid && mem_rsp_addr == s_addr;

  assign rsp_valid = s_vld;
  assign rsp_hit   = arr_hit || fwd_hit;
  assign rsp_tag   = s_tag;
  assign rsp_data  = fwd_hit ? mem_rsp_data : dat_q[s_set];

  // ----------------------------------------------------------- MSHRs
  logic          miss, m_match, m_free_ok, iss_ok, fill_hit_m;
  logic [MW-1:0] m_free, iss_idx, fill_m;

  assign miss = s_vld && !rsp_hit;

  always_comb begin
    m_match = 1'b0;
    m_free_ok = 1'b0; m_free = '0;
    iss_ok = 1'b0;    iss_idx = '0;
    fill_hit_m = 1'b0; fill_m = '0;
    for (int unsigned i = 0; i < MSHRS; i++) begin
      if (m_vld[i] && m_addr[i] == s_addr) m_match = 1'b1;
      if (!m_vld[i] && !m_free_ok) begin
        m_free_ok = 1'b1; m_free = MW'(i);
      end
      if (m_vld[i] && !m_iss[i] && !iss_ok) begin
        iss_ok = 1'b1; iss_idx = MW'(i);
      end
      if (mem_rsp_valid && m_vld[i] && m_iss[i] && m_addr[i] == mem_rsp_addr) begin
        fill_hit_m = 1'b1; fill_m = MW'(i);
      end
    end
  end

  assign ev_miss_merge = miss && m_match;
  assign ev_miss_alloc = miss && !m_match && m_free_ok;

  assign mem_req_valid = iss_ok;
  assign mem_req_addr  = m_addr[iss_idx];

  assign fill_valid = mem_rsp_valid;
  assign fill_addr  = mem_rsp_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_vld <= '0;
      m_iss <= '0;
      lv_q  <= '0;
    end else begin
      if (mem_req_valid && mem_req_ready) m_iss[iss_idx] <= 1'b1;
      if (fill_hit_m) begin
        m_vld[fill_m] <= 1'b0;
        m_iss[fill_m] <= 1'b0;
      end
      if (ev_miss_alloc) begin
        m_vld[m_free] <= 1'b1;
        m_iss[m_free] <= 1'b0;
      end
      if (mem_rsp_valid) lv_q[mem_rsp_addr[SW-1:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ev_miss_alloc) m_addr[m_free] <= s_addr;
    if (mem_rsp_valid) begin
      tag_q[mem_rsp_addr[SW-1:0]] <= mem_rsp_addr[ADDR_W-1:SW];
      dat_q[mem_rsp_addr[SW-1:0]] <= mem_rsp_data;
    end
  end

  // ----------------------------------------------------------- checks
  a_mshr_room: assert property (@(posedge clk) disable iff (!rst_n)
    miss |-> (m_match || m_free_ok));
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> fill_hit_m);

endmodule
