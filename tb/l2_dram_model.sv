// l2_dram_model: behavioural model of the memory behind the L1 cache
// (an L2 cache and DRAM), for simulation only.
//
// A request for an address is answered after L2_LAT cycles if the address
// has been fetched before (it is then held in the L2) and after
// L2_LAT + dram_lat cycles otherwise; the L2 is taken as large enough to keep
// every address once fetched. Requests are accepted on `req_valid &&
// req_ready`; `req_ready` is dropped at random on one cycle in STALL_1_IN
// (0 disables that). At most one response is returned per cycle, the one
// that became due first. The node record for an address is produced by
// `node_of`, a function of the address only, so the testbench can compute
// it independently: a record names the next node and carries the terminal
// flag, following the layout in rt_pkg. Reset empties the L2 and drops
// pending requests.
//
// The node graph modelled here is a levelled scene of LEVELS x NODES nodes
// (NODES a power of two): a node's address is level * NODES + index. A node
// of level L points to a node of level L+1 chosen by a fixed mixing of its
// index, and nodes of level LEVELS-1 are terminal. A ray starting at level s therefore visits
// exactly LEVELS - s nodes.
module l2_dram_model
  import rt_pkg::*;
#(
  parameter int unsigned L2_LAT     = 20,
  parameter int unsigned LEVELS     = 6,
  parameter int unsigned NODES      = 64,   // nodes per level, power of 2
  parameter int unsigned STALL_1_IN = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  int    dram_lat,
  input  logic  req_valid,
  output logic  req_ready,
  input  addr_t req_addr,
  output logic  rsp_valid,
  output addr_t rsp_addr,
  output node_t rsp_data
);
  function automatic node_t node_of(addr_t a);
    int unsigned lvl, idx, nidx;
    node_t n;
    lvl  = int'(a) / NODES;
    idx  = int'(a) % NODES;
    nidx = (idx * 37 + lvl * 11 + 5) % NODES;
    n = '0;
    n[DATA_W-1:32]   = a[25:0] ^ 26'h2a5_5a5;   // node contents
    n[ADDR_W]        = (lvl >= LEVELS - 1);
    n[ADDR_W-1:0]    = ADDR_W'((lvl + 1) * NODES + nidx);
    return n;
  endfunction

  typedef struct { longint due; addr_t addr; } pend_t;
  pend_t   pend[$];
  bit      in_l2 [addr_t];
  longint  now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= 0;
      req_ready <= 1'b1;
    end else begin
      now <= now + 1;
      req_ready <= (STALL_1_IN == 0) || ($urandom_range(0, STALL_1_IN - 1) != 0);
    end
  end

  always @(posedge clk or negedge rst_n) if (!rst_n) begin
    pend.delete();
    in_l2.delete();
  end else begin
    if (rsp_valid) begin
      for (int i = 0; i < pend.size(); i++)
        if (pend[i].addr == rsp_addr && pend[i].due <= now) begin
          pend.delete(i);
          break;
        end
      in_l2[rsp_addr] = 1'b1;
    end
    if (req_valid && req_ready)
      pend.push_back('{due: now + L2_LAT + (in_l2.exists(req_addr) ? 0 : dram_lat),
                       addr: req_addr});
  end

  always_comb begin
    longint best;
    rsp_valid = 1'b0;
    rsp_addr  = '0;
    best      = 64'h7fff_ffff_ffff_ffff;
    for (int i = 0; i < pend.size(); i++)
      if (pend[i].due <= now && pend[i].due < best) begin
        best = pend[i].due; rsp_valid = 1'b1; rsp_addr = pend[i].addr;
      end
    rsp_data = node_of(rsp_addr);
  end
endmodule
