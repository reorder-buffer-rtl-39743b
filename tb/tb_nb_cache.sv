// tb_nb_cache: random test of the non-blocking L1 cache.
// Lookups to a small random address set are issued on random cycles while a
// memory model answers misses after random delays, out of order. The
// testbench keeps its own copy of which address each direct-mapped line
// holds and checks, for every lookup: that the answer comes exactly one
// cycle later with the same tag; that hit/miss matches the copy (a line
// arriving in the same cycle counts as a hit); that hit data equals the
// record of the address. It also checks that the cache never has two
// memory requests outstanding for one address (misses to a pending address
// are merged), that every miss is followed by a fill of its address, and
// that fills are broadcast in the cycle the memory answers.
module tb_nb_cache;
  import rt_pkg::*;
  localparam int unsigned SETS = 16, MSHRS = 8, TAG_W = 4;

  logic clk = 0, rst_n = 0;
  logic req_valid; addr_t req_addr; logic [TAG_W-1:0] req_tag;
  logic rsp_valid, rsp_hit; logic [TAG_W-1:0] rsp_tag; node_t rsp_data;
  logic fill_valid; addr_t fill_addr;
  logic mem_req_valid, mem_req_ready; addr_t mem_req_addr;
  logic mem_rsp_valid; addr_t mem_rsp_addr; node_t mem_rsp_data;
  logic ev_miss_alloc, ev_miss_merge;

  nb_cache #(.SETS(SETS), .MSHRS(MSHRS), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;

  function automatic node_t rec(addr_t a);
    return {a[25:0] ^ 26'h155_5555, 12'h0, a[25:0]};
  endfunction

  // memory: pending requests with random delays
  typedef struct { int due; addr_t a; } mreq_t;
  mreq_t mq[$];
  bit outstanding [addr_t];
  int  waiting_miss [addr_t];  // misses seen, not yet filled
  addr_t line [SETS];
  bit    line_v [SETS];

  int n_hit = 0, n_miss = 0, n_merge = 0, n_fwd = 0, n_memreq = 0;

  // previous-cycle lookup, for the one-cycle response check
  logic p_v; addr_t p_a; logic [TAG_W-1:0] p_t;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory response selection (combinational)
  always_comb begin
    mem_rsp_valid = 0; mem_rsp_addr = '0;
    for (int i = 0; i < mq.size(); i++)
      if (!mem_rsp_valid && mq[i].due <= cyc) begin
        mem_rsp_valid = 1; mem_rsp_addr = mq[i].a;
      end
    mem_rsp_data = rec(mem_rsp_addr);
  end

  always @(negedge clk) if (rst_n) begin
    // check the answer to the lookup of the previous cycle
    checks++;
    if (rsp_valid != p_v) begin
      failures++; $display("cycle %0d: rsp_valid %0b expected %0b", cyc, rsp_valid, p_v);
    end
    if (p_v) begin
      bit exp_hit;
      int s;
      s = int'(p_a) % SETS;
      exp_hit = (line_v[s] && line[s] == p_a) || (mem_rsp_valid && mem_rsp_addr == p_a);
      if (mem_rsp_valid && mem_rsp_addr == p_a && !(line_v[s] && line[s] == p_a)) n_fwd++;
      checks++;
      if (rsp_hit != exp_hit || rsp_tag != p_t || (exp_hit && rsp_data != rec(p_a))) begin
        failures++;
        $display("cycle %0d: addr %h hit %0b exp %0b tag %0d/%0d", cyc, p_a, rsp_hit, exp_hit, rsp_tag, p_t);
      end
      if (exp_hit) n_hit++;
      else begin
        n_miss++;
        if (waiting_miss.exists(p_a)) n_merge++;
        waiting_miss[p_a] = 1;
      end
    end
    // fills
    checks++;
    if (fill_valid != mem_rsp_valid || (fill_valid && fill_addr != mem_rsp_addr)) begin
      failures++; $display("cycle %0d: fill broadcast wrong", cyc);
    end
    // memory request
    if (mem_req_valid && mem_req_ready) begin
      checks++;
      n_memreq++;
      if (outstanding.exists(mem_req_addr)) begin
        failures++; $display("cycle %0d: second request for %h", cyc, mem_req_addr);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mem_rsp_valid) begin
      int s;
      s = int'(mem_rsp_addr) % SETS;
      line[s] = mem_rsp_addr; line_v[s] = 1;
      outstanding.delete(mem_rsp_addr);
      waiting_miss.delete(mem_rsp_addr);
      foreach (mq[i]) if (mq[i].a == mem_rsp_addr && mq[i].due <= cyc) begin
        mq.delete(i); break;
      end
    end
    if (mem_req_valid && mem_req_ready) begin
      outstanding[mem_req_addr] = 1;
      mq.push_back('{due: cyc + $urandom_range(2, 40), a: mem_req_addr});
    end
    p_v <= req_valid; p_a <= req_addr; p_t <= req_tag;
  end

  initial begin
    req_valid = 0; req_addr = '0; req_tag = '0; mem_req_ready = 1;
    p_v = 0;
    foreach (line_v[i]) line_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(posedge clk); #1;
      // at most MSHRS distinct misses may be pending: the cache relies on it
      req_valid = ($urandom_range(0, 2) != 0) && (waiting_miss.num() < MSHRS - 1);
      req_addr  = ADDR_W'({$urandom_range(0, 3), 4'($urandom_range(0, SETS - 1))});
      req_tag   = TAG_W'($urandom);
      mem_req_ready = ($urandom_range(0, 4) != 0);
    end
    @(posedge clk); #1 req_valid = 0; mem_req_ready = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (waiting_miss.num() != 0 || outstanding.num() != 0) begin
      failures++; $display("misses never filled: %0d", waiting_miss.num());
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_merge == 0 || n_fwd == 0 || n_memreq >= n_miss) begin
      failures++;
    end
    $display("hits %0d misses %0d merged %0d forwarded %0d memreq %0d", n_hit, n_miss, n_merge, n_fwd, n_memreq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
