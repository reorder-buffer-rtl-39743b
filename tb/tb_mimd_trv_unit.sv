// tb_mimd_trv_unit: end-to-end test of the traversal unit at its default
// size, behind the L2/DRAM model, for DRAM latencies of 10, 100, 200 and 300
// cycles with an L2 latency of 20 (the unit is reset between latencies).
//
// Each run sends RAYS rays into a levelled scene (see l2_dram_model): ray i
// starts at a random node of a random level s and must come out exactly once,
// with its payload unchanged and LEVELS - s nodes visited. The number of
// pipeline entries must equal the total number of node visits. Every
// mechanism of the unit is counted over the runs and must have happened:
// misses kept in the buffer, wake-ups on miss completion, woken rays picked
// first, redundant lookups avoided, misses merged in the cache, rays fed back
// by the pipeline, and new rays refused while the buffer was full. Pipeline
// utilisation per latency is printed.
module tb_mimd_trv_unit;
  import rt_pkg::*;
  localparam int unsigned RAYS   = 400;
  localparam int unsigned LEVELS = 6;
  localparam int unsigned NODES  = 64;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready; ray_req_t in_req;
  logic out_valid; ray_t out_ray;
  logic mem_req_valid, mem_req_ready; addr_t mem_req_addr;
  logic mem_rsp_valid; addr_t mem_rsp_addr; node_t mem_rsp_data;
  logic [31:0] cnt_exec, cnt_idle, cnt_retain, cnt_merge, cnt_done, cnt_wake,
               cnt_sel_ready, cnt_mem_req, cnt_mshr_merge, cnt_pipe_busy, cnt_full;
  logic [4:0]  rays_buffered, rays_in_pipe;
  int dram_lat;

  mimd_trv_unit dut (.*);

  l2_dram_model #(.L2_LAT(20), .LEVELS(LEVELS), .NODES(NODES)) u_mem (
    .clk, .rst_n, .dram_lat,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .rsp_valid(mem_rsp_valid), .rsp_addr(mem_rsp_addr), .rsp_data(mem_rsp_data)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: FAIL %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_visits [RAYS];
  int seen [RAYS];
  int n_out, n_fb_rays;
  int sum_retain, sum_merge, sum_wake, sum_sel, sum_mshr, sum_full, sum_fb, sum_idle;

  always @(negedge clk) if (rst_n && out_valid) begin
    int r;
    r = int'(out_ray.rid);
    n_out++;
    check(r < RAYS, "ray id in range");
    if (r < RAYS) begin
      seen[r]++;
      check(seen[r] == 1, "ray finishes once");
      check(int'(out_ray.visits) == exp_visits[r], "visited node count");
      check(out_ray.payload == {6{32'(r * 13 + 7)}}, "payload kept");
      if (exp_visits[r] > 1) n_fb_rays++;
    end
  end

  initial begin
    int lats[4] = '{10, 100, 200, 300};
    longint t0;
    in_valid = 0; in_req = '0; dram_lat = 10;
    foreach (lats[k]) begin
      int total_visits;
      dram_lat = lats[k];
      rst_n = 0;
      repeat (3) @(posedge clk);
      n_out = 0; n_fb_rays = 0; total_visits = 0;
      foreach (seen[i]) seen[i] = 0;
      @(negedge clk);
      rst_n = 1;
      t0 = cyc;
      for (int i = 0; i < RAYS; i++) begin
        int lvl, idx;
        lvl = $urandom_range(0, LEVELS - 1);
        idx = $urandom_range(0, NODES - 1);
        exp_visits[i] = LEVELS - lvl;
        total_visits += LEVELS - lvl;
        in_valid = 1;
        in_req.ray.rid = RID_W'(i);
        in_req.ray.visits = '0;
        in_req.ray.payload = {6{32'(i * 13 + 7)}};
        in_req.addr = ADDR_W'(lvl * NODES + idx);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      while (n_out < RAYS) @(negedge clk);
      repeat (5) @(negedge clk);
      check(cnt_done == RAYS, "done counter");
      check(cnt_exec == 32'(total_visits), "one pipeline entry per node visit");
      foreach (seen[i]) check(seen[i] == 1, "every ray finished");
      $display("DRAM %0d: %0d rays, %0d cycles, pipeline busy %0d%%, entries %0d, retained %0d, woken %0d, woken-first %0d, merged %0d, mshr-merged %0d, memreq %0d, refused %0d",
               lats[k], RAYS, cyc - t0, 100 * cnt_pipe_busy / (cyc - t0), cnt_exec, cnt_retain,
               cnt_wake, cnt_sel_ready, cnt_merge, cnt_mshr_merge, cnt_mem_req, cnt_full);
      sum_retain += cnt_retain; sum_merge += cnt_merge; sum_wake += cnt_wake;
      sum_sel += cnt_sel_ready; sum_mshr += cnt_mshr_merge; sum_full += cnt_full;
      sum_fb += n_fb_rays; sum_idle += cnt_idle;
    end
    check(sum_retain > 0, "mechanism: miss kept in buffer");
    check(sum_wake > 0, "mechanism: wake-up on miss completion");
    check(sum_sel > 0, "mechanism: woken ray selected first");
    check(sum_merge > 0, "mechanism: redundancy control");
    check(sum_mshr > 0, "mechanism: miss merged in cache");
    check(sum_fb > 0, "mechanism: feedback from pipeline");
    check(sum_full > 0, "mechanism: new ray refused when full");
    check(sum_idle > 0, "mechanism: all buffered rays waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
