// tb_reorder_buffer: directed test of the reorder buffer, following the
// worked example of the scheme.
//
// The testbench plays the L1 cache: a lookup is answered one cycle later,
// as a hit when the address is in the testbench's set of present addresses.
// Sequence and checks:
//   1. R0@0x1, R1@0x2, R2@0x3, R3@0x4 arrive; only 0x3 is present. Lookups
//      go out in arrival order, each in the cycle after its ray arrived
//      (while the previous ray's answer comes back), R2 is dispatched two
//      cycles after it arrived, R0, R1, R3 stay in the buffer.
//   2. R4@0x1 arrives while R0 waits on 0x1: no lookup, merge count 1.
//   3. 0x1 completes while R10@0xA arrives, then R11@0x6: the next two
//      lookups are R0 and R4 (woken rays first), then the new rays.
//   4. R2 comes back from the pipeline needing 0x2, where R1 waits: merged.
//   5. Remaining misses complete; every ray is dispatched exactly as often
//      as expected and the buffer ends empty.
//   6. Credit: DEPTH missing rays fill the buffer; new rays are refused;
//      after all are dispatched the buffer is empty but still refuses new
//      rays while DEPTH rays are in the pipeline; a fed-back ray is taken.
// Throughout, in_ready must equal (occupancy + rays in pipeline < DEPTH).
module tb_reorder_buffer;
  import rt_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready; ray_req_t in_req;
  logic fb_valid; ray_req_t fb_req;
  logic retire;
  logic lk_valid; addr_t lk_addr; logic [IW-1:0] lk_idx;
  logic res_valid, res_hit; logic [IW-1:0] res_idx;
  logic fill_valid; addr_t fill_addr;
  logic disp_valid; ray_req_t disp_req;
  logic [IW:0] occupancy, in_pipe, ev_wake;
  logic [31:0] merge_cnt;
  logic ev_retain, ev_sel_ready;

  reorder_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: FAIL %s", cyc, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- cache mimic
  bit present [addr_t];
  logic p_v; addr_t p_a; logic [IW-1:0] p_i;
  assign res_valid = p_v;
  assign res_idx   = p_i;
  assign res_hit   = p_v && (present.exists(p_a) || (fill_valid && fill_addr == p_a));

  addr_t lk_log[$];
  int    lk_cyc[$];
  int    disp_log[$];
  int    disp_cyc[int];
  int    wake_total = 0, retain_total = 0;

  always @(posedge clk) begin
    if (!rst_n) p_v <= 0;
    else begin
      cyc <= cyc + 1;
      p_v <= lk_valid; p_a <= lk_addr; p_i <= lk_idx;
      if (fill_valid) present[fill_addr] = 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (lk_valid) begin
      lk_log.push_back(lk_addr);
      lk_cyc.push_back(cyc);
    end
    if (disp_valid) begin
      disp_log.push_back(int'(disp_req.ray.rid));
      disp_cyc[int'(disp_req.ray.rid)] = cyc;
    end
    wake_total   += int'(ev_wake);
    retain_total += int'(ev_retain);
    check(in_ready == (int'(occupancy) + int'(in_pipe) < DEPTH), "in_ready credit rule");
  end

  // --------------------------------------------------------------- stimulus
  function automatic ray_req_t mk(int rid, int a);
    ray_req_t r;
    r = '0;
    r.ray.rid = RID_W'(rid);
    r.ray.payload = {6{32'(rid * 7 + 1)}};
    r.addr = ADDR_W'(a);
    return r;
  endfunction

  int ins_cyc[int];

  task automatic push(int rid, int a);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_req = mk(rid, a);
    ins_cyc[rid] = cyc;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  int cnt_of[int];
  int nlk;

  initial begin
    in_valid = 0; in_req = '0; fb_valid = 0; fb_req = '0; retire = 0;
    fill_valid = 0; fill_addr = '0;
    present[ADDR_W'(3)] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. four rays, one present address
    @(negedge clk);
    in_valid = 1; in_req = mk(0, 1); ins_cyc[0] = cyc; @(negedge clk);
    in_req = mk(1, 2); ins_cyc[1] = cyc; @(negedge clk);
    in_req = mk(2, 3); ins_cyc[2] = cyc; @(negedge clk);
    in_req = mk(3, 4); ins_cyc[3] = cyc; @(negedge clk);
    in_valid = 0;
    wait_cycles(5);
    check(lk_log.size() == 4 && lk_log[0] == 1 && lk_log[1] == 2 &&
          lk_log[2] == 3 && lk_log[3] == 4, "lookups in arrival order");
    for (int i = 0; i < 4; i++)
      check(lk_cyc[i] == ins_cyc[i] + 1, "lookup in the cycle after arrival");
    check(disp_log.size() == 1 && disp_log[0] == 2, "only R2 dispatched");
    check(disp_cyc.exists(2) && disp_cyc[2] == ins_cyc[2] + 2, "hit dispatch two cycles after arrival");
    check(retain_total == 3, "three misses retained");
    check(occupancy == 3 && in_pipe == 1, "occupancy 3, one ray in pipeline");

    // 2. redundancy control
    push(4, 1);
    wait_cycles(4);
    check(lk_log.size() == 4, "merged ray made no lookup");
    check(merge_cnt == 1, "merge counter 1");
    check(occupancy == 4, "occupancy 4");

    // 3. completion of 0x1 competes with new rays
    nlk = lk_log.size();
    @(negedge clk);
    fill_valid = 1; fill_addr = 1;
    in_valid = 1; in_req = mk(10, 'hA);
    #1 check(ev_wake == 2, "fill wakes R0 and R4");
    @(negedge clk);
    fill_valid = 0;
    in_req = mk(11, 6);
    @(negedge clk);
    in_valid = 0;
    wait_cycles(6);
    check(lk_log.size() == nlk + 4, "four lookups after the fill");
    check(lk_log[nlk] == 1 && lk_log[nlk+1] == 1, "woken rays looked up first");
    check((lk_log[nlk+2] == 'hA && lk_log[nlk+3] == 6) ||
          (lk_log[nlk+2] == 6 && lk_log[nlk+3] == 'hA), "then the new rays");
    check(disp_log.size() == 3, "R0 and R4 dispatched");
    check(in_pipe == 3, "three rays in pipeline");

    // 4. R2 fed back needing 0x2 where R1 waits
    nlk = lk_log.size();
    @(negedge clk);
    fb_valid = 1; fb_req = mk(2, 2);
    @(negedge clk);
    fb_valid = 0;
    retire = 1;             // R0 and R4 leave the pipeline finished
    @(negedge clk);
    @(negedge clk);
    retire = 0;
    wait_cycles(3);
    check(merge_cnt == 2, "fed-back ray merged");
    check(lk_log.size() == nlk, "no lookup for merged feedback");
    check(in_pipe == 0, "pipeline empty");

    // 5. all remaining misses complete
    for (int a = 0; a < 4; a++) begin
      int addrs[4] = '{2, 4, 'hA, 6};
      @(negedge clk);
      fill_valid = 1; fill_addr = ADDR_W'(addrs[a]);
      @(negedge clk);
      fill_valid = 0;
      wait_cycles(3);
    end
    wait_cycles(4);
    foreach (disp_log[i]) cnt_of[disp_log[i]]++;
    check(cnt_of.num() == 7 && disp_log.size() == 8 && cnt_of[2] == 2 && cnt_of[0] == 1 && cnt_of[1] == 1 &&
          cnt_of[3] == 1 && cnt_of[4] == 1 && cnt_of[10] == 1 && cnt_of[11] == 1,
          "each ray dispatched the expected number of times");
    check(occupancy == 0, "buffer empty");
    check(wake_total >= 6, "wake-ups counted");
    @(negedge clk);
    retire = 1;
    while (in_pipe != 0) @(negedge clk);
    retire = 0;

    // 6. credit and full buffer
    for (int i = 0; i < DEPTH; i++) push(100 + i, 'h100 + i);
    wait_cycles(DEPTH + 3);
    check(occupancy == DEPTH && !in_ready, "buffer full refuses rays");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      fill_valid = 1; fill_addr = ADDR_W'('h100 + i);
    end
    @(negedge clk);
    fill_valid = 0;
    wait_cycles(DEPTH + 4);
    check(occupancy == 0 && in_pipe == DEPTH, "all dispatched");
    check(!in_ready, "empty buffer refuses rays while pipeline holds DEPTH");
    @(negedge clk);
    fb_valid = 1; fb_req = mk(200, 'h100);
    @(negedge clk);
    fb_valid = 0;
    wait_cycles(3);
    check(disp_log[disp_log.size() - 1] == 200, "fed-back ray dispatched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
