// tb_trv_pipeline: checks the traversal pipeline.
// Random rays with random node records enter on random cycles. Each must
// appear STAGES+1 cycles later, on the exit port if the record's terminal
// flag is set and on the feedback port otherwise, with the next-node address
// taken from the record and its visit count raised by one.
module tb_trv_pipeline;
  import rt_pkg::*;
  localparam int unsigned STAGES = 4;
  localparam int unsigned LAT = STAGES + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  ray_req_t in_req;
  node_t in_data;
  logic done_valid, fb_valid, busy;
  ray_t done_ray;
  ray_req_t fb_req;

  int checks = 0, failures = 0;
  int cyc = 0;

  trv_pipeline #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; ray_req_t req; node_t data; } exp_t;
  exp_t q[$];
  int n_done = 0, n_fb = 0;

  // monitor on the falling edge, outputs settled
  always @(negedge clk) if (rst_n) begin
    bit exp_v;
    exp_v = q.size() > 0 && q[0].due == cyc;
    checks++;
    if ((done_valid || fb_valid) != exp_v) begin
      failures++;
      $display("cycle %0d: output valid %0b, expected %0b", cyc, done_valid || fb_valid, exp_v);
    end
    if (exp_v) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (e.data[ADDR_W]) begin
        n_done++;
        if (!done_valid || done_ray.rid != e.req.ray.rid ||
            done_ray.visits != e.req.ray.visits + 8'd1 ||
            done_ray.payload != e.req.ray.payload) begin
          failures++;
          $display("cycle %0d: bad finished ray", cyc);
        end
      end else begin
        n_fb++;
        if (!fb_valid || fb_req.ray.rid != e.req.ray.rid ||
            fb_req.addr != e.data[ADDR_W-1:0] ||
            fb_req.ray.visits != e.req.ray.visits + 8'd1 ||
            fb_req.ray.payload != e.req.ray.payload) begin
          failures++;
          $display("cycle %0d: bad fed-back ray", cyc);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_req = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_req.ray.rid     = RID_W'($urandom);
      in_req.ray.visits  = VISIT_W'($urandom);
      in_req.ray.payload = {6{$urandom()}};
      in_req.addr        = ADDR_W'($urandom);
      in_data            = {$urandom(), $urandom()};
      if (in_valid) q.push_back('{due: cyc + LAT, req: in_req, data: in_data});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_done == 0 || n_fb == 0) failures++;
    $display("finished %0d, fed back %0d", n_done, n_fb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
