// tb_rob_select: random test of the selection priority.
// Drives random occupied/valid/ready/busy vectors and a random last-grant
// index, and compares the grant with a reference written as a plain scan:
// first among woken retained rays (valid=0, ready=1), then among new rays
// (valid=1), each scanned round-robin from the entry after `last`.
module tb_rob_select;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] occ, valid, ready, busy;
  logic [IW-1:0]    last;
  logic             gnt_valid, gnt_ready;
  logic [IW-1:0]    gnt_idx;

  int checks = 0, failures = 0;

  rob_select #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx, exp_lvl, j;
    bit lvl1_seen, lvl2_seen;
    for (int t = 0; t < 5000; t++) begin
      occ   = DEPTH'($urandom);
      valid = DEPTH'($urandom);
      ready = DEPTH'($urandom);
      busy  = (t % 3 == 0) ? DEPTH'($urandom) & DEPTH'($urandom) : '0;
      last  = IW'($urandom);
      #1;
      exp_idx = -1; exp_lvl = 0;
      for (int i = 1; i <= DEPTH && exp_idx < 0; i++) begin
        j = (int'(last) + i) % DEPTH;
        if (occ[j] && !busy[j] && !valid[j] && ready[j]) begin
          exp_idx = j; exp_lvl = 1;
        end
      end
      for (int i = 1; i <= DEPTH && exp_idx < 0; i++) begin
        j = (int'(last) + i) % DEPTH;
        if (occ[j] && !busy[j] && valid[j]) begin
          exp_idx = j; exp_lvl = 2;
        end
      end
      checks++;
      if (gnt_valid != (exp_idx >= 0) ||
          (exp_idx >= 0 && (int'(gnt_idx) != exp_idx || gnt_ready != (exp_lvl == 1)))) begin
        failures++;
        if (failures < 10)
          $display("mismatch occ=%h v=%h r=%h b=%h last=%0d: got %0b/%0d/%0b exp %0d lvl %0d",
                   occ, valid, ready, busy, last, gnt_valid, gnt_idx, gnt_ready, exp_idx, exp_lvl);
      end
      if (exp_lvl == 1) lvl1_seen = 1;
      if (exp_lvl == 2) lvl2_seen = 1;
    end
    checks++;
    if (!(lvl1_seen && lvl2_seen)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
