// tb_fntt_ctrl: self-checking test of the transform sequencer.
//
// A 16-point sequencer (4 stages). The testbench holds tw_ready low at
// first (start must then be ignored), loads 16 words with random gaps in
// in_valid, answers each stage_start with stage_done after a random delay
// and checks: load_cnt steps only on accepted words, stages start in
// order 0..3 one at a time and only after the previous done, cur_stage
// names the running stage, the readout issues exactly M reads with
// unload_cnt = 0..M-1, done pulses once right after the last read, and
// the next stage starts in the cycle right after the previous done.
module tb_fntt_ctrl;
  localparam int unsigned M    = 16;
  localparam int unsigned LOGM = $clog2(M);
  localparam int unsigned SW   = $clog2(LOGM);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            tw_ready, start, ready, busy, done, in_valid, in_ready, unload_rd;
  logic [LOGM-1:0] load_cnt, unload_cnt, stage_start, stage_done;
  logic [SW-1:0]   cur_stage;

  fntt_ctrl #(.M(M)) dut (.clk, .rst_n, .tw_ready, .start, .ready, .busy, .done,
    .in_valid, .in_ready, .load_cnt, .stage_start, .stage_done, .cur_stage,
    .unload_rd, .unload_cnt);

  int stalls = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic one_transform();
    int accepted, rd_seen;
    check(ready, "ready while idle");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    accepted = 0;
    while (accepted < M) begin
      in_valid = ($urandom_range(3, 0) != 0);
      if (!in_valid) stalls++;
      #1;
      check(in_ready, "in_ready during load");
      if (in_valid) begin
        check(int'(load_cnt) == accepted, "load_cnt");
        accepted++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    check(!in_ready, "in_ready drops after M words");
    for (int s = 0; s < LOGM; s++) begin
      int wait_c, dly;
      wait_c = 0;
      while (stage_start == '0 && wait_c < 10) begin @(negedge clk); wait_c++; end
      check(stage_start == LOGM'(1) << s, $sformatf("stage %0d starts alone", s));
      check(int'(cur_stage) == s, "cur_stage");
      check(wait_c == 0, $sformatf("stage %0d start spacing %0d", s, wait_c));
      dly = $urandom_range(6, 1);
      repeat (dly) begin
        @(negedge clk);
        check(stage_start == '0, "no extra stage_start while a stage runs");
      end
      stage_done = LOGM'(1) << s;
      @(negedge clk) stage_done = '0;
    end
    rd_seen = 0;
    while (rd_seen < M + 5 && !done) begin
      if (unload_rd) begin
        check(int'(unload_cnt) == rd_seen, "unload_cnt order");
        rd_seen++;
      end
      @(negedge clk);
    end
    check(rd_seen == M, $sformatf("%0d readout cycles", rd_seen));
    check(done, "done after readout");
    @(negedge clk);
    check(!done && !busy, "done is one pulse, back to idle");
  endtask

  initial begin
    tw_ready = 0; start = 0; in_valid = 0; stage_done = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(!busy && !ready, "start ignored before tw_ready");
    tw_ready = 1;
    @(negedge clk);
    one_transform();
    one_transform();
    check(stalls > 0, "input stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * M) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
