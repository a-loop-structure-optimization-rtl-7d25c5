// tb_fntt_processor: end-to-end test of the FNTT processor at 64 points.
//
// Configuration M = 64, P = 5441 (smallest prime >= 81*M with P = 1 mod M),
// ALPHA = 77, DW = 13. Three transforms run back to back: one with random
// input and random gaps in in_valid, one with the largest digit products
// (all inputs P-1) and one with an impulse at t = 1 (X(k) = ALPHA^k).
// Every output X(k) is compared with the direct sum
// X(k) = sum_t x(t) * ALPHA^(t*k) mod P computed in the testbench.
// Also checked: start is ignored until the twiddle table is ready, outputs
// come in natural order k = 0..M-1 one per cycle, done coincides with the
// last output, and the time from the last input word to done is exactly
// 1 + sum_s (TC(s) + 6) + M cycles (TC = M/4, M/2 in the last stage).
// Each mechanism is counted and must occur: input stalls, two-butterfly
// stages, the one-butterfly last stage, a start refused while not ready,
// and a transform started right after the previous one.
module tb_fntt_processor;
  localparam int unsigned M     = 64;
  localparam int unsigned P     = 5441;
  localparam int unsigned ALPHA = 77;
  localparam int unsigned DW    = 13;
  localparam int unsigned LOGM  = $clog2(M);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            ready, busy, start, in_valid, in_ready, out_valid, done;
  logic [DW-1:0]   in_data, out_data;
  logic [LOGM-1:0] out_index;

  fntt_processor #(.M(M), .P(P), .ALPHA(ALPHA), .DW(DW)) dut (
    .clk, .rst_n, .ready, .busy, .start, .in_valid, .in_ready, .in_data,
    .out_valid, .out_index, .out_data, .done);

  longint unsigned x [M], xref [M];
  int n_stall = 0, n_dual = 0, n_single = 0, n_refused = 0, n_b2b = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint unsigned powmod(longint unsigned b, longint unsigned e);
    longint unsigned r = 1;
    b = b % P;
    while (e > 0) begin
      if (e[0]) r = r * b % P;
      b = b * b % P;
      e >>= 1;
    end
    return r;
  endfunction

  function automatic void reference();
    for (int k = 0; k < M; k++) begin
      longint unsigned acc = 0, wk = powmod(ALPHA, k), w = 1;
      for (int t = 0; t < M; t++) begin
        acc = (acc + x[t] * w) % P;
        w = w * wk % P;
      end
      xref[k] = acc;
    end
  endfunction

  // Count stages by kind from the sequencer's start pulses.
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < LOGM; s++)
      if (dut.stage_start[s]) begin
        if (s < LOGM - 1) n_dual++;
        else              n_single++;
      end
  end

  task automatic transform(int mode, bit stall);
    int accepted, outs, last_in, done_cyc, cyc, exp_lat;
    bit seen_done;
    for (int t = 0; t < M; t++)
      case (mode)
        0: x[t] = $urandom_range(P - 1, 0);
        1: x[t] = P - 1;
        default: x[t] = (t == 1);
      endcase
    reference();
    check(ready, "ready before start");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    accepted = 0; cyc = 0; last_in = 0;
    while (accepted < M) begin
      in_valid = !stall || ($urandom_range(4, 0) != 0);
      in_data  = DW'(x[accepted]);
      #1;
      if (in_valid && in_ready) begin
        accepted++;
        last_in = cyc;
      end else if (!in_valid && in_ready) n_stall++;
      @(negedge clk); cyc++;
    end
    in_valid = 0;
    outs = 0; seen_done = 0; done_cyc = -1;
    while (!seen_done && cyc < 100 * M) begin
      #1;
      if (out_valid) begin
        check(int'(out_index) == outs, $sformatf("output order: index %0d, expected %0d", out_index, outs));
        check(longint'(out_data) == xref[out_index],
              $sformatf("X(%0d) = %0d, expected %0d", out_index, out_data, xref[out_index]));
        outs++;
      end
      if (done) begin
        seen_done = 1; done_cyc = cyc;
        check(out_valid && outs == M, "done with the last output");
      end
      @(negedge clk); cyc++;
    end
    check(outs == M, $sformatf("%0d outputs", outs));
    exp_lat = 1 + (LOGM - 1) * (M / 4 + 6) + (M / 2 + 6) + M;
    check(done_cyc - last_in == exp_lat,
          $sformatf("last input to done: %0d cycles, expected %0d", done_cyc - last_in, exp_lat));
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // the twiddle table is still filling: a start now must be refused
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    if (!ready && !busy) n_refused++;
    check(!busy, "start refused while the twiddle table fills");
    while (!ready) @(negedge clk);
    transform(0, 1);
    if (ready) n_b2b++;
    transform(1, 0);
    if (ready) n_b2b++;
    transform(2, 1);
    check(n_stall > 0,            "input stall happened");
    check(n_dual == 3 * (LOGM - 1), $sformatf("two-butterfly stages run: %0d", n_dual));
    check(n_single == 3,          $sformatf("last stages run: %0d", n_single));
    check(n_refused == 1,         "start refused before ready");
    check(n_b2b == 2,             "back-to-back transforms");
    $display("mechanisms: stalls=%0d dual_stages=%0d single_stages=%0d refused_starts=%0d back_to_back=%0d",
             n_stall, n_dual, n_single, n_refused, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * M * LOGM + 4 * M) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
