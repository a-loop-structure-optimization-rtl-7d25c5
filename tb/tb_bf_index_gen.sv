// tb_bf_index_gen: self-checking test of the flattened stage loop.
//
// For every stage of a 64-point transform one bf_index_gen instance is
// started; its index stream is compared, iteration by iteration, with the
// original nested loops over group g and butterfly n (idx1 = point*g + n,
// idx2 = idx1 + op), taking two butterflies (n, n+1) per iteration in all
// but the last stage. The trip count (M/4 or M/2), the position of last,
// the twiddle exponents n*2^s and (n+1)*2^s, and the fact that every index
// 0..M-1 is touched exactly once per stage are all checked.
module tb_bf_index_gen;
  localparam int unsigned M    = 64;
  localparam int unsigned LOGM = $clog2(M);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            start [LOGM];
  logic            busy  [LOGM];
  logic            valid [LOGM];
  logic            last  [LOGM];
  logic [LOGM-1:0] idx    [LOGM][4];
  logic [LOGM-2:0] tw_exp [LOGM][2];

  for (genvar s = 0; s < LOGM; s++) begin : g_dut
    bf_index_gen #(.M(M), .S(s)) dut (.clk, .rst_n, .start(start[s]), .busy(busy[s]),
      .valid(valid[s]), .last(last[s]), .idx(idx[s]), .tw_exp(tw_exp[s]));
  end

  task automatic run_stage(int s);
    int op, point, group, step, it, tc, cnt;
    int seen [M];
    bit dual;
    dual  = (s < LOGM - 1);
    op    = M >> (s + 1);
    point = op << 1;
    group = 1 << s;
    step  = dual ? 2 : 1;
    tc    = dual ? M / 4 : M / 2;
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk) start[s] = 1;
    @(negedge clk) start[s] = 0;
    it = 0;
    for (int g = 0; g < group; g++) begin
      for (int n = 0; n < op; n += step) begin
        int e1, e2;
        e1 = point * g + n;
        e2 = e1 + op;
        checks += 4;
        if (!valid[s]) begin failures++; $display("FAIL s%0d it%0d: not valid", s, it); end
        if (int'(idx[s][0]) != e1 || int'(idx[s][1]) != e2) begin
          failures++; $display("FAIL s%0d it%0d: idx %0d,%0d expected %0d,%0d", s, it, idx[s][0], idx[s][1], e1, e2);
        end
        if (int'(tw_exp[s][0]) != (n << s)) begin
          failures++; $display("FAIL s%0d it%0d: tw0 %0d expected %0d", s, it, tw_exp[s][0], n << s);
        end
        if (last[s] != (it == tc - 1)) begin failures++; $display("FAIL s%0d it%0d: last", s, it); end
        seen[idx[s][0]]++; seen[idx[s][1]]++;
        if (dual) begin
          checks += 2;
          if (int'(idx[s][2]) != e1 + 1 || int'(idx[s][3]) != e2 + 1) begin
            failures++; $display("FAIL s%0d it%0d: idx3/4 %0d,%0d", s, it, idx[s][2], idx[s][3]);
          end
          if (int'(tw_exp[s][1]) != ((n + 1) << s)) begin
            failures++; $display("FAIL s%0d it%0d: tw1 %0d", s, it, tw_exp[s][1]);
          end
          seen[idx[s][2]]++; seen[idx[s][3]]++;
        end
        it++;
        @(negedge clk);
      end
    end
    checks += 2;
    if (it != tc) begin failures++; $display("FAIL s%0d: trip count %0d", s, it); end
    if (valid[s]) begin failures++; $display("FAIL s%0d: still valid after %0d iterations", s, tc); end
    cnt = 0;
    foreach (seen[i]) if (seen[i] != 1) cnt++;
    checks++;
    if (cnt != 0) begin failures++; $display("FAIL s%0d: %0d indices not touched exactly once", s, cnt); end
  endtask

  initial begin
    foreach (start[i]) start[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < LOGM; s++) run_stage(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOGM * M + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
