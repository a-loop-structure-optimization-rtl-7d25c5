// tb_fntt_full: one complete 65,536-point transform at the default sizes.
//
// The processor is instantiated with no parameter overrides (M = 65536,
// P = 5308417, ALPHA = 167, DW = 23). After the twiddle table has filled,
// 65,536 random residues are loaded and the transform runs to done. A
// direct O(M^2) reference is too slow for a simulation, so the testbench
// checks 96 outputs in full, X(0) and 95 random k, each against the sum
// X(k) = sum_t x(t) * ALPHA^(t*k) mod P, and checks that every output is
// a residue below P, arrives in order k = 0..M-1, and that the transform
// takes exactly the expected number of cycles: M to load (no stalls),
// sum_s (TC(s) + 6) for the stages and M + 1 for the readout, which must
// not exceed the 410,480 cycles published for this processor.
module tb_fntt_full;
  localparam int unsigned M     = fntt_pkg::DEF_M;
  localparam int unsigned P     = fntt_pkg::DEF_P;
  localparam int unsigned ALPHA = fntt_pkg::DEF_ALPHA;
  localparam int unsigned DW    = fntt_pkg::DEF_DW;
  localparam int unsigned LOGM  = $clog2(M);
  localparam int unsigned NCHK  = 96;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            ready, busy, start, in_valid, in_ready, out_valid, done;
  logic [DW-1:0]   in_data, out_data;
  logic [LOGM-1:0] out_index;

  fntt_processor dut (
    .clk, .rst_n, .ready, .busy, .start, .in_valid, .in_ready, .in_data,
    .out_valid, .out_index, .out_data, .done);

  longint unsigned x [M];
  longint unsigned y [M];
  int              kchk [NCHK];

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

  function automatic longint unsigned direct(int k);
    longint unsigned acc = 0, wk = powmod(ALPHA, k), w = 1;
    for (int t = 0; t < M; t++) begin
      acc = (acc + x[t] * w) % P;
      w = w * wk % P;
    end
    return acc;
  endfunction

  initial begin
    int cyc, start_cyc, done_cyc, outs, exp_cyc;
    start = 0; in_valid = 0; in_data = '0;
    for (int t = 0; t < M; t++) x[t] = $urandom_range(P - 1, 0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == 1 + 4 * (M / 2 - 1), $sformatf("twiddle table ready after %0d cycles", cyc));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0; start_cyc = 0; outs = 0; done_cyc = -1;
    for (int t = 0; t < M; t++) begin
      in_valid = 1; in_data = DW'(x[t]);
      #1;
      if (!in_ready) begin failures++; $display("FAIL: in_ready low at word %0d", t); end
      @(negedge clk); cyc++;
    end
    in_valid = 0;
    while (done_cyc < 0 && cyc < 2 * M * LOGM) begin
      #1;
      if (out_valid) begin
        if (int'(out_index) != outs || longint'(out_data) >= P) begin
          failures++; $display("FAIL: output %0d: index %0d value %0d", outs, out_index, out_data);
        end
        y[out_index] = out_data;
        outs++;
      end
      if (done) done_cyc = cyc;
      @(negedge clk); cyc++;
    end
    checks++;   // order and range of all outputs
    check(outs == M, $sformatf("%0d outputs", outs));
    exp_cyc = M + (LOGM - 1) * (M / 4 + 6) + (M / 2 + 6) + M;
    check(done_cyc - start_cyc == exp_cyc,
          $sformatf("transform took %0d cycles, expected %0d", done_cyc - start_cyc, exp_cyc));
    $display("cycles per %0d-point transform (load to last output): %0d", M, done_cyc - start_cyc + 1);
    // published cycle count of the 65,536-point processor: 410,480
    check(done_cyc - start_cyc + 1 <= 410480, "no slower than the published 410,480 cycles");
    kchk[0] = 0;
    for (int i = 1; i < NCHK; i++) kchk[i] = $urandom_range(M - 1, 0);
    kchk[1] = M - 1; kchk[2] = M / 2;
    for (int i = 0; i < NCHK; i++) begin
      longint unsigned e;
      e = direct(kchk[i]);
      check(y[kchk[i]] == e, $sformatf("X(%0d) = %0d, expected %0d", kchk[i], y[kchk[i]], e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * M * 2 + 4 * M * LOGM) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
