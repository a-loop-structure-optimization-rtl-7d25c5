// tb_fntt_size_run: one FNTT processor of a given size and its checker.
//
// Helper of tb_fntt_sizes. Builds fntt_processor with (M, P, ALPHA, DW),
// waits for the twiddle table, loads M random residues with no gaps, and
// collects the M results. It checks the order and range of every result,
// X(k) against the direct sum for NCHK values of k (k = 0, M/2, M-1 and
// random ones), and the cycle count from the first input word to the
// last result: 2M + (m-1)(M/4 + 6) + (M/2 + 6) + 1 with m = log2(M).
// checks, failures and cycles are reported on its ports; finished rises
// at the end.
module tb_fntt_size_run #(
  parameter int unsigned M     = 1024,
  parameter int unsigned P     = 83969,
  parameter int unsigned ALPHA = 329,
  parameter int unsigned DW    = 17,
  parameter int unsigned NCHK  = 24
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cycles,
  output logic finished
);
  localparam int unsigned LOGM = $clog2(M);

  logic            ready, busy, start, in_valid, in_ready, out_valid, done;
  logic [DW-1:0]   in_data, out_data;
  logic [LOGM-1:0] out_index;

  fntt_processor #(.M(M), .P(P), .ALPHA(ALPHA), .DW(DW)) dut (
    .clk, .rst_n, .ready, .busy, .start, .in_valid, .in_ready, .in_data,
    .out_valid, .out_index, .out_data, .done);

  longint unsigned x [M];
  longint unsigned y [M];

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
    int cyc, outs, exp_cyc, k;
    longint unsigned e;
    checks = 0; failures = 0; cycles = 0; finished = 0;
    start = 0; in_valid = 0; in_data = '0;
    for (int t = 0; t < M; t++) x[t] = $urandom_range(P - 1, 0);
    @(posedge rst_n);
    while (!ready) @(negedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0; outs = 0;
    for (int t = 0; t < M; t++) begin
      in_valid = 1; in_data = DW'(x[t]);
      @(negedge clk); cyc++;
    end
    in_valid = 0;
    while (!done && cyc < 4 * M * LOGM) begin
      #1;
      if (out_valid) begin
        if (int'(out_index) != outs || longint'(out_data) >= P) failures++;
        y[out_index] = out_data;
        outs++;
      end
      if (!done) begin @(negedge clk); cyc++; end
    end
    #1;
    if (out_valid) begin y[out_index] = out_data; outs++; end
    checks += 2;
    if (outs != M) begin failures++; $display("FAIL M=%0d: %0d outputs", M, outs); end
    cycles  = cyc + 1;
    exp_cyc = 2 * M + (LOGM - 1) * (M / 4 + 6) + (M / 2 + 6) + 1;
    if (cycles != exp_cyc) begin
      failures++; $display("FAIL M=%0d: %0d cycles, expected %0d", M, cycles, exp_cyc);
    end
    for (int i = 0; i < NCHK; i++) begin
      k = (i == 0) ? 0 : (i == 1) ? M / 2 : (i == 2) ? M - 1 : $urandom_range(M - 1, 0);
      e = direct(k);
      checks++;
      if (y[k] != e) begin failures++; $display("FAIL M=%0d: X(%0d) = %0d, expected %0d", M, k, y[k], e); end
    end
    finished = 1;
  end
endmodule
