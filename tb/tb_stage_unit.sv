// tb_stage_unit: self-checking test of the per-stage pipeline.
//
// A 16-point configuration (P = 1297, ALPHA = 157) with one stage_unit per
// stage S = 0..3. For each stage the testbench models the source row
// data[S] (two banks, two ports, one-cycle reads) and the twiddle table,
// fills the row with random residues, starts the stage and records every
// write into the destination row. Checked: every destination word is
// written exactly once, equals the reference butterfly of the nested
// loops (sum to idx1, difference times ALPHA^(n*2^S) to idx2), every
// access lands in the bank of its index parity, and done pulses exactly
// TC + 5 cycles after start (TC = M/4, or M/2 in the last stage).
module tb_stage_unit;
  localparam int unsigned M     = 16;
  localparam int unsigned P     = 1297;
  localparam int unsigned ALPHA = 157;
  localparam int unsigned DW    = 11;
  localparam int unsigned LOGM  = $clog2(M);
  localparam int unsigned AW    = LOGM - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          start   [LOGM];
  logic          busy    [LOGM];
  logic          done    [LOGM];
  logic          rd_en   [LOGM];
  logic [AW-1:0] rd_addr [LOGM][2][2];
  logic [DW-1:0] rd_data [2][2];
  logic [AW-1:0] tw_addr [LOGM][2];
  logic [DW-1:0] tw_data [2];
  logic [1:0]    wr_en   [LOGM][2];
  logic [AW-1:0] wr_addr [LOGM][2][2];
  logic [DW-1:0] wr_data [LOGM][2][2];

  for (genvar s = 0; s < LOGM; s++) begin : g_dut
    stage_unit #(.M(M), .P(P), .DW(DW), .S(s)) dut (
      .clk, .rst_n, .start(start[s]), .busy(busy[s]), .done(done[s]),
      .rd_en(rd_en[s]), .rd_addr(rd_addr[s]), .rd_data(rd_data),
      .tw_addr(tw_addr[s]), .tw_data(tw_data),
      .wr_en(wr_en[s]), .wr_addr(wr_addr[s]), .wr_data(wr_data[s]));
  end

  longint unsigned src [M], dst [M], tw [M];
  int              wcount [M];
  int              cur;       // stage under test
  int unsigned     cyc;

  // Source row and twiddle table models: registered reads.
  always @(posedge clk) begin
    for (int b = 0; b < 2; b++)
      for (int p = 0; p < 2; p++)
        rd_data[b][p] <= DW'(src[2 * rd_addr[cur][b][p] + b]);
    for (int p = 0; p < 2; p++) tw_data[p] <= DW'(tw[tw_addr[cur][p]]);
  end

  // Destination row: record writes.
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < 2; b++)
      for (int p = 0; p < 2; p++)
        if (wr_en[cur][b][p]) begin
          dst[2 * wr_addr[cur][b][p] + b] = wr_data[cur][b][p];
          wcount[2 * wr_addr[cur][b][p] + b]++;
        end
  end

  task automatic run_stage(int s);
    int op, point, tc, done_at;
    longint unsigned ref_row [M];
    cur = s;
    op = M >> (s + 1);
    point = 2 * op;
    tc = (s < LOGM - 1) ? M / 4 : M / 2;
    foreach (src[i]) begin src[i] = $urandom_range(P - 1, 0); wcount[i] = 0; end
    if (s == 0) src[3] = P - 1;
    for (int g = 0; g < (1 << s); g++)
      for (int n = 0; n < op; n++) begin
        int i1, i2;
        i1 = point * g + n; i2 = i1 + op;
        ref_row[i1] = (src[i1] + src[i2]) % P;
        ref_row[i2] = ((src[i1] + P - src[i2]) % P) * tw[n << s] % P;
      end
    @(negedge clk) start[s] = 1;
    @(negedge clk) start[s] = 0;
    cyc = 1; done_at = -1;
    while (cyc < 4 * M && done_at < 0) begin
      if (done[s]) done_at = cyc;
      @(negedge clk); cyc++;
    end
    checks++;
    if (done_at != tc + 5) begin
      failures++; $display("FAIL s%0d: done after %0d cycles, expected %0d", s, done_at, tc + 5);
    end
    @(negedge clk);
    checks++;
    if (busy[s]) begin failures++; $display("FAIL s%0d: still busy", s); end
    for (int i = 0; i < M; i++) begin
      checks += 2;
      if (wcount[i] != 1) begin failures++; $display("FAIL s%0d: word %0d written %0d times", s, i, wcount[i]); end
      if (dst[i] != ref_row[i]) begin
        failures++; $display("FAIL s%0d: word %0d = %0d expected %0d", s, i, dst[i], ref_row[i]);
      end
    end
  endtask

  initial begin
    tw[0] = 1;
    for (int i = 1; i < M; i++) tw[i] = tw[i-1] * ALPHA % P;
    foreach (start[i]) start[i] = 0;
    cur = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < LOGM; s++) run_stage(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOGM * 8 * M + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
