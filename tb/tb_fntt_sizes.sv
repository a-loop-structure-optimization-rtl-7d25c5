// tb_fntt_sizes: the FNTT processor at the sizes 16 and 1,024 .. 32,768.
//
// Seven processors run side by side, one per size M = 16 and
// M = 2^10 .. 2^15, each
// with the smallest prime P >= 81*M with P = 1 (mod M) and the smallest
// ALPHA of multiplicative order exactly M:
//     M      P        ALPHA  DW
//     16      1297     157    11
//   1024    83969     329    17
//   2048   176129     153    18
//   4096   331777     386    19
//   8192   737281      96    20
//  16384  1376257      73    21
//  32768  2654209      89    22
// (the 65,536-point default is covered by tb_fntt_full). Each runs one
// transform checked by tb_fntt_size_run; the cycle count of each size is
// printed, checked against its formula, and required to be no larger than
// the count published for the same processor at that size.
module tb_fntt_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 7;
  int   checks_i [NS], failures_i [NS], cycles_i [NS];
  logic fin [NS];

  tb_fntt_size_run #(.M(1024),  .P(83969),   .ALPHA(329), .DW(17)) r0 (.clk, .rst_n, .checks(checks_i[0]), .failures(failures_i[0]), .cycles(cycles_i[0]), .finished(fin[0]));
  tb_fntt_size_run #(.M(2048),  .P(176129),  .ALPHA(153), .DW(18)) r1 (.clk, .rst_n, .checks(checks_i[1]), .failures(failures_i[1]), .cycles(cycles_i[1]), .finished(fin[1]));
  tb_fntt_size_run #(.M(4096),  .P(331777),  .ALPHA(386), .DW(19)) r2 (.clk, .rst_n, .checks(checks_i[2]), .failures(failures_i[2]), .cycles(cycles_i[2]), .finished(fin[2]));
  tb_fntt_size_run #(.M(8192),  .P(737281),  .ALPHA(96),  .DW(20)) r3 (.clk, .rst_n, .checks(checks_i[3]), .failures(failures_i[3]), .cycles(cycles_i[3]), .finished(fin[3]));
  tb_fntt_size_run #(.M(16384), .P(1376257), .ALPHA(73),  .DW(21)) r4 (.clk, .rst_n, .checks(checks_i[4]), .failures(failures_i[4]), .cycles(cycles_i[4]), .finished(fin[4]));
  tb_fntt_size_run #(.M(32768), .P(2654209), .ALPHA(89),  .DW(22)) r5 (.clk, .rst_n, .checks(checks_i[5]), .failures(failures_i[5]), .cycles(cycles_i[5]), .finished(fin[5]));
  tb_fntt_size_run #(.M(16),    .P(1297),    .ALPHA(157), .DW(11), .NCHK(16)) r6 (.clk, .rst_n, .checks(checks_i[6]), .failures(failures_i[6]), .cycles(cycles_i[6]), .finished(fin[6]));

  int checks = 0, failures = 0;
  localparam int SIZE [NS] = '{1024, 2048, 4096, 8192, 16384, 32768, 16};
  // published cycle counts of the same processor at these sizes
  localparam int PUBLISHED [NS] = '{5291, 10731, 22072, 45695, 94924, 197398, 178};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NS; i++) wait (fin[i]);
    for (int i = 0; i < NS; i++) begin
      checks += checks_i[i];
      failures += failures_i[i];
      $display("M = %0d: %0d cycles per transform (published: %0d), %0d checks, %0d failures",
               SIZE[i], cycles_i[i], PUBLISHED[i], checks_i[i], failures_i[i]);
      checks++;
      if (cycles_i[i] > PUBLISHED[i]) begin
        failures++; $display("FAIL: M = %0d slower than published", SIZE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
