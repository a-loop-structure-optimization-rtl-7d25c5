// tb_twiddle_table: self-checking test of the twiddle table.
//
// A 64-point table (P = 5441, ALPHA = 77) fills itself after reset. The
// test checks that ready rises exactly 1 + 4*(M/2 - 1) cycles after reset
// is released, then reads every entry through both ports (port 1 in
// reverse order) and compares it with ALPHA^i mod P computed by repeated
// multiplication in the testbench. It also checks ALPHA^(M/2) = -1 mod P,
// the property the butterfly relies on.
module tb_twiddle_table;
  localparam int unsigned M     = 64;
  localparam int unsigned P     = 5441;
  localparam int unsigned ALPHA = 77;
  localparam int unsigned DW    = 13;
  localparam int unsigned DEPTH = M / 2;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic          ready;
  logic [AW-1:0] rd_addr [2];
  logic [DW-1:0] rd_data [2];

  twiddle_table #(.M(M), .P(P), .ALPHA(ALPHA), .DW(DW)) dut (.clk, .rst_n, .ready, .rd_addr, .rd_data);

  longint unsigned pw [DEPTH + 1];
  int unsigned     cyc;

  initial begin
    pw[0] = 1;
    for (int i = 1; i <= DEPTH; i++) pw[i] = (pw[i-1] * ALPHA) % P;
    checks++;
    if (pw[DEPTH] != P - 1) begin failures++; $display("FAIL: ALPHA^(M/2) != -1"); end

    rd_addr[0] = '0; rd_addr[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 1 + 4 * (DEPTH - 1)) begin
      failures++; $display("FAIL: ready after %0d cycles, expected %0d", cyc, 1 + 4 * (DEPTH - 1));
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      rd_addr[0] = AW'(i);
      rd_addr[1] = AW'(DEPTH - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (longint'(rd_data[0]) != pw[i]) begin
        failures++; $display("FAIL: entry %0d = %0d expected %0d", i, rd_data[0], pw[i]);
      end
      if (longint'(rd_data[1]) != pw[DEPTH-1-i]) begin
        failures++; $display("FAIL: port 1 entry %0d = %0d expected %0d", DEPTH-1-i, rd_data[1], pw[DEPTH-1-i]);
      end
    end
    checks++;
    if (!ready) begin failures++; $display("FAIL: ready dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * M + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
