// tb_mod_mul: self-checking test of the Barrett modular multiplier.
//
// Drives one random operand pair per cycle (plus the corner values 0, 1,
// P-1) into mod_mul at the default 65,536-point modulus and at a small
// modulus, and compares every result, LAT = 3 cycles later, with a*b mod P
// computed in 64-bit integer arithmetic. A missing or extra out_valid, or
// a result in the wrong cycle, counts as a failure.
module tb_mod_mul;
  localparam int unsigned P1  = fntt_pkg::DEF_P;
  localparam int unsigned DW1 = fntt_pkg::DEF_DW;
  localparam int unsigned P2  = 1297;   // 16-point modulus
  localparam int unsigned DW2 = 11;
  localparam int unsigned LAT = 3;
  localparam int unsigned N   = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            v1, v2, ov1, ov2;
  logic [DW1-1:0]  a1, b1, y1;
  logic [DW2-1:0]  a2, b2, y2;

  mod_mul #(.P(P1), .DW(DW1)) dut1 (.clk, .rst_n, .in_valid(v1), .a(a1), .b(b1), .out_valid(ov1), .y(y1));
  mod_mul #(.P(P2), .DW(DW2)) dut2 (.clk, .rst_n, .in_valid(v2), .a(a2), .b(b2), .out_valid(ov2), .y(y2));

  longint unsigned exp1 [$], exp2 [$];
  int unsigned cyc = 0;

  function automatic int unsigned pick(int unsigned p, int unsigned i);
    case (i % 7)
      0: return 0;
      1: return 1;
      2: return p - 1;
      default: return $urandom_range(p - 1, 0);
    endcase
  endfunction

  initial begin
    v1 = 0; v2 = 0; a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int unsigned i = 0; i < N; i++) begin
      @(negedge clk);
      v1 = ($urandom_range(9, 0) != 0);
      v2 = ($urandom_range(9, 0) != 0);
      a1 = DW1'(pick(P1, i)); b1 = DW1'(pick(P1, i / 7));
      a2 = DW2'(pick(P2, i)); b2 = DW2'(pick(P2, i / 3));
      if (v1) exp1.push_back((longint'(a1) * longint'(b1)) % P1);
      if (v2) exp2.push_back((longint'(a2) * longint'(b2)) % P2);
    end
    @(negedge clk); v1 = 0; v2 = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp1.size() != 0 || exp2.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d results never came out", exp1.size(), exp2.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Results are checked in order; the latency is checked by comparing the
  // out_valid pattern with the in_valid pattern LAT cycles earlier.
  logic [LAT-1:0] vh1 = '0, vh2 = '0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    checks += 2;
    if (ov1 !== vh1[LAT-1]) begin failures++; $display("FAIL: out_valid timing (P1) at %0d", cyc); end
    if (ov2 !== vh2[LAT-1]) begin failures++; $display("FAIL: out_valid timing (P2) at %0d", cyc); end
    if (ov1) begin
      checks++;
      if (exp1.size() == 0 || longint'(y1) != exp1[0]) begin
        failures++; $display("FAIL P1: y=%0d expected %0d", y1, exp1.size() ? exp1[0] : -1);
      end
      if (exp1.size()) void'(exp1.pop_front());
    end
    if (ov2) begin
      checks++;
      if (exp2.size() == 0 || longint'(y2) != exp2[0]) begin
        failures++; $display("FAIL P2: y=%0d expected %0d", y2, exp2.size() ? exp2[0] : -1);
      end
      if (exp2.size()) void'(exp2.pop_front());
    end
    vh1 <= {vh1[LAT-2:0], v1};
    vh2 <= {vh2[LAT-2:0], v2};
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
