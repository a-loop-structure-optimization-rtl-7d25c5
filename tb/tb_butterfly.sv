// tb_butterfly: self-checking test of the modular DIF butterfly.
//
// Feeds random (a, b, w) triples, including equal operands and the extreme
// residues 0 and P-1, at the default modulus and checks
// y0 = (a + b) mod P and y1 = (a - b) * w mod P against 64-bit integer
// arithmetic, with out_valid exactly LAT = 4 cycles after in_valid.
module tb_butterfly;
  localparam int unsigned P   = fntt_pkg::DEF_P;
  localparam int unsigned DW  = fntt_pkg::DEF_DW;
  localparam int unsigned LAT = 4;
  localparam int unsigned N   = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic          v, ov;
  logic [DW-1:0] a, b, w, y0, y1;

  butterfly #(.P(P), .DW(DW)) dut (.clk, .rst_n, .in_valid(v), .a, .b, .w,
                                   .out_valid(ov), .y0, .y1);

  longint unsigned e0 [$], e1 [$];
  logic [LAT-1:0] vh = '0;

  function automatic int unsigned pick(int unsigned i);
    case (i % 5)
      0: return 0;
      1: return P - 1;
      default: return $urandom_range(P - 1, 0);
    endcase
  endfunction

  initial begin
    v = 0; a = '0; b = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int unsigned i = 0; i < N; i++) begin
      @(negedge clk);
      v = ($urandom_range(7, 0) != 0);
      a = DW'(pick(i));
      b = (i % 11 == 0) ? a : DW'(pick(i / 5));
      w = DW'(pick(i / 25));
      if (v) begin
        e0.push_back((longint'(a) + longint'(b)) % P);
        e1.push_back(((longint'(a) + P - longint'(b)) % P) * longint'(w) % P);
      end
    end
    @(negedge clk); v = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (e0.size() != 0) begin failures++; $display("FAIL: %0d results missing", e0.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (ov !== vh[LAT-1]) begin failures++; $display("FAIL: out_valid timing"); end
    if (ov) begin
      checks += 2;
      if (e0.size() == 0) begin failures += 2; $display("FAIL: unexpected output"); end
      else begin
        if (longint'(y0) != e0[0]) begin failures++; $display("FAIL y0=%0d exp %0d", y0, e0[0]); end
        if (longint'(y1) != e1[0]) begin failures++; $display("FAIL y1=%0d exp %0d", y1, e1[0]); end
        void'(e0.pop_front()); void'(e1.pop_front());
      end
    end
    vh <= {vh[LAT-2:0], v};
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
