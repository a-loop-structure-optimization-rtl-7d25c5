// butterfly: one decimation-in-frequency NTT butterfly on residues mod P.
//
//   y0 = (a + b)       mod P
//   y1 = ((a - b) * w) mod P
//
// This is the butterfly of the FNTT: splitting an M-point transform into
// two M/2-point transforms uses alpha^(M/2) = -1 (mod P), so the sum feeds
// the even-indexed half and the difference, scaled by the twiddle factor
// w = alpha^(n * 2^s), feeds the odd-indexed half. Each butterfly is one
// addition, one subtraction and one multiplication, as in the document;
// the pipelining is this design's choice.
//
// Timing: latency LAT = 4 cycles (one for the modular add/subtract, three
// for mod_mul), one butterfly accepted every cycle. Inputs must be < P.
module butterfly #(
  parameter int unsigned P  = fntt_pkg::DEF_P,
  parameter int unsigned DW = fntt_pkg::DEF_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] w,
  output logic          out_valid,
  output logic [DW-1:0] y0,
  output logic [DW-1:0] y1
);
  localparam int unsigned MUL_LAT = 3;
  localparam logic [DW:0] PW = (DW + 1)'(P);

  logic [DW:0]   sum_raw, dif_raw;
  logic [DW-1:0] sum_mod, dif_mod;
  logic [DW-1:0] sum_q, dif_q, w_q;
  logic          v_q;
  logic [DW-1:0] sum_dly [MUL_LAT];

  always_comb begin
    sum_raw = {1'b0, a} + {1'b0, b};
    sum_mod = DW'((sum_raw >= PW) ? sum_raw - PW : sum_raw);
    dif_raw = {1'b0, a} - {1'b0, b};
    dif_mod = DW'((a < b) ? dif_raw + PW : dif_raw);
  end

  always_ff @(posedge clk) begin
    sum_q <= sum_mod;
    dif_q <= dif_mod;
    w_q   <= w;
    sum_dly[0] <= sum_q;
    for (int i = 1; i < MUL_LAT; i++) sum_dly[i] <= sum_dly[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  mod_mul #(.P(P), .DW(DW)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_q),
    .a        (dif_q),
    .b        (w_q),
    .out_valid(out_valid),
    .y        (y1)
  );

  assign y0 = sum_dly[MUL_LAT-1];
endmodule
