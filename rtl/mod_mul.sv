// mod_mul: pipelined modular multiplier, y = a * b mod P.
//
// Both operands must already be reduced (a, b < P). The product is reduced
// with Barrett's method for a DW-bit modulus (P < 2^DW):
//   q = ((x >> (DW-1)) * MU) >> (DW+1),  MU = floor(2^(2*DW) / P)
//   r = x - q*P,  0 <= r < 3P,  then at most two subtractions of P.
// The document only states that each butterfly holds a multiplication on
// mod P; the Barrett reduction and its pipelining are this design's choice.
//
// Timing: fixed latency of LAT = 3 cycles, one new operand pair per cycle
// (initiation interval 1). in_valid travels alongside as out_valid.
// Stage 1 registers the full product, stage 2 the quotient estimate,
// stage 3 the corrected remainder.
module mod_mul #(
  parameter int unsigned P  = fntt_pkg::DEF_P,
  parameter int unsigned DW = fntt_pkg::DEF_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic          out_valid,
  output logic [DW-1:0] y
);
  localparam int unsigned LAT = 3;
  localparam longint unsigned MU_L = fntt_pkg::barrett_mu(DW, P);
  localparam logic [DW:0]     MU   = MU_L[DW:0];
  localparam logic [DW+1:0]   PW   = (DW + 2)'(P);

  logic [2*DW-1:0] x1;
  logic [DW+1:0]   x2;       // low bits suffice: r < 2^(DW+2)
  logic [DW:0]     q2;
  logic [DW-1:0]   r3;
  logic [LAT-1:0]  vld;

  // Remainder, kept to DW+2 bits since it is below 3P < 2^(DW+2); only
  // the low DW+2 bits of q*P are needed for it.
  logic [DW+1:0] r_raw;
  assign r_raw = x2 - (DW + 2)'(q2 * PW);

  always_ff @(posedge clk) begin
    x1 <= a * b;
    x2 <= x1[DW+1:0];
    // quotient estimate from the top DW+1 bits of the product
    q2 <= (DW + 1)'(({1'b0, x1[2*DW-1:DW-1]} * {{(DW+1){1'b0}}, MU}) >> (DW + 1));
    if (r_raw >= 2 * PW)  r3 <= DW'(r_raw - 2 * PW);
    else if (r_raw >= PW) r3 <= DW'(r_raw - PW);
    else                  r3 <= DW'(r_raw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid = vld[LAT-1];
  assign y         = r3;
endmodule
