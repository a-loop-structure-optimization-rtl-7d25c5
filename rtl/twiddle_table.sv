// twiddle_table: table of the twiddle factors alpha^i mod P, i = 0..M/2-1.
//
// The butterfly of stage s, operation n, needs alpha^(n * 2^s); all these
// exponents are below M/2, so one table of M/2 words serves every stage.
// After reset the table fills itself: entry 0 is 1 and entry i is entry
// i-1 times ALPHA mod P, computed with one mod_mul. One entry is written
// every MUL_LAT+1 cycles, so the fill takes (M/2)*(MUL_LAT+1) cycles
// ((M/2)*4 = 131,072 cycles at M = 65536); ready rises when it is done
// and stays high. The document names the powers of alpha but does not say
// how the hardware obtains them: building them at run time, rather than
// from a stored constant table, is this design's choice.
//
// Two read ports, each returning the word one cycle after the address
// (same timing as data_bank). Reads before ready return undefined data.
module twiddle_table #(
  parameter int unsigned M     = fntt_pkg::DEF_M,
  parameter int unsigned P     = fntt_pkg::DEF_P,
  parameter int unsigned ALPHA = fntt_pkg::DEF_ALPHA,
  parameter int unsigned DW    = fntt_pkg::DEF_DW,
  localparam int unsigned DEPTH = M / 2,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          ready,
  input  logic [AW-1:0] rd_addr [2],
  output logic [DW-1:0] rd_data [2]
);
  typedef enum logic [1:0] {FILL_MUL, FILL_WAIT, FILL_DONE} fill_state_e;

  logic [DW-1:0] mem [DEPTH];
  fill_state_e   state;
  logic [AW:0]   idx;        // next entry to write
  logic [DW-1:0] cur;        // alpha^(idx-1)
  logic          mul_go, mul_vld;
  logic [DW-1:0] mul_y;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [DW-1:0] wr_data;

  mod_mul #(.P(P), .DW(DW)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mul_go),
    .a        (cur),
    .b        (DW'(ALPHA)),
    .out_valid(mul_vld),
    .y        (mul_y)
  );

  assign mul_go = (state == FILL_MUL) && (idx != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FILL_MUL;
      idx   <= '0;
      cur   <= DW'(1);
    end else begin
      unique case (state)
        FILL_MUL:  if (idx == 0) idx <= 1;   // entry 0 written this cycle
                   else          state <= FILL_WAIT;
        FILL_WAIT: if (mul_vld) begin
                     cur <= mul_y;
                     idx <= idx + 1'b1;
                     state <= (idx == (AW+1)'(DEPTH - 1)) ? FILL_DONE : FILL_MUL;
                   end
        FILL_DONE: ;
        default:   state <= FILL_DONE;
      endcase
    end
  end

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = idx[AW-1:0];
    wr_data = mul_y;
    if (state == FILL_MUL && idx == 0) begin
      wr_en   = 1'b1;
      wr_data = DW'(1);
    end else if (state == FILL_WAIT && mul_vld) begin
      wr_en   = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    for (int p = 0; p < 2; p++) rd_data[p] <= mem[rd_addr[p]];
  end

  assign ready = (state == FILL_DONE);
endmodule
