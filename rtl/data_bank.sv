// data_bank: one bank of the stage data array, a two-port RAM.
//
// The processor keeps one row data[s] (M words) for every stage boundary
// s = 0..m, as the document's software model does, and splits every row
// cyclically into two banks of M/2 words: even indices in bank 0, odd
// indices in bank 1, address = index >> 1. This is the array partitioning
// that lets one loop iteration read four words and write four words.
//
// Each of the two ports can read or write one word per cycle. A read
// returns the word on rdata one cycle after en is high with we low. The
// two ports must not write the same address in the same cycle; the FNTT
// schedule never does. Contents are not reset.
module data_bank #(
  parameter int unsigned DEPTH = fntt_pkg::DEF_M / 2,
  parameter int unsigned DW    = fntt_pkg::DEF_DW,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [1:0]    en,
  input  logic [1:0]    we,
  input  logic [AW-1:0] addr  [2],
  input  logic [DW-1:0] wdata [2],
  output logic [DW-1:0] rdata [2]
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (en[p]) begin
        if (we[p]) mem[addr[p]] <= wdata[p];
        else       rdata[p]     <= mem[addr[p]];
      end
    end
  end
endmodule
