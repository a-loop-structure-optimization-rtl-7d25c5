// bf_index_gen: loop counter and index arithmetic of one FNTT stage.
//
// Hardware form of the flattened stage loop. For stage S of an M-point
// transform (M = 2^m) the group and butterfly loops are merged into one
// counter k over the M/2 butterflies of the stage, and
//   shift = m-1-S,  op = M >> (S+1),  point = 2*op
//   g = k >> shift,  n = k - (g << shift)
//   idx1 = point*g + n,  idx2 = idx1 + op
// Every stage but the last issues two butterflies per iteration (k steps
// by 2, trip count M/4): the second pair is idx3 = idx1 + 1,
// idx4 = idx3 + op. The last stage (op = 1) issues one butterfly per
// iteration (k steps by 1, trip count M/2). All of this follows the
// document. The twiddle exponents, tw_exp[0] = n << S for (idx1, idx2)
// and tw_exp[1] = (n+1) << S for (idx3, idx4), index twiddle_table.
//
// Timing: a start pulse launches the loop; valid is high in each of the
// next TC cycles (initiation interval 1), and last marks the final
// iteration. The outputs are combinational functions of the registered
// counter. start is ignored while busy.
module bf_index_gen #(
  parameter int unsigned M = fntt_pkg::DEF_M,
  parameter int unsigned S = 0,
  localparam int unsigned LOGM = $clog2(M),
  localparam bit          DUAL = (S < LOGM - 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            valid,
  output logic            last,
  output logic [LOGM-1:0] idx    [4],
  output logic [LOGM-2:0] tw_exp [2]
);
  localparam int unsigned SHIFT = LOGM - 1 - S;
  localparam int unsigned OP    = M >> (S + 1);
  localparam int unsigned STEP  = DUAL ? 2 : 1;
  localparam logic [LOGM-2:0] K_LAST = (LOGM - 1)'(M / 2 - STEP);

  logic [LOGM-2:0] k;
  logic            running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      k       <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        k       <= '0;
      end
    end else begin
      k <= k + (LOGM - 1)'(STEP);
      if (k == K_LAST) running <= 1'b0;
    end
  end

  logic [LOGM-1:0] g, n, idx1;

  always_comb begin
    g    = LOGM'(k >> SHIFT);
    n    = LOGM'(k) - (g << SHIFT);
    idx1 = (g << (SHIFT + 1)) + n;
    idx[0] = idx1;
    idx[1] = idx1 + LOGM'(OP);
    idx[2] = DUAL ? idx1 + 1'b1 : '0;
    idx[3] = DUAL ? idx1 + 1'b1 + LOGM'(OP) : '0;
    tw_exp[0] = (LOGM - 1)'(n << S);
    tw_exp[1] = DUAL ? (LOGM - 1)'((n + 1'b1) << S) : '0;
  end

  assign valid = running;
  assign busy  = running;
  assign last  = running && (k == K_LAST);
endmodule
