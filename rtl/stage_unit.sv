// stage_unit: the pipelined hardware of one FNTT stage S.
//
// It reads the row data[S] and writes the row data[S+1], both split into
// two banks (even and odd indices). Every stage but the last runs two
// butterflies per iteration: (idx1, idx2) both lie in the even bank and
// (idx3, idx4) = (idx1+1, idx2+1) both in the odd bank, so each bank
// serves two reads per iteration through its two ports, and the writes of
// the results go to the same addresses of the next row. The last stage
// runs one butterfly per iteration on (idx1, idx1+1), one word from each
// bank, with twiddle alpha^0. One instance exists per stage, as in the
// document's processor where the stage loop is expanded into a separate
// pipeline for each stage; the stages run one after another.
//
// Pipeline (initiation interval 1):
//   cycle 0  bf_index_gen gives the indices; RAM and twiddle reads issued
//   cycle 1  read data and twiddles arrive; butterflies start
//   cycle 5  butterfly results written into data[S+1]
// Timing: start is a one-cycle pulse; done pulses in the cycle the last
// results are written, TC + 5 cycles after start, where TC = M/4 for the
// two-butterfly stages and M/2 for the last stage. Addresses on the bank
// ports are word addresses (index >> 1). Unused ports are held idle.
module stage_unit #(
  parameter int unsigned M  = fntt_pkg::DEF_M,
  parameter int unsigned P  = fntt_pkg::DEF_P,
  parameter int unsigned DW = fntt_pkg::DEF_DW,
  parameter int unsigned S  = 0,
  localparam int unsigned LOGM = $clog2(M),
  localparam int unsigned AW   = LOGM - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // reads of data[S]: [bank][port]
  output logic          rd_en,
  output logic [AW-1:0] rd_addr [2][2],
  input  logic [DW-1:0] rd_data [2][2],
  // twiddle table reads
  output logic [AW-1:0] tw_addr [2],
  input  logic [DW-1:0] tw_data [2],
  // writes of data[S+1]: [bank][port]
  output logic [1:0]    wr_en   [2],
  output logic [AW-1:0] wr_addr [2][2],
  output logic [DW-1:0] wr_data [2][2]
);
  localparam bit          DUAL   = (S < LOGM - 1);
  localparam int unsigned BF_LAT = 4;
  localparam int unsigned WR_DLY = 1 + BF_LAT;   // read + butterfly

  logic            ig_valid, ig_last;
  logic [LOGM-1:0] idx    [4];
  logic [LOGM-2:0] tw_exp [2];

  bf_index_gen #(.M(M), .S(S)) u_idx (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .busy  (),
    .valid (ig_valid),
    .last  (ig_last),
    .idx   (idx),
    .tw_exp(tw_exp)
  );

  // Word addresses of the four (or two) butterfly operands: [bank][port].
  logic [AW-1:0] addr_now [2][2];
  always_comb begin
    if (DUAL) begin
      addr_now[0][0] = idx[0][LOGM-1:1];
      addr_now[0][1] = idx[1][LOGM-1:1];
      addr_now[1][0] = idx[2][LOGM-1:1];
      addr_now[1][1] = idx[3][LOGM-1:1];
    end else begin
      addr_now[0][0] = idx[0][LOGM-1:1];
      addr_now[0][1] = '0;
      addr_now[1][0] = idx[1][LOGM-1:1];
      addr_now[1][1] = '0;
    end
  end

  assign rd_en      = ig_valid;
  assign rd_addr    = addr_now;
  assign tw_addr[0] = tw_exp[0];
  assign tw_addr[1] = tw_exp[1];

  // Addresses, valid and last travel alongside the data to the write.
  logic [AW-1:0] addr_dly [WR_DLY][2][2];
  logic [WR_DLY-1:0] v_dly, last_dly;
  logic          busy_q;

  always_ff @(posedge clk) begin
    addr_dly[0] <= addr_now;
    for (int i = 1; i < WR_DLY; i++) addr_dly[i] <= addr_dly[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_dly    <= '0;
      last_dly <= '0;
      busy_q   <= 1'b0;
    end else begin
      v_dly    <= {v_dly[WR_DLY-2:0], ig_valid};
      last_dly <= {last_dly[WR_DLY-2:0], ig_last};
      if (start && !busy_q)       busy_q <= 1'b1;
      else if (last_dly[WR_DLY-1]) busy_q <= 1'b0;
    end
  end

  // Butterfly A: (idx1, idx2). Butterfly B: (idx3, idx4), two-butterfly
  // stages only.
  logic          bf_v;
  logic [DW-1:0] ya0, ya1, yb0, yb1;
  logic [DW-1:0] a_b;

  assign a_b = DUAL ? rd_data[0][1] : rd_data[1][0];

  butterfly #(.P(P), .DW(DW)) u_bf_a (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_dly[0]),
    .a        (rd_data[0][0]),
    .b        (a_b),
    .w        (tw_data[0]),
    .out_valid(bf_v),
    .y0       (ya0),
    .y1       (ya1)
  );

  if (DUAL) begin : g_bf_b
    butterfly #(.P(P), .DW(DW)) u_bf_b (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v_dly[0]),
      .a        (rd_data[1][0]),
      .b        (rd_data[1][1]),
      .w        (tw_data[1]),
      .out_valid(),
      .y0       (yb0),
      .y1       (yb1)
    );
  end else begin : g_no_bf_b
    assign yb0 = '0;
    assign yb1 = '0;
  end

  logic wr_v;
  assign wr_v    = v_dly[WR_DLY-1];
  assign wr_addr = addr_dly[WR_DLY-1];

  always_comb begin
    if (DUAL) begin
      wr_en[0]      = {wr_v, wr_v};
      wr_en[1]      = {wr_v, wr_v};
      wr_data[0][0] = ya0;
      wr_data[0][1] = ya1;
      wr_data[1][0] = yb0;
      wr_data[1][1] = yb1;
    end else begin
      wr_en[0]      = {1'b0, wr_v};
      wr_en[1]      = {1'b0, wr_v};
      wr_data[0][0] = ya0;
      wr_data[0][1] = '0;
      wr_data[1][0] = ya1;
      wr_data[1][1] = '0;
    end
  end

  assign busy = busy_q;
  assign done = last_dly[WR_DLY-1];

  // The butterfly pipeline and the address pipeline must stay aligned.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) bf_v == wr_v)
    else $error("stage_unit: butterfly output out of step with write address");
endmodule
