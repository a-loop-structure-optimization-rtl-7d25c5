// fntt_processor: M-point fast number theoretic transform (FNTT) processor.
//
// Computes X(k) = sum_{t=0}^{M-1} x(t) * ALPHA^(t*k) mod P for k = 0..M-1,
// with M = 2^m. The structure is that of the document's best processor:
//   * a data array with one row per stage boundary, data[0..m], each row
//     split cyclically into an even and an odd bank of M/2 words
//     (data_bank, 2*(m+1) instances);
//   * one pipelined stage_unit per stage (m instances), each running at
//     one iteration per cycle with two butterflies per iteration (one in
//     the last stage), reading row s and writing row s+1;
//   * fntt_ctrl, which loads row 0, runs the stages strictly one after
//     another and reads row m out.
// The twiddle table (twiddle_table) and the bank port multiplexing are
// this design's own. Row m holds X in bit-reversed order; the readout
// reverses the address so that X(k) leaves in natural order k = 0..M-1.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   ready      high when idle and the twiddle table is built (after reset
//              the table takes about 2*M cycles to fill)
//   start      one-cycle pulse while ready: begin a transform
//   in_valid/in_ready/in_data   M words x(0..M-1) in order, each < P;
//              in_valid may be dropped at any time to stall loading
//   out_valid/out_index/out_data  M words X(0..M-1), one per cycle, no
//              back-pressure
//   done       pulses with the last output word
// Timing: after the last input word, stage s takes M/4 + 6 cycles
// (M/2 + 6 for the last stage), then M + 1 cycles of readout.
module fntt_processor #(
  parameter int unsigned M     = fntt_pkg::DEF_M,
  parameter int unsigned P     = fntt_pkg::DEF_P,
  parameter int unsigned ALPHA = fntt_pkg::DEF_ALPHA,
  parameter int unsigned DW    = fntt_pkg::DEF_DW,
  localparam int unsigned LOGM = $clog2(M),
  localparam int unsigned AW   = LOGM - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            ready,
  output logic            busy,
  input  logic            start,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [DW-1:0]   in_data,
  output logic            out_valid,
  output logic [LOGM-1:0] out_index,
  output logic [DW-1:0]   out_data,
  output logic            done
);
  localparam int unsigned SW = $clog2(LOGM);

  // ---------------------------------------------------------------- control
  logic            tw_ready;
  logic [LOGM-1:0] load_cnt, unload_cnt;
  logic [LOGM-1:0] stage_start, stage_done;
  logic [SW-1:0]   cur_stage;
  logic            unload_rd;

  fntt_ctrl #(.M(M)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .tw_ready   (tw_ready),
    .start      (start),
    .ready      (ready),
    .busy       (busy),
    .done       (done),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .load_cnt   (load_cnt),
    .stage_start(stage_start),
    .stage_done (stage_done),
    .cur_stage  (cur_stage),
    .unload_rd  (unload_rd),
    .unload_cnt (unload_cnt)
  );

  // --------------------------------------------------------- twiddle table
  logic [AW-1:0] tw_addr [2];
  logic [DW-1:0] tw_data [2];

  twiddle_table #(.M(M), .P(P), .ALPHA(ALPHA), .DW(DW)) u_tw (
    .clk    (clk),
    .rst_n  (rst_n),
    .ready  (tw_ready),
    .rd_addr(tw_addr),
    .rd_data(tw_data)
  );

  // ------------------------------------------------------------ stage units
  logic          su_rd_en   [LOGM];
  logic [AW-1:0] su_rd_addr [LOGM][2][2];
  logic [AW-1:0] su_tw_addr [LOGM][2];
  logic [1:0]    su_wr_en   [LOGM][2];
  logic [AW-1:0] su_wr_addr [LOGM][2][2];
  logic [DW-1:0] su_wr_data [LOGM][2][2];
  logic [DW-1:0] mem_rdata  [LOGM+1][2][2];

  for (genvar s = 0; s < LOGM; s++) begin : g_stage
    stage_unit #(.M(M), .P(P), .DW(DW), .S(s)) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (stage_start[s]),
      .busy   (),
      .done   (stage_done[s]),
      .rd_en  (su_rd_en[s]),
      .rd_addr(su_rd_addr[s]),
      .rd_data(mem_rdata[s]),
      .tw_addr(su_tw_addr[s]),
      .tw_data(tw_data),
      .wr_en  (su_wr_en[s]),
      .wr_addr(su_wr_addr[s]),
      .wr_data(su_wr_data[s])
    );
  end

  // Only the running stage reads the twiddle table.
  always_comb begin
    tw_addr[0] = '0;
    tw_addr[1] = '0;
    for (int s = 0; s < LOGM; s++) begin
      if (cur_stage == SW'(s)) begin
        tw_addr[0] = su_tw_addr[s][0];
        tw_addr[1] = su_tw_addr[s][1];
      end
    end
  end

  // ------------------------------------------------------- INIT and readout
  logic          load_we;
  logic [LOGM-1:0] unload_idx;   // bit-reversed k: position of X(k) in row m

  assign load_we = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < LOGM; i++) unload_idx[i] = unload_cnt[LOGM-1-i];
  end

  logic out_bank;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_index <= '0;
      out_bank  <= 1'b0;
    end else begin
      out_valid <= unload_rd;
      out_index <= unload_cnt;
      out_bank  <= unload_idx[0];
    end
  end
  assign out_data = mem_rdata[LOGM][out_bank][0];

  // ------------------------------------------------------------ data array
  // Row r is written by stage r-1 (row 0 by INIT) and read by stage r
  // (row m by the readout); these never overlap in time, so every bank
  // port takes the writer's request when there is one, else the reader's.
  for (genvar r = 0; r <= LOGM; r++) begin : g_row
    for (genvar b = 0; b < 2; b++) begin : g_bank
      logic [1:0]    w_en, r_en, en, we;
      logic [AW-1:0] w_addr [2];
      logic [AW-1:0] r_addr [2];
      logic [AW-1:0] addr   [2];
      logic [DW-1:0] wdata  [2];

      if (r == 0) begin : g_wr_init
        assign w_en      = {1'b0, load_we && (load_cnt[0] == 1'(b))};
        assign w_addr[0] = load_cnt[LOGM-1:1];
        assign w_addr[1] = '0;
        assign wdata[0]  = in_data;
        assign wdata[1]  = '0;
      end else begin : g_wr_stage
        assign w_en   = su_wr_en[r-1][b];
        assign w_addr = su_wr_addr[r-1][b];
        assign wdata  = su_wr_data[r-1][b];
      end

      if (r == LOGM) begin : g_rd_out
        assign r_en      = {1'b0, unload_rd && (unload_idx[0] == 1'(b))};
        assign r_addr[0] = unload_idx[LOGM-1:1];
        assign r_addr[1] = '0;
      end else begin : g_rd_stage
        assign r_en   = {su_rd_en[r], su_rd_en[r]};
        assign r_addr = su_rd_addr[r][b];
      end

      always_comb begin
        en = w_en | r_en;
        we = w_en;
        for (int p = 0; p < 2; p++) addr[p] = w_en[p] ? w_addr[p] : r_addr[p];
      end

      data_bank #(.DEPTH(M / 2), .DW(DW)) u_bank (
        .clk  (clk),
        .en   (en),
        .we   (we),
        .addr (addr),
        .wdata(wdata),
        .rdata(mem_rdata[r][b])
      );

      // A row is never written and read in the same cycle.
      a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                   (w_en & r_en) == 2'b00)
        else $error("fntt_processor: row %0d bank %0d written and read at once", r, b);
    end
  end
endmodule
