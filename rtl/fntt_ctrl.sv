// fntt_ctrl: sequencer of the FNTT processor.
//
// One transform is: INIT (accept M input words into data[0]), then the
// m = log2(M) stages one after another, each started only when the
// previous one has written all its results (the stages read and write
// adjacent rows of the data array, so their pipelines are kept apart, as
// in the document), then the readout of data[m]. The handshakes around it
// are this design's choice:
//   IDLE    ready = tw_ready; a start pulse moves to LOAD
//   LOAD    in_ready high; every in_valid beat stores one word; after M
//           words go to the first stage
//   STAGE   stage_start[s] pulses for one cycle, then wait for
//           stage_done[s]
//   UNLOAD  one read of data[m] per cycle for k = 0..M-1 (unload_rd,
//           unload_cnt); the data appear one cycle later
//   FINISH  done pulses with the last output word, back to IDLE
// Timing: a stage with trip count TC occupies TC + 6 cycles from its start
// pulse to the next stage's start pulse (stage_unit gives done TC + 5
// cycles after start).
module fntt_ctrl #(
  parameter int unsigned M = fntt_pkg::DEF_M,
  localparam int unsigned LOGM = $clog2(M),
  localparam int unsigned SW   = $clog2(LOGM)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tw_ready,
  input  logic            start,
  output logic            ready,
  output logic            busy,
  output logic            done,
  // INIT
  input  logic            in_valid,
  output logic            in_ready,
  output logic [LOGM-1:0] load_cnt,
  // stages
  output logic [LOGM-1:0] stage_start,
  input  logic [LOGM-1:0] stage_done,
  output logic [SW-1:0]   cur_stage,
  // readout
  output logic            unload_rd,
  output logic [LOGM-1:0] unload_cnt
);
  typedef enum logic [2:0] {IDLE, LOAD, STAGE_GO, STAGE_RUN, UNLOAD, FINISH} state_e;

  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      load_cnt   <= '0;
      unload_cnt <= '0;
      cur_stage  <= '0;
    end else begin
      unique case (state)
        IDLE: if (start && tw_ready) begin
          state    <= LOAD;
          load_cnt <= '0;
        end
        LOAD: if (in_valid) begin
          load_cnt <= load_cnt + 1'b1;
          if (load_cnt == LOGM'(M - 1)) begin
            state     <= STAGE_GO;
            cur_stage <= '0;
          end
        end
        STAGE_GO: state <= STAGE_RUN;
        STAGE_RUN: if (stage_done[cur_stage]) begin
          if (cur_stage == SW'(LOGM - 1)) begin
            state      <= UNLOAD;
            unload_cnt <= '0;
          end else begin
            cur_stage <= cur_stage + 1'b1;
            state     <= STAGE_GO;
          end
        end
        UNLOAD: begin
          unload_cnt <= unload_cnt + 1'b1;
          if (unload_cnt == LOGM'(M - 1)) state <= FINISH;
        end
        FINISH:  state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    stage_start = '0;
    if (state == STAGE_GO) stage_start[cur_stage] = 1'b1;
  end

  assign ready     = (state == IDLE) && tw_ready;
  assign busy      = (state != IDLE);
  assign in_ready  = (state == LOAD);
  assign unload_rd = (state == UNLOAD);
  assign done      = (state == FINISH);
endmodule
