// tb_data_bank: self-checking test of the two-port data bank.
//
// Uses a 64-word bank. Random mixes of reads and writes on both ports,
// never two writes to one address in a cycle, are checked against a
// reference array: a read must return the word stored before that cycle,
// one cycle after the request.
module tb_data_bank;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned DW    = 23;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned N     = 20000;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [1:0]    en, we;
  logic [AW-1:0] addr  [2];
  logic [DW-1:0] wdata [2];
  logic [DW-1:0] rdata [2];

  data_bank #(.DEPTH(DEPTH), .DW(DW)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  logic [DW-1:0] ref_mem [DEPTH];
  logic [DW-1:0] exp_q   [2];
  logic [1:0]    rd_q;

  initial begin
    en = '0; we = '0; addr[0] = '0; addr[1] = '0; wdata[0] = '0; wdata[1] = '0;
    rd_q = '0;
    // fill every word first so that reads are defined
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      en = 2'b11; we = 2'b11;
      addr[0] = AW'(i); addr[1] = AW'(i + 1);
      wdata[0] = DW'($urandom); wdata[1] = DW'($urandom);
      ref_mem[i] = wdata[0]; ref_mem[i+1] = wdata[1];
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      // check the reads issued in the previous cycle
      for (int p = 0; p < 2; p++) if (rd_q[p]) begin
        checks++;
        if (rdata[p] !== exp_q[p]) begin
          failures++; $display("FAIL port %0d: read %0h expected %0h", p, rdata[p], exp_q[p]);
        end
      end
      for (int p = 0; p < 2; p++) begin
        en[p] = $urandom_range(3, 0) != 0;
        we[p] = $urandom_range(1, 0);
        addr[p] = AW'($urandom_range(DEPTH - 1, 0));
        wdata[p] = DW'($urandom);
      end
      if (we[0] && we[1] && addr[0] == addr[1]) we[1] = 1'b0;
      for (int p = 0; p < 2; p++) begin
        rd_q[p] = en[p] && !we[p];
        exp_q[p] = ref_mem[addr[p]];
      end
      for (int p = 0; p < 2; p++) if (en[p] && we[p]) ref_mem[addr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + DEPTH + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
