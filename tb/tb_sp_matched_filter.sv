// tb_sp_matched_filter: self-checking test of the inversed-type
// serial-to-parallel matched filter at TAPS=4, CODE_LEN=16.
// Each run feeds random samples and chips with random gaps in en, and every
// output is compared with a direct correlation sum computed here. The en
// cycle on which each output appears (M+tau+2) is checked as well, and runs
// use every segment count from 1 to CODE_LEN/TAPS.
module tb_sp_matched_filter;
  localparam int TAPS = 4, CODE_LEN = 16, DW = 6;
  localparam int ACCW = DW + $clog2(CODE_LEN) + 1;
  localparam int SEGW = $clog2(CODE_LEN/TAPS) + 1;

  logic clk = 0, rst_n = 0, start = 0, en = 0, c_in = 0;
  logic signed [DW-1:0] d_in = '0;
  logic [SEGW-1:0] segs = '0;
  logic corr_valid, busy;
  logic signed [ACCW-1:0] corr;
  logic [$clog2(TAPS)-1:0] corr_idx;

  int checks = 0, failures = 0;

  sp_matched_filter #(.TAPS(TAPS), .CODE_LEN(CODE_LEN), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d_arr [CODE_LEN+TAPS+2];
  bit c_arr [CODE_LEN];
  int en_count;
  int got [TAPS];
  int got_at [TAPS];
  int seen;

  // Collect outputs with the en count at which they appear.
  int en_seen = 0;
  always @(posedge clk) begin
    if (en) en_seen <= start ? 1 : en_seen + 1;
    if (corr_valid) begin
      got[corr_idx]    <= int'(corr);
      got_at[corr_idx] <= en_seen;
      seen             <= seen + 1;
    end
  end

  task automatic do_run(input int nseg);
    int m, expv;
    m = nseg * TAPS;
    for (int i = 0; i < CODE_LEN + TAPS + 2; i++) d_arr[i] = int'($signed(DW'($urandom)));
    for (int i = 0; i < CODE_LEN; i++) c_arr[i] = 1'($urandom);
    seen = 0;
    segs = SEGW'(nseg);
    en_count = 0;
    for (int k = 0; k < m + TAPS + 1; k++) begin
      // random idle cycles between en cycles
      while ($urandom_range(0, 2) == 0) begin
        @(negedge clk); en = 0; start = 0;
      end
      @(negedge clk);
      en = 1; start = (k == 0);
      d_in = DW'(d_arr[k]);
      c_in = (k < CODE_LEN) ? c_arr[k] : 1'($urandom);
      en_count++;
    end
    @(negedge clk); en = 0; start = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (seen != TAPS) begin
      failures++;
      $display("run segs=%0d: %0d outputs, expected %0d", nseg, seen, TAPS);
    end
    for (int tau = 0; tau < TAPS; tau++) begin
      expv = 0;
      for (int i = 0; i < m; i++) expv += c_arr[i] ? -d_arr[tau+i] : d_arr[tau+i];
      checks++;
      if (got[tau] != expv) begin
        failures++;
        $display("segs=%0d tau=%0d: got %0d expected %0d", nseg, tau, got[tau], expv);
      end
      checks++;
      if (got_at[tau] != m + tau + 2) begin
        failures++;
        $display("segs=%0d tau=%0d: output after en %0d, expected %0d", nseg, tau, got_at[tau], m + tau + 2);
      end
    end
    checks++;
    if (busy) begin
      failures++;
      $display("busy still high after run");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 12; r++) do_run((r % (CODE_LEN/TAPS)) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
