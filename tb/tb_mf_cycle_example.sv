// tb_mf_cycle_example: replays the three-tap worked example of the
// serial-to-parallel matched filter. With TAPS=3 and a 9-chip code the partial
// sums leaving the adder chain must follow, one per sample,
//   D0C0+D1C1+D2C2, D1C0+D2C1+D3C2, D2C0+D3C1+D4C2,
//   D3C3+D4C4+D5C5, D4C3+D5C4+D6C5, D5C3+D6C4+D7C5,
//   D6C6+D7C7+D8C8, ...
// i.e. the code segment changes every three outputs, and the three final
// outputs must be the full 9-chip correlations for offsets 0, 1 and 2. The
// chain output is observed inside the filter; everything else through ports.
module tb_mf_cycle_example;
  localparam int TAPS = 3, CODE_LEN = 9, DW = 6;
  localparam int ACCW = DW + $clog2(CODE_LEN) + 1;
  localparam int SEGW = $clog2(CODE_LEN/TAPS) + 1;
  localparam int NOUT = 9;

  logic clk = 0, rst_n = 0, start = 0, en = 0, c_in = 0;
  logic signed [DW-1:0] d_in = '0;
  logic [SEGW-1:0] segs = SEGW'(3);
  logic corr_valid, busy;
  logic signed [ACCW-1:0] corr;
  logic [$clog2(TAPS)-1:0] corr_idx;
  int checks = 0, failures = 0;

  sp_matched_filter #(.TAPS(TAPS), .CODE_LEN(CODE_LEN), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int D [CODE_LEN + TAPS + 2];
  int C [CODE_LEN];
  int partial [$];
  int finals [TAPS];
  int nfinal = 0;

  initial begin
    for (int i = 0; i < CODE_LEN + TAPS + 2; i++) D[i] = $urandom_range(0, 40) - 20;
    for (int i = 0; i < CODE_LEN; i++) C[i] = ($urandom_range(0, 1) == 1) ? -1 : 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < CODE_LEN + TAPS + 1; k++) begin
      @(negedge clk);
      en = 1; start = (k == 0);
      d_in = DW'(D[k]);
      c_in = (k < CODE_LEN) ? (C[k] < 0) : 1'b0;
      @(posedge clk); #1;
      // After en number k+1 the chain end holds output n = k - TAPS.
      if (k >= TAPS) partial.push_back(int'(dut.chain_q[TAPS-1]));
      if (corr_valid) begin finals[corr_idx] = int'(corr); nfinal++; end
    end
    @(negedge clk); en = 0; start = 0;
    @(posedge clk); #1;
    if (corr_valid) begin finals[corr_idx] = int'(corr); nfinal++; end
    for (int n = 0; n < NOUT; n++) begin
      int s, e;
      s = (n / TAPS) * TAPS;
      e = 0;
      for (int j = 0; j < TAPS; j++) e += D[n + j] * C[s + j];
      checks++;
      if (partial[n] != e) begin failures++; $display("output %0d = %0d, expected %0d", n, partial[n], e); end
    end
    checks++;
    if (nfinal != TAPS) begin failures++; $display("%0d final outputs", nfinal); end
    for (int tau = 0; tau < TAPS; tau++) begin
      int e;
      e = 0;
      for (int i = 0; i < CODE_LEN; i++) e += D[tau + i] * C[i];
      checks++;
      if (finals[tau] != e) begin failures++; $display("corr(%0d) = %0d, expected %0d", tau, finals[tau], e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
