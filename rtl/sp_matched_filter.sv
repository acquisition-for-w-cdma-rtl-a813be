// sp_matched_filter: inversed-type serial-to-parallel matched filter.
//
// It correlates a received sample stream D with a CODE_LEN-chip PN code C using
// only TAPS multipliers. One run produces TAPS full-length correlations
//     corr(tau) = sum_{i=0}^{M-1} D[tau+i] * C[i],  tau = 0 .. TAPS-1,
// with M = segs*TAPS chips of code. The code is used in segments of TAPS chips;
// each segment yields a partial correlation for every tau, and the partial sums
// are added up through a TAPS-deep delay line (the "N-chip delay" feedback of
// the serial-parallel architecture).
//
// Inversed (transposed) structure: each new sample, after one input register,
// is broadcast to all TAPS multipliers; the products ripple through a chain of
// adder registers, so there is no adder tree. Multiplication by a +/-1 chip is a
// conditional negation. The coefficient registers are all fed from the same
// serial chip stream c_in; load enable LD_EN[j] is a one-hot token that visits
// tap j when the chip index t satisfies t mod TAPS = j, so every tap switches to
// the next code segment exactly when its products start to belong to the next
// segment. These points follow the source design; the widths, the run control
// and the chip encoding (bit 0 = +1, bit 1 = -1) are this design's own.
//
// Interface and timing: the filter advances only on cycles with en=1. Every
// en cycle supplies a sample d_in and chip c_in; the cycle with start=1 (and
// en=1) carries D[0] and C[0], the k-th en carries D[k-1] and C[k-1] (the chip
// is ignored after the first M). A run takes M+TAPS+1 en cycles. corr(tau)
// leaves on corr/corr_idx with corr_valid one clock after en number
// M+tau+2; busy is high from start until the last output. A start while busy
// restarts the run.
module sp_matched_filter #(
  parameter int TAPS     = 128,                       // N, taps (at least 2)
  parameter int CODE_LEN = 256,                       // M, longest code
  parameter int DW       = 6,                         // sample width
  parameter int ACCW     = DW + $clog2(CODE_LEN) + 1, // accumulator width
  parameter int SEGW     = $clog2(CODE_LEN/TAPS) + 1  // width of segs
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    en,
  input  logic signed [DW-1:0]    d_in,
  input  logic                    c_in,
  input  logic [SEGW-1:0]         segs,       // code segments per run, 1..CODE_LEN/TAPS
  output logic                    corr_valid,
  output logic signed [ACCW-1:0]  corr,
  output logic [$clog2(TAPS)-1:0] corr_idx,
  output logic                    busy
);
  localparam int CW = $clog2(CODE_LEN + TAPS + 2) + 1;
  localparam int SEGS_MAX = CODE_LEN / TAPS;

  logic                   run_q;
  logic [CW-1:0]          k_q;        // en cycles done in this run
  logic [CW-1:0]          k;          // index of the current en cycle
  logic [CW-1:0]          mlen;       // M for this run
  logic signed [DW-1:0]   d_q;        // input register
  logic [TAPS-1:0]        coef_q;     // coefficient registers (chip bits)
  logic [TAPS-1:0]        ld_en_q;    // one-hot load-enable token
  logic signed [ACCW-1:0] chain_q [TAPS];
  logic signed [ACCW-1:0] dline_q [TAPS];
  logic signed [ACCW-1:0] prod    [TAPS];
  logic signed [ACCW-1:0] sum;
  logic signed [CW:0]     n;          // correlation index being accumulated
  logic                   active;

  always_comb begin
    logic [SEGW-1:0] s;
    s = segs;
    if (s == '0) s = SEGW'(1);
    if (int'(s) > SEGS_MAX) s = SEGW'(SEGS_MAX);
    mlen = CW'(s) * CW'(TAPS);
  end

  assign active = en && (start || run_q);
  assign k      = start ? CW'(1) : k_q + CW'(1);
  assign n      = $signed({1'b0, k}) - (CW+1)'(TAPS + 2);

  // Products of the registered sample with each tap's coefficient.
  always_comb begin
    for (int j = 0; j < TAPS; j++)
      prod[j] = coef_q[j] ? -ACCW'(d_q) : ACCW'(d_q);
  end

  // Sigma of the feedback loop: partial correlation plus the value one
  // segment (TAPS accumulations) earlier.
  assign sum = chain_q[TAPS-1] +
               ((n >= $signed((CW+1)'(TAPS))) ? dline_q[TAPS-1] : ACCW'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q      <= 1'b0;
      k_q        <= '0;
      d_q        <= '0;
      coef_q     <= '0;
      ld_en_q    <= TAPS'(1);
      corr_valid <= 1'b0;
      corr       <= '0;
      corr_idx   <= '0;
      for (int j = 0; j < TAPS; j++) begin
        chain_q[j] <= '0;
        dline_q[j] <= '0;
      end
    end else begin
      corr_valid <= 1'b0;
      if (active) begin
        k_q <= k;
        d_q <= d_in;
        // Staggered coefficient load from the serial chip stream.
        if (start) begin
          coef_q[0] <= c_in;
          ld_en_q   <= TAPS'(2);
        end else begin
          if (k <= mlen) begin
            for (int j = 0; j < TAPS; j++)
              if (ld_en_q[j]) coef_q[j] <= c_in;
          end
          ld_en_q <= {ld_en_q[TAPS-2:0], ld_en_q[TAPS-1]};
        end
        // Transposed adder chain.
        chain_q[0] <= prod[0];
        for (int j = 1; j < TAPS; j++)
          chain_q[j] <= chain_q[j-1] + prod[j];
        // Accumulation through the TAPS-deep delay line.
        if (n >= 0 && n < $signed({1'b0, mlen})) begin
          dline_q[0] <= sum;
          for (int j = 1; j < TAPS; j++)
            dline_q[j] <= dline_q[j-1];
          if (n >= $signed({1'b0, mlen}) - (CW+1)'(TAPS)) begin
            corr_valid <= 1'b1;
            corr       <= sum;
            corr_idx   <= $clog2(TAPS)'(n - ($signed({1'b0, mlen}) - (CW+1)'(TAPS)));
          end
        end
        run_q <= (k < mlen + CW'(TAPS + 1));
      end
    end
  end

  assign busy = run_q || corr_valid;

endmodule
